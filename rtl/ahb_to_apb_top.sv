// AHB-to-APB bridge.
//
// An AHB slave that turns each read or write it receives into one transfer on
// an APB, for peripherals that live on a slower, simpler bus. The two buses run
// on independent clocks, HCLK and PCLK, of any frequency and phase relation.
//
// Structure:
//   ahb_response  (HCLK) - state machine: accepts AHB transfers, drives
//                          HREADYOUT, raises PENDWR / PENDRD, waits for PDONE
//   ctrl_transfer (HCLK) - holds address, write data and read data
//   apb_access    (PCLK) - runs the APB setup / enable cycles, decodes PSELx,
//                          waits on PREADY, raises PDONE
//   sync2 x3             - double stage synchronizers: PENDWR and PENDRD into
//                          PCLK, PDONE into HCLK
// Only the three handshake lines cross the clock boundary through
// synchronizers. The holding registers cross unsynchronized: they are loaded
// before the request rises and do not change until the acknowledge returns,
// and the same holds for the read data coming back.
//
// Writes are posted: the AHB master sees a write complete as soon as its data
// is captured, and is held only when it issues a further transfer before the
// APB side has finished. A read holds HREADYOUT low until the APB read data
// is back in the HCLK domain. Each transfer costs the handshake round trip:
// about 2 HCLK + 2 PCLK cycles of synchronizer delay each way plus the two
// (or more, with PREADY) APB cycles.
//
// HREADYIN is the AHB bus's HREADY (the bridge's own HREADYOUT when it is the
// only slave). HRESETn and PRESETn are active low and asynchronous; both
// domains must be reset together. HSIZE and HBURST are not used: every APB
// transfer is a full-width single transfer, and a burst is carried out as its
// sequence of single transfers. No error response (HRESP) is given.
//
// Which parts follow the published bridge and which are this design's own
// choices is said in the header of each submodule.
module ahb_to_apb_top
  import ahb2apb_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned NUM_SLAVES = 4,
  parameter int unsigned SEL_LSB    = 12,
  parameter int unsigned SEL_BITS   = 3
) (
  // AHB side
  input  logic                  HCLK,
  input  logic                  HRESETn,
  input  logic                  HSEL,
  input  logic [1:0]            HTRANS,
  input  logic [ADDR_W-1:0]     HADDR,
  input  logic                  HWRITE,
  input  logic [DATA_W-1:0]     HWDATA,
  input  logic                  HREADYIN,
  output logic                  HREADYOUT,
  output logic [DATA_W-1:0]     HRDATA,
  // APB side
  input  logic                  PCLK,
  input  logic                  PRESETn,
  output logic [NUM_SLAVES-1:0] PSELX,
  output logic                  PENABLE,
  output logic [ADDR_W-1:0]     PADDR,
  output logic                  PWRITE,
  output logic [DATA_W-1:0]     PWDATA,
  input  logic [DATA_W-1:0]     PRDATA,
  input  logic                  PREADY
);

  // AHB-domain control
  logic              cap_addr, load_h, h_src_bus, load_wdata, load_rdata;
  logic              hwrite_reg;
  // crossing signals
  logic              pendwr, pendrd, pdone;
  logic              pendwr_sync, pendrd_sync, pdone_sync;
  logic [ADDR_W-1:0] h_addr;
  logic [DATA_W-1:0] h_wdata;
  logic [DATA_W-1:0] p_rdata;

  ahb_response u_ahb_response (
    .hclk       (HCLK),
    .hresetn    (HRESETn),
    .hsel       (HSEL),
    .htrans     (HTRANS),
    .hwrite     (HWRITE),
    .hreadyin   (HREADYIN),
    .hreadyout  (HREADYOUT),
    .hwrite_reg (hwrite_reg),
    .pendwr     (pendwr),
    .pendrd     (pendrd),
    .pdone_sync (pdone_sync),
    .cap_addr   (cap_addr),
    .load_h     (load_h),
    .h_src_bus  (h_src_bus),
    .load_wdata (load_wdata),
    .load_rdata (load_rdata),
    .state      ()
  );

  ctrl_transfer #(
    .ADDR_W (ADDR_W),
    .DATA_W (DATA_W)
  ) u_ctrl_transfer (
    .hclk       (HCLK),
    .hresetn    (HRESETn),
    .haddr      (HADDR),
    .hwrite     (HWRITE),
    .hwdata     (HWDATA),
    .hrdata     (HRDATA),
    .cap_addr   (cap_addr),
    .load_h     (load_h),
    .h_src_bus  (h_src_bus),
    .load_wdata (load_wdata),
    .load_rdata (load_rdata),
    .hwrite_reg (hwrite_reg),
    .h_addr     (h_addr),
    .h_wdata    (h_wdata),
    .p_rdata    (p_rdata)
  );

  sync2 u_sync_pendwr (.clk(PCLK), .rst_n(PRESETn), .d(pendwr), .q(pendwr_sync));
  sync2 u_sync_pendrd (.clk(PCLK), .rst_n(PRESETn), .d(pendrd), .q(pendrd_sync));
  sync2 u_sync_pdone  (.clk(HCLK), .rst_n(HRESETn), .d(pdone),  .q(pdone_sync));

  apb_access #(
    .ADDR_W     (ADDR_W),
    .DATA_W     (DATA_W),
    .NUM_SLAVES (NUM_SLAVES),
    .SEL_LSB    (SEL_LSB),
    .SEL_BITS   (SEL_BITS)
  ) u_apb_access (
    .pclk        (PCLK),
    .presetn     (PRESETn),
    .pendwr_sync (pendwr_sync),
    .pendrd_sync (pendrd_sync),
    .pdone       (pdone),
    .h_addr      (h_addr),
    .h_wdata     (h_wdata),
    .p_rdata     (p_rdata),
    .pselx       (PSELX),
    .penable     (PENABLE),
    .paddr       (PADDR),
    .pwrite      (PWRITE),
    .pwdata      (PWDATA),
    .prdata      (PRDATA),
    .pready      (PREADY),
    .pstate      ()
  );

endmodule
