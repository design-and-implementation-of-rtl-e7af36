// APB access: the PCLK-domain side of the AHB-to-APB bridge.
//
// It waits for a synchronized request from the AHB side (PENDWR for a write,
// PENDRD for a read), then runs one APB transfer: a setup cycle with one
// PSELx line up and PENABLE low, then enable cycles with PENABLE high until the
// peripheral's PREADY is high. On the last enable cycle it captures PRDATA for
// a read and raises PDONE. PDONE stays up until the request has dropped, then
// falls and the block is idle again (four-phase handshake).
//
// Address, write data and direction are taken from the AHB side's holding
// registers when the synchronized request is seen; those registers do not
// change while a request is up. The APB outputs are all registered.
//
// Peripheral selection: the field PADDR[SEL_LSB +: SEL_BITS] numbers the
// peripheral; PSELx[n] is raised for n < NUM_SLAVES, and no PSELx at all for
// any other value (an unknown location). Such a transfer still runs its setup
// and enable cycles, does not wait for PREADY, and reads as zero.
//
// Timing: from the synchronized request to PDONE takes 2 + (PREADY wait)
// PCLK cycles: one setup, at least one enable, PDONE registered on the edge
// that ends the last enable cycle.
//
// Four peripheral selects follow the bridge's published port list; the
// address field, the PREADY wait (the bridge is to serve peripherals that need
// extra wait states) and the behaviour at an unknown address in detail are
// this design's choices.
module apb_access
  import ahb2apb_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned NUM_SLAVES = 4,
  parameter int unsigned SEL_LSB    = 12,
  parameter int unsigned SEL_BITS   = 3
) (
  input  logic                  pclk,
  input  logic                  presetn,
  // handshake with the AHB domain
  input  logic                  pendwr_sync,
  input  logic                  pendrd_sync,
  output logic                  pdone,
  input  logic [ADDR_W-1:0]     h_addr,
  input  logic [DATA_W-1:0]     h_wdata,
  output logic [DATA_W-1:0]     p_rdata,
  // APB
  output logic [NUM_SLAVES-1:0] pselx,
  output logic                  penable,
  output logic [ADDR_W-1:0]     paddr,
  output logic                  pwrite,
  output logic [DATA_W-1:0]     pwdata,
  input  logic [DATA_W-1:0]     prdata,
  input  logic                  pready,
  // observation
  output apb_state_t            pstate
);

  logic [NUM_SLAVES-1:0] sel_dec;
  logic [SEL_BITS-1:0]   slot;
  logic                  req;
  logic                  ready_eff;

  assign slot      = h_addr[SEL_LSB +: SEL_BITS];
  assign req       = pendwr_sync || pendrd_sync;
  assign ready_eff = (pselx == '0) || pready;

  always_comb begin
    sel_dec = '0;
    for (int unsigned i = 0; i < NUM_SLAVES; i++)
      if (slot == SEL_BITS'(i)) sel_dec[i] = 1'b1;
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      pstate  <= P_IDLE;
      pselx   <= '0;
      penable <= 1'b0;
      paddr   <= '0;
      pwrite  <= 1'b0;
      pwdata  <= '0;
      pdone   <= 1'b0;
      p_rdata <= '0;
    end else begin
      unique case (pstate)
        P_IDLE: begin
          if (req) begin
            pstate <= P_SETUP;
            pselx  <= sel_dec;
            paddr  <= h_addr;
            pwrite <= pendwr_sync;
            if (pendwr_sync) pwdata <= h_wdata;
          end
        end
        P_SETUP: begin
          pstate  <= P_ENABLE;
          penable <= 1'b1;
        end
        P_ENABLE: begin
          if (ready_eff) begin
            pstate  <= P_DONE;
            penable <= 1'b0;
            pselx   <= '0;
            pdone   <= 1'b1;
            if (!pwrite) p_rdata <= (pselx == '0) ? '0 : prdata;
          end
        end
        P_DONE: begin
          if (!req) begin
            pstate <= P_IDLE;
            pdone  <= 1'b0;
          end
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end

  // APB rules: at most one peripheral selected; PENABLE only with a select or
  // an unknown-address transfer in its enable phase; address and control
  // stable from setup to the end of the transfer.
  a_onehot_sel: assert property (@(posedge pclk) disable iff (!presetn) $onehot0(pselx));
  a_enable_after_setup: assert property (@(posedge pclk) disable iff (!presetn)
    (pstate == P_SETUP) |=> penable);
  a_stable_in_enable: assert property (@(posedge pclk) disable iff (!presetn)
    penable |-> ($stable(paddr) && $stable(pwrite) && $stable(pselx)));

endmodule
