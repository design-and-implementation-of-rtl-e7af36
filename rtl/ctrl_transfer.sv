// Control transfer: the HCLK-domain registers of the AHB-to-APB bridge.
//
// The bridge buffers the AHB address, control and data before it drives the
// APB. This block holds them in two stages:
//   - addr_reg / hwrite_reg: the address phase last accepted on the AHB. For a
//     write it waits here for the data phase; it is also where a "pending"
//     transfer waits while the APB is still busy with the previous one.
//   - h_addr / h_wdata: the address and write data handed to the APB clock
//     domain. They are loaded only while no request is outstanding and stay
//     still while PENDWR or PENDRD is up, so the APB side may sample them
//     directly once its synchronized request arrives.
// On the way back, hrdata captures the read data the APB side holds while its
// PDONE is up.
//
// Which register loads when is decided by ahb_response; all loads take effect
// at the rising HCLK edge. The two-stage split and the reset values (all zero)
// are this design's choices.
module ctrl_transfer #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32
) (
  input  logic              hclk,
  input  logic              hresetn,
  // AHB
  input  logic [ADDR_W-1:0] haddr,
  input  logic              hwrite,
  input  logic [DATA_W-1:0] hwdata,
  output logic [DATA_W-1:0] hrdata,
  // control from ahb_response
  input  logic              cap_addr,
  input  logic              load_h,
  input  logic              h_src_bus,
  input  logic              load_wdata,
  input  logic              load_rdata,
  output logic              hwrite_reg,
  // to / from the APB domain
  output logic [ADDR_W-1:0] h_addr,
  output logic [DATA_W-1:0] h_wdata,
  input  logic [DATA_W-1:0] p_rdata
);

  logic [ADDR_W-1:0] addr_reg;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      addr_reg   <= '0;
      hwrite_reg <= 1'b0;
      h_addr     <= '0;
      h_wdata    <= '0;
      hrdata     <= '0;
    end else begin
      if (cap_addr) begin
        addr_reg   <= haddr;
        hwrite_reg <= hwrite;
      end
      if (load_h)     h_addr  <= h_src_bus ? haddr : addr_reg;
      if (load_wdata) h_wdata <= hwdata;
      if (load_rdata) hrdata  <= p_rdata;
    end
  end

endmodule
