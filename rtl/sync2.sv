// Double stage synchronizer.
//
// Brings a single-bit level from another clock domain into the domain of clk
// through two flip-flops in series. The first flop may go metastable when its
// input changes near a clock edge; the second gives it a full clock period to
// settle before the value is used. The bridge uses one of these for each
// handshake line: PENDWR and PENDRD into the PCLK domain, PDONE into the HCLK
// domain, as in the bridge's synchronizer diagram.
//
// Interface: d is the asynchronous input, q follows it two rising edges of clk
// later. Both flops clear on the active-low reset of the receiving domain (the
// reset value is this design's choice).
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
