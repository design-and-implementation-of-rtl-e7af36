// Behavioural model of the peripherals on the bridge's APB (test use only).
//
// NUM_SLAVES register files of 64 words each, one behind each PSELx line,
// addressed by PADDR[7:2]. Peripheral n inserts WAIT_BASE * n wait cycles
// plus a random 0..WAIT_RAND more on each transfer by holding PREADY low in
// the enable phase. Writes take effect at the end of the enable phase; read
// data is driven while the peripheral is selected. The model also checks the
// APB rules it can see (a setup cycle before every enable, stable address and
// control through the transfer) and counts transfers and wait cycles.
module apb_slave_model #(
  parameter int NUM_SLAVES = 4,
  parameter int ADDR_W     = 32,
  parameter int DATA_W     = 32,
  parameter int WAIT_BASE  = 1,
  parameter int WAIT_RAND  = 1
) (
  input  logic                  pclk,
  input  logic                  presetn,
  input  logic [NUM_SLAVES-1:0] pselx,
  input  logic                  penable,
  input  logic [ADDR_W-1:0]     paddr,
  input  logic                  pwrite,
  input  logic [DATA_W-1:0]     pwdata,
  output logic [DATA_W-1:0]     prdata,
  output logic                  pready
);

  logic [DATA_W-1:0] mem [NUM_SLAVES][64];
  int                sel;
  int                wait_cnt = 0;
  int                writes = 0, reads = 0, wait_cycles = 0, protocol_errors = 0;
  int                unselected = 0;
  logic [ADDR_W-1:0] last_addr;
  logic              last_write;
  logic              active = 1'b0;   // between a setup cycle and the end of its transfer

  always_comb begin
    sel = 0;
    for (int i = 0; i < NUM_SLAVES; i++) if (pselx[i]) sel = i;
  end

  assign pready = (wait_cnt == 0);
  assign prdata = (pselx != '0) ? mem[sel][paddr[7:2]] : '0;

  initial
    for (int s = 0; s < NUM_SLAVES; s++)
      for (int i = 0; i < 64; i++) mem[s][i] = DATA_W'(32'hA000_0000 + s * 256 + i);

  always @(posedge pclk) begin
    if (presetn) begin
      if (pselx != '0 && !penable) begin
        wait_cnt   <= WAIT_BASE * sel + $urandom_range(WAIT_RAND, 0);
        if (active) protocol_errors++;
        active     <= 1'b1;
        last_addr  <= paddr;
        last_write <= pwrite;
      end
      if (pselx != '0 && penable) begin
        if (!active) protocol_errors++;
        if (wait_cnt == 0) active <= 1'b0;
        if (paddr != last_addr || pwrite != last_write) protocol_errors++;
        if (wait_cnt != 0) begin
          wait_cnt <= wait_cnt - 1;
          wait_cycles++;
        end else if (pwrite) begin
          mem[sel][paddr[7:2]] <= pwdata;
          writes++;
        end else begin
          reads++;
        end
      end
      if (pselx == '0 && penable) unselected++;
    end
  end

endmodule
