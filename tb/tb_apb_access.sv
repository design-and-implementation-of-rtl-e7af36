// Testbench for apb_access, the PCLK-domain APB sequencer of the bridge.
//
// The testbench plays both neighbours: the AHB side (it sets the holding
// address and data, raises the synchronized PENDWR or PENDRD, waits for PDONE,
// drops the request) and the peripherals (four small register files behind
// PSELx[0..3], each transfer with a random number of PREADY wait cycles).
// Random reads and writes go to known and unknown peripheral slots. Checked
// for each transfer, cycle by cycle: the setup cycle (one expected PSELx line
// or none, PENABLE low, PADDR, PWRITE, PWDATA), the enable cycles, PDONE
// exactly 2 + wait cycles after the request is seen, the read data returned
// (zero at an unknown slot), and PDONE falling one cycle after the request.
module tb_apb_access;
  import ahb2apb_pkg::*;

  localparam int AW = 32;
  localparam int DW = 32;
  localparam int NS = 4;
  localparam int SEL_LSB = 12;
  localparam int SEL_BITS = 3;

  logic          pclk = 1'b0;
  logic          presetn = 1'b0;
  logic          pendwr_sync = 1'b0, pendrd_sync = 1'b0;
  logic          pdone;
  logic [AW-1:0] h_addr = '0;
  logic [DW-1:0] h_wdata = '0, p_rdata;
  logic [NS-1:0] pselx;
  logic          penable, pwrite, pready;
  logic [AW-1:0] paddr;
  logic [DW-1:0] pwdata, prdata;
  apb_state_t    pstate;
  int            checks = 0, failures = 0;

  apb_access #(.ADDR_W(AW), .DATA_W(DW), .NUM_SLAVES(NS), .SEL_LSB(SEL_LSB), .SEL_BITS(SEL_BITS))
    dut (.*);

  always #5 pclk = ~pclk;

  // ---------------- peripheral models ----------------
  logic [DW-1:0] mem [NS][16];
  int            wait_cfg = 0;
  int            wait_cnt = 0;
  int            sel_idx;

  always_comb begin
    sel_idx = 0;
    for (int i = 0; i < NS; i++) if (pselx[i]) sel_idx = i;
  end
  assign pready = (wait_cnt == 0);
  assign prdata = (pselx != '0) ? mem[sel_idx][paddr[5:2]] : 32'hDEAD_BEEF;

  always @(posedge pclk) begin
    if (pselx != '0 && !penable) wait_cnt <= wait_cfg;
    else if (penable && wait_cnt != 0) wait_cnt <= wait_cnt - 1;
    if (pselx != '0 && penable && pready && pwrite) mem[sel_idx][paddr[5:2]] <= pwdata;
  end

  // ---------------- reference ----------------
  logic [DW-1:0] ref_mem [NS][16];

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic transfer(input bit wr, input int slot, input int idx, input logic [31:0] data,
                          input int waits);
    logic [AW-1:0] a;
    logic [NS-1:0] exp_sel;
    logic [DW-1:0] exp_rd;
    int            n;
    a = '0;
    a[SEL_LSB +: SEL_BITS] = SEL_BITS'(slot);
    a[5:2] = 4'(idx);
    a[31:24] = 8'($urandom);      // bits the decoder must ignore
    exp_sel = (slot < NS) ? NS'(1 << slot) : '0;
    exp_rd  = (slot < NS) ? ref_mem[slot][idx] : '0;
    @(negedge pclk);
    wait_cfg = waits;
    h_addr  = a;
    h_wdata = data;
    pendwr_sync = wr;
    pendrd_sync = !wr;
    @(posedge pclk); #1;   // request seen -> setup
    check("setup state", 32'(pstate), 32'(P_SETUP));
    check("setup psel", 32'(pselx), 32'(exp_sel));
    check("setup penable", 32'(penable), 0);
    check("paddr", paddr, a);
    check("pwrite", 32'(pwrite), 32'(wr));
    if (wr) check("pwdata", pwdata, data);
    n = 1;
    @(posedge pclk); #1;
    check("enable penable", 32'(penable), 1);
    check("enable psel", 32'(pselx), 32'(exp_sel));
    while (!pdone && n < 40) begin
      @(posedge pclk); #1;
      n++;
    end
    check("cycles to pdone", n, 2 + ((slot < NS) ? waits : 0));
    check("done penable", 32'(penable), 0);
    check("done psel", 32'(pselx), 0);
    if (!wr) check("read data", p_rdata, exp_rd);
    if (wr && slot < NS) ref_mem[slot][idx] = data;
    // hold the request a little, then release it
    repeat ($urandom_range(2, 0)) begin
      @(posedge pclk); #1;
      check("pdone held", 32'(pdone), 1);
    end
    @(negedge pclk);
    pendwr_sync = 1'b0;
    pendrd_sync = 1'b0;
    @(posedge pclk); #1;
    check("pdone released", 32'(pdone), 0);
    check("back to idle", 32'(pstate), 32'(P_IDLE));
  endtask

  initial begin
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < 16; i++) begin
        mem[s][i] = 32'(s * 256 + i);
        ref_mem[s][i] = 32'(s * 256 + i);
      end
    #22 presetn = 1'b1;
    repeat (300) begin
      transfer($urandom_range(1, 0) != 0, $urandom_range(7, 0), $urandom_range(15, 0),
               $urandom, $urandom_range(3, 0));
    end
    // read back everything
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < 16; i++) transfer(1'b0, s, i, '0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
