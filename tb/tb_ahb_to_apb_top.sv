// End-to-end testbench of the AHB-to-APB bridge, at its default parameters.
//
// A pipelined AHB master (address phase of one transfer overlapping the data
// phase of the one before, SEQ for back-to-back transfers) drives the bridge;
// four behavioural peripherals with wait states sit on the APB. The run goes
// through four clock set-ups, each after a reset of both domains:
//   A  PCLK at half the HCLK frequency: a write burst to seven registers, a
//      rewrite of register 2 with 0x80, the read burst back, then random
//      traffic;
//   B  same frequency, PCLK a quarter period behind: a single write and its
//      read-back, then random traffic;
//   C  PCLK faster than HCLK (period 14 against 20), random traffic;
//   D  PCLK much slower (period 74 against 20), random traffic.
// Checks: every read returns the value a reference memory model predicts
// (zero at an unknown peripheral address); every APB transfer matches, in
// order, the AHB transfer it came from (address, direction, write data, the
// one PSELx line or none); the peripherals see no APB rule broken.
// Mechanism counters (each must be non-zero): reads, posted writes, SEQ
// bursts, AHB wait cycles, pending transfers (ST_WRITEP, ST_WENABLEP), every
// state, APB wait cycles, unknown-address transfers, and handshake round trips.
module tb_ahb_to_apb_top;
  import ahb2apb_pkg::*;

  localparam int AW = 32;
  localparam int DW = 32;
  localparam int NS = 4;

  // ---------------- clocks ----------------
  logic HCLK = 1'b0, PCLK = 1'b0;
  longint hhalf = 10, phalf = 20, poff = 0;
  longint tick = 0;
  always begin
    #1;
    tick++;
    HCLK = ((tick / hhalf) % 2) == 1;
    PCLK = (((tick + poff) / phalf) % 2) == 1;
  end

  // ---------------- DUT and peripherals ----------------
  logic          HRESETn = 1'b0, PRESETn = 1'b0;
  logic          HSEL = 1'b0, HWRITE = 1'b0;
  logic [1:0]    HTRANS = HTRANS_IDLE;
  logic [AW-1:0] HADDR = '0;
  logic [DW-1:0] HWDATA = '0, HRDATA;
  logic          HREADYOUT;
  logic [NS-1:0] PSELX;
  logic          PENABLE, PWRITE, PREADY;
  logic [AW-1:0] PADDR;
  logic [DW-1:0] PWDATA, PRDATA;

  ahb_to_apb_top dut (
    .HCLK, .HRESETn, .HSEL, .HTRANS, .HADDR, .HWRITE, .HWDATA,
    .HREADYIN(HREADYOUT), .HREADYOUT, .HRDATA,
    .PCLK, .PRESETn, .PSELX, .PENABLE, .PADDR, .PWRITE, .PWDATA, .PRDATA, .PREADY
  );

  apb_slave_model #(.NUM_SLAVES(NS), .ADDR_W(AW), .DATA_W(DW), .WAIT_BASE(1), .WAIT_RAND(1))
    u_periph (.pclk(PCLK), .presetn(PRESETn), .pselx(PSELX), .penable(PENABLE), .paddr(PADDR),
              .pwrite(PWRITE), .pwdata(PWDATA), .prdata(PRDATA), .pready(PREADY));

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------- stimulus and reference ----------------
  typedef struct {
    bit            write;
    bit            seq;
    int            gap;       // idle cycles before this transfer
    logic [AW-1:0] addr;
    logic [DW-1:0] data;      // write data, or expected read data
  } xfer_t;

  xfer_t         issue_q [$];
  xfer_t         apb_q [$];    // expected APB transfers, in order
  logic [DW-1:0] ref_mem [NS][64];

  function automatic logic [AW-1:0] mk_addr(int slot, int idx);
    logic [AW-1:0] a = '0;
    a[14:12] = 3'(slot);
    a[7:2]   = 6'(idx);
    return a;
  endfunction

  // queue one transfer, updating the reference memory in program order
  task automatic push(bit wr, int slot, int idx, logic [DW-1:0] wdata, int gap, bit seq);
    xfer_t x;
    x.write = wr;
    x.seq   = seq;
    x.gap   = gap;
    x.addr  = mk_addr(slot, idx);
    if (wr) begin
      x.data = wdata;
      if (slot < NS) ref_mem[slot][idx] = wdata;
    end else begin
      x.data = (slot < NS) ? ref_mem[slot][idx] : '0;
    end
    issue_q.push_back(x);
    apb_q.push_back(x);
  endtask

  task automatic push_random(int n);
    bit prev_busy = 0;
    for (int i = 0; i < n; i++) begin
      int gap = ($urandom_range(3, 0) == 0) ? $urandom_range(4, 1) : 0;
      int slot = ($urandom_range(6, 0) == 0) ? $urandom_range(7, 4) : $urandom_range(3, 0);
      push($urandom_range(1, 0) != 0, slot, $urandom_range(15, 0), $urandom, gap,
           prev_busy && gap == 0);
      prev_busy = 1;
    end
  endtask

  // ---------------- pipelined AHB master ----------------
  bit    ap_v = 0, dp_v = 0;
  xfer_t ap, dp;
  int    completed = 0, reads_checked = 0, seq_xfers = 0;
  int    stall = 0;                        // HREADY-low cycles of the current data phase
  int    rd_wait_min = 1 << 30, rd_wait_max = 0;

  always @(posedge HCLK) begin
    if (!HRESETn) begin
      ap_v = 0;
      dp_v = 0;
      HTRANS <= HTRANS_IDLE;
      HSEL   <= 1'b0;
    end else if (!HREADYOUT) begin
      stall++;
    end else begin
      // the data phase in progress completes at this edge
      if (dp_v) begin
        completed++;
        if (!dp.write) begin
          reads_checked++;
          check($sformatf("HRDATA of read at %h", dp.addr), HRDATA, dp.data);
          if (stall < rd_wait_min) rd_wait_min = stall;
          if (stall > rd_wait_max) rd_wait_max = stall;
        end
      end
      stall = 0;
      dp_v = ap_v;
      dp   = ap;
      ap_v = 0;
      if (issue_q.size() != 0) begin
        if (issue_q[0].gap > 0) begin
          issue_q[0].gap--;
        end else begin
          ap   = issue_q.pop_front();
          ap_v = 1;
        end
      end
      HSEL   <= ap_v ? 1'b1 : 1'($urandom_range(1, 0));
      HTRANS <= !ap_v ? HTRANS_IDLE : (ap.seq ? HTRANS_SEQ : HTRANS_NONSEQ);
      HADDR  <= ap_v ? ap.addr : AW'($urandom);
      HWRITE <= ap_v ? ap.write : 1'($urandom_range(1, 0));
      HWDATA <= (dp_v && dp.write) ? dp.data : DW'($urandom);
      if (ap_v && ap.seq) seq_xfers++;
    end
  end

  // ---------------- APB monitor ----------------
  int apb_xfers = 0, unknown_xfers = 0;
  always @(posedge PCLK) begin
    if (PRESETn && PENABLE && (PSELX == '0 || PREADY)) begin
      apb_xfers++;
      if (apb_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL APB transfer with none expected at %0t", $time);
      end else begin
        automatic xfer_t e = apb_q.pop_front();
        automatic int slot = int'(e.addr[14:12]);
        check("PADDR", PADDR, e.addr);
        check("PWRITE", 32'(PWRITE), 32'(e.write));
        check("PSELX", 32'(PSELX), (slot < NS) ? (32'd1 << slot) : 32'd0);
        if (e.write) check("PWDATA", PWDATA, e.data);
        if (slot >= NS) unknown_xfers++;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int state_seen [8];
  int ahb_wait_cycles = 0, posted_writes = 0, apb_wait_cycles = 0, handshakes = 0;
  ahb_state_t st;
  assign st = dut.u_ahb_response.state;
  always @(posedge HCLK) begin
    if (HRESETn) begin
      state_seen[int'(st)]++;
      if (!HREADYOUT) ahb_wait_cycles++;
      if (st == ST_WWAIT && HREADYOUT) posted_writes++;
      if (dut.pdone_sync && (dut.pendwr || dut.pendrd)) handshakes++;
    end
  end
  always @(posedge PCLK) if (PRESETn && PENABLE && PSELX != '0 && !PREADY) apb_wait_cycles++;

  // ---------------- scenarios ----------------
  task automatic run_scenario(string name, int hh, int ph, int off, int n_random, int kind);
    int t0;
    HRESETn = 1'b0;
    PRESETn = 1'b0;
    hhalf = hh;
    phalf = ph;
    poff  = off;
    repeat (4) @(posedge PCLK);
    repeat (2) @(posedge HCLK);
    @(negedge HCLK);
    HRESETn = 1'b1;
    PRESETn = 1'b1;
    if (kind == 0) begin
      // write burst to seven registers, then read them back as a burst
      for (int i = 1; i <= 7; i++) push(1, 0, i, 32'(i), 0, i != 1);
      push(1, 0, 2, 32'h80, 0, 1);
      for (int i = 1; i <= 7; i++) push(0, 0, i, '0, (i == 1) ? 2 : 0, i != 1);
    end else if (kind == 1) begin
      push(1, 1, 1, 32'h0000_0001, 2, 0);
      push(0, 1, 1, '0, 4, 0);
    end
    push_random(n_random);
    t0 = completed;
    while ((issue_q.size() != 0 || dp_v || ap_v || apb_q.size() != 0) && completed - t0 < 100000)
      @(posedge HCLK);
    repeat (30) @(posedge HCLK);
    check({"scenario ", name, " drained"}, 32'(apb_q.size() + issue_q.size()), 0);
    $display("scenario %s done: %0d AHB transfers completed so far; read wait cycles min %0d max %0d",
             name, completed, rd_wait_min, rd_wait_max);
    rd_wait_min = 1 << 30;
    rd_wait_max = 0;
  endtask

  initial begin
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < 64; i++) ref_mem[s][i] = DW'(32'hA000_0000 + s * 256 + i);
    run_scenario("A (PCLK = HCLK/2)", 10, 20, 0, 150, 0);
    run_scenario("B (same frequency, 90 degrees)", 10, 10, 5, 150, 1);
    run_scenario("C (PCLK faster)", 10, 7, 3, 150, 2);
    run_scenario("D (PCLK much slower)", 10, 37, 11, 100, 2);

    check("peripheral protocol errors", 32'(u_periph.protocol_errors), 0);
    begin
      automatic string names [8] = '{"ST_IDLE", "ST_READ", "ST_RENABLE", "ST_WWAIT", "ST_WRITE",
                           "ST_WENABLE", "ST_WRITEP", "ST_WENABLEP"};
      for (int i = 0; i < 8; i++) begin
        $display("  state %-12s cycles %0d", names[i], state_seen[i]);
        checks++;
        if (state_seen[i] == 0) begin failures++; $display("FAIL state %s never entered", names[i]); end
      end
    end
    $display("  reads checked %0d, posted writes %0d, SEQ transfers %0d", reads_checked, posted_writes, seq_xfers);
    $display("  AHB wait cycles %0d, APB wait cycles %0d, unknown-address transfers %0d",
             ahb_wait_cycles, apb_wait_cycles, unknown_xfers);
    $display("  handshake round trips %0d, APB transfers %0d", handshakes, apb_xfers);
    checks += 7;
    if (reads_checked == 0)   begin failures++; $display("FAIL no read"); end
    if (posted_writes == 0)   begin failures++; $display("FAIL no posted write"); end
    if (seq_xfers == 0)       begin failures++; $display("FAIL no burst"); end
    if (ahb_wait_cycles == 0) begin failures++; $display("FAIL no AHB wait cycle"); end
    if (apb_wait_cycles == 0) begin failures++; $display("FAIL no APB wait cycle"); end
    if (unknown_xfers == 0)   begin failures++; $display("FAIL no unknown-address transfer"); end
    if (handshakes == 0)      begin failures++; $display("FAIL no handshake"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
