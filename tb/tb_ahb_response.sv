// Testbench for ahb_response, the bridge's HCLK-domain state machine.
//
// A random AHB master, alternating busy and sparse stretches (IDLE, NONSEQ and SEQ transfers, reads and writes,
// occasionally deselected) drives the block, HREADYIN is its own HREADYOUT,
// and a model of the APB side answers each PENDWR/PENDRD with PDONE after a
// random delay of 1..5 cycles and drops PDONE after the request falls.
// Two kinds of checks run:
//   - cycle level: a reference state machine, written from the published
//     transition table and the four-phase handshake rule, predicts state,
//     HREADYOUT, PENDWR and PENDRD on every cycle;
//   - transfer level: every transfer accepted on the AHB must produce exactly
//     one request, of the right kind, in order.
// Each of the 16 published transitions (and each state) must be taken at
// least once, or the run counts a failure.
module tb_ahb_response;
  import ahb2apb_pkg::*;

  logic       hclk = 1'b0;
  logic       hresetn = 1'b0;
  logic       hsel = 1'b0;
  logic [1:0] htrans = HTRANS_IDLE;
  logic       hwrite = 1'b0;
  logic       hreadyin, hreadyout;
  logic       hwrite_reg = 1'b0;
  logic       pendwr, pendrd;
  logic       pdone_sync = 1'b0;
  logic       cap_addr, load_h, h_src_bus, load_wdata, load_rdata;
  ahb_state_t state;
  int         checks = 0, failures = 0;

  ahb_response dut (.*);

  assign hreadyin = hreadyout;
  always #5 hclk = ~hclk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------- reference model ----------------
  ahb_state_t m_state = ST_IDLE;
  logic       m_held = 1'b0, m_pwr = 1'b0, m_prd = 1'b0, m_hwr = 1'b0;
  int         trans_cnt [string];
  string      req_tr [] = '{"ST_IDLE>ST_READ", "ST_IDLE>ST_WWAIT", "ST_IDLE>ST_IDLE",
      "ST_READ>ST_RENABLE", "ST_RENABLE>ST_WWAIT", "ST_RENABLE>ST_READ", "ST_RENABLE>ST_IDLE",
      "ST_WWAIT>ST_WRITEP", "ST_WWAIT>ST_WRITE", "ST_WRITE>ST_WENABLE", "ST_WRITE>ST_WENABLEP",
      "ST_WENABLE>ST_READ", "ST_WENABLE>ST_WWAIT", "ST_WENABLE>ST_IDLE", "ST_WRITEP>ST_WENABLEP",
      "ST_WENABLEP>ST_WRITE", "ST_WENABLEP>ST_WRITEP", "ST_WENABLEP>ST_READ"};

  function automatic logic m_hready(ahb_state_t s, logic held, logic hwr);
    case (s)
      ST_IDLE, ST_RENABLE, ST_WENABLE, ST_WWAIT: return 1'b1;
      ST_WRITE:    return !held;
      ST_WENABLEP: return hwr;
      default:     return 1'b0;
    endcase
  endfunction

  // transfer-level bookkeeping
  bit  exp_q [$];      // 1 = write, in order of acceptance
  int  accepted = 0, requests = 0;

  always @(posedge hclk) begin
    if (hresetn) begin
      automatic logic v = hsel && hreadyin && htrans[1];
      automatic logic pend = m_pwr || m_prd;
      automatic logic setup = (m_state == ST_READ) || (m_state == ST_WRITE) || (m_state == ST_WRITEP);
      automatic logic done = setup && pend && pdone_sync;
      automatic logic raise = setup && !pend && !pdone_sync;
      automatic ahb_state_t nx = m_state;
      // compare the block with the model (values before this edge)
      check("state", int'(state), int'(m_state));
      check("hreadyout", int'(hreadyout), int'(m_hready(m_state, m_held, m_hwr)));
      check("pendwr", int'(pendwr), int'(m_pwr));
      check("pendrd", int'(pendrd), int'(m_prd));
      // transfer level
      if (v) begin exp_q.push_back(hwrite); accepted++; end
      case (m_state)
        ST_IDLE, ST_RENABLE, ST_WENABLE: nx = v ? (hwrite ? ST_WWAIT : ST_READ) : ST_IDLE;
        ST_WWAIT:    nx = v ? ST_WRITEP : ST_WRITE;
        ST_READ:     nx = done ? ST_RENABLE : ST_READ;
        ST_WRITE:    nx = done ? ((m_held || v) ? ST_WENABLEP : ST_WENABLE) : ST_WRITE;
        ST_WRITEP:   nx = done ? ST_WENABLEP : ST_WRITEP;
        ST_WENABLEP: nx = m_hwr ? (v ? ST_WRITEP : ST_WRITE) : ST_READ;
        default:     nx = ST_IDLE;
      endcase
      if (nx != m_state || !setup) trans_cnt[{m_state.name(), ">", nx.name()}]++;
      m_held = (m_state == ST_WRITE) && (nx == ST_WRITE) && (m_held || v);
      if (raise) begin
        m_prd = (m_state == ST_READ);
        m_pwr = (m_state != ST_READ);
      end else if (done) begin
        m_prd = 1'b0;
        m_pwr = 1'b0;
      end
      if (v) m_hwr = hwrite;
      m_state = nx;
      // a new request must match the oldest accepted transfer
      if (raise) begin
        requests++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL request with no accepted transfer at %0t", $time);
        end else if (exp_q.pop_front() != (m_state != ST_READ)) begin
          failures++; $display("FAIL request of the wrong kind at %0t", $time);
        end
      end
    end
  end

  // ctrl_transfer's hwrite_reg
  always @(posedge hclk) if (cap_addr) hwrite_reg <= hwrite;

  // ---------------- APB side model ----------------
  initial begin
    forever begin
      @(posedge hclk);
      if (pendwr || pendrd) begin
        repeat ($urandom_range(4, 0)) @(posedge hclk);
        pdone_sync <= 1'b1;
        while (pendwr || pendrd) @(posedge hclk);
        repeat ($urandom_range(4, 0)) @(posedge hclk);
        pdone_sync <= 1'b0;
      end
    end
  end

  // ---------------- AHB master ----------------
  logic acc;   // HREADY at the last edge: the master may move on
  always @(posedge hclk) acc <= hreadyout;
  initial begin
    #22 hresetn = 1'b1;
    for (int c = 0; c < 40000; c++) begin
      @(negedge hclk);
      if (acc) begin
        // alternate busy stretches with sparse ones of mostly idle cycles
        case (((c / 300) % 2 == 1) ? $urandom_range(9, 0) : $urandom_range(1, 0) * 3)
          0, 1:    htrans = HTRANS_IDLE;
          2:       htrans = HTRANS_BUSY;
          3, 4, 5: htrans = HTRANS_NONSEQ;
          default: htrans = HTRANS_SEQ;
        endcase
        hsel   = $urandom_range(9, 0) != 0;
        hwrite = $urandom_range(1, 0) != 0;
      end
    end
    // let the last transfers finish
    htrans = HTRANS_IDLE;
    repeat (50) @(negedge hclk);
    check("all accepted transfers requested", exp_q.size(), 0);
    foreach (req_tr[k]) begin
      checks++;
      if (!trans_cnt.exists(req_tr[k])) begin
        failures++;
        $display("FAIL transition %s never taken", req_tr[k]);
      end
    end
    $display("accepted=%0d requests=%0d", accepted, requests);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
