// Testbench for ctrl_transfer, the bridge's HCLK-domain holding registers.
//
// Applies random bus values and random load strobes for many cycles and checks
// every output against a reference model kept in the testbench: the latched
// address phase, the APB holding address (from the bus or from the latched
// address), the write data and the returned read data.
module tb_ctrl_transfer;

  localparam int AW = 32;
  localparam int DW = 32;

  logic          hclk = 1'b0;
  logic          hresetn = 1'b0;
  logic [AW-1:0] haddr;
  logic          hwrite;
  logic [DW-1:0] hwdata, hrdata, h_wdata, p_rdata;
  logic          cap_addr, load_h, h_src_bus, load_wdata, load_rdata, hwrite_reg;
  logic [AW-1:0] h_addr;
  int            checks = 0, failures = 0;

  // reference
  logic [AW-1:0] m_addr_reg, m_h_addr;
  logic          m_hwrite_reg;
  logic [DW-1:0] m_h_wdata, m_hrdata;

  ctrl_transfer #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 hclk = ~hclk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    {haddr, hwrite, hwdata, p_rdata} = '0;
    {cap_addr, load_h, h_src_bus, load_wdata, load_rdata} = '0;
    m_addr_reg = '0; m_h_addr = '0; m_hwrite_reg = 1'b0; m_h_wdata = '0; m_hrdata = '0;
    #12 hresetn = 1'b1;
    repeat (2000) begin
      @(negedge hclk);
      haddr      = $urandom;
      hwrite     = $urandom_range(1, 0) != 0;
      hwdata     = $urandom;
      p_rdata    = $urandom;
      cap_addr   = $urandom_range(1, 0) != 0;
      load_h     = $urandom_range(1, 0) != 0;
      h_src_bus  = $urandom_range(1, 0) != 0;
      load_wdata = $urandom_range(1, 0) != 0;
      load_rdata = $urandom_range(1, 0) != 0;
      // model the next edge
      if (load_h)     m_h_addr = h_src_bus ? haddr : m_addr_reg;
      if (cap_addr)   begin m_addr_reg = haddr; m_hwrite_reg = hwrite; end
      if (load_wdata) m_h_wdata = hwdata;
      if (load_rdata) m_hrdata = p_rdata;
      @(posedge hclk);
      #1;
      check("h_addr", h_addr, m_h_addr);
      check("hwrite_reg", {31'b0, hwrite_reg}, {31'b0, m_hwrite_reg});
      check("h_wdata", h_wdata, m_h_wdata);
      check("hrdata", hrdata, m_hrdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
