// Testbench for sync2, the double stage synchronizer.
//
// Drives a random level on d, changing at random times that are not aligned
// to clk, and checks that q always equals the value d had at the clk edge two
// edges earlier (a two-flop delay), and that reset clears the output.
module tb_sync2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d = 1'b0;
  logic q;
  int   checks = 0;
  int   failures = 0;
  logic s1, s2;   // d sampled at the last two edges
  int   cyc = 0;

  sync2 dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  // asynchronous stimulus: period 7..23 ns, unrelated to the 10 ns clock
  initial begin
    forever begin
      #($urandom_range(23, 7));
      d = $urandom_range(1, 0) != 0;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s1 <= d;
      s2 <= s1;
    end
  end

  // compare just before the next edge
  always @(negedge clk) begin
    if (rst_n && cyc > 3) begin
      checks++;
      if (q !== s2) begin
        failures++;
        $display("FAIL t=%0t q=%b expected %b", $time, q, s2);
      end
    end
  end

  initial begin
    #23 rst_n = 1'b1;
    #4000;
    // reset clears the output
    rst_n = 1'b0;
    #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset did not clear q"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
