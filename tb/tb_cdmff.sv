// tb_cdmff -- self-checking test of the conditional data mapping flip-flop.
//
// Drives random data and occasional resets into one cell and compares q and
// qbar, after every rising edge, with a reference bit kept by the testbench:
// q must take d at each edge, hold between edges, and clear while rst is
// high (also asynchronously, between edges). A watchdog ends the run.
module tb_cdmff;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic d   = 1'b0;
  logic q, qbar;
  logic q_ref = 1'b0;
  int   checks = 0, failures = 0;

  cdmff dut (.clk(clk), .rst(rst), .d(d), .q(q), .qbar(qbar));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (q !== q_ref || qbar !== ~q_ref) begin
      failures++;
      $display("FAIL %s: q=%0b qbar=%0b expected q=%0b", what, q, qbar, q_ref);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check("reset");
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      if (i % 97 == 50) begin
        // Asynchronous reset between edges.
        rst = 1'b1;
        #1 q_ref = 1'b0;
        check("async reset");
        @(negedge clk) rst = 1'b0;
      end
      @(posedge clk);
      q_ref = d;
      #1 check("capture");
      // Holds its value while the clock is low and d moves.
      @(negedge clk);
      d = ~d;
      #2 check("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
