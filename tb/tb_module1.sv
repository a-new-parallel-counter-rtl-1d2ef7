// tb_module1 -- self-checking test of the free-running 2-bit counter.
//
// After reset the module must step 00, 01, 10, 11, 00, ... one state per
// rising edge, and qen1 must equal Q1 AND NOT Q0 in every cycle. A reset
// in mid-count must return it to 00. The expected state is counted by the
// testbench itself. A watchdog ends the run.
module tb_module1;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic q1, q0, qen1;
  logic [1:0] exp_state;
  int   checks = 0, failures = 0;

  module1 dut (.clk(clk), .rst(rst), .q1(q1), .q0(q0), .qen1(qen1));

  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if ({q1, q0} !== exp_state || qen1 !== (exp_state == 2'b10)) begin
      failures++;
      $display("FAIL t=%0t: state=%b%b qen1=%0b expected state=%b", $time, q1, q0, qen1,
               exp_state);
    end
  endtask

  initial begin
    exp_state = 2'b00;
    repeat (2) @(posedge clk);
    #1 check();
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 50; i++) begin
      @(posedge clk);
      exp_state = exp_state + 2'd1;
      #1 check();
    end
    // Reset in mid-count (the state is 10 here: 50 mod 4 = 2).
    @(negedge clk) rst = 1'b1;
    exp_state = 2'b00;
    #1 check();
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 9; i++) begin
      @(posedge clk);
      exp_state = exp_state + 2'd1;
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
