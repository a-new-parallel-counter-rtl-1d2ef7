// tb_module3 -- self-checking test of the 2-bit counting module with enable.
//
// Drives a random count enable (ins) and a random look-ahead input (qc). At
// each rising edge the state must advance by one (modulo 4) where ins was
// high and hold where it was low; qen3 must always equal Q1 AND Q0 AND qc.
// The expected state is kept by the testbench. A watchdog ends the run.
module tb_module3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ins = 1'b0, qc = 1'b0;
  logic q1, q0, qen3;
  logic [1:0] exp_state;
  int   checks = 0, failures = 0;
  int   n_adv = 0, n_hold = 0, n_qen = 0;

  module3 dut (.clk(clk), .rst(rst), .ins(ins), .qc(qc), .q1(q1), .q0(q0), .qen3(qen3));

  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if ({q1, q0} !== exp_state || qen3 !== (&exp_state & qc)) begin
      failures++;
      $display("FAIL t=%0t: state=%b%b qen3=%0b expected state=%b qc=%0b", $time, q1, q0,
               qen3, exp_state, qc);
    end
    if (qen3) n_qen++;
  endtask

  initial begin
    exp_state = 2'b00;
    repeat (2) @(posedge clk);
    #1 check();
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ins = 1'($urandom);
      qc  = 1'($urandom);
      #1 check();                      // qen3 follows qc combinationally
      @(posedge clk);
      if (ins) begin exp_state = exp_state + 2'd1; n_adv++; end
      else n_hold++;
      #1 check();
    end
    if (n_adv == 0 || n_hold == 0 || n_qen == 0) begin
      failures++;
      $display("FAIL coverage: advances=%0d holds=%0d qen3=%0d", n_adv, n_hold, n_qen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
