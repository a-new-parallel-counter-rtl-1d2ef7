// tb_parallel_counter_widths -- the pipelined counter at other widths.
//
// The look-ahead chain is built differently for one slice (no AND gate, no
// second decoder), two slices (AND gate only) and four slices (two decoders
// in series), so each of these sizes is run through two full periods and
// compared cycle by cycle with a running value; the cascade output must be
// high exactly when the count is all ones except bit 0. A watchdog ends the
// run.
module tb_parallel_counter_widths;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [3:0] c1;  logic e1;   // N_MOD3 = 1:  4 bits
  logic [5:0] c2;  logic e2;   // N_MOD3 = 2:  6 bits
  logic [9:0] c4;  logic e4;   // N_MOD3 = 4: 10 bits
  logic [9:0] exp_count;
  int   checks = 0, failures = 0, wraps = 0;

  parallel_counter #(.N_MOD3(1)) dut1 (.clk(clk), .rst(rst), .count(c1), .cascade_en(e1));
  parallel_counter #(.N_MOD3(2)) dut2 (.clk(clk), .rst(rst), .count(c2), .cascade_en(e2));
  parallel_counter #(.N_MOD3(4)) dut4 (.clk(clk), .rst(rst), .count(c4), .cascade_en(e4));

  always #5 clk = ~clk;

  task automatic check();
    checks += 3;
    if (c1 !== exp_count[3:0] || e1 !== (exp_count[3:0] == 4'hE)) begin
      failures++;
      $display("FAIL 4-bit t=%0t: count=%h cascade=%0b expected %h", $time, c1, e1, exp_count[3:0]);
    end
    if (c2 !== exp_count[5:0] || e2 !== (exp_count[5:0] == 6'h3E)) begin
      failures++;
      $display("FAIL 6-bit t=%0t: count=%h cascade=%0b expected %h", $time, c2, e2, exp_count[5:0]);
    end
    if (c4 !== exp_count || e4 !== (exp_count == 10'h3FE)) begin
      failures++;
      $display("FAIL 10-bit t=%0t: count=%h cascade=%0b expected %h", $time, c4, e4, exp_count);
    end
  endtask

  initial begin
    exp_count = '0;
    repeat (2) @(posedge clk);
    #1 check();
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 2 * 1024 + 10; i++) begin
      @(posedge clk);
      exp_count = exp_count + 1'b1;
      if (exp_count == '0) wraps++;
      #1 check();
      if (failures > 20) break;
    end
    if (wraps == 0) begin failures++; $display("FAIL never: 10-bit wrap"); end
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
