// tb_parallel_counter -- end-to-end test of the 8-bit pipelined counter at
// its default size.
//
// The counter is reset and then clocked through three full periods of 256
// states, with a reset in mid-count before the last one. After every rising
// edge the testbench compares count with its own running value (which must
// rise by exactly one per clock: one state per cycle) and cascade_en with
// "count is 11111110". It also counts how often each mechanism of the design
// took place -- module-1 overflow, each module-3 advancing and overflowing
// (which is when its pipelined enable was used), the counter wrapping to 0,
// the cascade output and the mid-count reset -- and counts a failure for any
// that never happened. A watchdog ends the run.
module tb_parallel_counter;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [W-1:0] count;
  logic         cascade_en;
  logic [W-1:0] exp_count, prev;
  int           checks = 0, failures = 0;

  // Mechanism counters.
  int n_m1_ovf = 0, n_wrap = 0, n_cascade = 0, n_reset = 0;
  int n_adv [3] = '{0, 0, 0};
  int n_ovf [3] = '{0, 0, 0};

  parallel_counter dut (.clk(clk), .rst(rst), .count(count), .cascade_en(cascade_en));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (count !== exp_count || cascade_en !== (exp_count == 8'hFE)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s t=%0t: count=%02h cascade_en=%0b expected count=%02h", what,
                 $time, count, cascade_en, exp_count);
    end
  endtask

  task automatic run(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      prev = count;
      @(posedge clk);
      exp_count = exp_count + 1'b1;
      #1 check("count");
      if (cascade_en) n_cascade++;
      if (prev[1:0] == 2'b11 && count[1:0] == 2'b00) n_m1_ovf++;
      for (int k = 0; k < 3; k++) begin
        if (prev[2*k+2 +: 2] != count[2*k+2 +: 2]) n_adv[k]++;
        if (prev[2*k+2 +: 2] == 2'b11 && count[2*k+2 +: 2] == 2'b00) n_ovf[k]++;
      end
      if (prev == '1 && count == '0) n_wrap++;
    end
  endtask

  initial begin
    exp_count = '0;
    repeat (3) @(posedge clk);
    #1 check("reset");
    @(negedge clk) rst = 1'b0;
    run(2 * 256 + 100);
    // Reset in mid-count, then a full period and more from zero.
    @(negedge clk) rst = 1'b1;
    exp_count = '0;
    n_reset++;
    #1 check("mid-count reset");
    @(negedge clk) rst = 1'b0;
    run(256 + 40);

    if (n_m1_ovf == 0)  begin failures++; $display("FAIL never: module-1 overflow"); end
    for (int k = 0; k < 3; k++) begin
      if (n_adv[k] == 0) begin failures++; $display("FAIL never: module-3 %0d advance", k); end
      if (n_ovf[k] == 0) begin failures++; $display("FAIL never: module-3 %0d overflow", k); end
    end
    if (n_wrap == 0)    begin failures++; $display("FAIL never: counter wrap"); end
    if (n_cascade == 0) begin failures++; $display("FAIL never: cascade enable"); end
    if (n_reset == 0)   begin failures++; $display("FAIL never: mid-count reset"); end
    $display("mechanisms: module-1 overflow %0d, module-3 advances %0d/%0d/%0d, overflows %0d/%0d/%0d, wraps %0d, cascade %0d, resets %0d",
             n_m1_ovf, n_adv[0], n_adv[1], n_adv[2], n_ovf[0], n_ovf[1], n_ovf[2], n_wrap,
             n_cascade, n_reset);
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
