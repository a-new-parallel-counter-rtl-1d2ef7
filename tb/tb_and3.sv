// tb_and3 -- exhaustive test of the three-input AND gate: all eight input
// combinations, output compared with the product of the inputs.
module tb_and3;

  logic a, b, c, y;
  int   checks = 0, failures = 0;

  and3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== (v == 7)) begin
        failures++;
        $display("FAIL inputs=%03b y=%0b", v[2:0], y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
