// tb_state_decoder -- exhaustive test of the 2-bit state decoder.
//
// Two instances, one for each state the counter decodes (01 and 11), are
// driven with all eight combinations of q1, q0 and qual; match must be high
// only for the instance's own state with qual high.
module tb_state_decoder;

  logic q1, q0, qual;
  logic match01, match11;
  int   checks = 0, failures = 0;

  state_decoder #(.STATE(2'b01)) dut01 (.q1(q1), .q0(q0), .qual(qual), .match(match01));
  state_decoder #(.STATE(2'b11)) dut11 (.q1(q1), .q0(q0), .qual(qual), .match(match11));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {qual, q1, q0} = 3'(v);
      #1;
      checks += 2;
      if (match01 !== (v == 5)) begin
        failures++;
        $display("FAIL STATE=01 qual,q1,q0=%03b match=%0b", v[2:0], match01);
      end
      if (match11 !== (v == 7)) begin
        failures++;
        $display("FAIL STATE=11 qual,q1,q0=%03b match=%0b", v[2:0], match11);
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
