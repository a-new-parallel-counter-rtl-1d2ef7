// parallel_counter -- pipelined parallel binary counter built of 2-bit modules.
//
// The counter's value is split into 2-bit slices. Module-1 holds bits [1:0]
// and counts on every clock; each module-3 holds the next two bits and counts
// only when its enable is high. Instead of a ripple of carries through all
// lower bits, every enable is computed one clock early and held in a
// pipeline flip-flop (a CDMFF, the "module-2" cell), so each module sees its
// enable in exactly the cycle in which all lower bits are one, and the logic
// between any two flip-flops is at most a few gates whatever the width.
//
// Two registered signals per module-3 k (k = 0 .. N_MOD3-1, bits 2k+3:2k+2):
//   ins[k] -- count enable, high iff count[2k+1:0] is all ones.
//             ins[0] = reg(QEN1 of module-1), ins[k] = reg(QEN3 of module-3 k-1).
//   qc[k]  -- look-ahead, high iff count[2k+1:0] is all ones except bit 0.
//             It comes from pre[k], which is high iff count[2k+1:0] = 1..101
//             (one clock earlier, since going from ..01 to ..10 carries nothing):
//               pre[0] = module-1 in state 01                   (state decoder)
//               pre[1] = module-3 0 in 11 AND pre[0]            (3-input AND)
//               pre[k] = module-3 k-1 in 11 AND pre[k-1], k >= 2 (state decoder)
// Module-3 k forms QEN3 = Q1 & Q0 & qc[k], high iff count[2k+3:0] is all ones
// except bit 0, and the next pipeline flip-flop turns that into ins[k+1].
//
// Interface: clk, rst (active high, asynchronous, clears every flip-flop);
// count, the counter's value; cascade_en, QEN3 of the last module-3, high in
// the cycle before count reaches all ones (the enable a further module-3
// would register). Timing: count is 0 while rst is high and increases by one
// at every rising clock edge after it, wrapping to 0 after all ones.
//
// Parameter N_MOD3 is the number of module-3 slices: 3 gives the 8-bit
// counter (six pipeline flip-flops, two state decoders, one 3-input AND).
// From the source design: the module structure, QEN1 and QEN3, the pipelined
// enables and the component counts. Own choices: which states the decoders
// and the AND gate look at (so that the look-ahead comes out right), the reset
// and the generalisation to other widths.
// Lint note: rst is both the asynchronous reset of the cells and the
// "disable iff" of the invariant assertions below, which a linter reports as
// a net used synchronously and asynchronously; that use is intended.
module parallel_counter #(
  parameter int unsigned N_MOD3 = 3
) (
  input  logic                  clk,
  input  logic                  rst,
  output logic [2*N_MOD3+1:0]   count,
  output logic                  cascade_en
);

  logic              m1_q1, m1_q0, qen1;
  logic [N_MOD3-1:0] ins, qc, pre, qen3;
  logic [N_MOD3-1:0] m3_q1, m3_q0;

  module1 u_module1 (.clk(clk), .rst(rst), .q1(m1_q1), .q0(m1_q0), .qen1(qen1));

  assign count[1:0] = {m1_q1, m1_q0};

  // First look-ahead decode: module-1 in state 01.
  state_decoder #(.STATE(2'b01)) u_dec0 (
    .q1(m1_q1), .q0(m1_q0), .qual(1'b1), .match(pre[0])
  );

  for (genvar k = 0; k < N_MOD3; k++) begin : g_slice
    // Pipeline flip-flops (module-2): count enable and look-ahead.
    if (k == 0) begin : g_en_first
      cdmff u_en (.clk(clk), .rst(rst), .d(qen1), .q(ins[k]), .qbar());
    end else begin : g_en_next
      cdmff u_en (.clk(clk), .rst(rst), .d(qen3[k-1]), .q(ins[k]), .qbar());
    end
    cdmff u_qc (.clk(clk), .rst(rst), .d(pre[k]), .q(qc[k]), .qbar());

    module3 u_module3 (
      .clk(clk), .rst(rst), .ins(ins[k]), .qc(qc[k]),
      .q1(m3_q1[k]), .q0(m3_q0[k]), .qen3(qen3[k])
    );

    assign count[2*k+3:2*k+2] = {m3_q1[k], m3_q0[k]};

    // Look-ahead decode for the next slice.
    if (k + 1 < N_MOD3) begin : g_pre
      if (k == 0) begin : g_and
        and3 u_and3 (.a(m3_q1[k]), .b(m3_q0[k]), .c(pre[k]), .y(pre[k+1]));
      end else begin : g_dec
        state_decoder #(.STATE(2'b11)) u_dec (
          .q1(m3_q1[k]), .q0(m3_q0[k]), .qual(pre[k]), .match(pre[k+1])
        );
      end
    end

    // Pipeline invariants: the registered enable and look-ahead always match
    // the count they stand for.
    a_ins : assert property (@(posedge clk) disable iff (rst)
                             ins[k] == (&count[2*k+1:0]));
    a_qc  : assert property (@(posedge clk) disable iff (rst)
                             qc[k] == (count[2*k+1:0] == {{(2*k+1){1'b1}}, 1'b0}));
  end

  assign cascade_en = qen3[N_MOD3-1];

endmodule
