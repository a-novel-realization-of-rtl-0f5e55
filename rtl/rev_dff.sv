// rev_dff: clock-enabled D flip-flop in the reversible style.
//
// The next state is formed by a modified Fredkin (MF) gate driven with
// a = en, b = d, c = q, whose third output is Q+ = D.E + E'.Q: the stored bit
// takes d when en is 1 and holds when en is 0. A Feynman gate with a 0 input
// copies the stored bit to the output, as in the reversible latch it is
// modelled on; the MF gate's second output is the garbage line ("open").
//
// The reversible original closes the loop through a master-slave pair of
// latches clocked by E and its complement. Here that pair is a single
// positive-edge register on clk, so E becomes a clock enable; this and the
// synchronous active-high reset to 0 are this design's choices.
//
// Timing: q changes on the rising edge of clk after en (or rst) was sampled.
module rev_dff (
  input  logic clk,
  input  logic rst,   // synchronous, active high, clears the bit
  input  logic en,    // E of the clock-enabled latch
  input  logic d,
  output logic q,
  output logic g      // garbage output of the MF gate
);
  logic q_r, q_next, e_pass, fg_a;

  mf_gate u_mf (.a(en), .b(d), .c(q_r), .p(e_pass), .q(g), .r(q_next));

  always_ff @(posedge clk) begin
    if (rst) q_r <= 1'b0;
    else     q_r <= q_next;
  end

  feynman_gate u_copy (.a(q_r), .b(1'b0), .p(fg_a), .q(q));
endmodule
