// rev_lfsr4: the 4-bit reversible linear feedback shift register.
//
// Four rev_dff stages Q1..Q4 form a serial-in parallel-out register. A
// Feynman gate XORs Q3 and Q4 into the feedback bit, and a Fredkin gate,
// controlled by sel, chooses what enters Q1: the serial input din when
// sel = 0 (seed loading) or the feedback bit when sel = 1 (running). So the
// running register steps Q1 <= Q3 xor Q4, Qk <= Qk-1, which from 1100 gives
// 1100, 0110, 1011, 0101, 1010, 1101, 1110, 1111 and has period 15 for every
// non-zero seed; the all-zero state maps to itself.
//
// The structure (four flip-flops, the Fredkin gate at the input, the Feynman
// gate on Q3/Q4) and the state sequence are from the design description.
// The serial seed loading through the Fredkin gate, the polarity of sel and
// which Fredkin output feeds Q1 are this design's reading of it.
//
// Interface: q = {Q1,Q2,Q3,Q4}. Timing: one step per rising clk edge with
// en = 1; a seed v is loaded by four steps with sel = 0 and din = v[0], v[1],
// v[2], v[3] in that order.
module rev_lfsr4 (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       sel,  // 0: shift din in, 1: feedback
  input  logic       din,
  output logic [3:0] q
);
  logic fb, q3_copy, stage1_in, sel_pass, fred_garbage, sout;

  // Feynman gate on the feedback path: fb = Q3 xor Q4.
  feynman_gate u_fb (.a(q[1]), .b(q[0]), .p(q3_copy), .q(fb));

  // Fredkin gate: stage1_in = sel ? fb : din.
  fredkin_gate u_sel (.a(sel), .b(din), .c(fb), .p(sel_pass), .q(stage1_in), .r(fred_garbage));

  sipo_reg #(.N(4)) u_reg (.clk, .rst, .en, .sin(stage1_in), .q, .sout);
endmodule
