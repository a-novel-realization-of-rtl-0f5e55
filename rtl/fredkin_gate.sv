// fredkin_gate: the 3x3 reversible controlled-swap (Fredkin) gate.
//
// Outputs p = a, q = a'b xor ac, r = a'c xor ab: when the control a is 0,
// b and c pass straight through; when a is 1 they are swapped. Output q is
// therefore a 2:1 multiplexer (a ? c : b), which is how the LFSR uses it to
// choose between serial data and feedback. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
