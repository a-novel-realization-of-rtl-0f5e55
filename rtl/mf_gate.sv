// mf_gate: the 3x3 modified Fredkin (MF) reversible gate.
//
// Outputs p = a, q = a'b xor ac', r = ab xor a'c. With a = 0 it passes b and
// c through like a Fredkin gate; with a = 1 it swaps b with the complement of
// c. Driven with a = enable, b = D and c = the stored Q, output r is the
// clock-enabled latch equation Q+ = D.E + E'.Q and q is a garbage output.
// Purely combinational.
module mf_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & ~c);
  assign r = (a & b) ^ (~a & c);
endmodule
