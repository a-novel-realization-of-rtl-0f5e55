// feynman_gate: the 2x2 reversible controlled-NOT (Feynman) gate.
//
// Outputs p = a and q = a xor b. With b tied to 0 it copies a (fan-out), and
// with two data inputs it is the XOR of a feedback path. Purely combinational,
// no timing. The gate equations are those of the gate's standard definition.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
