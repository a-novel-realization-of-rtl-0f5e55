// psa: parallel signature analyzer.
//
// Each clock with en = 1 the new parallel pattern data_in is XORed, bit by
// bit in Feynman gates, into the stored signature: sig+ = sig xor data_in,
// like a running sum that uses XOR instead of addition. The signature bits
// live in rev_dff cells and clear on rst. The width W is a parameter; its
// default of 4, the LFSR width, is this design's choice, as is the plain
// accumulate form without an internal shift.
//
// Timing: sig reflects data_in one rising clk edge after it was applied.
module psa #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] data_in,
  output logic [W-1:0] sig
);
  logic [W-1:0] sig_q, sum, pass, garbage;

  for (genvar i = 0; i < W; i++) begin : g_bit
    feynman_gate u_xor (.a(data_in[i]), .b(sig_q[i]), .p(pass[i]), .q(sum[i]));
    rev_dff      u_ff  (.clk, .rst, .en, .d(sum[i]), .q(sig_q[i]), .g(garbage[i]));
  end

  assign sig = sig_q;
endmodule
