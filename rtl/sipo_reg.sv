// sipo_reg: N-bit serial-in parallel-out shift register of rev_dff cells.
//
// On each rising clk edge with en = 1, sin enters stage 1 and every stage
// moves one place on. q[N-1] is stage 1 (Q1, the bit shifted in last) and
// q[0] is stage N (QN), so q reads Q1 Q2 ... QN from most to least
// significant bit, the order in which LFSR states are written (1100 means
// Q1 = 1, Q4 = 0). sout is stage N. With en = 0 all stages hold.
// A nibble v is loaded in N clocks by shifting v[0] first and v[N-1] last.
module sipo_reg #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         sin,
  output logic [N-1:0] q,
  output logic         sout
);
  logic [N:0] chain;     // chain[N] = sin, chain[i] = stage output
  logic [N-1:0] garbage;

  assign chain[N] = sin;

  for (genvar i = N - 1; i >= 0; i--) begin : g_stage
    rev_dff u_ff (.clk, .rst, .en, .d(chain[i+1]), .q(chain[i]), .g(garbage[i]));
  end

  assign q    = chain[N-1:0];
  assign sout = chain[0];
endmodule
