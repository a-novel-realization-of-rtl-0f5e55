// siso_reg: N-bit serial-in serial-out shift register of rev_dff cells.
//
// A chain of N clock-enabled reversible D flip-flops: a bit presented on sin
// appears on sout after N rising clk edges with en = 1. With en = 0 the
// contents hold. Only the two ends are brought out. The register length N
// is a parameter; the default of 4 matches the LFSR width and is this
// design's choice.
module siso_reg #(
  parameter int unsigned N = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic sin,
  output logic sout
);
  logic [N:0] chain;
  logic [N-1:0] garbage;

  assign chain[N] = sin;

  for (genvar i = N - 1; i >= 0; i--) begin : g_stage
    rev_dff u_ff (.clk, .rst, .en, .d(chain[i+1]), .q(chain[i]), .g(garbage[i]));
  end

  assign sout = chain[0];
endmodule
