// pixel_ram: simple dual-port image memory, DEPTH words of WIDTH bits.
//
// One write port and one read port, both synchronous to clk. A write of
// wr_data to wr_addr happens on the rising edge when wr_en = 1. The read
// port registers its result: rd_data shows mem[rd_addr] one rising edge
// after rd_addr is presented (a read of a word written on the same edge
// returns the old word). This is the behaviour of an FPGA block RAM with a
// registered output; no reset, contents are undefined until written.
// The 64 x 8 default follows the 64-pixel image of the design; three of
// these memories make up the 1,536 memory bits of the system.
module pixel_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
