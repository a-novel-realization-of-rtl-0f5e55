// lfsr8_cipher: the 8-bit reversible-LFSR cipher engine.
//
// After a start pulse the engine walks addresses 0 .. DEPTH-1 of a source
// memory. For each pixel it reads the byte, splits it into the high nibble
// (to LFSR "hi") and the low nibble (to LFSR "lo"), shifts each nibble into
// its 4-bit reversible LFSR as the seed (four clocks, least significant bit
// first, Fredkin gate selecting the serial data), then clocks both LFSRs
// SHIFTS more times with feedback and writes {hi, lo} to the same address of
// a destination memory. With SHIFTS = 7 this encrypts (1100 -> 1111); an
// identical engine with SHIFTS = 8 decrypts, since 7 + 8 is the period 15.
// A zero nibble stays zero, as an LFSR cannot leave the all-zero state.
//
// The two 4-bit LFSRs per pixel, the memory-to-memory flow and the 64
// pixels follow the design description; the serial loading, the per-pixel
// sequence and the start/busy/done handshake are this design's choices.
//
// Timing per pixel: FETCH 1, CAPT 1, LOAD 4, RUN SHIFTS, WRITE 1 cycles, so a
// whole image takes DEPTH * (7 + SHIFTS) cycles from the cycle after start to
// the done pulse (one cycle, together with the last write). The source memory
// must have a one-cycle registered read (pixel_ram).
module lfsr8_cipher
  import lfsr_pkg::*;
#(
  parameter int unsigned SHIFTS = ENC_SHIFTS,
  parameter int unsigned DEPTH  = IMAGE_PIXELS,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,    // pulse; ignored while busy
  output logic               busy,
  output logic               done,     // one-cycle pulse at the last write
  // source memory read port
  output logic [AW-1:0]      rd_addr,
  input  logic [PIXEL_W-1:0] rd_data,
  // destination memory write port
  output logic               wr_en,
  output logic [AW-1:0]      wr_addr,
  output logic [PIXEL_W-1:0] wr_data
);
  localparam int unsigned CW = $clog2((SHIFTS > NIBBLE_W ? SHIFTS : NIBBLE_W) + 1);

  cipher_state_e        state;
  logic [AW-1:0]        addr;
  logic [CW-1:0]        cnt;
  logic [PIXEL_W-1:0]   pix;
  logic                 lfsr_en, lfsr_sel;
  logic [NIBBLE_W-1:0]  q_hi, q_lo;
  logic [1:0]           bit_idx;   // seed bit being loaded, 0 first

  assign bit_idx = cnt[1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= CS_IDLE;
      addr  <= '0;
      cnt   <= '0;
      pix   <= '0;
    end else begin
      unique case (state)
        CS_IDLE: if (start) begin
          addr  <= '0;
          state <= CS_FETCH;
        end
        CS_FETCH: state <= CS_CAPT;
        CS_CAPT: begin
          pix   <= rd_data;
          cnt   <= '0;
          state <= CS_LOAD;
        end
        CS_LOAD: begin
          if (cnt == CW'(NIBBLE_W - 1)) begin
            cnt   <= '0;
            state <= (SHIFTS == 0) ? CS_WRITE : CS_RUN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        CS_RUN: begin
          if (cnt == CW'(SHIFTS - 1)) begin
            cnt   <= '0;
            state <= CS_WRITE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        CS_WRITE: begin
          if (addr == AW'(DEPTH - 1)) begin
            state <= CS_IDLE;
          end else begin
            addr  <= addr + 1'b1;
            state <= CS_FETCH;
          end
        end
        default: state <= CS_IDLE;
      endcase
    end
  end

  assign lfsr_en  = (state == CS_LOAD) || (state == CS_RUN);
  assign lfsr_sel = (state == CS_RUN);

  rev_lfsr4 u_hi (
    .clk, .rst, .en(lfsr_en), .sel(lfsr_sel),
    .din(pix[{1'b1, bit_idx}]), .q(q_hi)
  );
  rev_lfsr4 u_lo (
    .clk, .rst, .en(lfsr_en), .sel(lfsr_sel),
    .din(pix[{1'b0, bit_idx}]), .q(q_lo)
  );

  assign busy    = (state != CS_IDLE);
  assign done    = (state == CS_WRITE) && (addr == AW'(DEPTH - 1));
  assign rd_addr = addr;
  assign wr_en   = (state == CS_WRITE);
  assign wr_addr = addr;
  assign wr_data = {q_hi, q_lo};
endmodule
