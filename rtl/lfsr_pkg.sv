// lfsr_pkg: constants and types shared by the reversible-LFSR image cipher.
//
// The cipher splits every 8-bit pixel into two 4-bit nibbles. Each nibble is
// loaded as the seed of a 4-bit LFSR (feedback Q1 <= Q3 xor Q4, i.e. the
// maximal-length polynomial x^4 + x^3 + 1 whose state sequence from 1100 is
// 1100, 0110, 1011, 0101, 1010, 1101, 1110, 1111, ...) and the LFSR is then
// clocked a fixed number of times. Because every non-zero state lies on one
// cycle of length 15, clocking ENC_SHIFTS times and then DEC_SHIFTS times with
// ENC_SHIFTS + DEC_SHIFTS = 15 returns the original nibble. The seven and eight
// clocks follow the worked example (1100 -> 1111 when encrypting, 1111 -> 1100
// when decrypting); the split 7 / 8 rather than 8 / 7 is this design's reading.
package lfsr_pkg;

  localparam int unsigned NIBBLE_W     = 4;   // one reversible LFSR
  localparam int unsigned PIXEL_W      = 8;   // two LFSRs side by side
  localparam int unsigned IMAGE_PIXELS = 64;  // pixels held by each memory
  localparam int unsigned LFSR_PERIOD  = 15;  // 2^4 - 1
  localparam int unsigned ENC_SHIFTS   = 7;   // 1100 -> 1111
  localparam int unsigned DEC_SHIFTS   = LFSR_PERIOD - ENC_SHIFTS;  // 1111 -> 1100

  // Per-pixel sequence of the cipher engine.
  typedef enum logic [2:0] {
    CS_IDLE,   // waiting for start
    CS_FETCH,  // pixel address presented to the source memory
    CS_CAPT,   // source data valid, captured into the pixel register
    CS_LOAD,   // nibbles shifted serially into the LFSRs (Fredkin selects data)
    CS_RUN,    // LFSRs clocked with feedback (Fredkin selects feedback)
    CS_WRITE   // result written to the destination memory
  } cipher_state_e;

  // Sequence of the whole system.
  typedef enum logic [1:0] {
    TS_IDLE,
    TS_ENC,    // input image -> encrypted memory
    TS_DEC,    // encrypted memory -> decrypted memory
    TS_DONE
  } top_state_e;

endpackage
