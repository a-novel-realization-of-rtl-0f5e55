// lfsr_crypt_top: image encryption and decryption with reversible LFSRs.
//
// Three pixel memories and two cipher engines form a chain:
//
//   input image memory --enc (7 LFSR steps)--> encrypted memory
//   encrypted memory   --dec (8 LFSR steps)--> decrypted memory
//
// A host writes the image (DEPTH pixels of 8 bits) through the img_wr_*
// port while the system is idle, then pulses start. The encryptor walks the
// whole image, then the decryptor walks the encrypted image; done rises when
// the decrypted image is complete and stays high until the next start. While
// idle, host_rd_addr reads the encrypted and decrypted memories (one cycle
// registered read latency on enc_rd_data and dec_rd_data).
//
// Beside the cipher, and unconnected to it, sit the two other registers the
// design describes: a serial-in serial-out register (siso_*) and a parallel
// signature analyzer (psa_*), each with its own ports.
//
// The memory-LFSR-memory-LFSR-memory chain, the 64 pixels of 8 bits and the
// two 4-bit LFSRs per pixel follow the design description. Running the two
// passes one after the other, the start/busy/done handshake, the host ports
// and the synchronous active-high reset are this design's choices.
//
// Timing: with the default 64 pixels the encryption pass takes 64 * 14 and
// the decryption pass 64 * 15 cycles; done rises 64 * 29 + 1 cycles after
// the start pulse is sampled.
module lfsr_crypt_top
  import lfsr_pkg::*;
#(
  parameter int unsigned DEPTH = IMAGE_PIXELS,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned SISO_N = 4,
  parameter int unsigned PSA_W  = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // image loading (ignored while busy)
  input  logic               img_wr_en,
  input  logic [AW-1:0]      img_wr_addr,
  input  logic [PIXEL_W-1:0] img_wr_data,
  // result readback (while idle)
  input  logic [AW-1:0]      host_rd_addr,
  output logic [PIXEL_W-1:0] enc_rd_data,
  output logic [PIXEL_W-1:0] dec_rd_data,
  // serial-in serial-out register
  input  logic               siso_en,
  input  logic               siso_din,
  output logic               siso_dout,
  // parallel signature analyzer
  input  logic               psa_en,
  input  logic [PSA_W-1:0]   psa_din,
  output logic [PSA_W-1:0]   psa_sig
);
  top_state_e tstate;

  logic               enc_start, enc_busy, enc_done, enc_wr_en;
  logic               dec_start, dec_busy, dec_done, dec_wr_en;
  logic [AW-1:0]      enc_rd_addr, enc_wr_addr, dec_rd_addr, dec_wr_addr, encmem_rd_addr;
  logic [PIXEL_W-1:0] img_rd_data, enc_wr_data, dec_wr_data;

  // ---------------------------------------------------------------- sequencing
  assign enc_start = start && (tstate == TS_IDLE || tstate == TS_DONE);
  assign dec_start = enc_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      tstate <= TS_IDLE;
    end else begin
      unique case (tstate)
        TS_IDLE, TS_DONE: if (enc_start) tstate <= TS_ENC;
        TS_ENC:           if (enc_done)  tstate <= TS_DEC;
        TS_DEC:           if (dec_done)  tstate <= TS_DONE;
        default:          tstate <= TS_IDLE;
      endcase
    end
  end

  assign busy = (tstate == TS_ENC) || (tstate == TS_DEC);
  assign done = (tstate == TS_DONE);

  // ---------------------------------------------------------------- memories
  pixel_ram #(.DEPTH(DEPTH), .WIDTH(PIXEL_W)) u_img_mem (
    .clk,
    .wr_en(img_wr_en && !busy), .wr_addr(img_wr_addr), .wr_data(img_wr_data),
    .rd_addr(enc_rd_addr), .rd_data(img_rd_data)
  );

  assign encmem_rd_addr = (tstate == TS_DEC) ? dec_rd_addr : host_rd_addr;

  pixel_ram #(.DEPTH(DEPTH), .WIDTH(PIXEL_W)) u_enc_mem (
    .clk,
    .wr_en(enc_wr_en), .wr_addr(enc_wr_addr), .wr_data(enc_wr_data),
    .rd_addr(encmem_rd_addr), .rd_data(enc_rd_data)
  );

  pixel_ram #(.DEPTH(DEPTH), .WIDTH(PIXEL_W)) u_dec_mem (
    .clk,
    .wr_en(dec_wr_en), .wr_addr(dec_wr_addr), .wr_data(dec_wr_data),
    .rd_addr(host_rd_addr), .rd_data(dec_rd_data)
  );

  // ---------------------------------------------------------------- engines
  lfsr8_cipher #(.SHIFTS(ENC_SHIFTS), .DEPTH(DEPTH)) u_enc (
    .clk, .rst, .start(enc_start), .busy(enc_busy), .done(enc_done),
    .rd_addr(enc_rd_addr), .rd_data(img_rd_data),
    .wr_en(enc_wr_en), .wr_addr(enc_wr_addr), .wr_data(enc_wr_data)
  );

  lfsr8_cipher #(.SHIFTS(DEC_SHIFTS), .DEPTH(DEPTH)) u_dec (
    .clk, .rst, .start(dec_start), .busy(dec_busy), .done(dec_done),
    .rd_addr(dec_rd_addr), .rd_data(enc_rd_data),
    .wr_en(dec_wr_en), .wr_addr(dec_wr_addr), .wr_data(dec_wr_data)
  );

  // ---------------------------------------------------------------- side registers
  siso_reg #(.N(SISO_N)) u_siso (
    .clk, .rst, .en(siso_en), .sin(siso_din), .sout(siso_dout)
  );

  psa #(.W(PSA_W)) u_psa (
    .clk, .rst, .en(psa_en), .data_in(psa_din), .sig(psa_sig)
  );

  // ---------------------------------------------------------------- checks
  // The two engines never run together and only run in their own phase.
  assert property (@(posedge clk) disable iff (rst) !(enc_busy && dec_busy));
  assert property (@(posedge clk) disable iff (rst) enc_busy |-> tstate == TS_ENC);
  assert property (@(posedge clk) disable iff (rst) dec_busy |-> tstate == TS_DEC);
endmodule
