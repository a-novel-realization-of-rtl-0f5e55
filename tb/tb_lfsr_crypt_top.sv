// tb_lfsr_crypt_top: end-to-end test of the image cipher at its default
// size (64 pixels, 7 encryption and 8 decryption steps, no parameter
// overrides).
//
// Run 1 loads a random image that also holds 0xCC (which must encrypt to
// 0xFF), all-zero and half-zero pixels, starts the system and tries to
// overwrite a pixel while it is busy (that write must be ignored). After
// done, every encrypted pixel is read back and compared with a reference
// that steps each nibble seven times through Q1 <= Q3 xor Q4, and every
// decrypted pixel must equal the original. Run 2 rewrites half the image
// while the system sits in its done state and starts again. The time from
// start to done must be 64 * (14 + 15) + 1 cycles. The serial-in
// serial-out register and the signature analyzer beside the cipher are
// exercised at the same time.
//
// Each mechanism is counted and must occur: seed loading, feedback
// stepping, an encryption pass, a decryption pass, a zero nibble staying
// zero, a write refused while busy, a restart from done, a bit through the
// SISO register and a signature update.
module tb_lfsr_crypt_top;
  import lfsr_pkg::*;
  localparam int D = 64;

  logic clk = 0, rst, start, busy, done;
  logic img_wr_en;
  logic [5:0] img_wr_addr, host_rd_addr;
  logic [7:0] img_wr_data, enc_rd_data, dec_rd_data;
  logic siso_en, siso_din, siso_dout;
  logic psa_en;
  logic [3:0] psa_din, psa_sig;

  logic [7:0] img [D];
  int checks = 0, failures = 0;
  int n_load = 0, n_run = 0, n_enc_pass = 0, n_dec_pass = 0, n_zero = 0;
  int n_refused = 0, n_restart = 0, n_siso = 0, n_psa = 0;

  lfsr_crypt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, taken from the engines' states
  cipher_state_e enc_prev, dec_prev;
  always_ff @(posedge clk) begin
    enc_prev <= dut.u_enc.state;
    dec_prev <= dut.u_dec.state;
    if (dut.u_enc.state == CS_LOAD && enc_prev != CS_LOAD) n_load++;
    if (dut.u_dec.state == CS_LOAD && dec_prev != CS_LOAD) n_load++;
    if (dut.u_enc.state == CS_RUN && enc_prev != CS_RUN) n_run++;
    if (dut.u_dec.state == CS_RUN && dec_prev != CS_RUN) n_run++;
    if (dut.u_enc.done) n_enc_pass++;
    if (dut.u_dec.done) n_dec_pass++;
    if (img_wr_en && busy) n_refused++;
    if (start && done) n_restart++;
  end

  function automatic logic [3:0] steps(input logic [3:0] v, input int n);
    for (int i = 0; i < n; i++) v = {v[1] ^ v[0], v[3:1]};
    return v;
  endfunction

  task automatic write_pixel(input int a, input logic [7:0] v);
    img_wr_en = 1; img_wr_addr = 6'(a); img_wr_data = v;
    @(posedge clk); #1;
    img_wr_en = 0;
  endtask

  task automatic run_and_check(input string tag);
    int cycles;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 1;
    // try to corrupt pixel 5 while busy
    img_wr_en = 1; img_wr_addr = 6'd5; img_wr_data = ~img[5];
    @(posedge clk); #1;
    img_wr_en = 0;
    cycles++;
    while (!done && cycles < 10000) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles != D * (14 + 15) + 1) begin
      failures++; $display("FAIL %s: %0d cycles to done, want %0d", tag, cycles, D * 29 + 1);
    end
    for (int i = 0; i < D; i++) begin
      logic [7:0] want;
      host_rd_addr = 6'(i);
      @(posedge clk); #1;
      want = {steps(img[i][7:4], 7), steps(img[i][3:0], 7)};
      checks += 2;
      if (enc_rd_data !== want) begin
        failures++; $display("FAIL %s enc[%0d]=%h want %h", tag, i, enc_rd_data, want);
      end
      if (dec_rd_data !== img[i]) begin
        failures++; $display("FAIL %s dec[%0d]=%h want %h", tag, i, dec_rd_data, img[i]);
      end
      if (img[i][7:4] == 4'h0 && enc_rd_data[7:4] == 4'h0) n_zero++;
      if (img[i][3:0] == 4'h0 && enc_rd_data[3:0] == 4'h0) n_zero++;
      if (img[i] == 8'hcc) begin
        checks++;
        if (enc_rd_data !== 8'hff) begin failures++; $display("FAIL 0xCC -> %h", enc_rd_data); end
      end
    end
  endtask

  // side registers: SISO delay of 4 and PSA XOR accumulation
  logic       siso_hist [$];
  logic [3:0] psa_model;
  initial begin
    siso_en = 0; siso_din = 0; psa_en = 0; psa_din = 0;
    wait (rst == 0);
    for (int i = 0; i < 4; i++) siso_hist.push_back(1'b0);
    psa_model = '0;
    repeat (200) begin
      siso_en = 1'($urandom); siso_din = 1'($urandom);
      psa_en = 1'($urandom);  psa_din = 4'($urandom);
      @(posedge clk);
      if (siso_en) begin siso_hist.push_back(siso_din); void'(siso_hist.pop_front()); n_siso++; end
      if (psa_en) begin psa_model ^= psa_din; n_psa++; end
      #1;
      checks += 2;
      if (siso_dout !== siso_hist[0]) begin failures++; $display("FAIL siso %b want %b", siso_dout, siso_hist[0]); end
      if (psa_sig !== psa_model) begin failures++; $display("FAIL psa %h want %h", psa_sig, psa_model); end
    end
    siso_en = 0; psa_en = 0;
  end

  initial begin
    rst = 1; start = 0; img_wr_en = 0; img_wr_addr = '0; img_wr_data = '0; host_rd_addr = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    checks++;
    if (busy !== 1'b0 || done !== 1'b0) begin failures++; $display("FAIL idle after reset"); end

    for (int i = 0; i < D; i++) img[i] = 8'($urandom);
    img[0] = 8'hcc; img[1] = 8'h00; img[2] = 8'h0c; img[3] = 8'hc0; img[63] = 8'hff;
    for (int i = 0; i < D; i++) write_pixel(i, img[i]);
    run_and_check("run1");

    for (int i = 0; i < D; i += 2) begin
      img[i] = 8'($urandom);
      write_pixel(i, img[i]);
    end
    img[10] = 8'hcc; write_pixel(10, img[10]);
    run_and_check("run2");

    $display("mechanisms: load=%0d run=%0d enc_pass=%0d dec_pass=%0d zero_nibble=%0d refused_write=%0d restart=%0d siso=%0d psa=%0d",
             n_load, n_run, n_enc_pass, n_dec_pass, n_zero, n_refused, n_restart, n_siso, n_psa);
    checks++;
    if (n_load != 4 * D || n_run != 4 * D || n_enc_pass != 2 || n_dec_pass != 2) begin
      failures++; $display("FAIL mechanism counts");
    end
    checks++;
    if (n_zero == 0 || n_refused == 0 || n_restart == 0 || n_siso == 0 || n_psa == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
