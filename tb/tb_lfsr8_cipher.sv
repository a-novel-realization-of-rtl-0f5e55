// tb_lfsr8_cipher: runs the cipher engine over a 64-pixel image held in a
// testbench memory with a one-cycle registered read, twice: once with the
// default seven steps (encryption, 64 pixels) and once with eight steps on
// the result (decryption, instance with 8 steps). Each written byte is
// compared with a reference that applies the LFSR step Q1 <= Q3 xor Q4 to
// each nibble; the decrypted image must equal the original, and each pass
// must take 64 * (7 + steps) cycles from start to the done pulse. The image
// holds 0xCC, which must encrypt to 0xFF, and zero nibbles.
module tb_lfsr8_cipher;
  localparam int D = 64;
  logic clk = 0, rst;
  logic start_e, busy_e, done_e, wen_e;
  logic start_d, busy_d, done_d, wen_d;
  logic [5:0] ra_e, wa_e, ra_d, wa_d;
  logic [7:0] rd_e, wd_e, rd_d, wd_d;
  logic [7:0] img [D], enc [D], dec [D];
  int checks = 0, failures = 0;

  lfsr8_cipher dut_e (.clk, .rst, .start(start_e), .busy(busy_e), .done(done_e),
                      .rd_addr(ra_e), .rd_data(rd_e), .wr_en(wen_e), .wr_addr(wa_e), .wr_data(wd_e));
  lfsr8_cipher #(.SHIFTS(8)) dut_d (.clk, .rst, .start(start_d), .busy(busy_d), .done(done_d),
                      .rd_addr(ra_d), .rd_data(rd_d), .wr_en(wen_d), .wr_addr(wa_d), .wr_data(wd_d));

  always #5 clk = ~clk;

  // testbench memories: registered read, synchronous write
  always_ff @(posedge clk) begin
    rd_e <= img[ra_e];
    rd_d <= enc[ra_d];
    if (wen_e) enc[wa_e] <= wd_e;
    if (wen_d) dec[wa_d] <= wd_d;
  end

  function automatic logic [3:0] steps(input logic [3:0] v, input int n);
    for (int i = 0; i < n; i++) v = {v[1] ^ v[0], v[3:1]};
    return v;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(input bit is_dec, input int n);
    int cycles;
    cycles = 1;  // the first cycle after start is sampled
    if (is_dec) start_d = 1; else start_e = 1;
    @(posedge clk); #1;
    start_e = 0; start_d = 0;
    checks++;
    if ((is_dec ? busy_d : busy_e) !== 1'b1) begin failures++; $display("FAIL busy after start"); end
    while (!(is_dec ? done_d : done_e) && cycles < 5000) begin
      @(posedge clk); #1;
      cycles++;
    end
    @(posedge clk); #1;  // done is combinational with the last write
    checks++;
    if (cycles != D * (7 + n)) begin
      failures++; $display("FAIL %0d steps: %0d cycles, want %0d", n, cycles, D * (7 + n));
    end
    checks++;
    if ((is_dec ? busy_d : busy_e) !== 1'b0) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    rst = 1; start_e = 0; start_d = 0;
    for (int i = 0; i < D; i++) img[i] = 8'($urandom);
    img[0] = 8'hcc; img[1] = 8'h00; img[2] = 8'h0f; img[3] = 8'ha0;
    repeat (2) @(posedge clk); #1;
    rst = 0;

    pass(0, 7);
    for (int i = 0; i < D; i++) begin
      logic [7:0] want;
      want = {steps(img[i][7:4], 7), steps(img[i][3:0], 7)};
      checks++;
      if (enc[i] !== want) begin failures++; $display("FAIL enc[%0d]=%h want %h (pixel %h)", i, enc[i], want, img[i]); end
    end
    checks++;
    if (enc[0] !== 8'hff) begin failures++; $display("FAIL 0xcc encrypted to %h", enc[0]); end

    pass(1, 8);
    for (int i = 0; i < D; i++) begin
      checks++;
      if (dec[i] !== img[i]) begin failures++; $display("FAIL dec[%0d]=%h want %h", i, dec[i], img[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
