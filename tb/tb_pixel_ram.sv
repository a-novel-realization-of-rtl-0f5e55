// tb_pixel_ram: random check of the simple dual-port pixel memory at its
// default 64 x 8 size. Every word is written first, then random writes and
// reads run together; each read is compared one cycle later with a model
// array (a read of the word written on the same edge returns the old word).
module tb_pixel_ram;
  logic clk = 0, wr_en;
  logic [5:0] wr_addr, rd_addr;
  logic [7:0] wr_data, rd_data, expect_q;
  logic [7:0] model [64];
  logic pending;
  int checks = 0, failures = 0;

  pixel_ram dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_addr = '0; wr_en = 1; pending = 0;
    for (int i = 0; i < 64; i++) begin
      wr_addr = 6'(i); wr_data = 8'($urandom); model[i] = wr_data;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 1000; i++) begin
      wr_en   = 1'($urandom);
      wr_addr = 6'($urandom);
      wr_data = 8'($urandom);
      rd_addr = ($urandom % 4 == 0) ? wr_addr : 6'($urandom);
      expect_q = model[rd_addr];
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data !== expect_q) begin failures++; $display("FAIL addr %0d got %h want %h", rd_addr, rd_data, expect_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
