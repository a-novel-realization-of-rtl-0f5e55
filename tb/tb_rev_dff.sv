// tb_rev_dff: random check of the clock-enabled reversible D flip-flop.
// A software copy of the bit follows q+ = en ? d : q with a synchronous
// reset; q is compared with it after every rising edge for 400 cycles.
module tb_rev_dff;
  logic clk = 0, rst, en, d, q, g;
  logic model;
  int checks = 0, failures = 0;

  rev_dff dut (.clk, .rst, .en, .d, .q, .g);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = 0;
    @(posedge clk); #1;
    rst = 0; model = 1'b0;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset q=%b", q); end
    for (int i = 0; i < 400; i++) begin
      en  = 1'($urandom);
      d   = 1'($urandom);
      rst = ($urandom % 50) == 0;
      @(posedge clk);
      model = rst ? 1'b0 : (en ? d : model);
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d en=%b d=%b q=%b want %b", i, en, d, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
