// tb_siso_reg: checks that the serial-in serial-out register (default
// N = 4) delays its input by exactly N enabled clocks and holds while
// en = 0. A random bit stream is compared with a history of the bits that
// were shifted in.
module tb_siso_reg;
  localparam int N = 4;
  logic clk = 0, rst, en, sin, sout;
  logic hist [$];
  int checks = 0, failures = 0;

  siso_reg dut (.clk, .rst, .en, .sin, .sout);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; sin = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < N; i++) hist.push_back(1'b0);  // cleared stages
    for (int i = 0; i < 300; i++) begin
      en  = ($urandom % 3) != 0;
      sin = 1'($urandom);
      @(posedge clk);
      if (en) begin
        hist.push_back(sin);
        void'(hist.pop_front());
      end
      #1;
      checks++;
      if (sout !== hist[0]) begin failures++; $display("FAIL cycle %0d sout=%b want %b", i, sout, hist[0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
