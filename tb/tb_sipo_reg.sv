// tb_sipo_reg: random check of the serial-in parallel-out register (N = 4
// and N = 7). The model shifts sin into the most significant bit on each
// enabled edge; q and sout are compared after every edge.
module tb_sipo_reg;
  logic clk = 0, rst, en, sin;
  logic [3:0] q4;  logic s4;
  logic [6:0] q7;  logic s7;
  logic [3:0] m4;
  logic [6:0] m7;
  int checks = 0, failures = 0;

  sipo_reg #(.N(4)) dut4 (.clk, .rst, .en, .sin, .q(q4), .sout(s4));
  sipo_reg #(.N(7)) dut7 (.clk, .rst, .en, .sin, .q(q7), .sout(s7));

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
    rst = 0; m4 = '0; m7 = '0;
    for (int i = 0; i < 300; i++) begin
      en  = ($urandom % 4) != 0;
      sin = 1'($urandom);
      @(posedge clk);
      if (en) begin
        m4 = {sin, m4[3:1]};
        m7 = {sin, m7[6:1]};
      end
      #1;
      checks += 2;
      if (q4 !== m4 || s4 !== m4[0]) begin failures++; $display("FAIL N=4 q=%b want %b", q4, m4); end
      if (q7 !== m7 || s7 !== m7[0]) begin failures++; $display("FAIL N=7 q=%b want %b", q7, m7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
