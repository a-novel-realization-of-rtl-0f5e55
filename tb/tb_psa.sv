// tb_psa: random check of the parallel signature analyzer (W = 4). The
// model XOR-accumulates every enabled input pattern; the signature is
// compared after each edge. A final check feeds one pattern twice and
// expects the signature to return to its earlier value.
module tb_psa;
  localparam int W = 4;
  logic clk = 0, rst, en;
  logic [W-1:0] data_in, sig, model, sig_prev;
  int checks = 0, failures = 0;

  psa dut (.clk, .rst, .en, .data_in, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; data_in = '0;
    @(posedge clk); #1;
    rst = 0; model = '0;
    for (int i = 0; i < 300; i++) begin
      en      = ($urandom % 4) != 0;
      data_in = W'($urandom);
      @(posedge clk);
      if (en) model = model ^ data_in;
      #1;
      checks++;
      if (sig !== model) begin failures++; $display("FAIL cycle %0d sig=%h want %h", i, sig, model); end
    end
    sig_prev = sig;
    en = 1; data_in = 4'ha;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (sig !== sig_prev) begin failures++; $display("FAIL self-inverse sig=%h want %h", sig, sig_prev); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
