// tb_feynman_gate: exhaustive check of the Feynman (controlled-NOT) gate.
// All four input pairs are applied; p must copy a, and q must be 1 exactly
// when a and b differ.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a, .b, .p, .q);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks += 2;
      if (p !== a) begin failures++; $display("FAIL a=%b b=%b p=%b", a, b, p); end
      if (q !== (a != b)) begin failures++; $display("FAIL a=%b b=%b q=%b", a, b, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
