// tb_mf_gate: exhaustive check of the modified Fredkin (MF) gate.
// For all eight inputs: p = a; with a = 0 the outputs (q, r) are (b, c);
// with a = 1, b and the complement of c are swapped, giving (~c, b). Also
// checks reversibility (all outputs different) and that r is the
// clock-enabled latch equation D.E + E'.Q for a = E, b = D, c = Q.
module tb_mf_gate;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  mf_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      logic eq, er;
      {a, b, c} = 3'(i);
      #1;
      eq = a ? ~c : b;
      er = a ? b : c;
      checks++;
      if (p !== a || q !== eq || r !== er) begin
        failures++;
        $display("FAIL abc=%b%b%b got pqr=%b%b%b want %b%b%b", a, b, c, p, q, r, a, eq, er);
      end
      checks++;
      if (r !== ((b & a) | (~a & c))) begin failures++; $display("FAIL latch equation"); end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin failures++; $display("FAIL not a bijection: %b", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
