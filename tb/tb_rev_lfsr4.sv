// tb_rev_lfsr4: checks the 4-bit reversible LFSR against its documented
// behaviour.
//  - the seed 1100 is shifted in serially and then runs through the state
//    sequence 1100, 0110, 1011, 0101, 1010, 1101, 1110, 1111;
//  - seeded with 1111 it returns to 1100 after eight steps;
//  - every non-zero seed has period exactly 15, zero stays zero;
//  - seven steps followed by eight steps restore every seed;
//  - en = 0 holds the state.
module tb_rev_lfsr4;
  logic clk = 0, rst, en, sel, din;
  logic [3:0] q;
  int checks = 0, failures = 0;

  rev_lfsr4 dut (.clk, .rst, .en, .sel, .din, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] want, input string what);
    checks++;
    if (q !== want) begin failures++; $display("FAIL %s: q=%b want %b", what, q, want); end
  endtask

  // Shift a seed in, least significant bit first; the partially loaded
  // register must look like a right shift at every step.
  task automatic load(input logic [3:0] v);
    logic [3:0] m;
    m = q;
    en = 1; sel = 0;
    for (int i = 0; i < 4; i++) begin
      din = v[i];
      @(posedge clk); #1;
      m = {v[i], m[3:1]};
      check(m, "load");
    end
    en = 0;
  endtask

  task automatic run(input int n);
    en = 1; sel = 1; din = 1'($urandom);
    repeat (n) @(posedge clk);
    #1;
    en = 0;
  endtask

  localparam logic [3:0] SEQ [8] = '{4'b1100, 4'b0110, 4'b1011, 4'b0101,
                                     4'b1010, 4'b1101, 4'b1110, 4'b1111};

  initial begin
    rst = 1; en = 0; sel = 0; din = 0;
    @(posedge clk); #1;
    rst = 0;
    check(4'b0000, "reset");

    // documented sequence
    load(4'b1100);
    check(SEQ[0], "seed");
    for (int i = 1; i < 8; i++) begin
      run(1);
      check(SEQ[i], "sequence");
    end
    // 1111 back to 1100 in eight steps
    load(4'b1111);
    run(8);
    check(4'b1100, "decrypt example");

    // hold with en = 0 (sel and din toggling)
    sel = 1; din = 1;
    repeat (3) @(posedge clk);
    #1;
    check(4'b1100, "hold");

    for (int s = 0; s < 16; s++) begin
      int period;
      load(4'(s));
      period = 0;
      for (int k = 1; k <= 15; k++) begin
        run(1);
        if (q == 4'(s) && period == 0) period = k;
      end
      checks++;
      if (s == 0 ? (period != 1) : (period != 15)) begin
        failures++; $display("FAIL seed %b period %0d", 4'(s), period);
      end
      // seven then eight steps restore the seed
      load(4'(s));
      run(7);
      run(8);
      check(4'(s), "7+8 steps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
