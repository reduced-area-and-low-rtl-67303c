// tb_sqrt_csla_clb - end-to-end self-checking test of the 16-bit square-root
// carry select adder at its default parameters.
//
// Every result {cout, sum} is compared with a + b + cin computed by the
// testbench on 17-bit integers. Operands come from three sources: corner
// values, uniformly random words, and "long carry" words where b is nearly
// the complement of a, so that carries run across several groups.
// For each carry select group (bits [3:2], [6:4], [10:7], [15:11]) the
// testbench also counts, from the operands alone, how often
//   * the mux chose the carry-in-0 sum and the carry-in-1 sum,
//   * the group made its own carry (generate), and
//   * an incoming carry ran through the whole group to its carry out, the
//     path the clb's AND/XOR pair builds without a mux (propagate).
// Any of these that never happened counts as a failure.
module tb_sqrt_csla_clb;
  localparam int W  = 16;
  localparam int NG = 4;  // carry select groups above the first ripple group
  localparam int GLSB [NG] = '{2, 4, 7, 11};
  localparam int GSZ  [NG] = '{2, 3, 4, 5};

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_sel0 [NG], n_sel1 [NG], n_gen [NG], n_prop [NG];

  sqrt_csla_clb dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one operand set, check the result and record which mechanisms ran
  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic ci);
    logic [W:0] expected;
    a = x; b = y; cin = ci;
    #1;
    expected = {1'b0, x} + {1'b0, y} + (W+1)'(ci);
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %h + %h + %b -> %b_%h, expected %h", x, y, ci, cout, sum, expected);
    end
    for (int g = 0; g < NG; g++) begin
      int lsb = GLSB[g], n = GSZ[g];
      logic [W:0] low  = ({1'b0, x} & ((W+1)'(1) << lsb) - 1)
                       + ({1'b0, y} & ((W+1)'(1) << lsb) - 1) + (W+1)'(ci);
      logic       c_in = low[lsb];
      int         xs   = (int'(x) >> lsb) & ((1 << n) - 1);
      int         ys   = (int'(y) >> lsb) & ((1 << n) - 1);
      if (c_in) n_sel1[g]++; else n_sel0[g]++;
      if (xs + ys >= (1 << n)) n_gen[g]++;
      if (c_in && xs + ys == (1 << n) - 1) n_prop[g]++;
    end
  endtask

  initial begin
    logic [W-1:0] x, m;
    for (int g = 0; g < NG; g++) begin
      n_sel0[g] = 0; n_sel1[g] = 0; n_gen[g] = 0; n_prop[g] = 0;
    end

    // corners
    for (int ci = 0; ci < 2; ci++) begin
      apply('0, '0, ci[0]);
      apply('1, '0, ci[0]);
      apply('0, '1, ci[0]);
      apply('1, '1, ci[0]);
      apply(16'h5555, 16'haaaa, ci[0]);
      apply(16'h8000, 16'h8000, ci[0]);
      apply(16'h7fff, 16'h0001, ci[0]);
    end

    // every single-bit a with all-ones b: carry enters at each position
    for (int i = 0; i < W; i++)
      for (int ci = 0; ci < 2; ci++) apply(W'(1) << i, '1, ci[0]);

    // random words
    for (int i = 0; i < 200_000; i++)
      apply(W'($urandom), W'($urandom), 1'($urandom));

    // long-carry words: b = ~a with a few bits flipped
    for (int i = 0; i < 200_000; i++) begin
      x = W'($urandom);
      m = W'($urandom) & W'($urandom) & W'($urandom);
      apply(x, ~x ^ m, 1'($urandom));
    end

    for (int g = 0; g < NG; g++) begin
      $display("group [%0d:%0d]: sel0=%0d sel1=%0d generate=%0d propagate=%0d",
               GLSB[g] + GSZ[g] - 1, GLSB[g], n_sel0[g], n_sel1[g], n_gen[g], n_prop[g]);
      checks++;
      if (n_sel0[g] == 0 || n_sel1[g] == 0 || n_gen[g] == 0 || n_prop[g] == 0) begin
        failures++;
        $display("FAIL group %0d: a mechanism never occurred", g + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
