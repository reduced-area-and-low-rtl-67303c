// tb_csla_group - exhaustive self-checking test of one carry select group at
// every size the 16-bit adder uses (2, 3, 4 and 5 bits; 2 is the default).
// For every a, b and carry in, {cout, sum} must equal a + b + cin.
module tb_csla_group;
  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic       cin, c2, c3, c4, c5;
  int checks = 0, failures = 0;

  csla_group          dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(c2));
  csla_group #(.N(3)) dut3 (.a(a3), .b(b3), .cin(cin), .sum(s3), .cout(c3));
  csla_group #(.N(4)) dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(c4));
  csla_group #(.N(5)) dut5 (.a(a5), .b(b5), .cin(cin), .sum(s5), .cout(c5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int x, int y, int ci, int got);
    checks++;
    if (got != x + y + ci) begin
      failures++;
      $display("FAIL N=%0d %0d+%0d+%0d -> %0d", n, x, y, ci, got);
    end
  endtask

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a5 = 5'(x); b5 = 5'(y);
          a4 = 4'(x); b4 = 4'(y);
          a3 = 3'(x); b3 = 3'(y);
          a2 = 2'(x); b2 = 2'(y);
          cin = ci[0];
          #1;
          check(5, x, y, ci, int'({c5, s5}));
          if (x < 16 && y < 16) check(4, x, y, ci, int'({c4, s4}));
          if (x < 8 && y < 8)   check(3, x, y, ci, int'({c3, s3}));
          if (x < 4 && y < 4)   check(2, x, y, ci, int'({c2, s2}));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
