// tb_clb - exhaustive self-checking test of the combinational logic block at
// its default size (3 sum bits) and at 2 and 5 sum bits.
// The testbench forms {c, s} = a + b itself, as the group's carry-in-0 adder
// would, and feeds it to the block with both values of cin. It expects
// x = s + 1 (mod 2^N) and cout = bit N of a + b + cin.
module tb_clb;
  logic [1:0] s2, x2;
  logic [2:0] s3, x3;
  logic [4:0] s5, x5;
  logic       c2, c3, c5, co2, co3, co5, cin;
  int checks = 0, failures = 0;

  clb #(.N(2)) dut2 (.s(s2), .c(c2), .cin(cin), .x(x2), .cout(co2));
  clb          dut3 (.s(s3), .c(c3), .cin(cin), .x(x3), .cout(co3));
  clb #(.N(5)) dut5 (.s(s5), .c(c5), .cin(cin), .x(x5), .cout(co5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int x, int y, int ci, int got_x, int got_co);
    int total = x + y + ci;
    int exp_x = (((x + y) % (1 << n)) + 1) % (1 << n);
    int exp_co = (total >> n) & 1;
    checks++;
    if (got_x != exp_x || got_co != exp_co) begin
      failures++;
      $display("FAIL N=%0d a=%0d b=%0d cin=%0d: x=%0d (exp %0d) cout=%0d (exp %0d)",
               n, x, y, ci, got_x, exp_x, got_co, exp_co);
    end
  endtask

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int ci = 0; ci < 2; ci++) begin
          {c5, s5} = 6'(x + y);
          {c3, s3} = 4'((x % 8) + (y % 8));
          {c2, s2} = 3'((x % 4) + (y % 4));
          cin = ci[0];
          #1;
          check(5, x, y, ci, int'(x5), int'(co5));
          if (x < 8 && y < 8) check(3, x, y, ci, int'(x3), int'(co3));
          if (x < 4 && y < 4) check(2, x, y, ci, int'(x2), int'(co2));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
