// tb_rca0 - exhaustive self-checking test of the carry-in-0 ripple adder at
// its default width (2), at 1 bit (a lone half adder) and at 5 bits.
// {cout, sum} must equal a + b.
module tb_rca0;
  logic       a1, b1, s1, c1;
  logic [1:0] a2, b2, s2;
  logic [4:0] a5, b5, s5;
  logic       c2, c5;
  int checks = 0, failures = 0;

  rca0 #(.N(1)) dut1 (.a(a1), .b(b1), .sum(s1), .cout(c1));
  rca0          dut2 (.a(a2), .b(b2), .sum(s2), .cout(c2));
  rca0 #(.N(5)) dut5 (.a(a5), .b(b5), .sum(s5), .cout(c5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a5 = 5'(x); b5 = 5'(y); a2 = 2'(x); b2 = 2'(y); a1 = x[0]; b1 = y[0];
        #1;
        checks++;
        if ({c5, s5} !== 6'(x + y)) begin
          failures++;
          $display("FAIL N=5 %0d+%0d -> %0d", x, y, {c5, s5});
        end
        if (x < 4 && y < 4) begin
          checks++;
          if ({c2, s2} !== 3'(x + y)) begin
            failures++;
            $display("FAIL N=2 %0d+%0d -> %0d", x, y, {c2, s2});
          end
        end
        if (x < 2 && y < 2) begin
          checks++;
          if ({c1, s1} !== 2'(x + y)) begin
            failures++;
            $display("FAIL N=1 %0d+%0d -> %0d", x, y, {c1, s1});
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
