// tb_rca - exhaustive self-checking test of the ripple carry adder with
// carry in, at its default width (2) and at 5 bits. {cout, sum} must equal
// a + b + cin for every input combination.
module tb_rca;
  logic [1:0] a2, b2, s2;
  logic [4:0] a5, b5, s5;
  logic       cin, c2, c5;
  int checks = 0, failures = 0;

  rca           dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(c2));
  rca #(.N(5))  dut5 (.a(a5), .b(b5), .cin(cin), .sum(s5), .cout(c5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a5 = 5'(x); b5 = 5'(y); a2 = 2'(x); b2 = 2'(y); cin = ci[0];
          #1;
          checks++;
          if ({c5, s5} !== 6'(x + y + ci)) begin
            failures++;
            $display("FAIL N=5 %0d+%0d+%0d -> %0d", x, y, ci, {c5, s5});
          end
          if (x < 4 && y < 4) begin
            checks++;
            if ({c2, s2} !== 3'(x + y + ci)) begin
              failures++;
              $display("FAIL N=2 %0d+%0d+%0d -> %0d", x, y, ci, {c2, s2});
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
