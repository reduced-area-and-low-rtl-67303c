// tb_fam - exhaustive self-checking test of the modified full adder.
// For all eight input combinations, {carry, sum} must equal a + b + cin.
module tb_fam;
  logic a, b, cin, sum, carry;
  int checks = 0, failures = 0;

  fam dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b carry=%b sum=%b", a, b, cin, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
