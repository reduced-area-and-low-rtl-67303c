// tb_sqrt_csla_widths - self-checking test of the adder at the other word
// sizes it is evaluated at: 8, 32 and 64 bits.
//
// The 8-bit adder (groups 2, 2, 3, 1) is tested exhaustively over all a, b
// and cin. The 32-bit (groups 2..7, then 3) and 64-bit (groups 2..10, then 8)
// adders get corner values, random words and long-carry words in which b is
// nearly the complement of a. Expected results are computed on 65-bit
// vectors in the testbench.
module tb_sqrt_csla_widths;
  logic [7:0]  a8, b8, s8;
  logic [31:0] a32, b32, s32;
  logic [63:0] a64, b64, s64;
  logic        cin, c8, c32, c64;
  int checks = 0, failures = 0;

  sqrt_csla_clb #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(c8));
  sqrt_csla_clb #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(c32));
  sqrt_csla_clb #(.WIDTH(64)) dut64 (.a(a64), .b(b64), .cin(cin), .sum(s64), .cout(c64));

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_wide(logic [63:0] x, logic [63:0] y, logic ci);
    logic [64:0] e64;
    logic [32:0] e32;
    a64 = x; b64 = y; a32 = x[31:0]; b32 = y[31:0]; cin = ci;
    #1;
    e64 = {1'b0, x} + {1'b0, y} + 65'(ci);
    e32 = {1'b0, x[31:0]} + {1'b0, y[31:0]} + 33'(ci);
    checks += 2;
    if ({c64, s64} !== e64) begin
      failures++;
      if (failures <= 10) $display("FAIL 64: %h + %h + %b -> %b_%h", x, y, ci, c64, s64);
    end
    if ({c32, s32} !== e32) begin
      failures++;
      if (failures <= 10) $display("FAIL 32: %h + %h + %b -> %b_%h", x[31:0], y[31:0], ci, c32, s32);
    end
  endtask

  function automatic logic [63:0] rand64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    logic [63:0] x, m;

    // 8 bits, exhaustive
    a32 = '0; b32 = '0; a64 = '0; b64 = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(i); b8 = 8'(j); cin = ci[0];
          #1;
          checks++;
          if ({c8, s8} !== 9'(i + j + ci)) begin
            failures++;
            if (failures <= 10) $display("FAIL 8: %0d + %0d + %0d -> %0d", i, j, ci, {c8, s8});
          end
        end

    // 32 and 64 bits
    for (int ci = 0; ci < 2; ci++) begin
      apply_wide('0, '0, ci[0]);
      apply_wide('1, '0, ci[0]);
      apply_wide('1, '1, ci[0]);
      apply_wide(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, ci[0]);
      for (int i = 0; i < 64; i++) apply_wide(64'(1) << i, '1, ci[0]);
    end
    for (int i = 0; i < 100_000; i++) apply_wide(rand64(), rand64(), 1'($urandom));
    for (int i = 0; i < 100_000; i++) begin
      x = rand64();
      m = rand64() & rand64() & rand64() & rand64();
      apply_wide(x, ~x ^ m, 1'($urandom));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
