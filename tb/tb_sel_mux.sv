// tb_sel_mux - self-checking test of the 2N:N selection mux at its default
// width (2) and at 5 bits: y must follow d0 when sel is 0 and d1 when sel
// is 1, for random data.
module tb_sel_mux;
  logic [1:0] d0_2, d1_2, y2;
  logic [4:0] d0_5, d1_5, y5;
  logic       sel;
  int checks = 0, failures = 0;

  sel_mux          dut2 (.d0(d0_2), .d1(d1_2), .sel(sel), .y(y2));
  sel_mux #(.N(5)) dut5 (.d0(d0_5), .d1(d1_5), .sel(sel), .y(y5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      d0_2 = 2'($urandom); d1_2 = 2'($urandom);
      d0_5 = 5'($urandom); d1_5 = 5'($urandom);
      sel  = i[0];
      #1;
      checks += 2;
      if (y2 !== (sel ? d1_2 : d0_2)) begin
        failures++;
        $display("FAIL N=2 sel=%b d0=%b d1=%b y=%b", sel, d0_2, d1_2, y2);
      end
      if (y5 !== (sel ? d1_5 : d0_5)) begin
        failures++;
        $display("FAIL N=5 sel=%b d0=%b d1=%b y=%b", sel, d0_5, d1_5, y5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
