// tb_pasta_mux2: exhaustive self-checking test of the one-bit 2:1 multiplexer.
// All eight input combinations are applied and the output is compared with
// the selection rule (sel = 0 passes d0, sel = 1 passes d1).
module tb_pasta_mux2;
  logic sel, d0, d1, y;
  int   checks = 0, failures = 0;

  pasta_mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, d1, d0} = 3'(v);
      #1;
      checks++;
      if (y !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL sel=%0b d1=%0b d0=%0b y=%0b", sel, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
