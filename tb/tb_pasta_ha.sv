// tb_pasta_ha: exhaustive self-checking test of the half adder.
// For each of the four input pairs the output pair (c, s) must equal the
// two-bit arithmetic sum x + y, and the pair (1,1) must never appear.
module tb_pasta_ha;
  import pasta_pkg::*;
  logic      x, y;
  ha_state_t st;
  int        checks = 0, failures = 0;

  pasta_ha dut (.x(x), .y(y), .st(st));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if ({st.c, st.s} !== 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%0b y=%0b c=%0b s=%0b", x, y, st.c, st.s);
      end
      checks++;
      if (st.c && st.s) begin
        failures++;
        $display("FAIL state (1,1) produced");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
