// tb_pasta_cdu: self-checking test of the completion detection unit at the
// 16-bit default. Applies the all-zero carry vector, every single set carry
// (walking one over C_0..C_17) and random vectors, each with sel = 0 and
// sel = 1; term must be 1 exactly when sel = 1 and no carry is set.
module tb_pasta_cdu;
  localparam int unsigned N = pasta_pkg::PASTA_WIDTH;
  logic         sel, term;
  logic [N+1:0] carry;
  int           checks = 0, failures = 0;

  pasta_cdu dut (.sel(sel), .carry(carry), .term(term));

  task automatic check_one(input logic s_i, input logic [N+1:0] c_i);
    sel   = s_i;
    carry = c_i;
    #1;
    checks++;
    if (term !== (s_i && (c_i == '0))) begin
      failures++;
      $display("FAIL sel=%0b carry=%h term=%0b", s_i, c_i, term);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s_v = 0; s_v < 2; s_v++) begin
      check_one(1'(s_v), '0);
      for (int i = 0; i < N + 2; i++) check_one(1'(s_v), (N+2)'(1) << i);
      for (int r = 0; r < 200; r++) check_one(1'(s_v), (N+2)'({$urandom, $urandom}) & (N+2)'({$urandom, $urandom}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
