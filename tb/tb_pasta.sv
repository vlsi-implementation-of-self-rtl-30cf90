// tb_pasta: end-to-end self-checking test of the PASTA adder at its default
// width (16 bits, no parameter override).
//
// Each addition follows the SEL protocol: operands applied with sel = 0 for
// one clock edge, then sel raised. A word-level model of the recursion
// (S' = S xor C, C' = (S and C) << 1, starting from S = a xor b,
// C = (a and b) << 1 | cin) gives the expected sum and the expected number
// of iterations k; the adder must raise term after exactly k clock edges
// (immediately with sel when k = 0), with {cout, s} = a + b + cin, and keep
// the result while sel stays high. The operands are changed after sel rises
// to show that the iterative phase ignores them.
//
// Coverage of the mechanisms, each of which must occur at least once:
// completion in the initial phase alone (k = 0), completion after
// iterations, a carry chain over the whole width, a consumed carry-in, a
// carry-out, reset, and every transition of a slice's state diagram
// ((C_{i+1},S_i) = 00/01/10 with incoming carry 0 or 1), observed on the
// slices' state registers and compared with the half-adder table.
module tb_pasta;
  localparam int unsigned N = pasta_pkg::PASTA_WIDTH;
  localparam int          NRAND = 3000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         sel = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic         cin = 1'b0;
  logic [N-1:0] s;
  logic         cout, term;

  int checks = 0, failures = 0;
  int n_k0 = 0, n_iter = 0, n_full_chain = 0, n_cin = 0, n_cout = 0, n_reset = 0;
  int n_trans [3][2];   // [state 00/01/10][incoming carry]
  longint sum_k = 0, n_rand_done = 0;
  bit observe = 1'b0;

  pasta dut (.clk(clk), .rst_n(rst_n), .sel(sel), .a(a), .b(b), .cin(cin),
             .s(s), .cout(cout), .term(term));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: word-level form of the recursion. Returns the iteration count.
  function automatic int ref_iters(input logic [N-1:0] ra, input logic [N-1:0] rb,
                                   input logic rc, output logic [N:0] rsum);
    logic [N:0]   sv;
    logic [N+1:0] cv;
    int           k = 0;
    sv = {1'b0, ra ^ rb};
    cv = {1'b0, ra & rb, rc};
    while (cv != '0) begin
      logic [N:0] sn;
      sn = sv ^ cv[N:0];
      cv = {sv & cv[N:0], 1'b0};
      sv = sn;
      k++;
    end
    rsum = sv;
    return k;
  endfunction

  // State-diagram observer: every iterative clock edge, each slice moves from
  // (C_{i+1}, S_i) under incoming carry C_i to the half-adder result.
  // Snapshot in the active region of the edge (old state), compare after it.
  always @(posedge clk) begin
    if (observe && sel && rst_n) begin
      logic [1:0] prev_st [N+1];
      logic       prev_ci [N+1];
      for (int i = 0; i <= N; i++) begin
        prev_st[i] = {dut.st_q[i].c, dut.st_q[i].s};
        prev_ci[i] = dut.carry[i];
      end
      #1;
      for (int i = 0; i <= N; i++) begin
        logic [1:0] now_st, exp_st;
        now_st = {dut.st_q[i].c, dut.st_q[i].s};
        exp_st = {prev_st[i][0] & prev_ci[i], prev_st[i][0] ^ prev_ci[i]};
        if (prev_st[i] != 2'b11) n_trans[prev_st[i]][prev_ci[i]]++;
        checks++;
        if (now_st != exp_st) begin
          failures++;
          $display("FAIL slice %0d: %b --%0b--> %b, expected %b", i, prev_st[i],
                   prev_ci[i], now_st, exp_st);
        end
      end
    end
  end

  task automatic add_one(input logic [N-1:0] ta, input logic [N-1:0] tb_,
                         input logic tc, input bit randomised);
    logic [N:0] exp_sum;
    int         k_exp, k_got;
    k_exp = ref_iters(ta, tb_, tc, exp_sum);
    checks++;
    if (exp_sum != ({1'b0, ta} + {1'b0, tb_} + (N+1)'(tc))) begin
      failures++;   // the model itself must agree with plain addition
      $display("FAIL reference model %h+%h+%0b", ta, tb_, tc);
    end
    @(negedge clk);
    sel = 1'b0; a = ta; b = tb_; cin = tc;
    @(negedge clk);          // one rising edge in the initial phase
    sel = 1'b1;
    observe = 1'b1;
    a = N'($urandom); b = N'($urandom); cin = 1'($urandom);  // ignored now
    k_got = 0;
    #1;
    while (!term && k_got <= N + 2) begin
      @(negedge clk);
      k_got++;
    end
    checks++;
    if (k_got != k_exp) begin
      failures++;
      $display("FAIL %h+%h+%0b: term after %0d iterations, expected %0d", ta, tb_, tc, k_got, k_exp);
    end
    checks++;
    if ({cout, s} != exp_sum) begin
      failures++;
      $display("FAIL %h+%h+%0b: got %h, expected %h", ta, tb_, tc, {cout, s}, exp_sum);
    end
    checks++;
    if (k_exp > N + 1) begin
      failures++;
      $display("FAIL %h+%h+%0b: %0d iterations exceed the bound", ta, tb_, tc, k_exp);
    end
    // Result must stay put while sel is held.
    repeat (2) @(negedge clk);
    checks++;
    if (!term || {cout, s} != exp_sum) begin
      failures++;
      $display("FAIL %h+%h+%0b: result not held", ta, tb_, tc);
    end
    observe = 1'b0;
    if (k_exp == 0) n_k0++; else n_iter++;
    if (k_exp >= N) n_full_chain++;
    if (tc && k_exp > 0) n_cin++;
    if (exp_sum[N]) n_cout++;
    if (randomised) begin
      sum_k += k_exp;
      n_rand_done++;
    end
  endtask

  initial begin
    logic [N-1:0] ones;
    ones = '1;
    foreach (n_trans[i, j]) n_trans[i][j] = 0;

    // Reset: state cleared, an immediate sel shows a zero result.
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    sel = 1'b1;
    #1;
    checks++;
    if (!term || {cout, s} != '0) begin
      failures++;
      $display("FAIL after reset: term=%0b result=%h", term, {cout, s});
    end else n_reset++;
    sel = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;

    // Directed cases.
    add_one('0, '0, 1'b0, 1'b0);                     // k = 0
    add_one({(N/2){2'b10}}, {(N/2){2'b01}}, 1'b0, 1'b0); // no carries
    add_one(ones, N'(1), 1'b0, 1'b0);                // chain over all bits
    add_one(ones, '0, 1'b1, 1'b0);                   // carry-in rippling
    add_one(ones, ones, 1'b1, 1'b0);                 // maximum value
    add_one('0, '0, 1'b1, 1'b0);                     // carry-in only
    add_one(N'(1) << (N - 1), N'(1) << (N - 1), 1'b0, 1'b0); // carry-out only

    // Random operands.
    for (int r = 0; r < NRAND; r++)
      add_one(N'($urandom), N'($urandom), 1'($urandom), 1'b1);

    // Logarithmic average: mean k of random operands stays near log2(N).
    checks++;
    if (sum_k * 1.0 / n_rand_done > $clog2(N) + 2.0) begin
      failures++;
      $display("FAIL mean iterations %f too high", sum_k * 1.0 / n_rand_done);
    end
    $display("random operands: mean iterations %0.2f over %0d additions (N=%0d)",
             sum_k * 1.0 / n_rand_done, n_rand_done, N);

    // Every mechanism must have occurred.
    $display("k=0 %0d, iterated %0d, full chain %0d, carry-in %0d, carry-out %0d, reset %0d",
             n_k0, n_iter, n_full_chain, n_cin, n_cout, n_reset);
    checks++; if (n_k0 == 0)         begin failures++; $display("FAIL no k=0 completion"); end
    checks++; if (n_iter == 0)       begin failures++; $display("FAIL no iteration"); end
    checks++; if (n_full_chain == 0) begin failures++; $display("FAIL no full-width chain"); end
    checks++; if (n_cin == 0)        begin failures++; $display("FAIL no carry-in"); end
    checks++; if (n_cout == 0)       begin failures++; $display("FAIL no carry-out"); end
    checks++; if (n_reset == 0)      begin failures++; $display("FAIL no reset"); end
    for (int st = 0; st < 3; st++)
      for (int c = 0; c < 2; c++) begin
        $display("transition %02b --%0d--> seen %0d times", 2'(st), c, n_trans[st][c]);
        checks++;
        if (n_trans[st][c] == 0) begin
          failures++;
          $display("FAIL transition %02b under carry %0d never seen", 2'(st), c);
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
