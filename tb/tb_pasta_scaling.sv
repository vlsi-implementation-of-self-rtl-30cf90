// tb_pasta_scaling: average completion time of the PASTA adder against width.
//
// The adder's selling point is that, for random operands, the number of
// iterations grows with the logarithm of the width rather than linearly.
// Four adders (N = 8, 16, 32, 64) are run side by side on 1000 random
// additions each. Every result is checked against a + b + cin, and the
// number of clock edges until term is recorded. The mean must stay below
// log2(N) + 2 at every width, and doubling the width may add at most 2 to
// the mean (a linear adder would double it).
module tb_pasta_scaling;
  localparam int NW = 4;
  localparam int WIDTHS [NW] = '{8, 16, 32, 64};
  localparam int NADD = 1000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  real  mean_k [NW];
  bit   done [NW];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int unsigned N = WIDTHS[w];
    logic         sel = 1'b0;
    logic [N-1:0] a = '0, b = '0;
    logic         cin = 1'b0;
    logic [N-1:0] s;
    logic         cout, term;

    pasta #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .sel(sel), .a(a), .b(b),
                        .cin(cin), .s(s), .cout(cout), .term(term));

    initial begin
      longint sum_k = 0;
      done[w] = 1'b0;
      @(negedge clk);
      @(negedge clk);
      for (int r = 0; r < NADD; r++) begin
        logic [N-1:0] ta, tb_;
        logic         tc;
        int           k;
        ta  = N'({$urandom, $urandom});   // N <= 64
        tb_ = N'({$urandom, $urandom});
        tc = 1'($urandom);
        sel = 1'b0; a = ta; b = tb_; cin = tc;
        @(negedge clk);
        sel = 1'b1;
        #1;
        k = 0;
        while (!term && k <= int'(N) + 2) begin
          @(negedge clk);
          k++;
        end
        checks++;
        if (!term || {cout, s} != ({1'b0, ta} + {1'b0, tb_} + (N+1)'(tc))) begin
          failures++;
          $display("FAIL N=%0d: %h+%h+%0b gave %h after %0d", N, ta, tb_, tc, {cout, s}, k);
        end
        sum_k += longint'(k);
        @(negedge clk);
        sel = 1'b0;
      end
      mean_k[w] = sum_k * 1.0 / NADD;
      done[w] = 1'b1;
    end
  end

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int w = 0; w < NW; w++) begin
      $display("N=%0d: mean iterations %0.2f", WIDTHS[w], mean_k[w]);
      checks++;
      if (mean_k[w] > $clog2(WIDTHS[w]) + 2.0) begin
        failures++;
        $display("FAIL N=%0d: mean above log2(N)+2", WIDTHS[w]);
      end
      if (w > 0) begin
        checks++;
        if (mean_k[w] - mean_k[w-1] > 2.0) begin
          failures++;
          $display("FAIL N=%0d: mean grew by more than 2 on doubling", WIDTHS[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
