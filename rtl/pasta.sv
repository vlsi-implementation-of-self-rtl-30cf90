// pasta: N-bit parallel self-timed adder (PASTA), recursive half-adder form.
//
// The adder has N+1 bit slices, each a half adder HA_i fed by two 2:1
// multiplexers. While sel = 0 (initial phase) slice i adds the operand bits:
// S_i = a_i xor b_i, C_{i+1} = a_i and b_i; slice N gets 0 on both inputs.
// After sel rises (iterative phase) every slice adds its own sum to the
// carry from the slice below: S_i' = S_i xor C_i, C_{i+1}' = S_i and C_i.
// All slices work in parallel, so independent carry chains resolve at the
// same time and the number of iterations k equals the longest chain.
// When all carries are zero the completion detection unit raises term, and
// {cout, s} = {S_N, S_{N-1}..S_0} is the sum a + b + cin.
//
// Timing. Each slice's state (C_{i+1}, S_i) is held in a flip-flop and one
// clock edge is one iteration; the slices thus advance in lock step, the
// condition under which the recursion is exact. The loop in the original
// circuit is closed by gate delays alone; the clock is this implementation's
// way of separating the iterations. Protocol:
//   1. hold a, b, cin with sel = 0 for at least one rising edge of clk;
//   2. raise sel and hold it, operands may change;
//   3. term rises k edges later (combinationally with sel if k = 0) and
//      stays high with s, cout stable until sel falls.
// k is at most N without a carry-in and at most N+1 with one.
//
// Carry-in: C_0 is loaded with cin in the initial phase, added in the first
// iteration and cleared afterwards (a choice of this implementation, so the
// carry-in is added exactly once). Reset (asynchronous, active low) clears
// every slice to state (0,0).
module pasta #(
  parameter int unsigned N = pasta_pkg::PASTA_WIDTH // operand width
) (
  input  logic         clk,   // iteration clock
  input  logic         rst_n, // asynchronous reset, active low
  input  logic         sel,   // SEL / Req: 0 load operands, 1 iterate
  input  logic [N-1:0] a,     // operand a
  input  logic [N-1:0] b,     // operand b
  input  logic         cin,   // carry-in
  output logic [N-1:0] s,     // sum bits S_{N-1}..S_0
  output logic         cout,  // carry-out, S_N
  output logic         term   // TERM: s and cout valid
);
  import pasta_pkg::*;

  ha_state_t        st_q [N+1];  // registered (C_{i+1}, S_i) of slice i
  ha_state_t        st_d [N+1];  // half-adder outputs
  logic             c0_q;        // pending carry-in C_0
  logic [N+1:0]     carry;       // C_{N+1}..C_0
  logic [N:0]       op_a, op_b;  // operand inputs of the slices
  logic [N:0]       ha_x, ha_y;  // half-adder inputs after the multiplexers

  // Operands of the slices; slice N is fed with zeros.
  always_comb begin
    op_a = {1'b0, a};
    op_b = {1'b0, b};
  end

  // Carries seen by the slices: C_0 is the pending carry-in,
  // C_{i+1} comes out of slice i.
  always_comb begin
    carry[0] = c0_q;
    for (int i = 0; i <= N; i++) carry[i+1] = st_q[i].c;
  end

  for (genvar i = 0; i <= N; i++) begin : g_slice
    pasta_mux2 u_mux_x (.sel(sel), .d0(op_a[i]), .d1(st_q[i].s), .y(ha_x[i]));
    pasta_mux2 u_mux_y (.sel(sel), .d0(op_b[i]), .d1(carry[i]),  .y(ha_y[i]));
    pasta_ha   u_ha    (.x(ha_x[i]), .y(ha_y[i]), .st(st_d[i]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st_q[i] <= '0;
      else        st_q[i] <= st_d[i];
    end

    // Fig. 2: a half adder never reaches state (1,1).
    a_no_state_11 : assert property (@(posedge clk) disable iff (!rst_n)
                                     !(st_q[i].c && st_q[i].s));
  end

  // Carry-in: captured in the initial phase, consumed by the first iteration.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c0_q <= 1'b0;
    else        c0_q <= sel ? 1'b0 : cin;
  end

  pasta_cdu #(.N(N)) u_cdu (.sel(sel), .carry(carry), .term(term));

  always_comb begin
    for (int i = 0; i < N; i++) s[i] = st_q[i].s;
    cout = st_q[N].s;
  end

  // Once complete, the result holds until sel falls.
  a_result_stable : assert property (@(posedge clk) disable iff (!rst_n)
                                     term && sel |=> !sel || (term && $stable({cout, s})));

endmodule
