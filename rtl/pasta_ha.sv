// pasta_ha: half adder of one PASTA bit slice.
//
// Computes the sum S_i = x xor y and the carry C_{i+1} = x and y. In the
// initial phase x, y are the operand bits a_i, b_i; in the iterative phase
// they are the slice's own previous sum S_i and the carry C_i arriving from
// the slice below, which makes each iteration S_i' = S_i xor C_i,
// C_{i+1}' = S_i and C_i. Because it is a half adder, the output pair
// (c, s) = (1, 1) cannot occur. Purely combinational.
module pasta_ha (
  input  logic                  x,  // a_i or S_i
  input  logic                  y,  // b_i or C_i
  output pasta_pkg::ha_state_t  st  // {c: C_{i+1}, s: S_i}
);

  always_comb begin
    st.s = x ^ y;
    st.c = x & y;
  end

endmodule
