// pasta_mux2: one-bit two-input multiplexer of a PASTA bit slice.
//
// Every half adder of the adder has two of these in front of its inputs.
// While sel (the SEL / Req signal) is 0 the multiplexer passes the operand
// bit d0; once sel has risen it passes the fed-back sum or carry bit d1,
// which closes the iteration loop. Purely combinational, no timing of its
// own. The selection rule is the adder's; the one-bit form is a choice of
// this implementation.
module pasta_mux2 (
  input  logic sel, // 0: operand, 1: feedback
  input  logic d0,  // operand bit (a_i, b_i, or 0 at the top bit)
  input  logic d1,  // feedback bit (S_i or C_i)
  output logic y    // to the half adder
);

  always_comb y = sel ? d1 : d0;

endmodule
