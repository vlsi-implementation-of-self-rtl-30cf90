// pasta_cdu: completion detection unit of the PASTA adder.
//
// The addition is finished when no carry is left to propagate, i.e. when
// every carry of the adder is zero. The unit is a wide NOR of the carries,
// qualified with sel so that term is raised only in the iterative phase.
// carry[i] is C_i for i = 0..N+1: C_1..C_N are the termination condition
// proper, C_{N+1} (out of the top slice) is drawn into the unit as well, and
// C_0 is the pending carry-in, included here so that term cannot rise before
// a carry-in has been added. Including C_0 and gating with sel are choices of
// this implementation. Purely combinational.
module pasta_cdu #(
  parameter int unsigned N = pasta_pkg::PASTA_WIDTH // operand width
) (
  input  logic         sel,   // SEL: 1 in the iterative phase
  input  logic [N+1:0] carry, // C_{N+1}..C_0
  output logic         term   // all carries zero: result valid
);

  always_comb term = sel & ~(|carry);

endmodule
