// gf_reduce: combinational reduction of a polynomial over GF(2) of up to N
// coefficients modulo f(z) = z^M + POLY(z).
//
// Works from the highest coefficient down: each set coefficient at z^i,
// i >= M, is cancelled by adding f(z) * z^(i-M). With a constant POLY this
// folds into a fixed XOR network, so the whole reduction is one level of
// combinational logic ("fully parallel modulo"). Used by the parallel
// multiplier, the digit-serial multiplier, the Karatsuba multiplier and the
// squarer. N must exceed M. No clock; output valid in the same cycle as
// the input.
module gf_reduce #(
  parameter int unsigned      M    = bec_pkg::GF_M,
  parameter int unsigned      N    = 2 * M - 1,
  parameter logic [M-1:0]     POLY = bec_pkg::GF_POLY
) (
  input  logic [N-1:0] c,
  output logic [M-1:0] r
);

  localparam logic [N-1:0] FN = N'({1'b1, POLY});

  always_comb begin
    logic [N-1:0] t;
    t = c;
    for (int i = N - 1; i >= int'(M); i--)
      if (t[i]) t = t ^ (FN << (i - int'(M)));
    r = t[M-1:0];
  end

endmodule
