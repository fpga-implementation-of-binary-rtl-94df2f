// multi_p: fully parallel multiplier in GF(2^M), polynomial basis.
//
// All 2M-1 coefficients C_k = XOR over i+j=k of a_i b_j of the schoolbook
// product are formed at once in an AND/XOR array, and the product is reduced
// modulo f(z) by the parallel XOR network of gf_reduce. The whole
// multiplication is one clock cycle, at the cost of about M^2 gates: the
// fastest and by far the largest of the multipliers.
//
// Interface: start_valid samples a and b; on the next clock edge dout holds
// a*b mod f and out_valid is high for that one cycle (start_valid delayed by
// one). dout holds until the next start_valid. Synchronous active-low reset.
// The output register is this implementation's choice; the arithmetic
// follows the design's bit-parallel formula.
module multi_p #(
  parameter int unsigned  M    = bec_pkg::GF_M,
  parameter logic [M-1:0] POLY = bec_pkg::GF_POLY
) (
  input  logic         clk,
  input  logic         rstn,
  input  logic         start_valid,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] dout,
  output logic         out_valid
);

  logic [2*M-2:0] prod;
  logic [M-1:0]   red;

  always_comb begin
    prod = '0;
    for (int i = 0; i < int'(M); i++)
      if (a[i]) prod = prod ^ ((2*M-1)'(b) << i);
  end

  gf_reduce #(.M(M), .N(2*M-1), .POLY(POLY)) u_red (.c(prod), .r(red));

  always_ff @(posedge clk) begin
    if (!rstn) begin
      dout <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= start_valid;
      if (start_valid) dout <= red;
    end
  end

endmodule
