// clmul_ds: sequential carry-less (GF(2)[z]) multiplier of two N-bit
// polynomials, with no reduction. Helper of the 2-way Karatsuba multiplier.
//
// Horner's rule over DIGIT-bit digits of a, most significant first:
// p <- p*z^DIGIT + A_k(z)*b. NDIG = ceil(N/DIGIT) steps. The full product has
// 2N-1 coefficients; the accumulator keeps exactly those, which is exact
// because no intermediate value exceeds the final degree.
//
// Interface: start samples a and b; done is a one-cycle pulse NDIG clock
// edges after the start edge, with p valid from then until the next start.
// Synchronous active-low reset.
module clmul_ds #(
  parameter int unsigned N     = 82,
  parameter int unsigned DIGIT = 4
) (
  input  logic           clk,
  input  logic           rstn,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p,
  output logic           done
);

  localparam int unsigned NDIG = (N + DIGIT - 1) / DIGIT;
  localparam int unsigned AW   = NDIG * DIGIT;
  localparam int unsigned CW   = $clog2(NDIG + 1);

  logic [AW-1:0]    a_sh;
  logic [N-1:0]     b_q;
  logic [CW-1:0]    cnt;
  logic             busy;
  logic [2*N-2:0]   p_next;
  logic [DIGIT-1:0] dig;

  assign dig = a_sh[AW-1 -: DIGIT];

  always_comb begin
    p_next = p << DIGIT;
    for (int j = 0; j < int'(DIGIT); j++)
      if (dig[j]) p_next = p_next ^ ((2*N-1)'(b_q) << j);
  end

  always_ff @(posedge clk) begin
    if (!rstn) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0; a_sh <= '0; b_q <= '0; p <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1; cnt <= CW'(NDIG); a_sh <= AW'(a); b_q <= b; p <= '0;
      end else if (busy) begin
        p    <= p_next;
        a_sh <= a_sh << DIGIT;
        cnt  <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0; done <= 1'b1;
        end
      end
    end
  end

endmodule
