// multi_sp: digit-serial (serial-parallel hybrid) multiplier in GF(2^M).
//
// Like the bit-serial multiplier, but DIGIT bits of a are consumed per clock,
// most significant digit first:  c <- c*z^DIGIT + A_k(z)*b  (mod f). a is
// zero-extended to NDIG*DIGIT bits, NDIG = ceil(M/DIGIT). Each step shifts
// the accumulator by DIGIT places, adds the DIGIT x M partial product and
// reduces the (M+DIGIT)-bit sum in one parallel XOR network. With DIGIT = 4
// a 163-bit product takes 41 steps.
//
// Interface: a one-cycle start_valid samples a and b. out_valid rises
// NDIG clock edges after the start edge and stays high, with dout held,
// until the next start_valid. Synchronous active-low reset. The digit size
// of 4 is the design's; the Horner organisation and the handshake are this
// implementation's choices.
module multi_sp #(
  parameter int unsigned  M     = bec_pkg::GF_M,
  parameter logic [M-1:0] POLY  = bec_pkg::GF_POLY,
  parameter int unsigned  DIGIT = 4
) (
  input  logic         clk,
  input  logic         rstn,
  input  logic         start_valid,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] dout,
  output logic         out_valid
);

  localparam int unsigned NDIG = (M + DIGIT - 1) / DIGIT;
  localparam int unsigned AW   = NDIG * DIGIT;
  localparam int unsigned CW   = $clog2(NDIG + 1);

  logic [AW-1:0]      a_sh;
  logic [M-1:0]       b_q, acc, acc_next;
  logic [CW-1:0]      cnt;
  logic               busy;
  logic [M+DIGIT-1:0] sum;
  logic [DIGIT-1:0]   dig;

  assign dig = a_sh[AW-1 -: DIGIT];

  always_comb begin
    sum = {acc, {DIGIT{1'b0}}};
    for (int j = 0; j < int'(DIGIT); j++)
      if (dig[j]) sum = sum ^ ((M+DIGIT)'(b_q) << j);
  end

  gf_reduce #(.M(M), .N(M + DIGIT), .POLY(POLY)) u_red (.c(sum), .r(acc_next));

  always_ff @(posedge clk) begin
    if (!rstn) begin
      busy <= 1'b0; out_valid <= 1'b0; cnt <= '0;
      a_sh <= '0; b_q <= '0; acc <= '0; dout <= '0;
    end else if (start_valid) begin
      busy <= 1'b1; out_valid <= 1'b0; cnt <= CW'(NDIG);
      a_sh <= AW'(a); b_q <= b; acc <= '0;
    end else if (busy) begin
      acc  <= acc_next;
      a_sh <= a_sh << DIGIT;
      cnt  <= cnt - 1'b1;
      if (cnt == CW'(1)) begin
        busy <= 1'b0; out_valid <= 1'b1; dout <= acc_next;
      end
    end
  end

  property p_no_restart;
    @(posedge clk) disable iff (!rstn) start_valid |-> !busy;
  endproperty
  a_no_restart: assert property (p_no_restart);

endmodule
