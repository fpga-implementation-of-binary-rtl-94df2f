// multi_s: bit-serial multiplier in GF(2^M), polynomial basis.
//
// Computes dout = a * b mod f(z) by Horner's rule, most significant bit of a
// first:  c <- c*z + a_i*b  (mod f), for i = M-1 down to 0. One bit of a is
// consumed per clock, so the smallest of the multipliers takes M cycles.
// Multiplying by z is a one-place left shift; the coefficient that falls out
// at z^M is folded back as POLY.
//
// Interface: a one-cycle start_valid samples a and b. out_valid rises M
// clock edges after the start edge and stays high, with dout held, until the
// next start_valid. Synchronous active-low reset. The algorithm follows the
// bit-serial formula of the design; the handshake, the reset and the latency
// bookkeeping are this implementation's own.
module multi_s #(
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

  localparam int unsigned CW = $clog2(M + 1);

  logic [M-1:0]  a_sh, b_q, acc;
  logic [CW-1:0] cnt;
  logic          busy;
  logic [M-1:0]  acc_next;

  // c*z mod f, plus a_i*b
  always_comb begin
    acc_next = {acc[M-2:0], 1'b0} ^ (acc[M-1] ? POLY : '0);
    if (a_sh[M-1]) acc_next = acc_next ^ b_q;
  end

  always_ff @(posedge clk) begin
    if (!rstn) begin
      busy <= 1'b0; out_valid <= 1'b0; cnt <= '0;
      a_sh <= '0; b_q <= '0; acc <= '0; dout <= '0;
    end else if (start_valid) begin
      busy <= 1'b1; out_valid <= 1'b0; cnt <= CW'(M);
      a_sh <= a; b_q <= b; acc <= '0;
    end else if (busy) begin
      acc  <= acc_next;
      a_sh <= a_sh << 1;
      cnt  <= cnt - 1'b1;
      if (cnt == CW'(1)) begin
        busy <= 1'b0; out_valid <= 1'b1; dout <= acc_next;
      end
    end
  end

  // A new operation may only start when the previous one has finished.
  property p_no_restart;
    @(posedge clk) disable iff (!rstn) start_valid |-> !busy;
  endproperty
  a_no_restart: assert property (p_no_restart);

endmodule
