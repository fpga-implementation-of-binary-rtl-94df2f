// inverse: inverter in GF(2^M) by the binary extended Euclidean algorithm.
//
// State u, v (M+1 bits) and g1, g2 (M bits) start as u = a, v = f(z),
// g1 = 1, g2 = 0 and keep the invariants g1*a = u and g2*a = v (mod f).
// One step per clock:
//   u even:  u <- u/z,  g1 <- g1/z mod f
//   v even:  v <- v/z,  g2 <- g2/z mod f
//   else:    the larger of u, v (compared as integers) gets the other added,
//            and its g the other g.
// The loop ends when u or v reaches 1; the matching g is a^-1. Division by
// z mod f is a right shift, after adding f when the constant term is 1
// (f has a constant term, so this always clears it). Each step lowers
// deg(u)+deg(v) or leaves it and clears a factor z next step, so the run
// takes at most about 4M steps and typically about 2.5M.
//
// Comparing u and v as integers instead of by degree is a simplification of
// this implementation: when the degrees differ it makes the same choice,
// and when they are equal either choice lowers a degree.
//
// Interface: a one-cycle start_valid samples a. out_valid rises when the
// result is ready (a data-dependent number of cycles) and stays high, with
// dout held, until the next start_valid. The inverse of 0 is undefined; this
// unit returns 0 for it after one step. Synchronous active-low reset. The
// use of an extended Euclidean inverter follows the design; the variant,
// the handshake and the zero case are this implementation's choices.
module inverse #(
  parameter int unsigned  M    = bec_pkg::GF_M,
  parameter logic [M-1:0] POLY = bec_pkg::GF_POLY
) (
  input  logic         clk,
  input  logic         rstn,
  input  logic         start_valid,
  input  logic [M-1:0] a,
  output logic [M-1:0] dout,
  output logic         out_valid
);

  localparam logic [M:0] F = {1'b1, POLY};

  logic [M:0]   u, v;
  logic [M-1:0] g1, g2;
  logic         busy;

  function automatic logic [M-1:0] div_z(logic [M-1:0] g);
    logic [M:0] t;
    t = {1'b0, g};
    if (g[0]) t = t ^ F;
    return t[M:1];
  endfunction

  always_ff @(posedge clk) begin
    if (!rstn) begin
      busy <= 1'b0; out_valid <= 1'b0; dout <= '0;
      u <= '0; v <= '0; g1 <= '0; g2 <= '0;
    end else if (start_valid) begin
      busy <= 1'b1; out_valid <= 1'b0;
      u <= {1'b0, a}; v <= F; g1 <= M'(1); g2 <= '0;
    end else if (busy) begin
      if (u == '0) begin
        busy <= 1'b0; out_valid <= 1'b1; dout <= '0;
      end else if (u == (M+1)'(1)) begin
        busy <= 1'b0; out_valid <= 1'b1; dout <= g1;
      end else if (v == (M+1)'(1)) begin
        busy <= 1'b0; out_valid <= 1'b1; dout <= g2;
      end else if (!u[0]) begin
        u <= u >> 1; g1 <= div_z(g1);
      end else if (!v[0]) begin
        v <= v >> 1; g2 <= div_z(g2);
      end else if (u > v) begin
        u <= u ^ v; g1 <= g1 ^ g2;
      end else begin
        v <= v ^ u; g2 <= g2 ^ g1;
      end
    end
  end

  property p_no_restart;
    @(posedge clk) disable iff (!rstn) start_valid |-> !busy;
  endproperty
  a_no_restart: assert property (p_no_restart);

endmodule
