// sqr: squarer in GF(2^M), polynomial basis.
//
// Over GF(2) squaring is linear: (sum a_i z^i)^2 = sum a_i z^2i. The operand
// is spread by inserting a zero between neighbouring bits (a generate loop
// of plain wires, no gates), and the resulting 2M-1 bit polynomial is
// reduced modulo f(z) in one parallel XOR network. The result is ready in a
// single clock cycle.
//
// Interface: start_valid samples a; on the next clock edge dout holds
// a^2 mod f and out_valid is high for that one cycle. dout holds until the
// next start_valid. Synchronous active-low reset. Spreading and parallel
// reduction follow the design; the output register is this
// implementation's choice.
module sqr #(
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

  logic [2*M-2:0] spread;
  logic [M-1:0]   red;

  for (genvar i = 0; i < M; i++) begin : g_spread
    assign spread[2*i] = a[i];
    if (i < M - 1) begin : g_gap
      assign spread[2*i+1] = 1'b0;
    end
  end

  gf_reduce #(.M(M), .N(2*M-1), .POLY(POLY)) u_red (.c(spread), .r(red));

  always_ff @(posedge clk) begin
    if (!rstn) begin
      dout <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= start_valid;
      if (start_valid) dout <= red;
    end
  end

endmodule
