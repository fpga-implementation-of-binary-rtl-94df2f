// multi_2way: GF(2^M) multiplier using one level of 2-way Karatsuba-Ofman.
//
// The operands are zero-extended to an even width 2H (H = ceil(M/2), 82 for
// M = 163) and split into halves, a = A0 + z^H A1 and b = B0 + z^H B1. Three
// half-size carry-less products run side by side:
//     P0 = A0 B0,  P1 = (A0+A1)(B0+B1),  P2 = A1 B1,
// and the full product is  P0 + (P0+P1+P2) z^H + P2 z^2H , which is then
// reduced modulo f(z) in one parallel XOR network. Three half-size products
// replace the four of the schoolbook split.
//
// Each half product is formed by a clmul_ds that takes DIGIT bits per clock,
// so the unit finishes in ceil(H/DIGIT)+1 steps (22 for the defaults), ahead
// of the 4-bit digit-serial multiplier (41 steps).
//
// Interface: a one-cycle start_valid samples a and b. out_valid rises
// ceil(H/DIGIT)+1 clock edges after the start edge and stays high, with dout
// held, until the next start_valid. Synchronous active-low reset. The
// Karatsuba split follows the design; the even-width padding, the sequential
// half products and DIGIT are this implementation's choices.
module multi_2way #(
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

  localparam int unsigned H  = (M + 1) / 2;
  localparam int unsigned PW = 2 * H - 1;   // width of a half product
  localparam int unsigned FW = 4 * H - 1;   // width of the recombined product

  logic [2*H-1:0] a_ext, b_ext;
  logic [H-1:0]   a0, a1, b0, b1;
  logic [PW-1:0]  p0, p1, p2;
  logic           d0, d1, d2;
  logic [PW-1:0]  mid;
  logic [FW-1:0]  full;
  logic [M-1:0]   red;
  logic           busy;

  assign a_ext = (2*H)'(a);
  assign b_ext = (2*H)'(b);
  assign a0 = a_ext[H-1:0];
  assign a1 = a_ext[2*H-1:H];
  assign b0 = b_ext[H-1:0];
  assign b1 = b_ext[2*H-1:H];

  clmul_ds #(.N(H), .DIGIT(DIGIT)) u_p0 (
    .clk, .rstn, .start(start_valid), .a(a0), .b(b0), .p(p0), .done(d0));
  clmul_ds #(.N(H), .DIGIT(DIGIT)) u_p1 (
    .clk, .rstn, .start(start_valid), .a(a0 ^ a1), .b(b0 ^ b1), .p(p1), .done(d1));
  clmul_ds #(.N(H), .DIGIT(DIGIT)) u_p2 (
    .clk, .rstn, .start(start_valid), .a(a1), .b(b1), .p(p2), .done(d2));

  // C0 + C1 z^H + C2 z^2H with C0 = P0, C1 = P0+P1+P2, C2 = P2
  assign mid  = p0 ^ p1 ^ p2;
  assign full = FW'(p0) ^ (FW'(mid) << H) ^ (FW'(p2) << (2*H));

  gf_reduce #(.M(M), .N(FW), .POLY(POLY)) u_red (.c(full), .r(red));

  always_ff @(posedge clk) begin
    if (!rstn) begin
      busy <= 1'b0; out_valid <= 1'b0; dout <= '0;
    end else if (start_valid) begin
      busy <= 1'b1; out_valid <= 1'b0;
    end else if (busy && d0) begin
      busy <= 1'b0; out_valid <= 1'b1; dout <= red;
    end
  end

  // The three half products run in lock step.
  property p_lockstep;
    @(posedge clk) disable iff (!rstn) d0 == d1 && d1 == d2;
  endproperty
  a_lockstep: assert property (p_lockstep);

  property p_no_restart;
    @(posedge clk) disable iff (!rstn) start_valid |-> !busy;
  endproperty
  a_no_restart: assert property (p_no_restart);

endmodule
