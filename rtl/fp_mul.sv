// fp_mul: IEEE 754 double precision multiply, round to nearest even.
//
// Unpacks both operands (denormals get the exponent of the smallest normal
// and no hidden bit), forms the exact 106-bit product of the significands
// and hands it to fp_round.  NaN inputs and infinity times zero give the
// quiet NaN 7FF8_0000_0000_0000; infinity times a nonzero number gives a
// signed infinity.  Combinational.
module fp_mul (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y,
  output logic        inexact,
  output logic        overflow,
  output logic        underflow
);
  logic          sgn, a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [52:0]   ma, mb;
  logic [105:0]  p;
  int            e;
  logic [63:0]   r;
  logic          r_inx, r_of, r_uf;

  fp_round #(.W(106)) u_rnd (.sign(sgn), .zero_sign(sgn), .s(p), .e(e), .y(r),
                             .overflow(r_of), .underflow(r_uf), .inexact(r_inx));

  always_comb begin
    sgn    = a[63] ^ b[63];
    a_nan  = a[62:52] == 11'h7FF && a[51:0] != 0;
    b_nan  = b[62:52] == 11'h7FF && b[51:0] != 0;
    a_inf  = a[62:52] == 11'h7FF && a[51:0] == 0;
    b_inf  = b[62:52] == 11'h7FF && b[51:0] == 0;
    a_zero = a[62:0] == 0;
    b_zero = b[62:0] == 0;
    ma     = {a[62:52] != 0, a[51:0]};
    mb     = {b[62:52] != 0, b[51:0]};
    p      = ma * mb;
    e      = ((a[62:52] == 0) ? 1 : int'(a[62:52])) + ((b[62:52] == 0) ? 1 : int'(b[62:52])) - 2150;
    y         = r;
    inexact   = r_inx;
    overflow  = r_of;
    underflow = r_uf;
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = 64'h7FF8_0000_0000_0000; inexact = 0; overflow = 0; underflow = 0;
    end else if (a_inf || b_inf) begin
      y = {sgn, 11'h7FF, 52'd0}; inexact = 0; overflow = 0; underflow = 0;
    end
  end
endmodule
