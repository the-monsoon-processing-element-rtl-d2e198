// fp_addsub: IEEE 754 double precision add / subtract, round to nearest
// even.
//
// Computes a + b, or a - b when sub is set.  The operand with the larger
// exponent is kept; the other significand is shifted right by the exponent
// difference into three extra low bits, everything shifted further being
// ORed into the last bit (sticky).  The 57-bit sum or difference is then
// normalised and rounded by fp_round.  An exact zero difference is +0
// (-0 only when both addends are -0).  NaN inputs and infinity minus
// infinity give the quiet NaN 7FF8_0000_0000_0000.  Combinational.
module fp_addsub (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        sub,
  output logic [63:0] y,
  output logic        inexact,
  output logic        overflow,
  output logic        underflow
);
  logic [63:0] bb, x, z;
  logic        a_nan, b_nan, a_inf, b_inf, swap, eff_sub, sgn;
  int          ex, ez, d;
  logic [56:0] mx, mz, mzs, s;
  logic [63:0] r;
  logic        r_inx, r_of, r_uf;

  fp_round #(.W(57)) u_rnd (.sign(sgn), .zero_sign(x[63] & z[63]), .s(s), .e(ex - 1078),
                            .y(r), .overflow(r_of), .underflow(r_uf), .inexact(r_inx));

  always_comb begin
    bb     = {b[63] ^ sub, b[62:0]};
    a_nan  = a[62:52] == 11'h7FF && a[51:0] != 0;
    b_nan  = b[62:52] == 11'h7FF && b[51:0] != 0;
    a_inf  = a[62:52] == 11'h7FF && a[51:0] == 0;
    b_inf  = b[62:52] == 11'h7FF && b[51:0] == 0;
    swap   = bb[62:0] > a[62:0];
    x      = swap ? bb : a;
    z      = swap ? a : bb;
    ex     = (x[62:52] == 0) ? 1 : int'(x[62:52]);
    ez     = (z[62:52] == 0) ? 1 : int'(z[62:52]);
    d      = ex - ez;
    mx     = {1'b0, x[62:52] != 0, x[51:0], 3'b000};
    mz     = {1'b0, z[62:52] != 0, z[51:0], 3'b000};
    if (d > 56) mzs = {56'd0, mz != 0};
    else        mzs = (mz >> d) | {56'd0, (mz & ((57'd1 << d) - 57'd1)) != 0};
    eff_sub = x[63] ^ z[63];
    s       = eff_sub ? mx - mzs : mx + mzs;
    sgn     = x[63];
    y         = r;
    inexact   = r_inx;
    overflow  = r_of;
    underflow = r_uf;
    if (a_nan || b_nan || (a_inf && b_inf && (a[63] != bb[63]))) begin
      y = 64'h7FF8_0000_0000_0000; inexact = 0; overflow = 0; underflow = 0;
    end else if (a_inf || b_inf) begin
      y = a_inf ? a : bb; inexact = 0; overflow = 0; underflow = 0;
    end
  end
endmodule
