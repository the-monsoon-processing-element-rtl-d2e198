// fp_div: IEEE 754 double precision divide, round to nearest even.
//
// Both significands are first normalised (denormals shifted up by their
// leading-zero count, the exponent adjusted), then the exact quotient
// floor(ma * 2^57 / mb) is formed, at least 57 significant bits, and a
// sticky bit records a nonzero remainder; fp_round then rounds the result.
// Special cases: a NaN operand, 0/0 and inf/inf give the quiet NaN
// 7FF8_0000_0000_0000; a finite nonzero number divided by zero gives a
// signed infinity and raises divz; inf/x gives a signed infinity, x/inf
// and 0/x a signed zero.  The operation is in the architecture's float
// operation set; the restoring division written as one combinational
// divide is this design's choice.  Combinational.
module fp_div (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y,
  output logic        inexact,
  output logic        overflow,
  output logic        underflow,
  output logic        divz
);
  logic          sgn, a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [52:0]   ma, mb;
  logic [109:0]  num, q;
  logic [52:0]   rem;
  logic [58:0]   s;
  int            e, la, lb;
  logic [63:0]   r;
  logic          r_inx, r_of, r_uf;

  fp_round #(.W(59)) u_rnd (.sign(sgn), .zero_sign(sgn), .s(s), .e(e), .y(r),
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
    la     = 0;
    lb     = 0;
    for (int i = 52; i >= 0; i--) if (ma[i] == 1'b0 && la == 52 - i) la++;
    for (int i = 52; i >= 0; i--) if (mb[i] == 1'b0 && lb == 52 - i) lb++;
    if (la > 52) la = 0;  // zero operands are handled below
    if (lb > 52) lb = 0;
    ma     = ma << la;
    mb     = mb << lb;
    num    = {ma, 57'd0};
    q      = num / {57'd0, mb};
    rem    = 53'(num % {57'd0, mb});
    s      = {q[57:0], rem != 0};
    e      = ((a[62:52] == 0) ? 1 : int'(a[62:52])) - la
           - ((b[62:52] == 0) ? 1 : int'(b[62:52])) + lb - 58;
    y         = r;
    inexact   = r_inx;
    overflow  = r_of;
    underflow = r_uf;
    divz      = 1'b0;
    if (a_nan || b_nan || (a_inf && b_inf) || (a_zero && b_zero)) begin
      y = 64'h7FF8_0000_0000_0000; inexact = 0; overflow = 0; underflow = 0;
    end else if (a_inf || b_zero) begin
      y = {sgn, 11'h7FF, 52'd0}; inexact = 0; overflow = 0; underflow = 0;
      divz = b_zero;
    end else if (b_inf || a_zero) begin
      y = {sgn, 63'd0}; inexact = 0; overflow = 0; underflow = 0;
    end
  end
endmodule
