// fp_sqrt: IEEE 754 double precision square root, round to nearest even.
//
// The significand is normalised (denormals shifted up), the exponent made
// even by moving one bit into the significand, and the radicand
// R = m * 2^60 (at most 114 bits) is given to a bit-by-bit restoring square
// root that yields a 57-bit root and a remainder; a nonzero remainder is
// the sticky bit for fp_round.  Special cases: NaN gives the quiet NaN,
// a negative nonzero operand gives the quiet NaN (the status word has no
// invalid-operation bit, so no flag is raised), -0
// gives -0, +inf gives +inf.  A square root is never tiny or too large, so
// only inexact is reported.  The operation is in the architecture's float
// operation set; the restoring algorithm is this design's choice.
// Combinational.
module fp_sqrt (
  input  logic [63:0] a,
  output logic [63:0] y,
  output logic        inexact
);
  logic [52:0]   ma;
  logic [113:0]  rad;
  logic [115:0]  rem, trial;
  logic [56:0]   root;
  logic [58:0]   s;
  int            la, ex, e;
  logic [63:0]   r;
  logic          r_inx, r_of, r_uf;

  fp_round #(.W(59)) u_rnd (.sign(1'b0), .zero_sign(1'b0), .s(s), .e(e), .y(r),
                            .overflow(r_of), .underflow(r_uf), .inexact(r_inx));

  always_comb begin
    ma = {a[62:52] != 0, a[51:0]};
    la = 0;
    for (int i = 52; i >= 0; i--) if (ma[i] == 1'b0 && la == 52 - i) la++;
    if (la > 52) la = 0;
    ma = ma << la;
    // a = ma * 2^ex
    ex  = ((a[62:52] == 0) ? 1 : int'(a[62:52])) - la - 1075;
    rad = {1'b0, ma, 60'd0};
    if (ex % 2 != 0) begin
      rad = {ma, 61'd0};
      ex  = ex - 1;
    end
    // restoring square root, two radicand bits per step
    rem  = '0;
    root = '0;
    for (int i = 56; i >= 0; i--) begin
      rem   = {rem[113:0], rad[2*i+1 -: 2]};
      trial = {57'd0, root, 2'b01};
      root  = root << 1;
      if (rem >= trial) begin
        rem     = rem - trial;
        root[0] = 1'b1;
      end
    end
    s       = {1'b0, root, rem != 0};
    e       = (ex - 60) / 2 - 1;
    y       = r;
    inexact = r_inx;
    if (a[62:52] == 11'h7FF && a[51:0] != 0) begin
      y = 64'h7FF8_0000_0000_0000; inexact = 0;
    end else if (a[62:0] == 0) begin
      y = a; inexact = 0;
    end else if (a[63]) begin
      y = 64'h7FF8_0000_0000_0000; inexact = 0;
    end else if (a[62:52] == 11'h7FF) begin
      y = a; inexact = 0;
    end
  end
endmodule
