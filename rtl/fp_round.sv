// fp_round: normalises and rounds an exact value S * 2^E to an IEEE 754
// double, round to nearest even.
//
// S is an unsigned W-bit significand whose least significant bit may be a
// sticky bit (any nonzero bits shifted away below it), E a signed binary
// exponent.  The value is normalised by its leading-zero count, denormal
// results are shifted right with sticky collection, and the 53-bit
// significand is rounded with guard and sticky bits.  The rounded
// significand is added to the exponent field so a carry out of the
// significand moves the exponent (and a carry out of the largest finite
// number gives infinity).  A zero S yields a zero of sign zero_sign.
// Flags: overflow (result infinite), underflow (tiny and inexact), inexact.
// Combinational; W must be at least 55.
module fp_round #(
  parameter int W = 57
) (
  input  logic         sign,
  input  logic         zero_sign,
  input  logic [W-1:0] s,
  input  int           e,
  output logic [63:0]  y,
  output logic         overflow,
  output logic         underflow,
  output logic         inexact
);
  int           lz, be, sh;
  logic [W-1:0] sn, ss, lost;
  logic         sticky, guard, rnd, tiny;
  logic [52:0]  m;
  logic [63:0]  packed_v;

  always_comb begin
    lz = W;
    for (int i = 0; i < W; i++)
      if (s[i]) lz = W - 1 - i;
    sn     = (lz >= W) ? '0 : (s << lz);
    be     = e - lz + (W - 1) + 1023;
    tiny   = be <= 0;
    sh     = tiny ? 1 - be : 0;
    if (sh > W) sh = W;
    lost   = (sh >= W) ? sn : (sn & ((W'(1) << sh) - W'(1)));
    ss     = (sh >= W) ? '0 : (sn >> sh);
    if (tiny) be = 1;
    m      = ss[W-1 -: 53];
    guard  = ss[W-54];
    sticky = (|ss[W-55:0]) || (|lost);
    rnd    = guard && (sticky || m[0]);
    inexact  = guard || sticky;
    packed_v = ({53'd0, 11'(be - 1)} << 52) + {11'd0, m} + {63'd0, rnd};
    overflow  = 1'b0;
    underflow = tiny && inexact;
    if (s == '0) begin
      y        = {zero_sign, 63'd0};
      inexact  = 1'b0;
      underflow = 1'b0;
    end else if (be >= 2047 || packed_v[62:52] == 11'h7FF) begin
      y        = {sign, 11'h7FF, 52'd0};
      overflow = 1'b1;
      inexact  = 1'b1;
    end else begin
      y = {sign, packed_v[62:0]};
    end
  end
endmodule
