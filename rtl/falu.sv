// falu: the floating point, arithmetic and logic unit.
//
// Combinational.  Takes the 64-bit immediates of A and B and the 8-bit OP of
// FUCTL, produces Y and the status bits used by the exception mask
// (DIVZ, UF, OF, INX, NAN, DEN, ZERO, NEG; ALWAYS is added by the caller).
//
// Implemented groups:
//  * integer (0x80..0x8D): multiplies (low 64 bits; OF when the full
//    product does not fit), add / subtract / reverse subtract (OF on signed
//    overflow), abs, negate, signed and unsigned min / max, pass, and an
//    arithmetic shift of A by the signed count B (B > 0 shifts left);
//  * integer comparisons (0xB8..0xBE) and float comparisons (0x18..0x1E),
//    with the printed codes: true is all ones, false all zeros; a NaN
//    operand makes every float comparison false except "not equal";
//  * the sixteen bitwise functions (0x40..0x4F, OP[3:0] is the truth table
//    indexed by {A_i, B_i}), logical shift, rotate and bit reversal;
//  * float sign manipulation and selection: FABS, FNEG, FPASS, FMIN, FMAX;
//  * float add / subtract (FADD, FSUB, FSUBR and the absolute-value forms),
//    multiply (FMUL and forms), divide (FDIV, DIVZ on a zero divisor) and
//    square root (FSQRT), IEEE double precision, round to nearest even, via
//    fp_addsub, fp_mul, fp_div and fp_sqrt.
//  * conversions FCI / FCU (round to nearest even), FCTI / FCTU (toward
//    zero), ICF / IUCF, FCICF and FCITCF; a float too large for the integer
//    type (or negative for FCU / FCTU, or NaN) saturates and sets OF.
// All operations are single-cycle combinational logic.  ZERO and NEG
// describe Y for every operation; NAN and DEN describe the float inputs of
// float operations; INX, OF and UF come from the float adder, multiplier
// and converters, OF also from integer overflow.  The unused overflow and
// underflow outputs of the integer-to-float rounder cannot occur (a 64-bit
// integer always fits a double).  The OP numbers other than the comparisons are this
// design's assignment (see monsoon_pkg).
module falu
  import monsoon_pkg::*;
(
  input  logic [7:0]  op,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y,
  output logic [8:0]  status
);
  // ---- helpers
  function automatic logic is_nan(input logic [63:0] f);
    return (f[62:52] == 11'h7FF) && (f[51:0] != 0);
  endfunction
  function automatic logic is_den(input logic [63:0] f);
    return (f[62:52] == 11'h000) && (f[51:0] != 0);
  endfunction
  // Map a double onto an unsigned key that orders like the numbers
  // (both zeros map to the same key).
  function automatic logic [63:0] fkey(input logic [63:0] f);
    if (f[62:0] == 0) return 64'h8000_0000_0000_0000;
    return f[63] ? ~f : (f | 64'h8000_0000_0000_0000);
  endfunction
  function automatic logic [63:0] shl_signed(input logic [63:0] v, input logic [63:0] cnt,
                                             input logic arith);
    logic [63:0] mag;
    mag = cnt[63] ? -cnt : cnt;
    if (!cnt[63]) return (mag > 63) ? 64'd0 : v << mag[5:0];
    if (mag > 63) return (arith && v[63]) ? '1 : 64'd0;
    return arith ? 64'($signed(v) >>> mag[5:0]) : v >> mag[5:0];
  endfunction

  logic         fnan_in, cmp_lt, cmp_eq, cmp_r;
  logic [127:0] ps, pu, psu;
  logic [64:0]  sum;
  logic         of, inx, divz, uf, is_float;
  logic [63:0]  rev;
  logic [3:0]   tt;

  // float -> integer conversion
  function automatic logic [64:0] f2i(input logic [63:0] f, input logic rnd,
                                      input logic uns);
    // returns {overflow, value}
    logic [52:0]  m;
    logic [127:0] mag, rem;
    int           sh;
    logic         guard, sticky, ovf;
    logic [63:0]  v;
    m   = {f[62:52] != 0, f[51:0]};
    sh  = ((f[62:52] == 0) ? 1 : int'(f[62:52])) - 1075;
    if (sh >= 0) begin
      mag = (sh > 75) ? {128{1'b1}} : ({75'd0, m} << sh);
      guard = 1'b0; sticky = 1'b0;
    end else if (-sh > 60) begin
      mag = '0; guard = 1'b0; sticky = (m != 0);
    end else begin
      mag    = {75'd0, m} >> (-sh);
      rem    = {75'd0, m} & ((128'd1 << (-sh)) - 128'd1);
      guard  = rem[-sh-1];
      sticky = (rem & ((128'd1 << (-sh-1)) - 128'd1)) != 0;
    end
    if (rnd && guard && (sticky || mag[0])) mag = mag + 128'd1;
    if (f[62:52] == 11'h7FF) begin
      ovf = 1'b1; v = uns ? '1 : 64'h7FFF_FFFF_FFFF_FFFF;
    end else if (uns) begin
      ovf = (f[63] && mag != 0) || (mag[127:64] != 0);
      v   = f[63] ? 64'd0 : (ovf ? '1 : mag[63:0]);
    end else if (f[63]) begin
      ovf = mag > 128'h8000_0000_0000_0000;
      v   = ovf ? 64'h8000_0000_0000_0000 : -mag[63:0];
    end else begin
      ovf = mag > 128'h7FFF_FFFF_FFFF_FFFF;
      v   = ovf ? 64'h7FFF_FFFF_FFFF_FFFF : mag[63:0];
    end
    return {ovf, v};
  endfunction

  // integer -> float through the shared rounder
  logic [64:0] cv;
  logic [63:0] cvt_src, cvt_mag, cvt_r;
  logic        cvt_neg, cvt_inx, cvt_of, cvt_uf;

  fp_round #(.W(64)) u_cvt (.sign(cvt_neg), .zero_sign(1'b0), .s(cvt_mag), .e(0),
                            .y(cvt_r), .overflow(cvt_of), .underflow(cvt_uf),
                            .inexact(cvt_inx));

  // float arithmetic
  logic [63:0] add_x, add_y, add_r, mul_x, mul_y, mul_r;
  logic        add_sub, add_inx, add_of, add_uf, mul_inx, mul_of, mul_uf;

  fp_addsub u_add (.a(add_x), .b(add_y), .sub(add_sub), .y(add_r),
                   .inexact(add_inx), .overflow(add_of), .underflow(add_uf));
  logic [63:0] div_r, sqrt_r;
  logic        div_inx, div_of, div_uf, div_z, sqrt_inx;

  fp_div    u_div (.a(a), .b(b), .y(div_r), .inexact(div_inx), .overflow(div_of),
                   .underflow(div_uf), .divz(div_z));
  fp_sqrt   u_sqrt (.a(a), .y(sqrt_r), .inexact(sqrt_inx));
  fp_mul    u_mul (.a(mul_x), .b(mul_y), .y(mul_r),
                   .inexact(mul_inx), .overflow(mul_of), .underflow(mul_uf));

  always_comb begin
    for (int i = 0; i < 64; i++) rev[i] = a[63-i];
    ps   = 128'($signed(a) * $signed(b));
    pu   = {64'd0, a} * {64'd0, b};
    psu  = 128'($signed(a) * $signed({1'b0, b}));
    sum  = '0;
    of   = 1'b0;
    inx  = 1'b0;
    divz = 1'b0;
    uf   = 1'b0;
    y    = '0;
    tt   = '0;
    is_float = (op[7:6] == 2'b00);
    fnan_in  = is_nan(a) || is_nan(b);

    // float adder / multiplier operand set-up
    add_x   = a;
    add_y   = b;
    add_sub = 1'b0;
    unique case (op)
      OP_FSUB, OP_FSUBA:   add_sub = 1'b1;
      OP_FSUBR, OP_FSUBRA: begin add_x = b; add_y = a; add_sub = 1'b1; end
      default: ;
    endcase
    mul_x = a;
    mul_y = b;
    unique case (op)
      OP_FMULAA: begin mul_x = {1'b0, a[62:0]}; mul_y = {1'b0, b[62:0]}; end
      OP_FMULAB: mul_y = {1'b0, b[62:0]};
      default: ;
    endcase

    // conversions
    unique case (op)
      OP_FCI, OP_FCICF: cv = f2i(a, 1'b1, 1'b0);
      OP_FCU:           cv = f2i(a, 1'b1, 1'b1);
      OP_FCTU:          cv = f2i(a, 1'b0, 1'b1);
      default:          cv = f2i(a, 1'b0, 1'b0);
    endcase
    cvt_src = (op == OP_FCICF || op == OP_FCITCF) ? cv[63:0] : a;
    cvt_neg = (op != OP_IUCF) && cvt_src[63];
    cvt_mag = cvt_neg ? -cvt_src : cvt_src;

    // comparisons
    if (op[7]) begin
      cmp_lt = $signed(a) < $signed(b);
      cmp_eq = a == b;
    end else begin
      cmp_lt = fkey(a) < fkey(b);
      cmp_eq = fkey(a) == fkey(b);
    end
    unique case (op[1:0])
      2'b00:   cmp_r = cmp_eq;
      2'b01:   cmp_r = cmp_lt;
      default: cmp_r = cmp_lt || cmp_eq;
    endcase
    if (op[2]) cmp_r = !cmp_r;
    if (!op[7] && fnan_in) cmp_r = op[2] && (op[1:0] == 2'b00);

    if (op[7:4] == 4'h4) begin
      tt = op[3:0];
      for (int i = 0; i < 64; i++) y[i] = tt[{a[i], b[i]}];
    end else begin
      unique case (op)
        OP_FEQ, OP_FLT, OP_FLEQ, OP_FNEQ, OP_FGEQ, OP_FGT,
        OP_IEQ, OP_ILT, OP_ILEQ, OP_INEQ, OP_IGEQ, OP_IGT: y = {64{cmp_r}};
        OP_FADD, OP_FSUB, OP_FSUBR: begin y = add_r; inx = add_inx; of = add_of; uf = add_uf; end
        OP_FADDA, OP_FSUBA, OP_FSUBRA: begin
          y = {1'b0, add_r[62:0]}; inx = add_inx; of = add_of; uf = add_uf;
        end
        OP_FMUL, OP_FMULAA, OP_FMULAB: begin y = mul_r; inx = mul_inx; of = mul_of; uf = mul_uf; end
        OP_FDIV: begin
          y = div_r; inx = div_inx; of = div_of; uf = div_uf; divz = div_z;
        end
        OP_FSQRT: begin y = sqrt_r; inx = sqrt_inx; end
        OP_FMULA: begin y = {1'b0, mul_r[62:0]}; inx = mul_inx; of = mul_of; uf = mul_uf; end
        OP_FCI, OP_FCU, OP_FCTI, OP_FCTU: begin y = cv[63:0]; of = cv[64]; end
        OP_ICF, OP_IUCF: begin y = cvt_r; inx = cvt_inx; end
        OP_FCICF, OP_FCITCF: begin y = cvt_r; of = cv[64]; end
        OP_FABS:  y = {1'b0, a[62:0]};
        OP_FNEG:  y = {~a[63], a[62:0]};
        OP_FPASS: y = a;
        OP_FMIN:  y = (fkey(b) < fkey(a)) ? b : a;
        OP_FMAX:  y = (fkey(b) > fkey(a)) ? b : a;
        OP_LS:    y = shl_signed(a, b, 1'b0);
        OP_ROT:   y = (a << b[5:0]) | (a >> (7'd64 - {1'b0, b[5:0]}));
        OP_REV:   y = rev;
        OP_IMUL: begin
          y  = ps[63:0];
          of = ps[127:64] != {64{ps[63]}};
        end
        OP_IMULU: begin
          y  = pu[63:0];
          of = pu[127:64] != 0;
        end
        OP_IMULUB: begin
          y  = psu[63:0];
          of = psu[127:64] != {64{psu[63]}};
        end
        OP_IADD: begin
          sum = {a[63], a} + {b[63], b};
          y   = sum[63:0];
          of  = sum[64] != sum[63];
        end
        OP_ISUB: begin
          sum = {a[63], a} - {b[63], b};
          y   = sum[63:0];
          of  = sum[64] != sum[63];
        end
        OP_ISUBR: begin
          sum = {b[63], b} - {a[63], a};
          y   = sum[63:0];
          of  = sum[64] != sum[63];
        end
        OP_IABS:   begin y = a[63] ? -a : a; of = (a == 64'h8000_0000_0000_0000); end
        OP_INEG:   begin y = -a;             of = (a == 64'h8000_0000_0000_0000); end
        OP_IMAX:   y = ($signed(a) > $signed(b)) ? a : b;
        OP_IMIN:   y = ($signed(a) < $signed(b)) ? a : b;
        OP_IMAXU:  y = (a > b) ? a : b;
        OP_IMINU:  y = (a < b) ? a : b;
        OP_IPASSU: y = a;
        OP_ISHIFT: y = shl_signed(a, b, 1'b1);
        default:   y = '0;
      endcase
    end

    status           = '0;
    status[ST_DIVZ]  = divz;
    status[ST_UF]    = uf;
    status[ST_OF]    = of;
    status[ST_INX]   = inx;
    status[ST_NAN]   = is_float && fnan_in;
    status[ST_DEN]   = is_float && (is_den(a) || is_den(b));
    status[ST_ZERO]  = (y == 0);
    status[ST_NEG]   = y[63];
  end
endmodule
