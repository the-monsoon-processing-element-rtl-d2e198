// piu: the pointer increment unit.
//
// Treats the A immediate as a pointer and B as a signed integer.  OP[5:4]
// (PORTOP), OP[3:2] (IPOP) and OP[1:0] (FPOP) independently choose:
//   PORT: A PORT, instruction PORT, l, r
//   IP:   A IP + B, A IP + s, A IP, s
//   FP:   A FP + B, A FP + s, A FP, s
// where s is the instruction's sign-extended 11-bit offset.  Increments go
// through ptr_add, so the PE number follows the MAP field of A (only the
// field named by HASH carries into PE).  Setting a field to s never
// changes PE.  MAP is copied from A.  OF / UF report a field that left its
// range.  OP[7:6] are ignored.  Combinational.
module piu
  import monsoon_pkg::*;
(
  input  logic [7:0]  op,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        inst_port,
  input  logic [10:0] s,
  output logic [63:0] y,
  output logic        ovf,
  output logic        unf
);
  pointer_t    pa, ip_res, fp_res, q;
  logic [63:0] ip_off, fp_off, s_ext;
  logic        ip_ovf, ip_unf, fp_ovf, fp_unf, ip_add, fp_add;

  ptr_add u_ip (.p(pa), .sel_ip(1'b1), .offset(ip_off), .q(ip_res), .ovf(ip_ovf), .unf(ip_unf));
  ptr_add u_fp (.p(pa), .sel_ip(1'b0), .offset(fp_off), .q(fp_res), .ovf(fp_ovf), .unf(fp_unf));

  always_comb begin
    pa     = pointer_t'(a);
    s_ext  = {{53{s[10]}}, s};
    ip_off = (op[3:2] == 2'b00) ? b : s_ext;
    fp_off = (op[1:0] == 2'b00) ? b : s_ext;
    ip_add = !op[3];
    fp_add = !op[1];
    q      = pa;
    unique case (op[5:4])
      2'b00: q.port = pa.port;
      2'b01: q.port = inst_port;
      2'b10: q.port = 1'b0;
      2'b11: q.port = 1'b1;
    endcase
    unique case (op[3:2])
      2'b00, 2'b01: q.ip = ip_res.ip;
      2'b10:        q.ip = pa.ip;
      2'b11:        q.ip = 24'(s_ext);
    endcase
    unique case (op[1:0])
      2'b00, 2'b01: q.fp = fp_res.fp;
      2'b10:        q.fp = pa.fp;
      2'b11:        q.fp = 22'(s_ext);
    endcase
    // only the interleaved field can move PE, so at most one of these differs
    if (ip_add && pa.hash == HASH_IP)     q.pe = ip_res.pe;
    else if (fp_add && pa.hash == HASH_FP) q.pe = fp_res.pe;
    y   = q;
    ovf = (ip_add && ip_ovf) || (fp_add && fp_ovf);
    unf = (ip_add && ip_unf) || (fp_add && fp_unf);
  end
endmodule
