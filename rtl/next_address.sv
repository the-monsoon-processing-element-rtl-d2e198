// next_address: builds the two destination tags tag1 and tag2 from the
// incoming TAG, in parallel with the function units (stage 5).
//
// NACTL = {NA1[1:0], NA2}.
//   tag1: NA1 = 00 IP, 01 IP+1, 10 IP+2, 11 (IP OR 1)+3; PORT = l.
//   tag2: NA2 = 0 IP with PORT = r; 1 IP+s with the instruction's PORT.
// NA1 = 0, NA2 = 0 thus names the two ports of the current instruction.
// The increments go through ptr_add, so with HASH = IP they step the PE
// number across the subdomain.  Both tags keep the incoming TAG TYPE.
// Combinational.
module next_address
  import monsoon_pkg::*;
(
  input  tag_t        tag,
  input  nactl_t      nactl,
  input  logic        inst_port,
  input  logic [10:0] s,
  output tag_t        tag1,
  output tag_t        tag2
);
  pointer_t    p1, q1, q2;
  logic [63:0] off1, off2;
  logic        unused_flags;
  logic        o1, u1, o2, u2;

  ptr_add u_t1 (.p(p1),      .sel_ip(1'b1), .offset(off1), .q(q1), .ovf(o1), .unf(u1));
  ptr_add u_t2 (.p(tag.ptr), .sel_ip(1'b1), .offset(off2), .q(q2), .ovf(o2), .unf(u2));

  always_comb begin
    p1 = tag.ptr;
    unique case (nactl.na1)
      2'b00: off1 = 64'd0;
      2'b01: off1 = 64'd1;
      2'b10: off1 = 64'd2;
      2'b11: begin p1.ip = tag.ptr.ip | 24'd1; off1 = 64'd3; end
    endcase
    off2 = nactl.na2 ? {{53{s[10]}}, s} : 64'd0;
    tag1          = '{typ: tag.typ, ptr: q1};
    tag1.ptr.port = 1'b0;
    tag2          = '{typ: tag.typ, ptr: q2};
    tag2.ptr.port = nactl.na2 ? inst_port : 1'b1;
    // a destination address wraps like any instruction address
    unused_flags  = o1 | u1 | o2 | u2;
  end
endmodule
