// ea_unit: the effective address generator of stage 2.
//
// EA = (MUX(FP, IP) AND mask) + r, 24 bits wide, r unsigned.  The two
// EA mode bits give: 00 FP + r (frame relative), 10 IP + r (instruction
// relative literals), 11 r (absolute; the mask generator's Zero input makes
// the mask all zeros), 01 mask(FP) + r (active frame base).  In mode 01 the
// mask generator clears the N low bits (N from MAP) when N > 0 and
// HASH = base FP; otherwise the mask is all ones.  The 22-bit FP is zero
// extended to 24 bits.  Purely combinational.
module ea_unit
  import monsoon_pkg::*;
(
  input  ea_mode_e    mode,
  input  pointer_t    ptr,     // TAG pointer of the incoming token
  input  logic [9:0]  r,
  output logic [23:0] ea
);
  logic        mask_en, zero, fpip;
  logic [23:0] mask, base;

  always_comb begin
    mask_en = (mode == EA_MASK);
    zero    = (mode == EA_ABS);
    fpip    = (mode == EA_IP);
    // mask generator
    if (zero)
      mask = '0;
    else if (mask_en && ptr.n != 5'd0 && ptr.hash == HASH_BASE)
      mask = (ptr.n >= 5'd24) ? 24'd0 : ~((24'd1 << ptr.n) - 24'd1);
    else
      mask = '1;
    base = fpip ? ptr.ip : {2'b00, ptr.fp};
    ea   = (base & mask) + {14'd0, r};
  end
endmodule
