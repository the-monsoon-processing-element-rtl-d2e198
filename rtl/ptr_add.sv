// ptr_add: adds a signed offset to the IP or FP field of a pointer, letting
// the MAP field carry the increment into the PE number.
//
// A subdomain is 2^N logical processors on a 2^N boundary.  When the field
// being incremented is the one the HASH strategy interleaves (FP for
// HASH = FP, IP for HASH = IP), the N low PE bits act as the least
// significant digits of the address: the sum is formed on {field, PE[N-1:0]}
// so consecutive words land on consecutive processors of the subdomain.
// With HASH = aliased FP or base FP, and for the other field, the field is
// incremented alone and PE is left unchanged.  N above 10 is treated as 10.
// ovf / unf flag a result field that does not fit (above its maximum /
// below zero).  Purely combinational.  The interleaving unit (one field
// step) is this design's reading of "single word boundaries".
module ptr_add
  import monsoon_pkg::*;
(
  input  pointer_t    p,
  input  logic        sel_ip,   // 1: add to IP, 0: add to FP
  input  logic [63:0] offset,   // two's complement
  output pointer_t    q,
  output logic        ovf,
  output logic        unf
);
  logic        interleave;
  logic [3:0]  n_eff;
  logic [9:0]  pe_mask;
  logic [23:0] field;
  logic [4:0]  fw;             // field width
  logic signed [79:0] wide, sum, fsum;

  always_comb begin
    interleave = (p.hash == HASH_FP && !sel_ip) || (p.hash == HASH_IP && sel_ip);
    n_eff      = (p.n > 5'd10) ? 4'd10 : p.n[3:0];
    if (!interleave) n_eff = 4'd0;
    pe_mask    = 10'((11'd1 << n_eff) - 11'd1);
    field      = sel_ip ? p.ip : {2'b00, p.fp};
    fw         = sel_ip ? 5'd24 : 5'd22;
    wide       = ($signed({56'd0, field}) <<< n_eff) | $signed({70'd0, p.pe & pe_mask});
    sum        = wide + $signed({{16{offset[63]}}, offset});
    fsum       = sum >>> n_eff;
    q          = p;
    q.pe       = (p.pe & ~pe_mask) | (sum[9:0] & pe_mask);
    if (sel_ip) q.ip = fsum[23:0];
    else        q.fp = fsum[21:0];
    unf        = fsum < 0;
    ovf        = !unf && ((fsum >>> fw) != 0);
  end
endmodule
