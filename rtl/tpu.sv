// tpu: the type propagation unit.
//
// Produces the 8-bit Y TYPE bit by bit from sixteen controls, eight m_i
// (upper byte) and eight v_i (lower byte): m_i v_i = 00 gives 0, 01 gives
// 1, 10 copies A TYPE_i, 11 copies B TYPE_i.  The controls are the TMASK
// field of the second level decode, except when the TPU itself is the
// selected unit: then OP = 0 (SETTYPE) takes the controls from the low 16
// bits of the A immediate and OP = 1 (GETTYPE) keeps TMASK; in both cases
// the Y immediate the unit supplies is A TYPE (zero extended).  Only OP[0]
// is decoded.  Combinational.
module tpu
  import monsoon_pkg::*;
(
  input  logic        selected,  // UNIT = TPU
  input  logic [7:0]  op,
  input  logic [15:0] tmask,
  input  word_t       a,
  input  logic [7:0]  b_type,
  output logic [7:0]  y_type,
  output logic [63:0] y_imm
);
  logic [15:0] ctl;
  always_comb begin
    ctl = (selected && !op[0]) ? a.imm[15:0] : tmask;
    for (int i = 0; i < 8; i++) begin
      unique case ({ctl[8+i], ctl[i]})
        2'b00: y_type[i] = 1'b0;
        2'b01: y_type[i] = 1'b1;
        2'b10: y_type[i] = a.typ[i];
        2'b11: y_type[i] = b_type[i];
      endcase
    end
    y_imm = {56'd0, a.typ};
  end
endmodule
