// crossover: sorts VALUE and temp into the function unit operands A and B.
//
// The left operand l and right operand r are told apart by the incoming
// PORT: the token's VALUE is the operand of its own port and temp the
// other.  FLIP = 0 gives A = l, B = r; FLIP = 1 gives A = r, B = l.
// Whole 72-bit words move, so the TYPE fields cross over with their
// immediates (the two crossover boxes of the function unit schematic).
// Purely combinational.
module crossover
  import monsoon_pkg::*;
(
  input  word_t value,
  input  word_t temp,
  input  logic  port,
  input  logic  flip,
  output word_t a,
  output word_t b
);
  always_comb begin
    if (port ^ flip) begin
      a = temp;
      b = value;
    end else begin
      a = value;
      b = temp;
    end
  end
endmodule
