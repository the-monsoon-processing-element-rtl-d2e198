// token_stack: one of the two token stacks of the form token stage.
//
// A memory of 2^AW tokens (144 bits) with a BASE and a top-of-stack (TOS)
// register.  The stack grows upward from BASE: a push writes at TOS and
// increments it, a pop decrements it and the popped token is the one at
// TOS-1, which is always presented on top.  The stack is empty when
// TOS = BASE.  Up to two pushes per cycle (push_cnt = 2 writes d0 then d1,
// d1 ending on top); a pop and a push never share a cycle (the form token
// stage guarantees it).  The MCU loads BASE or TOS with set_base / set_tos
// (the write wins over a push or pop in the same cycle).  Pointers wrap
// modulo 2^AW.  BASE and TOS reset to 0.
module token_stack
  import monsoon_pkg::*;
#(
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    push_cnt,
  input  token_t        d0,
  input  token_t        d1,
  input  logic          pop,
  input  logic          set_base,
  input  logic          set_tos,
  input  logic [AW-1:0] set_val,
  output token_t        top,
  output logic          empty,
  output logic [AW-1:0] base,
  output logic [AW-1:0] tos
);
  token_t mem [2**AW];

  assign top   = mem[tos - AW'(1)];
  assign empty = (tos == base);

  always_ff @(posedge clk) begin
    if (push_cnt != 2'd0) mem[tos]          <= d0;
    if (push_cnt == 2'd2) mem[tos + AW'(1)] <= d1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base <= '0;
      tos  <= '0;
    end else begin
      if (set_base) base <= set_val;
      if (set_tos)
        tos <= set_val;
      else if (pop)
        tos <= tos - AW'(1);
      else
        tos <= tos + AW'(push_cnt);
    end
  end

  // A pop never meets a push, and never finds the stack empty.
  property p_no_pop_push;
    @(posedge clk) disable iff (!rst_n) pop |-> (push_cnt == 2'd0 && !empty);
  endproperty
  assert property (p_no_pop_push);
endmodule
