// mcu: the machine control unit, program access to machine settings.
//
// OP[7] = 1 writes, 0 reads; OP[6:4] picks the class; OP[3:0] the item.
//   stack class (0): base0, base1, TOS0, TOS1, NOPOP0, NOPOP1, STACKSWAP
//     (items 0..6).  A read returns the register in Y; a write sends the A
//     immediate to the form token stage (stack_set), which applies it in
//     the next cycle together with that instruction's own token handling.
//   exception class (1): GETA, GETB, GETSTATUS return the saved A, B
//     immediates and masked status of the current thread; CLEAR (write,
//     item 3) clears the thread's exception flag.
//   statistics class (2): ACTIVITY? (read, item 0) returns the activity
//     flag (all ones when set) and clears it; GETCOUNTER (read, item 1)
//     returns counter(A); SETCOUNTER (write, item 1) loads counter(A)
//     with B.
// The activity flag is set by every instruction other than ACTIVITY?.
// Only instructions with UNIT = MCU (selected) have effects.  Reads of
// undefined items return 0.  The flag resets to 0.
module mcu
  import monsoon_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        selected,
  input  logic [7:0]  op,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  stack_regs_t stack_regs,
  input  word_t       ctx_a,
  input  word_t       ctx_b,
  input  logic [8:0]  ctx_status,
  input  logic [31:0] cnt_rd_val,
  output logic [3:0]  cnt_rd_idx,
  output logic [63:0] y,
  output stack_set_t  stack_set,
  output logic        exc_clear,
  output logic        cnt_set,
  output logic [3:0]  cnt_set_idx,
  output logic [31:0] cnt_set_val
);
  logic activity, is_activity_q;
  logic wr;
  logic [2:0] cls;
  logic [3:0] item;

  always_comb begin
    wr   = op[7];
    cls  = op[6:4];
    item = op[3:0];
    y    = '0;
    stack_set   = '{valid: 1'b0, idx: item[2:0], data: a};
    exc_clear   = 1'b0;
    cnt_set     = 1'b0;
    cnt_set_idx = a[3:0];
    cnt_set_val = b[31:0];
    cnt_rd_idx  = a[3:0];
    is_activity_q = selected && !wr && cls == MCU_CLASS_STATS && item == 4'd0;
    if (selected) begin
      unique case (cls)
        MCU_CLASS_STACK: begin
          if (wr) stack_set.valid = (item <= 4'd6);
          else begin
            unique case (item)
              4'd0: y = stack_regs.base0;
              4'd1: y = stack_regs.base1;
              4'd2: y = stack_regs.tos0;
              4'd3: y = stack_regs.tos1;
              4'd4: y = {64{stack_regs.nopop0}};
              4'd5: y = {64{stack_regs.nopop1}};
              4'd6: y = {64{stack_regs.swap}};
              default: y = '0;
            endcase
          end
        end
        MCU_CLASS_EXC: begin
          if (wr) exc_clear = (item == 4'd3);
          else begin
            unique case (item)
              4'd0: y = ctx_a.imm;
              4'd1: y = ctx_b.imm;
              4'd2: y = {55'd0, ctx_status};
              default: y = '0;
            endcase
          end
        end
        MCU_CLASS_STATS: begin
          if (wr) cnt_set = (item == 4'd1);
          else if (item == 4'd0) y = {64{activity}};
          else if (item == 4'd1) y = {32'd0, cnt_rd_val};
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) activity <= 1'b0;
    else        activity <= !is_activity_q;
  end
endmodule
