// form_token: the form token stage (stage 6) with the token stacks and the
// network connection.
//
// From Y, B (function unit) and tag1, tag2 (next address) it assembles up
// to two tokens as FTCTL directs:
//   EN1/EN2  00 always, 01 when Y = 0, 10 never, 11 when Y != 0
//   K1       00 {tag1,Y} 01 {tag1,B} 10 {Y,tag1} 11 {B,Y}     ({TAG,VALUE})
//   K2       00 {tag2,Y} 01 {Y,B}    10 {tag1,tag2} 11 {Y,tag2}
//   ORD      which token has priority (token1 when 0)
//   RECIRC   00 recirculate, 01 recirculate uninterruptibly, 10 / 11 push
//            on stack0 / stack1
//   STACK    stack for the lower priority token
//   ACK      count an acknowledgement owed for a token sent to the network
// Every cycle exactly one token enters stage 1 (next_token): a produced
// token, an incoming network token, a popped token or the idle token
// (IP = 0, on this PE).  The rules:
//   * A token whose PE differs from pe_id (ignoring the N low PE bits for
//     HASH = aliased FP) goes to the network; with the output blocked, or
//     with a second network token in the same cycle, it is pushed on
//     stack0.  A popped token bound for another PE goes to the network too.
//   * No local token: the network input, else a pop (stack0 before stack1),
//     else idle.
//   * One local token: RECIRC 00 recirculates it, unless a network token
//     waits, which then enters while the local token is pushed on stack0;
//     RECIRC 01 recirculates it and holds the network input off; RECIRC
//     1x pushes it on that stack and lets the network token or idle in.
//   * Two local tokens: the lower priority one is always pushed on STACK
//     (first); the higher one is handled as a single token, except that
//     RECIRC 00 with a waiting network token pushes it on stack0.
// Stacks: NOPOPk makes physical stack k test empty; STACKSWAP exchanges the
// roles of the two stacks (the stack numbers of RECIRC, STACK and of the
// pop priority name logical stacks mapped to physical stack k XOR swap).
// Pops happen only in cycles with no push, so a cycle sees at most two
// pushes or one pop.  While acknowledgements are owed (ack_cnt != 0),
// logical stack1 is not popped.
// Exceptions: exc replaces the outputs by one uninterruptible token to the
// handler, tag {IP = thread+1, FP = 0, PE = pe_id}, value = the offending
// TAG; mcheck drops the outputs.
// MCU writes to the stack registers (stack_set) take effect at this
// stage's clock edge.  Network ports use valid/ready: a token moves when
// both are high; net_out_valid does not depend on net_out_ready.
// The event outputs pulse for one cycle when the mechanism happens.
// The separate stack memories and the push-only-or-pop rule are this
// design's choices.
module form_token
  import monsoon_pkg::*;
#(
  parameter int STACK_AW = 8,
  parameter int THREAD_W = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [9:0]          pe_id,
  // stage 6 inputs
  input  tag_t                in_tag,
  input  logic [THREAD_W-1:0] thread,
  input  word_t               y,
  input  word_t               b,
  input  tag_t                tag1,
  input  tag_t                tag2,
  input  ftctl_t              ftctl,
  input  logic                cond_zero,
  input  logic                exc,
  input  logic                mcheck,
  input  stack_set_t          stack_set,
  output stack_regs_t         stack_regs,
  // token entering stage 1 next cycle
  output token_t              next_token,
  // network
  input  logic                net_in_valid,
  input  token_t              net_in_token,
  output logic                net_in_ready,
  output logic                net_out_valid,
  output token_t              net_out_token,
  output logic                net_out_ack_req,
  input  logic                net_out_ready,
  input  logic                net_ack_in,
  // events
  output logic                ev_two,        // two tokens formed
  output logic                ev_recirc,     // a formed token recirculated
  output logic                ev_uninterrupt,// network input held off
  output logic                ev_push,
  output logic                ev_pop,
  output logic                ev_idle,
  output logic                ev_net_in,
  output logic                ev_net_out,
  output logic                ev_net_blocked,// network-bound token stacked
  output logic                ev_ack_hold    // stack1 pop held for acks
);
  typedef enum logic [1:0] {SRC_IDLE, SRC_NET, SRC_TOK, SRC_POP} src_e;

  logic        nopop0, nopop1, swap;
  logic [7:0]  ack_cnt;

  token_t      tok1, tok2, hi, lo, handler, single, entry_tok, pop_tok;
  logic        en1, en2, hi_v, lo_v, hi_rem, lo_rem, hl, ll;
  logic [1:0]  recirc;
  logic [1:0]  nloc;
  src_e        src;
  logic        cand_v, sent, take_net, unint;
  token_t      cand;
  logic        sent_is_formed;

  // push list
  logic [1:0]  np;
  token_t      pt [2];
  logic        pl [2];   // logical stack

  // stacks
  logic [1:0]  push_cnt [2];
  token_t      pd0 [2], pd1 [2], top [2];
  logic        pop [2], empty [2], avail [2];
  logic [STACK_AW-1:0] base [2], tos [2];
  logic        pop_src, pop_any, pop_phys, l1_phys;

  function automatic logic en_ok(input logic [1:0] en, input logic z);
    unique case (en)
      2'b00: return 1'b1;
      2'b01: return z;
      2'b10: return 1'b0;
      2'b11: return !z;
    endcase
  endfunction

  function automatic logic is_local(input token_t t, input logic [9:0] me);
    logic [9:0] m;
    m = '1;
    if (t.tag.ptr.hash == HASH_ALIAS)
      m = (t.tag.ptr.n >= 5'd10) ? 10'd0 : ~10'((11'd1 << t.tag.ptr.n) - 11'd1);
    return ((t.tag.ptr.pe ^ me) & m) == 10'd0;
  endfunction

  function automatic token_t idle_token(input logic [9:0] me);
    token_t t;
    t = '0;
    t.tag.ptr.pe = me;
    return t;
  endfunction

  always_comb begin
    // ---------------------------------------------------- token assembly
    unique case (ftctl.k1)
      2'b00: tok1 = '{tag: tag1, value: y};
      2'b01: tok1 = '{tag: tag1, value: b};
      2'b10: tok1 = '{tag: tag_t'(y), value: word_t'(tag1)};
      2'b11: tok1 = '{tag: tag_t'(b), value: y};
    endcase
    unique case (ftctl.k2)
      2'b00: tok2 = '{tag: tag2, value: y};
      2'b01: tok2 = '{tag: tag_t'(y), value: b};
      2'b10: tok2 = '{tag: tag1, value: word_t'(tag2)};
      2'b11: tok2 = '{tag: tag_t'(y), value: word_t'(tag2)};
    endcase
    en1    = en_ok(ftctl.en1, cond_zero);
    en2    = en_ok(ftctl.en2, cond_zero);
    recirc = ftctl.recirc;
    hi     = ftctl.ord ? tok2 : tok1;
    lo     = ftctl.ord ? tok1 : tok2;
    hi_v   = ftctl.ord ? en2 : en1;
    lo_v   = ftctl.ord ? en1 : en2;

    handler                 = '0;
    handler.tag.ptr.ip      = 24'(thread) + 24'd1;
    handler.tag.ptr.pe      = pe_id;
    handler.value           = word_t'(in_tag);
    if (exc) begin
      hi = handler; hi_v = 1'b1; lo_v = 1'b0; recirc = 2'b01;
    end
    if (mcheck) begin
      hi_v = 1'b0; lo_v = 1'b0;
    end

    // ---------------------------------------------------------- network out
    hi_rem  = hi_v && !is_local(hi, pe_id);
    lo_rem  = lo_v && !is_local(lo, pe_id);
    cand_v  = hi_rem || lo_rem;
    cand    = hi_rem ? hi : lo;
    sent    = cand_v && net_out_ready;
    sent_is_formed = sent;

    np = '0;
    pt[0] = hi; pt[1] = hi; pl[0] = 1'b0; pl[1] = 1'b0;
    // remote tokens that could not leave go on stack0
    if (hi_rem && !sent) begin pt[np[0]] = hi; pl[np[0]] = 1'b0; np = np + 2'd1; end
    if (lo_rem && (hi_rem || !sent)) begin pt[np[0]] = lo; pl[np[0]] = 1'b0; np = np + 2'd1; end

    // ------------------------------------------------------- local tokens
    hl     = hi_v && !hi_rem;
    ll     = lo_v && !lo_rem;
    nloc   = {1'b0, hl} + {1'b0, ll};
    single = hl ? hi : lo;
    unint  = (nloc != 2'd0) && (recirc == 2'b01);
    net_in_ready = !unint;
    take_net     = net_in_valid && !unint;
    src          = SRC_IDLE;
    entry_tok    = single;

    if (nloc == 2'd2) begin
      pt[np[0]] = lo; pl[np[0]] = ftctl.stk; np = np + 2'd1;
    end
    if (nloc != 2'd0) begin
      unique case (recirc)
        2'b00: begin
          if (take_net) begin
            pt[np[0]] = single; pl[np[0]] = 1'b0; np = np + 2'd1; src = SRC_NET;
          end else src = SRC_TOK;
        end
        2'b01: src = SRC_TOK;
        default: begin
          pt[np[0]] = single; pl[np[0]] = recirc[0]; np = np + 2'd1;
          src = take_net ? SRC_NET : SRC_IDLE;
        end
      endcase
    end else if (take_net) begin
      src = SRC_NET;
    end

    // ---------------------------------------------------------------- pop
    // physical stack k is available when nonempty, not NOPOP, and (for the
    // stack playing logical stack1) no acknowledgement is owed
    l1_phys  = !swap;
    avail[0] = !empty[0] && !nopop0 && !(l1_phys == 1'b0 && ack_cnt != 8'd0);
    avail[1] = !empty[1] && !nopop1 && !(l1_phys == 1'b1 && ack_cnt != 8'd0);
    pop_phys = avail[swap] ? swap : !swap;
    pop_any  = avail[swap] || avail[!swap];
    pop_tok  = top[pop_phys];
    pop_src  = 1'b0;
    if (nloc == 2'd0 && !take_net && np == 2'd0 && pop_any) begin
      if (is_local(pop_tok, pe_id)) begin
        pop_src = 1'b1;
        src     = SRC_POP;
      end else if (!cand_v) begin
        cand_v  = 1'b1;
        cand    = pop_tok;
        pop_src = net_out_ready;
        sent_is_formed = 1'b0;
      end
    end

    unique case (src)
      SRC_NET:  next_token = net_in_token;
      SRC_TOK:  next_token = entry_tok;
      SRC_POP:  next_token = pop_tok;
      default:  next_token = idle_token(pe_id);
    endcase

    net_out_valid   = cand_v;
    net_out_token   = cand;
    net_out_ack_req = sent_is_formed && ftctl.ack && !exc;

    // ------------------------------------------------ stack port drive
    for (int k = 0; k < 2; k++) begin
      push_cnt[k] = '0;
      pd0[k]      = pt[0];
      pd1[k]      = pt[1];
      pop[k]      = pop_src && (pop_phys == k[0]);
    end
    for (int i = 0; i < 2; i++) begin
      if (i < int'(np)) begin
        // physical stack of push i
        if ((pl[i] ^ swap) == 1'b0) begin
          if (push_cnt[0] == 2'd0) pd0[0] = pt[i]; else pd1[0] = pt[i];
          push_cnt[0] = push_cnt[0] + 2'd1;
        end else begin
          if (push_cnt[1] == 2'd0) pd0[1] = pt[i]; else pd1[1] = pt[i];
          push_cnt[1] = push_cnt[1] + 2'd1;
        end
      end
    end

    // ------------------------------------------------------------ events
    ev_two         = hi_v && lo_v;
    ev_recirc      = (src == SRC_TOK);
    ev_uninterrupt = net_in_valid && unint;
    ev_push        = (np != 2'd0);
    ev_pop         = pop_src;
    ev_idle        = (src == SRC_IDLE);
    ev_net_in      = (src == SRC_NET);
    ev_net_out     = cand_v && net_out_ready;
    ev_net_blocked = (hi_rem && !sent) || (lo_rem && (hi_rem || !sent));
    ev_ack_hold    = !empty[l1_phys] && ack_cnt != 8'd0;
  end

  // ------------------------------------------------------------- stacks
  for (genvar k = 0; k < 2; k++) begin : g_stack
    token_stack #(.AW(STACK_AW)) u_stack (
      .clk(clk), .rst_n(rst_n),
      .push_cnt(push_cnt[k]), .d0(pd0[k]), .d1(pd1[k]), .pop(pop[k]),
      .set_base(stack_set.valid && stack_set.idx == (k == 0 ? SREG_BASE0 : SREG_BASE1)),
      .set_tos (stack_set.valid && stack_set.idx == (k == 0 ? SREG_TOS0 : SREG_TOS1)),
      .set_val (stack_set.data[STACK_AW-1:0]),
      .top(top[k]), .empty(empty[k]), .base(base[k]), .tos(tos[k]));
  end

  always_comb begin
    stack_regs.base0  = 64'(base[0]);
    stack_regs.base1  = 64'(base[1]);
    stack_regs.tos0   = 64'(tos[0]);
    stack_regs.tos1   = 64'(tos[1]);
    stack_regs.nopop0 = nopop0;
    stack_regs.nopop1 = nopop1;
    stack_regs.swap   = swap;
  end

  // ---------------------------------------------- control registers, acks
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nopop0  <= 1'b0;
      nopop1  <= 1'b0;
      swap    <= 1'b0;
      ack_cnt <= '0;
    end else begin
      if (stack_set.valid && stack_set.idx == SREG_NOPOP0) nopop0 <= stack_set.data[0];
      if (stack_set.valid && stack_set.idx == SREG_NOPOP1) nopop1 <= stack_set.data[0];
      if (stack_set.valid && stack_set.idx == SREG_SWAP)   swap   <= stack_set.data[0];
      ack_cnt <= ack_cnt + 8'(net_out_ack_req && net_out_valid && net_out_ready)
                         - 8'(net_ack_in && ack_cnt != 8'd0);
    end
  end
endmodule
