// monsoon_pe: one Monsoon explicit-token-store dataflow processing element.
//
// A token (TAG + VALUE, 144 bits) circulates through a six-stage pipeline;
// exactly one token enters stage 1 every clock, and every token spends one
// clock in each stage:
//   1 Instruction fetch   the 32-bit instruction at IP is read from local
//                         memory (word IP >> 1, low half when IP[0] = 0).
//   2 Effective address   first level decode by OPCODE; EA from FP / IP /
//                         r; type map lookup giving the type code TC.
//   3 Presence bits       presence map lookup on {PMAP, PORT, TC, state};
//                         the new state is written back (one word, or 32
//                         words for the bulk maps 4..7); the second level
//                         address (BASE OR BRA, or BRA when FZ) is formed.
//   4 Operand fetch/store read / write / exchange / enqueue of [EA] (none
//                         for PMAP 0..3), giving temp; second level decode.
//   5 ALU/FPU and next    function units produce Y and B; next address
//     address             produces tag1 and tag2; exceptions are detected
//                         and the statistics counter named by STATS counts.
//   6 Form token          zero, one or two tokens are formed and either
//                         recirculated into stage 1, stacked or sent to the
//                         network; or a stacked, network or idle token
//                         enters instead.
// Each stage does its memory read-modify-write within its own cycle, so the
// six tokens in flight never need interlocks.  The pipeline slot a token
// occupies is its thread number (0..5), which selects its exception
// context.  Reset fills the pipeline with idle tokens (IP = 0): the word at
// address 0 must hold an idle instruction.
//
// Host port: writes one entry of local memory, presence rows, or one of the
// four microcontrol tables per clock (host_sel, see monsoon_pkg); reads
// local memory and the statistics counters.  The network ports use
// valid/ready handshakes (see form_token); the network itself and the
// logical-to-physical PE lookup are outside this block.  machine_check is
// sticky until reset.
//
// Sizes: the token, instruction, table and field widths and table depths
// are the architecture's.  LMEM_AW (local memory words) and STACK_AW (token
// stack depth) are this design's choices; the architecture keeps the
// stacks in local memory, this design gives them their own memories.
module monsoon_pe
  import monsoon_pkg::*;
#(
  parameter int LMEM_AW  = 16,
  parameter int STACK_AW = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [9:0]   pe_id,
  // host port
  input  logic         host_we,
  input  logic [2:0]   host_sel,
  input  logic [23:0]  host_addr,
  input  logic [71:0]  host_wdata,
  input  logic [23:0]  host_raddr,
  output logic [71:0]  host_rdata,
  input  logic [3:0]   host_cnt_idx,
  output logic [31:0]  host_cnt_val,
  input  logic         host_cnt_clr,
  // network
  input  logic         net_in_valid,
  input  token_t       net_in_token,
  output logic         net_in_ready,
  output logic         net_out_valid,
  output token_t       net_out_token,
  output logic         net_out_ack_req,
  input  logic         net_out_ready,
  input  logic         net_ack_in,
  // status
  output logic         exception,
  output logic         machine_check,
  output logic [9:0]   events   // one-cycle pulses, see below
);
  localparam int NTHREAD = 6;

  // ------------------------------------------------------ pipeline state
  token_t      s1_tok, s2_tok, s3_tok, s4_tok, s5_tok, s6_tok;
  logic [2:0]  s1_thr, s2_thr, s3_thr, s4_thr, s5_thr, s6_thr, slot;
  instr_t      s2_inst, s3_inst, s4_inst, s5_inst;
  fld_t        s3_fld;
  logic [23:0] s3_ea, s4_ea;
  logic [1:0]  s3_tc;
  pent_t       s4_pent;
  logic [5:0]  s4_pmap;
  logic [10:0] s4_base;
  word_t       s5_temp;
  sld_t        s5_sld;
  ftctl_t      s6_ftctl;
  word_t       s6_y, s6_b;
  tag_t        s6_tag1, s6_tag2;
  logic        s6_zero, s6_exc, s6_mcheck;
  stack_set_t  s6_sset;

  token_t      next_token;

  // ---------------------------------------------------------- host port
  logic h_lmem, h_pres, h_fld, h_tmap, h_pmap, h_sld;
  assign h_lmem = host_we && host_sel == HSEL_LMEM;
  assign h_pres = host_we && host_sel == HSEL_PRES;
  assign h_fld  = host_we && host_sel == HSEL_FLD;
  assign h_tmap = host_we && host_sel == HSEL_TMAP;
  assign h_pmap = host_we && host_sel == HSEL_PMAP;
  assign h_sld  = host_we && host_sel == HSEL_SLD;

  // ------------------------------------------------------ stage 1: fetch
  logic [71:0] if_word, op_rdata, op_wdata;
  logic        op_we;
  instr_t      s1_inst;

  local_memory #(.AW(LMEM_AW)) u_lmem (
    .clk(clk),
    .if_addr(s1_tok.tag.ptr.ip[LMEM_AW:1]), .if_rdata(if_word),
    .op_addr(s4_ea[LMEM_AW-1:0]), .op_rdata(op_rdata), .op_we(op_we), .op_wdata(op_wdata),
    .host_we(h_lmem), .host_waddr(host_addr[LMEM_AW-1:0]), .host_wdata(host_wdata),
    .host_raddr(host_raddr[LMEM_AW-1:0]), .host_rdata(host_rdata));

  assign s1_inst = s1_tok.tag.ptr.ip[0] ? instr_t'(if_word[63:32]) : instr_t'(if_word[31:0]);

  // -------------------------------------------- stage 2: effective address
  fld_t        fld;
  logic [23:0] ea;
  logic [1:0]  tc;

  first_level_decode u_fld (.clk(clk), .opcode(s2_inst.opcode), .entry(fld),
                            .host_we(h_fld), .host_addr(host_addr[9:0]),
                            .host_wdata(fld_t'(host_wdata[23:0])));

  ea_unit u_ea (.mode(fld.ea), .ptr(s2_tok.tag.ptr), .r(s2_inst.r), .ea(ea));

  type_map u_tmap (.clk(clk), .tmap(fld.tmap), .typ(s2_tok.value.typ),
                   .port(s2_tok.tag.ptr.port), .tc(tc),
                   .host_we(h_tmap), .host_addr(host_addr[13:0]), .host_wdata(host_wdata[1:0]));

  // ---------------------------------------------- stage 3: presence bits
  logic [1:0] pstate;
  pent_t      pent;

  presence_map u_pmap (.clk(clk), .pmap(s3_fld.pmap), .port(s3_tok.tag.ptr.port), .tc(s3_tc),
                       .state(pstate), .pent(pent),
                       .host_we(h_pmap), .host_addr(host_addr[10:0]),
                       .host_wdata(pent_t'(host_wdata[6:0])));

  presence_bits #(.AW(LMEM_AW)) u_pbits (
    .clk(clk), .ea(s3_ea[LMEM_AW-1:0]), .state(pstate),
    .upd(1'b1), .bulk(s3_fld.pmap[5:2] == 4'd1), .next(pent.next),
    .host_we(h_pres), .host_row(host_addr[LMEM_AW-6:0]), .host_wdata(host_wdata[63:0]));

  // ------------------------------------------- stage 4: operand fetch/store
  word_t       temp;
  sld_t        sld;
  logic [10:0] sld_addr;

  operand_fetch_store u_ofs (.fop(s4_pent.fop), .nop(s4_pmap[5:2] == 4'd0),
                             .value(s4_tok.value), .mem_rdata(op_rdata),
                             .mem_we(op_we), .mem_wdata(op_wdata), .temp(temp));

  second_level_decode u_sld (.clk(clk), .base(s4_base), .bra(s4_pent.bra), .fz(s4_pent.fz),
                             .addr(sld_addr), .entry(sld),
                             .host_we(h_sld), .host_addr(host_addr[10:0]),
                             .host_wdata(sld_t'(host_wdata[SLD_W-1:0])));

  // -------------------------------------- stage 5: function units, next addr
  word_t       fu_a, fu_y, fu_b, ctx_a, ctx_b;
  logic [8:0]  fu_status, ctx_status;
  logic        fu_zero, exc_clear, cnt_set, exc, mcheck;
  logic [3:0]  cnt_rd_idx, cnt_set_idx;
  logic [31:0] cnt_set_val, cnt_rd_val;
  stack_set_t  sset;
  stack_regs_t stack_regs;
  tag_t        tag1, tag2;

  function_unit u_fu (
    .clk(clk), .rst_n(rst_n), .fuctl(s5_sld.fuctl), .tmask(s5_sld.tmask),
    .value(s5_tok.value), .temp(s5_temp), .port(s5_tok.tag.ptr.port),
    .inst_port(s5_inst.port), .s(s5_inst.s), .stack_regs(stack_regs),
    .ctx_a(ctx_a), .ctx_b(ctx_b), .ctx_status(ctx_status), .cnt_rd_val(cnt_rd_val),
    .cnt_rd_idx(cnt_rd_idx), .a(fu_a), .y(fu_y), .b(fu_b), .status(fu_status),
    .cond_zero(fu_zero), .stack_set(sset), .exc_clear(exc_clear), .cnt_set(cnt_set),
    .cnt_set_idx(cnt_set_idx), .cnt_set_val(cnt_set_val));

  next_address u_na (.tag(s5_tok.tag), .nactl(s5_sld.nactl), .inst_port(s5_inst.port),
                     .s(s5_inst.s), .tag1(tag1), .tag2(tag2));

  exception_unit #(.NCTX(8)) u_exc (
    .clk(clk), .rst_n(rst_n), .thread(s5_thr), .status(fu_status), .emask(s5_sld.emask),
    .a(fu_a), .b(fu_b), .clear(exc_clear), .exc(exc), .mcheck(mcheck),
    .ctx_a(ctx_a), .ctx_b(ctx_b), .ctx_status(ctx_status));

  stats_counters #(.N(16), .W(32)) u_stats (
    .clk(clk), .rst_n(rst_n), .inc(1'b1), .inc_idx(s5_sld.stats),
    .set(cnt_set), .set_idx(cnt_set_idx), .set_val(cnt_set_val),
    .rd_idx(cnt_rd_idx), .rd_val(cnt_rd_val),
    .host_idx(host_cnt_idx), .host_val(host_cnt_val), .host_clr(host_cnt_clr));

  // ------------------------------------------------- stage 6: form token
  logic ev_two, ev_recirc, ev_unint, ev_push, ev_pop, ev_idle, ev_net_in, ev_net_out,
        ev_net_blocked, ev_ack_hold;

  form_token #(.STACK_AW(STACK_AW), .THREAD_W(3)) u_ft (
    .clk(clk), .rst_n(rst_n), .pe_id(pe_id),
    .in_tag(s6_tok.tag), .thread(s6_thr), .y(s6_y), .b(s6_b), .tag1(s6_tag1), .tag2(s6_tag2),
    .ftctl(s6_ftctl), .cond_zero(s6_zero), .exc(s6_exc), .mcheck(s6_mcheck),
    .stack_set(s6_sset), .stack_regs(stack_regs), .next_token(next_token),
    .net_in_valid(net_in_valid), .net_in_token(net_in_token), .net_in_ready(net_in_ready),
    .net_out_valid(net_out_valid), .net_out_token(net_out_token),
    .net_out_ack_req(net_out_ack_req), .net_out_ready(net_out_ready), .net_ack_in(net_ack_in),
    .ev_two(ev_two), .ev_recirc(ev_recirc), .ev_uninterrupt(ev_unint), .ev_push(ev_push),
    .ev_pop(ev_pop), .ev_idle(ev_idle), .ev_net_in(ev_net_in), .ev_net_out(ev_net_out),
    .ev_net_blocked(ev_net_blocked), .ev_ack_hold(ev_ack_hold));

  // events: [0] two tokens formed, [1] recirculation, [2] network input held
  // off by an uninterruptible token, [3] push, [4] pop, [5] idle inserted,
  // [6] network token entered, [7] token sent, [8] network-bound token
  // stacked, [9] stack1 pop held for acknowledgements
  assign events = {ev_ack_hold, ev_net_blocked, ev_net_out, ev_net_in, ev_idle,
                   ev_pop, ev_push, ev_unint, ev_recirc, ev_two};
  assign exception = s6_exc;

  // ---------------------------------------------------- pipeline registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot          <= '0;
      s1_tok        <= '0;  s2_tok <= '0;  s3_tok <= '0;
      s4_tok        <= '0;  s5_tok <= '0;  s6_tok <= '0;
      s1_thr        <= '0;  s2_thr <= '0;  s3_thr <= '0;
      s4_thr        <= '0;  s5_thr <= '0;  s6_thr <= '0;
      s2_inst       <= '0;  s3_inst <= '0; s4_inst <= '0; s5_inst <= '0;
      s3_fld        <= '0;  s3_ea <= '0;   s3_tc <= '0;
      s4_ea         <= '0;  s4_pent <= '0; s4_pmap <= '0; s4_base <= '0;
      s5_temp       <= '0;  s5_sld <= '0;
      s6_ftctl      <= '0;  s6_y <= '0;    s6_b <= '0;
      s6_tag1       <= '0;  s6_tag2 <= '0; s6_zero <= 1'b0;
      s6_exc        <= 1'b0; s6_mcheck <= 1'b0; s6_sset <= '0;
      machine_check <= 1'b0;
      // the idle tokens of a fresh pipeline belong to this PE
      s1_tok.tag.ptr.pe <= pe_id; s2_tok.tag.ptr.pe <= pe_id; s3_tok.tag.ptr.pe <= pe_id;
      s4_tok.tag.ptr.pe <= pe_id; s5_tok.tag.ptr.pe <= pe_id; s6_tok.tag.ptr.pe <= pe_id;
      s6_ftctl.en1  <= 2'b10;  // never
      s6_ftctl.en2  <= 2'b10;
    end else begin
      slot    <= (slot == 3'(NTHREAD - 1)) ? 3'd0 : slot + 3'd1;
      // 1
      s1_tok  <= next_token;
      s1_thr  <= slot;
      // 1 -> 2
      s2_tok  <= s1_tok;   s2_thr <= s1_thr;  s2_inst <= s1_inst;
      // 2 -> 3
      s3_tok  <= s2_tok;   s3_thr <= s2_thr;  s3_inst <= s2_inst;
      s3_fld  <= fld;      s3_ea  <= ea;      s3_tc   <= tc;
      // 3 -> 4
      s4_tok  <= s3_tok;   s4_thr <= s3_thr;  s4_inst <= s3_inst;
      s4_ea   <= s3_ea;    s4_pent <= pent;   s4_pmap <= s3_fld.pmap;
      s4_base <= s3_fld.base;
      // 4 -> 5
      s5_tok  <= s4_tok;   s5_thr <= s4_thr;  s5_inst <= s4_inst;
      s5_temp <= temp;     s5_sld <= sld;
      // 5 -> 6
      s6_tok   <= s5_tok;  s6_thr <= s5_thr;
      s6_ftctl <= s5_sld.ftctl;
      s6_y     <= fu_y;    s6_b   <= fu_b;
      s6_tag1  <= tag1;    s6_tag2 <= tag2;
      s6_zero  <= fu_zero;
      s6_exc   <= exc;     s6_mcheck <= mcheck;
      s6_sset  <= sset;
      if (mcheck) machine_check <= 1'b1;
    end
  end

  // The second level address is only observed through the entry it reads.
  logic unused;
  assign unused = ^{sld_addr, s4_thr[0], s2_thr[0]};
endmodule
