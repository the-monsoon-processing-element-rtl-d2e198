// tb_monsoon_pe_prog.svh: the test program of tb_monsoon_pe, included in
// its module body.  Defines the PE numbers, frame and constant addresses,
// token builders, and load(), which writes every table entry, the
// instructions, the constants and the presence bits through the host port.
// Opcodes: 0 idle, 1 add (dyadic), 2 out (send {constant tag, A}),
// 3 handler, 4 clear, 5 I-structure, 6 enqueue, 7 typed, 8 fork, 9 loop,
// 10 acknowledged fork, 11 activity, 12 bulk presence clear.

localparam logic [9:0] ME = 10'd3, RM = 10'd9;
localparam int FP = 'h400, C_OUT = 'h300, C_EXC = 'h301, C_M1 = 'h302;

function automatic tag_t rtag(input logic [23:0] ip);  // a tag on the remote PE
  tag_t t;
  t = '0; t.ptr.hash = HASH_BASE; t.ptr.ip = ip; t.ptr.pe = RM;
  return t;
endfunction

localparam word_t C_OUT_W = word_t'(rtag(24'h777));
localparam word_t C_EXC_W = word_t'(rtag(24'hEEE));

function automatic token_t tk(input int ip, input logic port, input word_t v);
  token_t t;
  t = '0; t.tag.ptr.port = port; t.tag.ptr.hash = HASH_BASE; t.tag.ptr.ip = 24'(ip);
  t.tag.ptr.pe = ME; t.tag.ptr.fp = 22'(FP); t.value = v;
  return t;
endfunction

// a second level entry; TMASK copies the A TYPE, FLIP = 0
function automatic sld_t sld_e(input unit_e unit, input logic [7:0] op, input logic [1:0] na1,
                               input logic na2, input logic [1:0] en1, en2, k1, k2,
                               input logic ord, input logic [1:0] rc, input logic stk, ack,
                               input logic [9:0] em, input logic [3:0] stats);
  return '{fuctl: '{flip: 1'b0, unit: unit, op: op}, nactl: '{na1: na1, na2: na2},
           ftctl: '{en1: en1, en2: en2, k1: k1, k2: k2, ord: ord, recirc: rc, stk: stk,
                    ack: ack},
           tmask: 16'hFF00, emask: emask_t'(em), stats: stats};
endfunction

function automatic pent_t pm(input int map, input logic port, input logic [1:0] tc, st);
  pent_t p;
  p = '{bra: 2'd0, fz: 1'b1, fop: FOP_READ, next: st};  // default: no output, keep state
  unique case (map)
    0: begin p.fz = 1'b0; p.bra = (tc == 2'd1) ? 2'd1 : 2'd0; end
    4: p.next = 2'd0;
    8: if (st == 2'd1) begin p.fz = 1'b0; p.next = 2'd0; end
       else begin p.fop = FOP_WRITE; p.next = 2'd1; end
    9: p.fz = 1'b0;
    10: unique case ({port, st})
      3'b0_00: begin p.fop = FOP_WRITE; p.next = 2'd1; end
      3'b0_10: begin p.fop = FOP_EXCH; p.next = 2'd1; p.fz = 1'b0; p.bra = 2'd1; end
      3'b1_00: begin p.fop = FOP_WRITE; p.next = 2'd2; end
      3'b1_01: begin p.fz = 1'b0; p.bra = 2'd1; end
      default: ;
    endcase
    11: p.fop = FOP_ENQ;
    default: p = '0;
  endcase
  return p;
endfunction

task automatic load();
  instr_t prog [64];
  fld_t   f;
  sld_t   s;
  prog = '{default: '0};
  for (int i = 1; i <= 6; i++) prog[i] = '{opcode: 10'd3, r: 10'(C_EXC), port: 1'b0, s: 11'd6};
  for (int i = 7; i <= 12; i++) prog[i] = '{opcode: 10'd4, r: 10'd0, port: 1'b0, s: 11'd0};
  prog[20] = '{10'd1, 10'd0, 1'b0, 11'd0};
  foreach (prog[i])
    if (i inside {21, 27, 29, 32, 36, 40, 43}) prog[i] = '{10'd2, 10'(C_OUT), 1'b0, 11'd0};
  prog[22] = '{10'd5, 10'd1, 1'b0, 11'd0};
  prog[24] = '{10'd6, 10'd2, 1'b0, 11'd0};
  prog[26] = '{10'd7, 10'd0, 1'b0, 11'd0};
  prog[28] = '{10'd8, 10'd0, 1'b0, 11'd4};
  prog[34] = '{10'd9, 10'(C_M1), 1'b0, 11'd2};
  prog[38] = '{10'd10, 10'(C_OUT), 1'b0, 11'd2};
  prog[42] = '{10'd11, 10'd0, 1'b0, 11'd0};
  prog[44] = '{10'd12, 10'd0, 1'b0, 11'd0};
  for (int w = 0; w < 32; w++) hw(HSEL_LMEM, w, {8'd0, prog[2*w+1], prog[2*w]});
  hw(HSEL_LMEM, C_OUT, C_OUT_W);
  hw(HSEL_LMEM, C_EXC, C_EXC_W);
  hw(HSEL_LMEM, C_M1, {8'd1, 64'hFFFF_FFFF_FFFF_FFFF});
  for (int w = FP; w < FP + 32; w++) hw(HSEL_LMEM, w, '0);
  for (int r = 0; r < 2048; r++) hw(HSEL_PRES, r, '0);
  for (int i = 0; i < 1024; i++) begin
    unique case (i)
      1:  f = '{11'd4,  5'd0, 6'd8,  EA_FP};
      2:  f = '{11'd8,  5'd0, 6'd9,  EA_ABS};
      3:  f = '{11'd12, 5'd0, 6'd9,  EA_ABS};
      4:  f = '{11'd16, 5'd0, 6'd0,  EA_ABS};
      5:  f = '{11'd20, 5'd0, 6'd10, EA_FP};
      6:  f = '{11'd24, 5'd0, 6'd11, EA_FP};
      7:  f = '{11'd28, 5'd1, 6'd0,  EA_ABS};
      8:  f = '{11'd32, 5'd0, 6'd0,  EA_ABS};
      9:  f = '{11'd36, 5'd0, 6'd9,  EA_ABS};
      10: f = '{11'd40, 5'd0, 6'd9,  EA_ABS};
      11: f = '{11'd44, 5'd0, 6'd0,  EA_ABS};
      12: f = '{11'd48, 5'd0, 6'd4,  EA_FP};
      default: f = '{11'd0, 5'd0, 6'd0, EA_ABS};
    endcase
    hw(HSEL_FLD, i, 72'(f));
  end
  for (int i = 0; i < 1024; i++)  // maps 0 and 1; map 1 sends TYPE 2 on port l to TC 1
    hw(HSEL_TMAP, i, (i == {5'd1, 8'd2, 1'b0}) ? 72'd1 : 72'd0);
  for (int i = 0; i < 2048; i++) hw(HSEL_PMAP, i, 72'(pm(i >> 5, i[4], i[3:2], i[1:0])));
  for (int i = 0; i < 2048; i++) begin
    unique case (i)
      4:  s = sld_e(UNIT_FALU, OP_IADD, 1, 0, 0, 2, 0, 0, 0, 0, 0, 0, 10'h020, 1);
      8:  s = sld_e(UNIT_FALU, OP_PASSA, 0, 0, 0, 2, 3, 0, 0, 0, 0, 0, 0, 2);
      12: s = sld_e(UNIT_FALU, OP_PASSA, 0, 1, 0, 0, 3, 0, 0, 0, 0, 0, 0, 0);
      16: s = sld_e(UNIT_MCU, 8'h93, 0, 0, 2, 2, 0, 0, 0, 0, 0, 0, 0, 0);
      21: s = sld_e(UNIT_FALU, OP_PASSA, 0, 0, 0, 2, 3, 0, 0, 0, 0, 0, 0, 0);
      28: s = sld_e(UNIT_FALU, OP_IADD, 1, 0, 0, 2, 0, 0, 0, 0, 0, 0, 0, 0);
      29: s = sld_e(UNIT_FALU, OP_XOR, 1, 0, 0, 2, 0, 0, 0, 0, 0, 0, 0, 0);
      32: s = sld_e(UNIT_FALU, OP_PASSA, 1, 1, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0);
      36: s = sld_e(UNIT_FALU, OP_IADD, 0, 1, 3, 1, 0, 0, 0, 1, 0, 0, 0, 0);
      40: s = sld_e(UNIT_FALU, OP_PASSA, 0, 1, 0, 0, 3, 0, 0, 3, 1, 1, 0, 0);
      44: s = sld_e(UNIT_MCU, 8'h20, 1, 0, 0, 2, 0, 0, 0, 0, 0, 0, 0, 0);
      default: s = sld_e(UNIT_FALU, OP_PASSA, 0, 0, 2, 2, 0, 0, 0, 0, 0, 0, 0, 0);
    endcase
    hw(HSEL_SLD, i, 72'(s));
  end
  @(negedge clk) host_we = 0;
endtask
