// tb_form_token: directed scenarios for the form token stage: the K1 / K2
// assembly and EN conditions, recirculation, stacking of the lower priority
// token, pops (stack0 before stack1), the idle token, network input
// priority and its blocking by uninterruptible tokens, network output and
// its blocked case, pops of network-bound tokens, two tokens meeting a
// network token, two remote tokens, aliased locality, acknowledgement holds,
// NOPOP, STACKSWAP, exception handler tokens and machine checks.  Expected
// tokens are built by the testbench from the encoding tables.
module tb_form_token;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam logic [9:0] ME = 10'd5;

  logic        rst_n = 0;
  tag_t        in_tag = '0, tag1 = '0, tag2 = '0;
  logic [2:0]  thread = '0;
  word_t       y = '0, b = '0;
  ftctl_t      ft = '0;
  logic        cond_zero = 0, exc = 0, mcheck = 0;
  stack_set_t  sset = '0;
  stack_regs_t sr;
  token_t      nt, net_in_token = '0, net_out_token, exp_t;
  logic        net_in_valid = 0, net_in_ready, net_out_valid, net_out_ack_req;
  logic        net_out_ready = 1, net_ack_in = 0;
  logic        ev_two, ev_recirc, ev_unint, ev_push, ev_pop, ev_idle, ev_net_in, ev_net_out,
               ev_net_blocked, ev_ack_hold;

  form_token #(.STACK_AW(6), .THREAD_W(3)) dut (
    .clk(clk), .rst_n(rst_n), .pe_id(ME), .in_tag(in_tag), .thread(thread), .y(y), .b(b),
    .tag1(tag1), .tag2(tag2), .ftctl(ft), .cond_zero(cond_zero), .exc(exc), .mcheck(mcheck),
    .stack_set(sset), .stack_regs(sr), .next_token(nt), .net_in_valid(net_in_valid),
    .net_in_token(net_in_token), .net_in_ready(net_in_ready), .net_out_valid(net_out_valid),
    .net_out_token(net_out_token), .net_out_ack_req(net_out_ack_req),
    .net_out_ready(net_out_ready), .net_ack_in(net_ack_in), .ev_two(ev_two),
    .ev_recirc(ev_recirc), .ev_uninterrupt(ev_unint), .ev_push(ev_push), .ev_pop(ev_pop),
    .ev_idle(ev_idle), .ev_net_in(ev_net_in), .ev_net_out(ev_net_out),
    .ev_net_blocked(ev_net_blocked), .ev_ack_hold(ev_ack_hold));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tag_t mk_tag(input logic [9:0] pe, input logic [23:0] ip, input logic port);
    tag_t t;
    t = '0; t.typ = 8'h11; t.ptr.pe = pe; t.ptr.ip = ip; t.ptr.port = port; t.ptr.fp = 22'h123;
    return t;
  endfunction
  function automatic token_t idle();
    token_t t;
    t = '0; t.tag.ptr.pe = ME;
    return t;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: next %h tos0 %0d tos1 %0d base0 %0d", what, nt, sr.tos0, sr.tos1, sr.base0);
    end
  endtask

  // set FTCTL with both tokens off, then the fields we want
  function automatic ftctl_t ftc(input logic [1:0] en1, en2, k1, k2, input logic ord,
                                 input logic [1:0] recirc, input logic stk, ack);
    return '{en1: en1, en2: en2, k1: k1, k2: k2, ord: ord, recirc: recirc, stk: stk, ack: ack};
  endfunction

  task automatic idle_inputs();
    ft = ftc(2'b10, 2'b10, 0, 0, 0, 0, 0, 0);
    net_in_valid = 0; exc = 0; mcheck = 0; sset = '0; net_ack_in = 0; net_out_ready = 1;
  endtask

  initial begin
    tag1 = mk_tag(ME, 24'd100, 1'b0);
    tag2 = mk_tag(ME, 24'd200, 1'b1);
    y    = '{typ: 8'h22, imm: 64'h1111};
    b    = '{typ: 8'h33, imm: 64'h2222};
    in_tag = mk_tag(ME, 24'd99, 1'b1);
    idle_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- K1 encodings, single token recirculated
    ft = ftc(2'b00, 2'b10, 2'b00, 0, 0, 2'b00, 0, 0); #1
    chk(nt == '{tag: tag1, value: y} && ev_recirc, "K1=00");
    ft.k1 = 2'b01; #1 chk(nt == '{tag: tag1, value: b}, "K1=01");
    ft.k1 = 2'b10; y.imm = 64'(mk_tag(ME, 24'd7, 0)); y.typ = 8'h11;
    #1 chk(nt == '{tag: tag_t'(y), value: word_t'(tag1)}, "K1=10");
    ft.k1 = 2'b11; b = word_t'(mk_tag(ME, 24'd8, 0));
    #1 chk(nt == '{tag: tag_t'(b), value: y}, "K1=11");
    // ---- K2 encodings (token1 never)
    ft = ftc(2'b10, 2'b00, 0, 2'b00, 0, 2'b00, 0, 0);
    #1 chk(nt == '{tag: tag2, value: y}, "K2=00");
    ft.k2 = 2'b01; #1 chk(nt == '{tag: tag_t'(y), value: b}, "K2=01");
    ft.k2 = 2'b10; #1 chk(nt == '{tag: tag1, value: word_t'(tag2)}, "K2=10");
    ft.k2 = 2'b11; #1 chk(nt == '{tag: tag_t'(y), value: word_t'(tag2)}, "K2=11");
    y = '{typ: 8'h22, imm: 64'h1111};
    b = '{typ: 8'h33, imm: 64'h2222};
    // ---- EN conditions
    ft = ftc(2'b01, 2'b10, 0, 0, 0, 0, 0, 0); cond_zero = 0;
    #1 chk(nt == idle() && ev_idle, "EN=01 with Y!=0 gives nothing");
    cond_zero = 1; #1 chk(nt.tag == tag1, "EN=01 with Y=0");
    ft.en1 = 2'b11; #1 chk(nt == idle(), "EN=11 with Y=0");
    cond_zero = 0; #1 chk(nt.tag == tag1, "EN=11 with Y!=0");

    // ---- two local tokens, ORD=0, RECIRC=00, STACK=1: token2 stacked
    @(negedge clk);
    ft = ftc(2'b00, 2'b00, 2'b00, 2'b00, 1'b0, 2'b00, 1'b1, 1'b0);
    #1 chk(nt == '{tag: tag1, value: y} && ev_two && ev_push, "two tokens, token1 recirculates");
    @(negedge clk);
    chk(sr.tos1 == 1 && sr.tos0 == 0, "token2 on stack1");
    // ---- ORD=1: token2 recirculates, token1 stacked on stack0 (STACK=0)
    ft = ftc(2'b00, 2'b00, 2'b00, 2'b00, 1'b1, 2'b00, 1'b0, 1'b0);
    #1 chk(nt == '{tag: tag2, value: y}, "ORD=1");
    @(negedge clk);
    chk(sr.tos0 == 1, "token1 on stack0");
    // ---- no tokens: pop stack0 first, then stack1, then idle
    idle_inputs();
    #1 chk(nt == '{tag: tag1, value: y} && ev_pop, "pop stack0");
    @(negedge clk);
    #1 chk(nt == '{tag: tag2, value: y} && ev_pop, "pop stack1");
    @(negedge clk);
    #1 chk(nt == idle() && ev_idle && !ev_pop, "idle");

    // ---- network input beats a normal recirculation; token goes to stack0
    net_in_token = '{tag: mk_tag(ME, 24'd300, 0), value: '{typ: 8'h44, imm: 64'h4444}};
    net_in_valid = 1;
    ft = ftc(2'b00, 2'b10, 0, 0, 0, 2'b00, 0, 0);
    #1 chk(nt == net_in_token && net_in_ready && ev_net_in && ev_push, "network input priority");
    @(negedge clk);
    chk(sr.tos0 == 1, "interrupted token on stack0");
    // ---- uninterruptible recirculation holds the network off
    ft.recirc = 2'b01;
    #1 chk(nt == '{tag: tag1, value: y} && !net_in_ready && ev_unint, "uninterruptible");
    // ---- no tokens: the network token enters rather than a pop
    ft = ftc(2'b10, 2'b10, 0, 0, 0, 0, 0, 0);
    #1 chk(nt == net_in_token && !ev_pop, "network before pops");
    @(negedge clk);
    net_in_valid = 0;
    #1 chk(nt == '{tag: tag1, value: y} && ev_pop, "pop after network");
    @(negedge clk);

    // ---- RECIRC=10 single token: pushed on stack0, idle inserted
    ft = ftc(2'b00, 2'b10, 0, 0, 0, 2'b10, 0, 0);
    #1 chk(nt == idle() && ev_push, "RECIRC=10");
    @(negedge clk);
    chk(sr.tos0 == 1, "RECIRC=10 pushed on stack0");
    // ---- two tokens RECIRC=11 STACK=1: low then high on stack1
    // (NOPOP0 is set in the same cycle, so stack0 tests empty from now on)
    ft = ftc(2'b00, 2'b00, 2'b00, 2'b00, 1'b0, 2'b11, 1'b1, 0);
    sset = '{valid: 1, idx: SREG_NOPOP0, data: 64'd1};
    #1 chk(nt == idle(), "RECIRC=11 two tokens, idle");
    @(negedge clk);
    chk(sr.tos1 == 2, "two pushes on stack1");
    // NOPOP0: stack0 tests empty, so stack1 pops: the high token (token1) first
    idle_inputs();
    #1 chk(sr.nopop0 && nt == '{tag: tag1, value: y}, "NOPOP0 and high token on top");
    @(negedge clk);
    #1 chk(nt == '{tag: tag2, value: y}, "low token next");
    @(negedge clk);
    #1 chk(nt == idle(), "stack0 held by NOPOP0");
    sset = '{valid: 1, idx: SREG_NOPOP0, data: 64'd0};
    @(negedge clk);
    sset = '0;
    #1 chk(nt == '{tag: tag1, value: y} && ev_pop, "stack0 pops again");
    @(negedge clk);

    // ---- network output
    tag1 = mk_tag(10'd9, 24'd50, 0);
    ft = ftc(2'b00, 2'b10, 0, 0, 0, 0, 0, 0);
    #1 chk(net_out_valid && net_out_token == '{tag: tag1, value: y} && ev_net_out && nt == idle(),
           "remote token sent");
    net_out_ready = 0;
    #1 chk(ev_net_blocked && ev_push && nt == idle(), "blocked remote token stacked");
    @(negedge clk);
    chk(sr.tos0 == 1, "remote token on stack0");
    // popped remote token leaves through the network when it is free
    idle_inputs(); net_out_ready = 0;
    #1 chk(net_out_valid && !ev_pop && nt == idle(), "remote pop waits");
    net_out_ready = 1;
    #1 chk(net_out_valid && ev_pop && net_out_token.tag == tag1, "remote pop sent");
    @(negedge clk);
    chk(sr.tos0 == 0, "stack0 empty again");

    // ---- acknowledgement: a sent ACK token holds stack1 pops
    tag2 = mk_tag(ME, 24'd200, 1'b1);
    ft = ftc(2'b00, 2'b00, 2'b00, 2'b00, 1'b0, 2'b00, 1'b1, 1'b1);  // token1 remote, token2 local
    #1 chk(net_out_valid && net_out_ack_req && nt == '{tag: tag2, value: y}, "ack send");
    @(negedge clk);
    ft = ftc(2'b10, 2'b00, 0, 2'b00, 0, 2'b11, 0, 0);  // push token2 on stack1
    @(negedge clk);
    idle_inputs();
    #1 chk(!ev_pop && ev_ack_hold && nt == idle(), "stack1 held for ack");
    @(negedge clk);
    net_ack_in = 1;
    @(negedge clk);
    net_ack_in = 0;
    #1 chk(ev_pop && nt == '{tag: tag2, value: y}, "stack1 released after ack");
    @(negedge clk);

    // ---- STACKSWAP: STACK=0 pushes land on physical stack1
    sset = '{valid: 1, idx: SREG_SWAP, data: 64'd1};
    @(negedge clk);
    sset = '0;
    tag1 = mk_tag(ME, 24'd100, 1'b0);
    ft = ftc(2'b00, 2'b10, 0, 0, 0, 2'b10, 0, 0);
    @(negedge clk);
    idle_inputs();
    chk(sr.swap && sr.tos1 == 1 && sr.tos0 == 0, "swap pushes to physical stack1");
    #1 chk(ev_pop && nt.tag == tag1, "swap pops physical stack1 first");
    @(negedge clk);
    sset = '{valid: 1, idx: SREG_SWAP, data: 64'd0};
    @(negedge clk);
    sset = '0;

    // ---- two local tokens with a waiting network token: both pushed
    begin
      logic [63:0] t0, t1;
      t0 = sr.tos0; t1 = sr.tos1;
      tag1 = mk_tag(ME, 24'd100, 1'b0); tag2 = mk_tag(ME, 24'd200, 1'b1);
      net_in_valid = 1;
      ft = ftc(2'b00, 2'b00, 2'b00, 2'b00, 1'b0, 2'b00, 1'b1, 1'b0);
      #1 chk(nt == net_in_token && ev_two && ev_push, "two tokens pushed for the network token");
      @(negedge clk);
      chk(sr.tos0 == t0 + 1 && sr.tos1 == t1 + 1, "low on STACK, high on stack0");
      // uninterruptible with two tokens: high recirculates, low stacked
      ft.recirc = 2'b01;
      #1 chk(nt == '{tag: tag1, value: y} && !net_in_ready && ev_push, "uninterruptible pair");
      @(negedge clk);
      chk(sr.tos1 == t1 + 2, "low token stacked again");
      idle_inputs();
      repeat (3) @(negedge clk);
      chk(sr.tos0 == t0 && sr.tos1 == t1, "stacks drained by pops");
      // two remote tokens: one leaves, the other goes on stack0
      tag1 = mk_tag(10'd9, 24'd1, 1'b0); tag2 = mk_tag(10'd9, 24'd2, 1'b0);
      ft = ftc(2'b00, 2'b00, 2'b00, 2'b00, 1'b0, 2'b00, 1'b0, 1'b0);
      #1 chk(net_out_valid && net_out_token.tag == tag1 && ev_net_blocked && nt == idle(),
             "second remote token stacked");
      @(negedge clk);
      idle_inputs();
      #1 chk(net_out_valid && net_out_token.tag == tag2 && ev_pop, "stacked remote token leaves");
      @(negedge clk);
      // aliased HASH: a PE in the same subdomain counts as local
      tag1 = mk_tag(ME ^ 10'd2, 24'd3, 1'b0);
      tag1.ptr.hash = HASH_ALIAS; tag1.ptr.n = 5'd2;
      ft = ftc(2'b00, 2'b10, 0, 0, 0, 0, 0, 0);
      #1 chk(!net_out_valid && nt.tag == tag1, "aliased token stays local");
      tag1.ptr.n = 5'd1;
      #1 chk(net_out_valid && nt == idle(), "outside the subdomain it leaves");
      @(negedge clk);
      idle_inputs();
      tag1 = mk_tag(ME, 24'd100, 1'b0); tag2 = mk_tag(ME, 24'd200, 1'b1);
    end
    // ---- exception: handler token replaces the outputs, holds the network
    thread = 3'd4; exc = 1; net_in_valid = 1;
    ft = ftc(2'b00, 2'b00, 0, 0, 0, 0, 0, 0);
    exp_t = '0; exp_t.tag.ptr.ip = 24'd5; exp_t.tag.ptr.pe = ME; exp_t.value = word_t'(in_tag);
    #1 chk(nt == exp_t && !net_in_ready && !ev_push, "exception handler token");
    exc = 0; mcheck = 1;
    #1 chk(nt == net_in_token && !ev_push, "machine check drops tokens");
    idle_inputs();
    @(negedge clk);
    // MCU writes BASE / TOS
    sset = '{valid: 1, idx: SREG_TOS0, data: 64'd9};
    @(negedge clk);
    chk(sr.tos0 == 9, "SETTOS0");
    sset = '{valid: 1, idx: SREG_BASE0, data: 64'd7};
    @(negedge clk);
    sset = '0;
    chk(sr.base0 == 7 && sr.tos0 == 8, "SETBASE0 (the pop of that cycle still happens)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
