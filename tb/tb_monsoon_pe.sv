// tb_monsoon_pe: end-to-end test of the processing element at its default
// sizes.  Holding reset, the host port loads a small program: the decode
// tables, presence maps, type maps, instructions, constants and cleared
// presence bits.  Tokens then arrive over the network input and results
// leave over the network output, where they are compared with expected
// tokens (order free), and the pipeline latency of six clocks per
// instruction is checked.  Programs: dyadic add with presence matching, bulk
// presence clear, I-structure (deferred read, exchange, read), enqueue,
// type-map dispatch, a two-token fork through the stacks, an
// uninterruptible countdown loop, an acknowledged send with a held stack,
// a blocked network output, the MCU activity flag, integer overflow
// exceptions with handler and CLEAR, statistics counters, and finally a
// machine check.  Every mechanism of the form token stage and the
// exception unit is counted; one that never happens is a failure.
module tb_monsoon_pe;
  import monsoon_pkg::*;
  `include "tb_monsoon_pe_prog.svh"
  int checks = 0, failures = 0, n_out = 0, ack_timer = 0, evc[12], cyc = 0, t_in = 0, t_out = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_we = 0, host_cnt_clr = 0, net_in_valid = 0, net_in_ready, net_out_valid;
  logic net_out_ack_req, net_out_ready = 1, net_ack_in, exception, machine_check;
  logic [2:0] host_sel = 0;
  logic [23:0] host_addr = 0, host_raddr = 0;
  logic [71:0] host_wdata = 0, host_rdata;
  logic [3:0] host_cnt_idx = 0;
  logic [31:0] host_cnt_val;
  token_t net_in_token = '0, net_out_token, expq[$], gotq[$];
  logic [9:0] events;
  string names[12] = '{"two tokens", "recirculate", "uninterruptible", "push", "pop", "idle",
                       "network in", "network out", "network blocked", "ack hold",
                       "exception", "machine check"};

  monsoon_pe dut (.*, .pe_id(ME));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign net_ack_in = (ack_timer == 1);
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (net_out_valid && net_out_ready) begin
      gotq.push_back(net_out_token);
      t_out <= cyc;
      if (net_out_ack_req) ack_timer <= 20;
    end else if (ack_timer > 0) ack_timer <= ack_timer - 1;
    for (int i = 0; i < 10; i++) if (events[i]) evc[i]++;
    if (exception) evc[10]++;
    if (machine_check) evc[11]++;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic hw(input host_sel_e sel, input int addr, input logic [71:0] d);
    @(negedge clk);
    host_we = 1; host_sel = sel; host_addr = 24'(addr); host_wdata = d;
  endtask

  task automatic send(input token_t t);
    logic ok;
    @(negedge clk);
    net_in_valid = 1; net_in_token = t;
    forever begin
      #4 ok = net_in_ready;
      @(posedge clk);
      if (ok) begin t_in = cyc; break; end
    end
  endtask

  task automatic out(input word_t v);  // one expected output through OUT
    expq.push_back('{tag: tag_t'(C_OUT_W), value: v});
    n_out++;
  endtask

  // wait, then match the collected network output against expq
  task automatic settle(input int n, input string what);
    @(negedge clk) net_in_valid = 0;
    repeat (n) @(posedge clk);
    chk(gotq.size() == expq.size(), {what, ": output count"});
    foreach (expq[i]) begin
      int k;
      k = -1;
      foreach (gotq[j]) if (k < 0 && gotq[j] == expq[i]) k = j;
      chk(k >= 0, {what, ": expected token seen"});
      if (k >= 0) gotq.delete(k);
      else $display("  missing %h", expq[i]);
    end
    expq.delete(); gotq.delete();
  endtask

  function automatic word_t wv(input logic [63:0] v, input logic [7:0] t = 8'd1);
    return '{typ: t, imm: v};
  endfunction

  initial begin
    logic [63:0] x, z;
    tag_t t;
    load();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // latency: six clocks per instruction, one per stage
    send(tk(21, 0, wv(64'd11))); out(wv(11));
    settle(20, "single instruction");
    chk(t_out - t_in == 6, "one instruction takes six clocks");
    send(tk(26, 0, wv(64'd4))); out(wv(8));
    settle(30, "two instructions");
    chk(t_out - t_in == 12, "two chained instructions take twelve clocks");
    // dyadic add: first arrival stores, second matches
    x = 64'($urandom); z = 64'($urandom);
    send(tk(20, 0, wv(x))); send(tk(20, 1, wv(z))); out(wv(x + z));
    settle(40, "dyadic add");
    // bulk clear of the presence row drops a waiting operand
    send(tk(20, 0, wv(1))); send(tk(44, 0, wv(0))); send(tk(20, 0, wv(2)));
    send(tk(20, 1, wv(3))); out(wv(5));
    settle(40, "bulk presence clear");
    // I-structure: deferred read, then write (exchange), then a plain read
    send(tk(22, 1, word_t'(rtag(24'h501)))); settle(20, "deferred read waits");
    send(tk(22, 0, wv(99)));
    expq.push_back('{tag: rtag(24'h501), value: wv(99)});
    settle(40, "deferred read served");
    send(tk(22, 1, word_t'(rtag(24'h502))));
    expq.push_back('{tag: rtag(24'h502), value: wv(99)});
    settle(40, "present read");
    host_raddr = FP + 1; #1 chk(host_rdata == wv(99), "I-structure slot holds the value");
    // enqueue writes VALUE with IP + 1
    t = tk(100, 0, wv(0)).tag;
    send(tk(24, 0, word_t'(t))); settle(20, "enqueue");
    t.ptr.ip = 24'd101;
    host_raddr = FP + 2; #1 chk(host_rdata == word_t'(t), "enqueue stored IP + 1");
    // type map dispatch: type 2 on the left port takes the second entry
    send(tk(26, 0, wv(21))); out(wv(42));
    send(tk(26, 0, wv(21, 8'd2))); out(wv(0, 8'd2));
    settle(40, "type dispatch");
    // fork: two tokens, the second through stack1
    send(tk(28, 0, wv(8))); out(wv(8)); out(wv(8));
    settle(40, "fork");
    // uninterruptible loop while a burst of tokens waits at the input
    send(tk(34, 0, wv(30))); out(wv(0));
    for (int i = 1; i <= 6; i++) begin send(tk(26, 0, wv(i))); out(wv(2 * i)); end
    settle(300, "countdown loop");
    // acknowledged send; the stacked token waits for the acknowledgement
    send(tk(38, 0, wv(77))); out(wv(77)); out(wv(77)); n_out--;
    settle(80, "acknowledged fork");
    // blocked network output
    net_out_ready = 0;
    send(tk(26, 0, wv(50))); out(wv(100));
    @(negedge clk) net_in_valid = 0;
    repeat (30) @(posedge clk);
    chk(gotq.size() == 0, "nothing leaves while blocked");
    net_out_ready = 1;
    settle(30, "blocked output");
    // activity flag
    send(tk(42, 0, wv(5))); out(wv('1));
    settle(40, "activity flag");
    // overflow exceptions: handler sends the offending tag, then CLEAR
    for (int i = 0; i < 2; i++) begin
      send(tk(20, 0, wv(64'h7FFF_FFFF_FFFF_FFFF))); send(tk(20, 1, wv(1)));
      expq.push_back('{tag: tag_t'(C_EXC_W), value: word_t'(tk(20, 1, wv(1)).tag)});
      settle(60, "exception handler");
    end
    chk(!machine_check, "no machine check after CLEAR");
    // statistics: counter 2 counts OUT instructions
    host_cnt_idx = 4'd2; #1 chk(host_cnt_val == 32'(n_out), "OUT counter");
    host_cnt_idx = 4'd1; #1 chk(host_cnt_val == 32'd4, "ADD counter");
    // a handler that itself faults gives a machine check
    hw(HSEL_SLD, 12, 72'(sld_e(UNIT_FALU, OP_PASSA, 0, 1, 0, 0, 3, 0, 0, 0, 0, 0, 10'h100, 0)));
    @(negedge clk) host_we = 0;
    send(tk(20, 0, wv(64'h7FFF_FFFF_FFFF_FFFF))); send(tk(20, 1, wv(1)));
    settle(60, "faulting handler");
    chk(machine_check, "machine check");
    foreach (evc[i]) begin
      chk(evc[i] > 0, {"mechanism happened: ", names[i]});
      $display("  %-16s %0d", names[i], evc[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
