// tb_exception_unit: checks the SENSE / mask rule on random status words,
// that an exception saves A, B and the masked status of its thread, that a
// second exception before CLEAR raises a machine check, and that each
// thread reads its own context.
module tb_exception_unit;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       rst_n = 0, clear = 0, exc, mcheck;
  logic [2:0] thread = '0;
  logic [8:0] status = '0, ctx_status, st, m;
  emask_t     emask = '0;
  word_t      a = '0, b = '0, ctx_a, ctx_b;
  logic       flag [8];
  word_t      ma [8], mb [8];
  logic [8:0] ms [8];
  logic       raw;

  exception_unit #(.NCTX(8)) dut (.clk(clk), .rst_n(rst_n), .thread(thread), .status(status),
    .emask(emask), .a(a), .b(b), .clear(clear), .exc(exc), .mcheck(mcheck), .ctx_a(ctx_a),
    .ctx_b(ctx_b), .ctx_status(ctx_status));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (flag[i]) flag[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      thread = 3'($urandom);
      status = 9'($urandom);
      emask  = emask_t'($urandom_range(0, 1023) & ($urandom_range(0, 3) == 0 ? 10'h3FF : 10'h2FF));
      a = word_t'({$urandom, $urandom, $urandom});
      b = word_t'({$urandom, $urandom, $urandom});
      clear = ($urandom_range(0, 3) == 0);
      #1;
      st = status; st[8] = 1'b1;
      m  = st & emask[8:0];
      raw = emask.sense ? (m == 0) : (m != 0);
      checks++;
      if (exc !== (raw && !flag[thread]) || mcheck !== (raw && flag[thread])) begin
        failures++;
        if (failures < 10) $display("thr %0d st %b mask %b: exc %b mc %b", thread, status, emask, exc, mcheck);
      end
      if (flag[thread] || exc) begin
        // context of a thread that has taken an exception
        if (!exc && (ctx_a !== ma[thread] || ctx_b !== mb[thread] || ctx_status !== ms[thread])) begin
          failures++;
          if (failures < 10) $display("context of thread %0d wrong", thread);
        end
      end
      @(posedge clk);
      if (raw && !flag[thread]) begin
        flag[thread] = 1; ma[thread] = a; mb[thread] = b; ms[thread] = m;
      end else if (clear) flag[thread] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
