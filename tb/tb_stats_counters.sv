// tb_stats_counters: random increments, MCU writes and host clears against
// a model of sixteen 32-bit counters, checking both read ports.
module tb_stats_counters;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n = 0, inc = 0, set = 0, host_clr = 0;
  logic [3:0]  inc_idx = '0, set_idx = '0, rd_idx = '0, host_idx = '0;
  logic [31:0] set_val = '0, rd_val, host_val;
  logic [31:0] model [16];

  stats_counters #(.N(16), .W(32)) dut (.clk(clk), .rst_n(rst_n), .inc(inc), .inc_idx(inc_idx),
    .set(set), .set_idx(set_idx), .set_val(set_val), .rd_idx(rd_idx), .rd_val(rd_val),
    .host_idx(host_idx), .host_val(host_val), .host_clr(host_clr));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rd_idx = 4'($urandom); host_idx = 4'($urandom);
      #1;
      checks++;
      if (rd_val !== model[rd_idx] || host_val !== model[host_idx]) begin
        failures++;
        if (failures < 10) $display("cnt %0d: %0d exp %0d", rd_idx, rd_val, model[rd_idx]);
      end
      inc = 1'($urandom); inc_idx = 4'($urandom_range(0, 3));
      set = ($urandom_range(0, 20) == 0); set_idx = 4'($urandom); set_val = $urandom;
      host_clr = ($urandom_range(0, 500) == 0);
      @(posedge clk);
      if (host_clr) foreach (model[k]) model[k] = '0;
      else begin
        if (inc) model[inc_idx] = model[inc_idx] + 1;
        if (set) model[set_idx] = set_val;
      end
      #1 inc = 0; set = 0; host_clr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
