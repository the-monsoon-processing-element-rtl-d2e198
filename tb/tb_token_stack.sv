// tb_token_stack: random single and double pushes, pops and MCU loads of
// BASE / TOS against a queue model; checks top, empty and the pointers.
module tb_token_stack;
  import monsoon_pkg::*;
  localparam int AW = 6;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          rst_n = 0, pop = 0, set_base = 0, set_tos = 0, empty;
  logic [1:0]    push_cnt = '0;
  token_t        d0 = '0, d1 = '0, top;
  logic [AW-1:0] set_val = '0, base, tos;
  token_t        model [$];

  token_stack #(.AW(AW)) dut (.clk(clk), .rst_n(rst_n), .push_cnt(push_cnt), .d0(d0), .d1(d1),
    .pop(pop), .set_base(set_base), .set_tos(set_tos), .set_val(set_val), .top(top),
    .empty(empty), .base(base), .tos(tos));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 checks++;
    if (!empty || tos != 0 || base != 0) begin failures++; $display("reset state"); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      push_cnt = '0; pop = 0;
      if (model.size() > 0 && $urandom_range(0, 2) == 0) pop = 1;
      else if (model.size() < 2**AW - 3) push_cnt = 2'($urandom_range(0, 2));
      d0 = token_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      d1 = token_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      @(posedge clk);
      if (pop) void'(model.pop_back());
      if (push_cnt >= 1) model.push_back(d0);
      if (push_cnt == 2) model.push_back(d1);
      #1;
      checks++;
      if (empty !== (model.size() == 0) || (model.size() > 0 && top !== model[$]) ||
          AW'(tos - base) !== AW'(model.size())) begin
        failures++;
        if (failures < 10) $display("step %0d: size %0d empty %b tos %0d", i, model.size(), empty, tos);
      end
    end
    // MCU loads: moving BASE up to TOS empties the stack
    @(negedge clk);
    push_cnt = 0; pop = 0; set_base = 1; set_val = tos;
    @(negedge clk);
    set_base = 0;
    checks++;
    if (!empty || base !== tos) begin failures++; $display("set base"); end
    set_tos = 1; set_val = base + 3;
    @(negedge clk);
    set_tos = 0;
    checks++;
    if (empty || tos !== AW'(base + 3)) begin failures++; $display("set tos"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
