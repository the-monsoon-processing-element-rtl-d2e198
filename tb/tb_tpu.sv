// tb_tpu: checks type propagation bit by bit (m,v = 00 -> 0, 01 -> 1,
// 10 -> A, 11 -> B), SETTYPE taking its controls from A, GETTYPE keeping
// TMASK, and the A TYPE immediate.
module tb_tpu;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        selected;
  logic [7:0]  op, b_type, y_type, exp_t;
  logic [15:0] tmask, ctl;
  word_t       a;
  logic [63:0] y_imm;

  tpu dut (.selected(selected), .op(op), .tmask(tmask), .a(a), .b_type(b_type),
           .y_type(y_type), .y_imm(y_imm));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: m = 0xF0, v = 0xCC -> bits 7..4 from B/A/B/A... check one
    selected = 0; op = 0; tmask = 16'hF0_CC; a = '0; a.typ = 8'b1010_1010; b_type = 8'b0101_0101;
    #1 checks++;
    // bits 7..4: m=1; v=1,1,0,0 -> B7 B6 A5 A4 = 0 1 1 0; bits 3..0: v = 1,1,0,0
    if (y_type !== 8'b0110_1100) begin failures++; $display("directed %b", y_type); end
    for (int i = 0; i < 2000; i++) begin
      selected = 1'($urandom);
      op       = 8'($urandom_range(0, 1));
      tmask    = 16'($urandom);
      a        = word_t'({$urandom, $urandom, $urandom});
      b_type   = 8'($urandom);
      #1;
      ctl = (selected && op == 0) ? a.imm[15:0] : tmask;
      for (int k = 0; k < 8; k++)
        exp_t[k] = ctl[8+k] ? (ctl[k] ? b_type[k] : a.typ[k]) : ctl[k];
      checks++;
      if (y_type !== exp_t || y_imm !== {56'd0, a.typ}) begin
        failures++;
        if (failures < 10) $display("sel %b op %0d: %b exp %b", selected, op, y_type, exp_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
