// tb_mcu: checks the MCU read and write operations: stack register reads
// and writes, exception context reads and CLEAR, GETCOUNTER / SETCOUNTER,
// the ACTIVITY? flag (set by any other instruction, cleared by reading),
// and that nothing happens when the MCU is not the selected unit.  A
// final random run compares every operation with a reference model.
module tb_mcu;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n = 0, selected = 0, exc_clear, cnt_set;
  logic [7:0]  op = '0;
  logic [63:0] a = '0, b = '0, y;
  stack_regs_t sr;
  word_t       ctx_a, ctx_b;
  logic [8:0]  ctx_status;
  logic [31:0] cnt_rd_val, cnt_set_val;
  logic [3:0]  cnt_rd_idx, cnt_set_idx;
  stack_set_t  sset;

  mcu dut (.clk(clk), .rst_n(rst_n), .selected(selected), .op(op), .a(a), .b(b), .stack_regs(sr),
           .ctx_a(ctx_a), .ctx_b(ctx_b), .ctx_status(ctx_status), .cnt_rd_val(cnt_rd_val),
           .cnt_rd_idx(cnt_rd_idx), .y(y), .stack_set(sset), .exc_clear(exc_clear),
           .cnt_set(cnt_set), .cnt_set_idx(cnt_set_idx), .cnt_set_val(cnt_set_val));

  // counter bank model answering GETCOUNTER
  assign cnt_rd_val = 32'h1000 + 32'(cnt_rd_idx);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of one MCU operation
  logic        act_m, sv_m, clr_m, cs_m;
  logic [63:0] y_m;
  task automatic model();
    y_m = '0; sv_m = 0; clr_m = 0; cs_m = 0;
    if (selected) begin
      if (op[7]) begin
        if (op[6:4] == 3'd0 && op[3:0] <= 4'd6) sv_m = 1;
        if (op[6:4] == 3'd1 && op[3:0] == 4'd3) clr_m = 1;
        if (op[6:4] == 3'd2 && op[3:0] == 4'd1) cs_m = 1;
      end else begin
        case ({op[6:4], op[3:0]})
          7'h00: y_m = sr.base0;
          7'h01: y_m = sr.base1;
          7'h02: y_m = sr.tos0;
          7'h03: y_m = sr.tos1;
          7'h04: y_m = sr.nopop0 ? '1 : '0;
          7'h05: y_m = sr.nopop1 ? '1 : '0;
          7'h06: y_m = sr.swap ? '1 : '0;
          7'h10: y_m = ctx_a.imm;
          7'h11: y_m = ctx_b.imm;
          7'h12: y_m = 64'(ctx_status);
          7'h20: y_m = act_m ? '1 : '0;
          7'h21: y_m = 64'h1000 + 64'(a[3:0]);
          default: y_m = '0;
        endcase
      end
    end
  endtask

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (y=%h)", what, y); end
  endtask

  initial begin
    sr = '{base0: 64'd11, base1: 64'd22, tos0: 64'd33, tos1: 64'd44, nopop0: 1'b1, nopop1: 1'b0, swap: 1'b1};
    ctx_a = '{typ: 8'h5, imm: 64'hAAAA}; ctx_b = '{typ: 8'h6, imm: 64'hBBBB}; ctx_status = 9'h155;
    repeat (2) @(negedge clk);
    rst_n = 1;
    selected = 1;
    op = 8'b0000_0000; #1 chk(y == 11, "GETBASE0");
    op = 8'b0000_0001; #1 chk(y == 22, "GETBASE1");
    op = 8'b0000_0010; #1 chk(y == 33, "GETTOS0");
    op = 8'b0000_0011; #1 chk(y == 44, "GETTOS1");
    op = 8'b0000_0100; #1 chk(y == '1, "GETNOPOP0");
    op = 8'b0000_0101; #1 chk(y == '0, "GETNOPOP1");
    op = 8'b0000_0110; #1 chk(y == '1, "GETSWAP");
    for (int k = 0; k < 7; k++) begin
      op = 8'h80 | 8'(k); a = 64'($urandom); #1;
      chk(sset.valid && sset.idx == 3'(k) && sset.data == a && y == 0, "SET stack reg");
    end
    op = 8'b0001_0000; #1 chk(y == 64'hAAAA, "GETA");
    op = 8'b0001_0001; #1 chk(y == 64'hBBBB, "GETB");
    op = 8'b0001_0010; #1 chk(y == 64'h155, "GETSTATUS");
    op = 8'b1001_0011; #1 chk(exc_clear && !sset.valid, "CLEAR");
    op = 8'b0010_0001; a = 64'd7; #1 chk(y == 64'h1007 && cnt_rd_idx == 7, "GETCOUNTER");
    op = 8'b1010_0001; a = 64'd9; b = 64'h1234_5678; #1
      chk(cnt_set && cnt_set_idx == 9 && cnt_set_val == 32'h1234_5678, "SETCOUNTER");
    // activity: the instructions above set it; ACTIVITY? returns and clears
    @(negedge clk);
    op = 8'b0010_0000; #1 chk(y == '1, "ACTIVITY? set");
    @(negedge clk);
    #1 chk(y == '0, "ACTIVITY? cleared by itself");
    op = 8'b0000_0000;
    @(negedge clk);
    op = 8'b0010_0000; #1 chk(y == '1, "ACTIVITY? set again");
    // not selected: no effects
    selected = 0;
    for (int k = 0; k < 50; k++) begin
      op = 8'($urandom); a = {$urandom, $urandom}; #1;
      chk(!sset.valid && !exc_clear && !cnt_set && y == 0, "unselected");
    end
    // random operations against a reference model, one per clock, with
    // the activity flag tracked across cycles
    selected = 1;
    @(negedge clk);
    op = 8'b0010_0000; #1;  // clear the flag before the model takes over
    @(negedge clk);
    act_m = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      sr = '{base0: {$urandom, $urandom}, base1: {$urandom, $urandom},
             tos0: {$urandom, $urandom}, tos1: {$urandom, $urandom},
             nopop0: 1'($urandom), nopop1: 1'($urandom), swap: 1'($urandom)};
      ctx_a = '{typ: 8'($urandom), imm: {$urandom, $urandom}};
      ctx_b = '{typ: 8'($urandom), imm: {$urandom, $urandom}};
      ctx_status = 9'($urandom);
      op = {1'($urandom), 3'($urandom_range(0, 3)), 4'($urandom_range(0, 7))};
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      selected = ($urandom_range(0, 9) != 0);
      #1;
      model();
      chk(y == y_m && sset.valid == sv_m && (!sv_m || (sset.idx == op[2:0] && sset.data == a))
          && exc_clear == clr_m && cnt_set == cs_m
          && (!cs_m || (cnt_set_idx == a[3:0] && cnt_set_val == b[31:0])), "random op");
      act_m = !(selected && op == 8'b0010_0000);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
