// tb_function_unit: checks the function unit as an assembly: the crossover
// of VALUE / temp into A and B by PORT and FLIP, the UNIT selection of the
// Y immediate among FALU, PIU, TPU and MCU, the Y TYPE from TMASK, B
// passing through, the status word routing and cond_zero.  Random operands
// with a simple reference per unit (integer add / xor on the FALU, pointer
// copy and field set on the PIU, GETTYPE on the TPU, stack register reads
// and a stack write on the MCU).
module tb_function_unit;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  fuctl_t      fuctl = '0;
  logic [15:0] tmask = '0;
  word_t       value = '0, temp = '0, a, y, b, ea, eb, ey;
  logic        port = 0, inst_port = 0, cond_zero, exc_clear, cnt_set;
  logic [10:0] s = '0;
  stack_regs_t sr = '0;
  logic [8:0]  status;
  logic [3:0]  cnt_rd_idx, cnt_set_idx;
  logic [31:0] cnt_set_val;
  stack_set_t  sset;
  pointer_t    pa, pe;

  function_unit dut (
    .clk(clk), .rst_n(rst_n), .fuctl(fuctl), .tmask(tmask), .value(value), .temp(temp),
    .port(port), .inst_port(inst_port), .s(s), .stack_regs(sr), .ctx_a('0), .ctx_b('0),
    .ctx_status('0), .cnt_rd_val(32'h0), .cnt_rd_idx(cnt_rd_idx), .a(a), .y(y), .b(b),
    .status(status), .cond_zero(cond_zero), .stack_set(sset), .exc_clear(exc_clear),
    .cnt_set(cnt_set), .cnt_set_idx(cnt_set_idx), .cnt_set_val(cnt_set_val));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_type(input logic [15:0] t, input logic [7:0] at, bt);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      case ({t[8+i], t[i]})
        2'b00: r[i] = 1'b0;
        2'b01: r[i] = 1'b1;
        2'b10: r[i] = at[i];
        default: r[i] = bt[i];
      endcase
    return r;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: unit %0d op %h a %h b %h y %h", what, fuctl.unit, fuctl.op, a, b, y);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      value = '{typ: 8'($urandom), imm: {$urandom, $urandom}};
      temp  = '{typ: 8'($urandom), imm: {$urandom, $urandom}};
      if (n % 7 == 0) temp.imm = 64'd0 - value.imm;  // makes some sums zero
      port = 1'($urandom); fuctl.flip = 1'($urandom); inst_port = 1'($urandom);
      s = 11'($urandom); tmask = 16'($urandom);
      sr.tos0 = {$urandom, $urandom}; sr.base1 = {$urandom, $urandom};
      // reference crossover
      if (fuctl.flip) begin
        ea = (port == 1'b0) ? temp : value;
        eb = (port == 1'b0) ? value : temp;
      end else begin
        ea = (port == 1'b0) ? value : temp;
        eb = (port == 1'b0) ? temp : value;
      end
      unique case (n % 8)
        0: begin fuctl.unit = UNIT_FALU; fuctl.op = OP_IADD; ey.imm = ea.imm + eb.imm; end
        1: begin fuctl.unit = UNIT_FALU; fuctl.op = OP_XOR; ey.imm = ea.imm ^ eb.imm; end
        2: begin fuctl.unit = UNIT_PIU; fuctl.op = 8'h0A; ey.imm = ea.imm; end
        3: begin
          fuctl.unit = UNIT_PIU; fuctl.op = 8'h1F;  // PORT = instruction PORT, IP = s, FP = s
          pa = pointer_t'(ea.imm); pe = pa; pe.port = inst_port;
          pe.ip = 24'(signed'(s)); pe.fp = 22'(signed'(s));
          ey.imm = pe;
        end
        4: begin fuctl.unit = UNIT_TPU; fuctl.op = 8'h01; ey.imm = {56'd0, ea.typ}; end
        5: begin fuctl.unit = UNIT_MCU; fuctl.op = 8'h02; ey.imm = sr.tos0; end
        6: begin fuctl.unit = UNIT_MCU; fuctl.op = 8'h01; ey.imm = sr.base1; end
        default: begin fuctl.unit = UNIT_MCU; fuctl.op = 8'h86; ey.imm = 64'd0; end
      endcase
      #1;
      chk(a == ea && b == eb, "crossover");
      chk(y.imm == ey.imm, "Y immediate");
      chk(y.typ == ref_type(tmask, ea.typ, eb.typ), "Y TYPE from TMASK");
      chk(cond_zero == (ey.imm == 64'd0), "cond_zero");
      if (fuctl.unit != UNIT_FALU && fuctl.unit != UNIT_PIU) chk(status == '0, "status quiet");
      if (n % 8 == 7)
        chk(sset.valid && sset.idx == SREG_SWAP && sset.data == ea.imm, "MCU stack write");
      else
        chk(!sset.valid, "no stack write");
      @(negedge clk);
    end
    // a FALU overflow shows in status, an IADD of zero sets ZERO
    fuctl = '{flip: 0, unit: UNIT_FALU, op: OP_IADD}; port = 0;
    value.imm = 64'h7FFF_FFFF_FFFF_FFFF; temp.imm = 64'd1;
    #1 chk(status[ST_OF], "FALU overflow in status");
    fuctl.unit = UNIT_TPU;
    #1 chk(!status[ST_OF], "status only from the selected unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
