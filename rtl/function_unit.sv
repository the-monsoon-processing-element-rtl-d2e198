// function_unit: the ALU/FPU stage (stage 5) as the function unit
// interconnection shows it.
//
// The crossover sorts VALUE and temp into A and B by the incoming PORT and
// FLIP.  A and B feed four units in parallel, FALU, PIU, TPU and MCU; UNIT
// selects whose immediate becomes Y.  The TPU always supplies the Y TYPE
// (from TMASK, or from A for SETTYPE).  B and its TYPE pass through
// unchanged as the second result.  The status word carries the FALU flags
// when the FALU is selected and the PIU overflow / underflow when the PIU
// is; ALWAYS is added by the exception unit.  cond_zero (Y immediate = 0)
// is the condition the form token stage tests.  All combinational except
// the MCU's activity flag.
module function_unit
  import monsoon_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fuctl_t      fuctl,
  input  logic [15:0] tmask,
  input  word_t       value,
  input  word_t       temp,
  input  logic        port,
  input  logic        inst_port,
  input  logic [10:0] s,
  input  stack_regs_t stack_regs,
  input  word_t       ctx_a,
  input  word_t       ctx_b,
  input  logic [8:0]  ctx_status,
  input  logic [31:0] cnt_rd_val,
  output logic [3:0]  cnt_rd_idx,
  output word_t       a,
  output word_t       y,
  output word_t       b,
  output logic [8:0]  status,
  output logic        cond_zero,
  output stack_set_t  stack_set,
  output logic        exc_clear,
  output logic        cnt_set,
  output logic [3:0]  cnt_set_idx,
  output logic [31:0] cnt_set_val
);
  logic [63:0] y_falu, y_piu, y_tpu, y_mcu;
  logic [8:0]  st_falu;
  logic        piu_ovf, piu_unf;
  logic [7:0]  y_type;

  crossover u_xo (.value(value), .temp(temp), .port(port), .flip(fuctl.flip), .a(a), .b(b));

  falu u_falu (.op(fuctl.op), .a(a.imm), .b(b.imm), .y(y_falu), .status(st_falu));

  piu u_piu (.op(fuctl.op), .a(a.imm), .b(b.imm), .inst_port(inst_port), .s(s),
             .y(y_piu), .ovf(piu_ovf), .unf(piu_unf));

  tpu u_tpu (.selected(fuctl.unit == UNIT_TPU), .op(fuctl.op), .tmask(tmask), .a(a),
             .b_type(b.typ), .y_type(y_type), .y_imm(y_tpu));

  mcu u_mcu (.clk(clk), .rst_n(rst_n), .selected(fuctl.unit == UNIT_MCU), .op(fuctl.op),
             .a(a.imm), .b(b.imm), .stack_regs(stack_regs), .ctx_a(ctx_a), .ctx_b(ctx_b),
             .ctx_status(ctx_status), .cnt_rd_val(cnt_rd_val), .cnt_rd_idx(cnt_rd_idx),
             .y(y_mcu), .stack_set(stack_set), .exc_clear(exc_clear), .cnt_set(cnt_set),
             .cnt_set_idx(cnt_set_idx), .cnt_set_val(cnt_set_val));

  always_comb begin
    status = '0;
    unique case (fuctl.unit)
      UNIT_FALU: begin y.imm = y_falu; status = st_falu; end
      UNIT_PIU:  begin y.imm = y_piu; status[ST_OF] = piu_ovf; status[ST_UF] = piu_unf; end
      UNIT_TPU:  y.imm = y_tpu;
      UNIT_MCU:  y.imm = y_mcu;
    endcase
    y.typ     = y_type;
    cond_zero = (y.imm == 64'd0);
  end
endmodule
