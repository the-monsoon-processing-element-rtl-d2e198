// tb_operand_fetch_store: checks read, write, exchange and enqueue, and that
// the NOP presence maps suppress the memory operation with temp = VALUE.
module tb_operand_fetch_store;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  fop_e        fop;
  logic        nop, mem_we;
  word_t       value, temp;
  logic [71:0] mem_rdata, mem_wdata, exp_w;
  pointer_t    p;

  operand_fetch_store dut (.fop(fop), .nop(nop), .value(value), .mem_rdata(mem_rdata),
                           .mem_we(mem_we), .mem_wdata(mem_wdata), .temp(temp));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      value     = word_t'({$urandom, $urandom, $urandom});
      mem_rdata = {$urandom, $urandom, $urandom};
      fop       = fop_e'($urandom_range(0, 3));
      nop       = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (nop) begin
        if (mem_we !== 1'b0 || temp !== value) failures++;
      end else begin
        p = pointer_t'(value.imm);
        p.ip = p.ip + 1;
        exp_w = (fop == FOP_ENQ) ? {value.typ, 64'(p)} : 72'(value);
        unique case (fop)
          FOP_READ:  if (mem_we !== 0 || temp !== word_t'(mem_rdata)) failures++;
          FOP_WRITE: if (mem_we !== 1 || temp !== value || mem_wdata !== exp_w) failures++;
          FOP_EXCH:  if (mem_we !== 1 || temp !== word_t'(mem_rdata) || mem_wdata !== exp_w) failures++;
          FOP_ENQ:   if (mem_we !== 1 || temp !== word_t'(mem_rdata) || mem_wdata !== exp_w) failures++;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
