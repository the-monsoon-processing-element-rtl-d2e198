// tb_ea_unit: checks the effective address generator against an
// independent model of the four EA modes, including the masked base mode
// that only applies with HASH = base FP and N > 0.
module tb_ea_unit;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  ea_mode_e    mode;
  pointer_t    ptr;
  logic [9:0]  r;
  logic [23:0] ea, exp_ea;

  ea_unit dut (.mode(mode), .ptr(ptr), .r(r), .ea(ea));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: mask(FP) with N = 15 aligns to 32K words
    ptr = '0; ptr.hash = HASH_BASE; ptr.n = 5'd15; ptr.fp = 22'h12_3456; r = 10'd7; mode = EA_MASK;
    #1 checks++;
    if (ea !== 24'h12_0007) begin failures++; $display("mask N=15: %h", ea); end
    for (int i = 0; i < 4000; i++) begin
      ptr  = pointer_t'({$urandom, $urandom});
      if (i % 3 == 0) ptr.hash = HASH_BASE;
      if (i % 5 == 0) ptr.n = 5'($urandom_range(0, 24));
      r    = 10'($urandom);
      mode = ea_mode_e'($urandom_range(0, 3));
      #1;
      unique case (mode)
        EA_FP:   exp_ea = {2'b0, ptr.fp} + 24'(r);
        EA_IP:   exp_ea = ptr.ip + 24'(r);
        EA_ABS:  exp_ea = 24'(r);
        EA_MASK: begin
          exp_ea = {2'b0, ptr.fp};
          if (ptr.hash == HASH_BASE)
            for (int k = 0; k < 24; k++) if (k < int'(ptr.n)) exp_ea[k] = 1'b0;
          exp_ea = exp_ea + 24'(r);
        end
      endcase
      checks++;
      if (ea !== exp_ea) begin
        failures++;
        if (failures < 10) $display("mode %0d ptr %h r %0d: ea %h exp %h", mode, ptr, r, ea, exp_ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
