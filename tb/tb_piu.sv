// tb_piu: checks every PORTOP / IPOP / FPOP choice on random pointers whose
// MAP does not interleave (HASH = base FP), then the FP interleave of
// HASH = FP: with N = 1 consecutive FP increments alternate between the two
// processors of the subdomain, and the overflow flag.
module tb_piu;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0]  op;
  logic [63:0] a, b, y;
  logic        inst_port, ovf, unf;
  logic [10:0] s;
  pointer_t    pa, py, pe_;
  logic [63:0] sx;

  piu dut (.op(op), .a(a), .b(b), .inst_port(inst_port), .s(s), .y(y), .ovf(ovf), .unf(unf));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      pa = pointer_t'({$urandom, $urandom});
      pa.hash = HASH_BASE;
      a  = pa;
      b  = 64'($signed(16'($urandom)));
      s  = 11'($urandom);
      sx = {{53{s[10]}}, s};
      inst_port = 1'($urandom);
      op = 8'($urandom);
      #1;
      py  = pointer_t'(y);
      pe_ = pa;
      unique case (op[5:4])
        2'b00: pe_.port = pa.port;
        2'b01: pe_.port = inst_port;
        2'b10: pe_.port = 1'b0;
        2'b11: pe_.port = 1'b1;
      endcase
      unique case (op[3:2])
        2'b00: pe_.ip = pa.ip + 24'(b);
        2'b01: pe_.ip = pa.ip + 24'(sx);
        2'b10: pe_.ip = pa.ip;
        2'b11: pe_.ip = 24'(sx);
      endcase
      unique case (op[1:0])
        2'b00: pe_.fp = pa.fp + 22'(b);
        2'b01: pe_.fp = pa.fp + 22'(sx);
        2'b10: pe_.fp = pa.fp;
        2'b11: pe_.fp = 22'(sx);
      endcase
      checks++;
      if (py !== pe_) begin
        failures++;
        if (failures < 10) $display("op %h: %h exp %h", op, py, pe_);
      end
    end
    // HASH = FP, N = 1: FP + 1 from (FP 5, PE 6) gives (FP 5, PE 7), then (FP 6, PE 6)
    pa = '0; pa.hash = HASH_FP; pa.n = 5'd1; pa.fp = 22'd5; pa.pe = 10'd6;
    a = pa; b = 64'd1; op = 8'b0010_1000; s = '0; inst_port = 0;  // IP kept, FP + B
    #1; py = pointer_t'(y);
    checks++;
    if (py.fp !== 22'd5 || py.pe !== 10'd7) begin failures++; $display("interleave 1: fp %0d pe %0d", py.fp, py.pe); end
    pa.pe = 10'd7; a = pa;
    #1; py = pointer_t'(y);
    checks++;
    if (py.fp !== 22'd6 || py.pe !== 10'd6) begin failures++; $display("interleave 2: fp %0d pe %0d", py.fp, py.pe); end
    // FP overflow
    pa = '0; pa.hash = HASH_BASE; pa.fp = '1; a = pa; b = 64'd1; op = 8'b0010_1000;
    #1 checks++;
    if (!ovf) begin failures++; $display("no overflow"); end
    b = -64'd1; pa.fp = '0; a = pa;
    #1 checks++;
    if (!unf) begin failures++; $display("no underflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
