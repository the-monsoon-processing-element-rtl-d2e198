// tb_second_level_decode: loads random entries, then checks the address
// formation (BASE OR BRA, or BRA alone when FZ) and the entry read there,
// and that the entry fields unpack in the printed order.
module tb_second_level_decode;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        host_we = 0;
  logic [10:0] host_addr = '0, base = '0, addr, exp_a;
  sld_t        host_wdata = '0, entry;
  logic [1:0]  bra = '0;
  logic        fz = 0;
  sld_t        model [2048];

  second_level_decode dut (.clk(clk), .base(base), .bra(bra), .fz(fz), .addr(addr), .entry(entry),
                           .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = 11'(i);
      host_wdata = sld_t'({$urandom, $urandom});
      model[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    for (int i = 0; i < 1000; i++) begin
      base = 11'($urandom); bra = 2'($urandom); fz = ($urandom_range(0, 3) == 0);
      #1;
      exp_a = fz ? {9'd0, bra} : (base | {9'd0, bra});
      checks++;
      if (addr !== exp_a || entry !== model[exp_a]) begin
        failures++;
        if (failures < 10) $display("base %h bra %0d fz %b: addr %h", base, bra, fz, addr);
      end
    end
    // field order: FUCTL is the top 11 bits, STATS the bottom 4
    base = 11'd4; bra = 0; fz = 0; #1;
    checks++;
    if (entry.fuctl !== model[4][56:46] || entry.stats !== model[4][3:0] ||
        entry.emask !== model[4][13:4]) begin
      failures++; $display("field layout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
