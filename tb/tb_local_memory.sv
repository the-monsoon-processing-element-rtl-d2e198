// tb_local_memory: writes random entries through the host port and reads them back
// through the pipeline read port, comparing with a model of the table;
// rewrites are included so a stale or misaddressed write is caught.
// Then every word is rewritten through the operand port and read again.
module tb_local_memory;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          host_we = 0;
  logic [16-1:0] host_addr = '0;
  logic [72-1:0] host_wdata = '0;
  logic [16-1:0] raddr = '0;
  logic [72-1:0] rdata;
  logic [72-1:0] model [logic [16-1:0]];
  logic [16-1:0] keys [$];

  logic [71:0] if_rdata, op_rdata, op_wdata = '0;
  logic        op_we = 0;
  local_memory #(.AW(16)) dut (.clk(clk), .if_addr(raddr), .if_rdata(if_rdata),
                    .op_addr(raddr), .op_rdata(op_rdata), .op_we(op_we), .op_wdata(op_wdata),
                    .host_we(host_we), .host_waddr(host_addr), .host_wdata(host_wdata),
                    .host_raddr(raddr), .host_rdata(rdata));
  always @(negedge clk) if (!host_we && !op_we && (if_rdata !== rdata || op_rdata !== rdata)) begin
    failures++; $display("port mismatch");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      host_we    = 1'b1;
      host_addr  = (i >= 300 && keys.size() > 0) ? keys[$urandom_range(0, keys.size() - 1)]
                                                 : 16'({$urandom, $urandom});
      host_wdata = 72'({$urandom, $urandom, $urandom});
      if (!model.exists(host_addr)) keys.push_back(host_addr);
      model[host_addr] = host_wdata;
    end
    @(negedge clk);
    host_we = 1'b0;
    foreach (keys[k]) begin
      raddr = keys[k];
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        if (failures < 10) $display("addr %h: %h exp %h", raddr, rdata, model[raddr]);
      end
    end
    // operand port writes, at the operand address only
    foreach (keys[k]) begin
      @(negedge clk);
      raddr = keys[k]; op_we = 1; op_wdata = {$urandom, $urandom, $urandom};
      model[raddr] = op_wdata;
    end
    @(negedge clk);
    op_we = 0;
    foreach (keys[k]) begin
      raddr = keys[k];
      #1;
      checks++;
      if (rdata !== model[raddr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
