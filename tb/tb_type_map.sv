// tb_type_map: writes random entries through the host port and reads them back
// through the pipeline read port, comparing with a model of the table;
// rewrites are included so a stale or misaddressed write is caught.
module tb_type_map;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          host_we = 0;
  logic [14-1:0] host_addr = '0;
  logic [2-1:0] host_wdata = '0;
  logic [14-1:0] raddr = '0;
  logic [2-1:0] rdata;
  logic [2-1:0] model [logic [14-1:0]];
  logic [14-1:0] keys [$];

  type_map dut (.clk(clk), .tmap(raddr[13:9]), .typ(raddr[8:1]), .port(raddr[0]), .tc(rdata),
                .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata));

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
                                                 : 14'({$urandom, $urandom});
      host_wdata = 2'({$urandom, $urandom, $urandom});
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
