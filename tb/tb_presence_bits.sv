// tb_presence_bits: initialises the store through the host port, then runs
// random presence updates (single word and bulk) against a model and checks
// the state read before each update.
module tb_presence_bits;
  import monsoon_pkg::*;
  localparam int AW = 10;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] ea = '0;
  logic [1:0]    state, next = '0;
  logic          upd = 0, bulk = 0, host_we = 0;
  logic [AW-6:0] host_row = '0;
  logic [63:0]   host_wdata = '0;
  logic [1:0]    model [2**AW];

  presence_bits #(.AW(AW)) dut (.clk(clk), .ea(ea), .state(state), .upd(upd), .bulk(bulk),
                                .next(next), .host_we(host_we), .host_row(host_row),
                                .host_wdata(host_wdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2**(AW-5); r++) begin
      @(negedge clk);
      host_we = 1; host_row = (AW-5)'(r); host_wdata = {$urandom, $urandom};
      for (int w = 0; w < 32; w++) model[r*32+w] = host_wdata[2*w +: 2];
    end
    @(negedge clk);
    host_we = 0;
    for (int i = 0; i < 3000; i++) begin
      ea   = AW'($urandom);
      next = 2'($urandom);
      bulk = ($urandom_range(0, 15) == 0);
      upd  = 1'($urandom);
      #1;
      checks++;
      if (state !== model[ea]) begin
        failures++;
        if (failures < 10) $display("ea %0d: state %0d exp %0d", ea, state, model[ea]);
      end
      @(negedge clk);
      if (upd) begin
        if (bulk) for (int w = 0; w < 32; w++) model[{ea[AW-1:5], 5'(w)}] = next;
        else model[ea] = next;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
