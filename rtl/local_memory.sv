// local_memory: the frame store of one processing element.
//
// 2^AW words of 72 bits hold code (two 32-bit instructions per word),
// activation frames and literals.  Three ports:
//  * instruction port: combinational read of the word at if_addr, used by
//    instruction fetch (stage 1);
//  * operand port: combinational read of op_addr and a write at the clock
//    edge when op_we, used by operand fetch/store (stage 4);
//  * host port: a write when host_we and a combinational read of host_raddr,
//    used to load programs and inspect results.
// An operand write and a host write to the same word in one cycle: the
// operand write wins.  The word width is the architecture's; the size is a
// parameter because the architecture fixes only the address space (22-bit
// FP), not how much memory a processor carries.  No reset: software owns
// the contents.
module local_memory #(
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] if_addr,
  output logic [71:0]   if_rdata,
  input  logic [AW-1:0] op_addr,
  output logic [71:0]   op_rdata,
  input  logic          op_we,
  input  logic [71:0]   op_wdata,
  input  logic          host_we,
  input  logic [AW-1:0] host_waddr,
  input  logic [71:0]   host_wdata,
  input  logic [AW-1:0] host_raddr,
  output logic [71:0]   host_rdata
);
  logic [71:0] mem [2**AW];

  assign if_rdata   = mem[if_addr];
  assign op_rdata   = mem[op_addr];
  assign host_rdata = mem[host_raddr];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_waddr] <= host_wdata;
    if (op_we)   mem[op_addr]    <= op_wdata;
  end
endmodule
