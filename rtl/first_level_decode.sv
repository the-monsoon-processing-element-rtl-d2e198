// first_level_decode: the first level microcontrol store.
//
// 1024 entries of 24 bits, addressed by the 10-bit macro instruction
// OPCODE.  Each entry gives BASE (11 bits, second level decode base),
// TMAP (5, one of 32 type maps), PMAP (6, one of 64 presence maps) and
// EA (2, effective address mode).  Read is combinational (stage 2 of the
// pipeline); the host writes an entry at the clock edge.  Sizes and layout
// follow the architecture; the host write port is this design's way of
// loading the table.
module first_level_decode
  import monsoon_pkg::*;
(
  input  logic       clk,
  input  logic [9:0] opcode,
  output fld_t       entry,
  input  logic       host_we,
  input  logic [9:0] host_addr,
  input  fld_t       host_wdata
);
  fld_t tbl [1024];

  assign entry = tbl[opcode];

  always_ff @(posedge clk)
    if (host_we) tbl[host_addr] <= host_wdata;
endmodule
