// second_level_decode: the second level microcontrol store.
//
// 2048 horizontal microinstructions addressed by (BASE OR BRA), or by BRA
// alone when the presence map asserts FZ; that address is formed here from
// the first level BASE and the presence map outputs.  An entry holds FUCTL
// (11 bits), NACTL (3), FTCTL (13), TMASK (16), EMASK (10) and STATS (4),
// 57 bits, the widths of the sub-field tables.  Combinational read
// (stage 4); the host writes an entry per clock.
module second_level_decode
  import monsoon_pkg::*;
(
  input  logic        clk,
  input  logic [10:0] base,
  input  logic [1:0]  bra,
  input  logic        fz,
  output logic [10:0] addr,
  output sld_t        entry,
  input  logic        host_we,
  input  logic [10:0] host_addr,
  input  sld_t        host_wdata
);
  sld_t tbl [2048];

  assign addr  = (fz ? 11'd0 : base) | {9'd0, bra};
  assign entry = tbl[addr];

  always_ff @(posedge clk)
    if (host_we) tbl[host_addr] <= host_wdata;
endmodule
