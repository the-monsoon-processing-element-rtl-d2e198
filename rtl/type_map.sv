// type_map: the 32 programmable type maps.
//
// Each map has 512 two-bit entries, one per (VALUE TYPE, PORT) pair, so the
// table is addressed by {TMAP, TYPE, PORT} (5 + 8 + 1 bits).  The output is
// the type dispatch code TC fed to the presence map.  The codes have no
// fixed meaning: software defines them.  Combinational read (stage 2); the
// host writes one entry per clock.
module type_map (
  input  logic        clk,
  input  logic [4:0]  tmap,
  input  logic [7:0]  typ,
  input  logic        port,
  output logic [1:0]  tc,
  input  logic        host_we,
  input  logic [13:0] host_addr,
  input  logic [1:0]  host_wdata
);
  logic [1:0] tbl [16384];

  assign tc = tbl[{tmap, typ, port}];

  always_ff @(posedge clk)
    if (host_we) tbl[host_addr] <= host_wdata;
endmodule
