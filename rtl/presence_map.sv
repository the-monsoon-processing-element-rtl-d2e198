// presence_map: the 64 programmable presence state transition tables.
//
// Each map has 32 seven-bit entries (PENT), one per (PORT, TC, current
// state); the table is addressed by {PMAP, PORT, TC, STATE} (6+1+2+2 bits),
// matching the printed map whose rows are PORT,TC and whose columns are the
// current state.  A PENT holds BRA (2-bit branch into the second level
// decode), FZ (force the base to zero), FOP (frame store operation) and
// NEXT (new presence state).  Combinational read (stage 3); the host writes
// one entry per clock.
module presence_map
  import monsoon_pkg::*;
(
  input  logic        clk,
  input  logic [5:0]  pmap,
  input  logic        port,
  input  logic [1:0]  tc,
  input  logic [1:0]  state,
  output pent_t       pent,
  input  logic        host_we,
  input  logic [10:0] host_addr,
  input  pent_t       host_wdata
);
  pent_t tbl [2048];

  assign pent = tbl[{pmap, port, tc, state}];

  always_ff @(posedge clk)
    if (host_we) tbl[host_addr] <= host_wdata;
endmodule
