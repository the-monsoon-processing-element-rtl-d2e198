// presence_bits: the two presence bits kept for every local memory word.
//
// Stored as rows of 32 words (64 bits per row) so that a "bulk" presence
// map (PMAP 4..7) can set the bits of all 32 words of an aligned block in
// one cycle.  The state of word ea is read combinationally; at the clock
// edge, when upd is set, the new state is written to word ea, or to all 32
// words of its row when bulk is set.  This is a read-modify-write inside
// one pipeline stage, so no two tokens can interleave on one word.  The
// host writes whole rows to initialise the store (state 00 = empty).
// No reset: the contents are initialised through the host port.
module presence_bits #(
  parameter int AW = 16    // word address width; rows are 2^(AW-5)
) (
  input  logic          clk,
  input  logic [AW-1:0] ea,
  output logic [1:0]    state,
  input  logic          upd,
  input  logic          bulk,
  input  logic [1:0]    next,
  input  logic          host_we,
  input  logic [AW-6:0] host_row,
  input  logic [63:0]   host_wdata
);
  logic [63:0] rows [2**(AW-5)];
  logic [63:0] row, new_row;

  assign row   = rows[ea[AW-1:5]];
  assign state = row[2*ea[4:0] +: 2];

  always_comb begin
    new_row = row;
    if (bulk) new_row = {32{next}};
    else      new_row[2*ea[4:0] +: 2] = next;
  end

  always_ff @(posedge clk) begin
    if (host_we) rows[host_row] <= host_wdata;
    if (upd)     rows[ea[AW-1:5]] <= new_row;
  end
endmodule
