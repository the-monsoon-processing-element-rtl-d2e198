// stats_counters: the hardware monitoring counters.
//
// N (16) counters of W (32) bits.  Every instruction passing the function
// unit stage increments the counter its STATS field names (inc, inc_idx).
// The MCU writes a counter with SETCOUNTER (set, set_idx, set_val; a write
// wins over an increment of the same counter) and reads one through
// rd_idx / rd_val; the host reads through host_idx / host_val and clears
// all counters with host_clr.  Counters wrap.  Synchronous reset to zero.
module stats_counters #(
  parameter int N = 16,
  parameter int W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inc,
  input  logic [$clog2(N)-1:0] inc_idx,
  input  logic                 set,
  input  logic [$clog2(N)-1:0] set_idx,
  input  logic [W-1:0]         set_val,
  input  logic [$clog2(N)-1:0] rd_idx,
  output logic [W-1:0]         rd_val,
  input  logic [$clog2(N)-1:0] host_idx,
  output logic [W-1:0]         host_val,
  input  logic                 host_clr
);
  logic [W-1:0] cnt [N];

  assign rd_val   = cnt[rd_idx];
  assign host_val = cnt[host_idx];

  always_ff @(posedge clk) begin
    if (!rst_n || host_clr) begin
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      if (inc) cnt[inc_idx] <= cnt[inc_idx] + W'(1);
      if (set) cnt[set_idx] <= set_val;
    end
  end
endmodule
