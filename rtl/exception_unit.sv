// exception_unit: exception detection and the per-thread fault contexts.
//
// Each cycle it sees the status word of the instruction in the function
// unit stage (ALWAYS is forced to 1 here) and that instruction's EMASK.
// A status bit is masked when its EMASK bit is 0.  With SENSE = 0 an
// exception occurs when any unmasked bit is set, with SENSE = 1 when none
// is.  On an exception in pipeline thread t whose exception flag is clear,
// A, B and the masked status word are saved in context t, the flag is set
// and exc is raised so the form token stage launches the handler.  An
// exception in a thread whose flag is still set raises mcheck (machine
// check) instead.  clear (MCU CLEAR) clears the flag of the current thread;
// a new exception in the same cycle wins.  The saved A, B and status of the
// current thread are always presented, so each handler reads its own
// context.  Flags reset to zero; context contents are undefined until
// written.  NCTX = 8 contexts, as many as there can be pipeline threads.
module exception_unit
  import monsoon_pkg::*;
#(
  parameter int NCTX = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NCTX)-1:0] thread,
  input  logic [8:0]              status,
  input  emask_t                  emask,
  input  word_t                   a,
  input  word_t                   b,
  input  logic                    clear,
  output logic                    exc,
  output logic                    mcheck,
  output word_t                   ctx_a,
  output word_t                   ctx_b,
  output logic [8:0]              ctx_status
);
  word_t      sa [NCTX];
  word_t      sb [NCTX];
  logic [8:0] ss [NCTX];
  logic [NCTX-1:0] flag;
  logic [8:0] st, masked;
  logic       raw;

  always_comb begin
    st             = status;
    st[ST_ALWAYS]  = 1'b1;
    masked         = st & emask[8:0];
    raw            = emask.sense ? (masked == '0) : (masked != '0);
    exc            = raw && !flag[thread];
    mcheck         = raw &&  flag[thread];
  end

  assign ctx_a      = sa[thread];
  assign ctx_b      = sb[thread];
  assign ctx_status = ss[thread];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flag <= '0;
    end else if (exc) begin
      flag[thread] <= 1'b1;
    end else if (clear) begin
      flag[thread] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (exc) begin
      sa[thread] <= a;
      sb[thread] <= b;
      ss[thread] <= masked;
    end
  end
endmodule
