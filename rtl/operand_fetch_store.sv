// operand_fetch_store: the frame store operation of stage 4.
//
// Given FOP from the presence map it drives the local memory operand port:
//   00 read     temp <- [EA]
//   01 write    [EA] <- VALUE            (temp = VALUE)
//   10 exchange temp <- [EA]; [EA] <- VALUE
//   11 enqueue  temp <- [EA]; [EA] <- VALUE with its IP field plus one
// When nop is set (PMAP 0..3) no memory operation happens and temp =
// VALUE.  The IP increment of an enqueue is a plain add on the 24-bit IP
// field, leaving the rest of the word as it is.  Purely combinational; the
// write itself happens in local_memory at the clock edge.
module operand_fetch_store
  import monsoon_pkg::*;
(
  input  fop_e        fop,
  input  logic        nop,
  input  word_t       value,
  input  logic [71:0] mem_rdata,
  output logic        mem_we,
  output logic [71:0] mem_wdata,
  output word_t       temp
);
  word_t    enq;
  pointer_t p;

  always_comb begin
    p       = pointer_t'(value.imm);
    p.ip    = p.ip + 24'd1;
    enq     = '{typ: value.typ, imm: p};
    mem_we    = 1'b0;
    mem_wdata = value;
    temp      = value;
    if (!nop) begin
      unique case (fop)
        FOP_READ:  temp = word_t'(mem_rdata);
        FOP_WRITE: mem_we = 1'b1;
        FOP_EXCH:  begin temp = word_t'(mem_rdata); mem_we = 1'b1; end
        FOP_ENQ:   begin temp = word_t'(mem_rdata); mem_we = 1'b1; mem_wdata = enq; end
      endcase
    end
  end
endmodule
