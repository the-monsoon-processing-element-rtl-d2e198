// tb_next_address: checks the NA1 and NA2 encodings (IP, IP+1, IP+2,
// (IP OR 1)+3 with port l; IP with port r or IP+s with the instruction
// port) and that HASH = IP increments step through the PE subdomain.
module tb_next_address;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  tag_t        tag, tag1, tag2;
  nactl_t      nactl;
  logic        inst_port;
  logic [10:0] s;
  logic [23:0] e1, e2;

  next_address dut (.tag(tag), .nactl(nactl), .inst_port(inst_port), .s(s), .tag1(tag1), .tag2(tag2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      tag = tag_t'({$urandom, $urandom, $urandom});
      if (tag.ptr.hash == HASH_IP) tag.ptr.hash = HASH_FP;
      tag.ptr.ip = 24'($urandom_range(4096, 1 << 23));
      nactl = nactl_t'($urandom);
      inst_port = 1'($urandom);
      s = 11'($urandom);
      #1;
      unique case (nactl.na1)
        2'b00: e1 = tag.ptr.ip;
        2'b01: e1 = tag.ptr.ip + 1;
        2'b10: e1 = tag.ptr.ip + 2;
        2'b11: e1 = (tag.ptr.ip | 24'd1) + 3;
      endcase
      e2 = nactl.na2 ? tag.ptr.ip + {{13{s[10]}}, s} : tag.ptr.ip;
      checks++;
      if (tag1.ptr.ip !== e1 || tag1.ptr.port !== 1'b0 || tag2.ptr.ip !== e2 ||
          tag2.ptr.port !== (nactl.na2 ? inst_port : 1'b1) || tag1.typ !== tag.typ ||
          tag1.ptr.pe !== tag.ptr.pe || tag2.ptr.fp !== tag.ptr.fp) begin
        failures++;
        if (failures < 10) $display("na %b: %h %h exp %h %h", nactl, tag1.ptr.ip, tag2.ptr.ip, e1, e2);
      end
    end
    // HASH = IP, N = 2: {IP, PE[1:0]} is incremented as one number
    tag = '0; tag.ptr.hash = HASH_IP; tag.ptr.n = 5'd2; tag.ptr.ip = 24'd10; tag.ptr.pe = 10'b0101_0011;
    nactl = '{na1: 2'b01, na2: 1'b0}; s = '0; inst_port = 0;
    #1 checks++;
    if (tag1.ptr.ip !== 24'd11 || tag1.ptr.pe !== 10'b0101_0000) begin
      failures++; $display("hash ip: ip %0d pe %b", tag1.ptr.ip, tag1.ptr.pe);
    end
    nactl = '{na1: 2'b10, na2: 1'b0};
    #1 checks++;
    if (tag1.ptr.ip !== 24'd11 || tag1.ptr.pe !== 10'b0101_0001) begin
      failures++; $display("hash ip +2: ip %0d pe %b", tag1.ptr.ip, tag1.ptr.pe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
