// tb_falu: checks the FALU against independent models: SystemVerilog
// integer arithmetic for the integer group, the truth-table encoding of the
// sixteen bitwise functions, shifts and rotates, the printed comparison
// codes, and the simulator's own IEEE double arithmetic ($bitstoreal /
// $realtobits, round to nearest) for float add, subtract, multiply,
// divide, square root and the conversions.  Status bits OF, NAN, ZERO and NEG are checked as well.
module tb_falu;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0]  op;
  logic [63:0] a, b, y, e;
  logic [8:0]  status;
  real         ra, rb;

  falu dut (.op(op), .a(a), .b(b), .y(y), .status(status));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_y(input logic [63:0] exp_y, input string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 20) $display("%s op %h a %h b %h: y %h exp %h", what, op, a, b, y, exp_y);
    end
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction
  function automatic logic [63:0] rndf();
    // a random finite double of moderate magnitude
    logic [63:0] f;
    f = rnd64();
    f[62:52] = 11'(1023 + $signed(12'($urandom_range(0, 80))) - 40);
    return f;
  endfunction

  initial begin
    for (int i = 0; i < 300; i++) begin
      a = rnd64(); b = rnd64();
      if (i % 4 == 0) b = 64'($signed(8'($urandom)));
      op = OP_IADD;   expect_y(a + b, "iadd");
      op = OP_ISUB;   expect_y(a - b, "isub");
      op = OP_ISUBR;  expect_y(b - a, "isubr");
      op = OP_IMUL;   expect_y(64'($signed(a) * $signed(b)), "imul");
      op = OP_IMULU;  expect_y(a * b, "imulu");
      op = OP_INEG;   expect_y(-a, "ineg");
      op = OP_IABS;   expect_y(a[63] ? -a : a, "iabs");
      op = OP_IMAX;   expect_y(($signed(a) > $signed(b)) ? a : b, "imax");
      op = OP_IMIN;   expect_y(($signed(a) < $signed(b)) ? a : b, "imin");
      op = OP_IMAXU;  expect_y((a > b) ? a : b, "imaxu");
      op = OP_IMINU;  expect_y((a < b) ? a : b, "iminu");
      op = OP_IPASSU; expect_y(a, "ipassu");
      op = OP_IEQ;    expect_y({64{a == b}}, "ieq");
      op = OP_ILT;    expect_y({64{$signed(a) < $signed(b)}}, "ilt");
      op = OP_ILEQ;   expect_y({64{$signed(a) <= $signed(b)}}, "ileq");
      op = OP_INEQ;   expect_y({64{a != b}}, "ineq");
      op = OP_IGEQ;   expect_y({64{$signed(a) >= $signed(b)}}, "igeq");
      op = OP_IGT;    expect_y({64{$signed(a) > $signed(b)}}, "igt");
      op = OP_AND;    expect_y(a & b, "and");
      op = OP_OR;     expect_y(a | b, "or");
      op = OP_XOR;    expect_y(a ^ b, "xor");
      op = 8'h47;     expect_y(~(a & b), "nand");
      op = 8'h49;     expect_y(~(a ^ b), "xnor");
      op = 8'h43;     expect_y(~a, "nota");
      op = 8'h45;     expect_y(~b, "notb");
      op = OP_PASSA;  expect_y(a, "passa");
      op = OP_PASSB;  expect_y(b, "passb");
      op = OP_SET;    expect_y('1, "set");
      op = OP_CLR;    expect_y('0, "clr");
      b  = 64'($urandom_range(0, 63));
      op = OP_LS;     expect_y(a << b[5:0], "ls left");
      op = OP_ISHIFT; expect_y(a << b[5:0], "ishift left");
      op = OP_ROT;    expect_y({a, a} >> (64 - b[5:0]), "rot");
      b  = -b;
      op = OP_LS;     expect_y(a >> (-b), "ls right");
      op = OP_ISHIFT; expect_y(64'($signed(a) >>> (-b)), "ishift right");
    end
    // integer overflow flag
    a = 64'h7FFF_FFFF_FFFF_FFFF; b = 64'd1; op = OP_IADD; #1;
    checks++; if (!status[ST_OF] || !status[ST_NEG]) begin failures++; $display("of/neg flag"); end
    a = 64'd5; b = 64'd5; op = OP_ISUB; #1;
    checks++; if (!status[ST_ZERO] || status[ST_OF]) begin failures++; $display("zero flag"); end

    // floating point
    for (int i = 0; i < 2000; i++) begin
      a = rndf(); b = rndf();
      if (i % 7 == 0) b = {~a[63], a[62:52], b[51:0]};   // cancellation
      ra = $bitstoreal(a); rb = $bitstoreal(b);
      op = OP_FADD;  expect_y($realtobits(ra + rb), "fadd");
      op = OP_FSUB;  expect_y($realtobits(ra - rb), "fsub");
      op = OP_FSUBR; expect_y($realtobits(rb - ra), "fsubr");
      op = OP_FMUL;  expect_y($realtobits(ra * rb), "fmul");
      op = OP_FMULA; e = $realtobits(ra * rb); expect_y({1'b0, e[62:0]}, "fmula");
      if (b[62:0] != 0) begin op = OP_FDIV; expect_y($realtobits(ra / rb), "fdiv"); end
      a[63] = 1'b0; ra = $bitstoreal(a);
      op = OP_FSQRT; expect_y($realtobits($sqrt(ra)), "fsqrt");
      op = OP_FLT;   expect_y({64{ra < rb}}, "flt");
      op = OP_FGEQ;  expect_y({64{ra >= rb}}, "fgeq");
      op = OP_FEQ;   expect_y({64{ra == rb}}, "feq");
      op = OP_FMIN;  expect_y((rb < ra) ? b : a, "fmin");
      op = OP_FMAX;  expect_y((rb > ra) ? b : a, "fmax");
      op = OP_FNEG;  expect_y({~a[63], a[62:0]}, "fneg");
      op = OP_FABS;  expect_y({1'b0, a[62:0]}, "fabs");
      a = 64'($signed(32'($urandom)));
      op = OP_ICF;   expect_y($realtobits(real'($signed(a))), "icf");
      a = rnd64();
      op = OP_ICF;   expect_y($realtobits(real'($signed(a))), "icf big");
      a = $realtobits(real'($signed(32'($urandom))) / 7.0);
      op = OP_FCTI;  expect_y(64'($rtoi($bitstoreal(a))), "fcti");
    end
    // round to nearest even for FCI, truncation for FCTI
    a = $realtobits(2.5);  op = OP_FCI;  expect_y(64'd2, "fci 2.5");
    a = $realtobits(3.5);  op = OP_FCI;  expect_y(64'd4, "fci 3.5");
    a = $realtobits(-2.5); op = OP_FCI;  expect_y(-64'd2, "fci -2.5");
    a = $realtobits(-2.7); op = OP_FCTI; expect_y(-64'd2, "fcti -2.7");
    a = $realtobits(2.7);  op = OP_FCICF; expect_y($realtobits(3.0), "fcicf");
    a = $realtobits(2.7);  op = OP_FCITCF; expect_y($realtobits(2.0), "fcitcf");
    a = $realtobits(-1.0); op = OP_FCU;  expect_y(64'd0, "fcu neg");
    checks++; if (!status[ST_OF]) begin failures++; $display("fcu of"); end
    // NaN: comparisons false except FNEQ, NAN status set
    a = 64'h7FF8_0000_0000_0001; b = $realtobits(1.0);
    op = OP_FEQ;  expect_y('0, "feq nan");
    checks++; if (!status[ST_NAN]) begin failures++; $display("nan flag"); end
    op = OP_FNEQ; expect_y('1, "fneq nan");
    op = OP_FADD; expect_y(64'h7FF8_0000_0000_0000, "fadd nan");
    // infinity minus infinity
    a = 64'h7FF0_0000_0000_0000; b = a; op = OP_FSUB; expect_y(64'h7FF8_0000_0000_0000, "inf-inf");
    // denormal result of a subtraction and its DEN input flag
    a = 64'h0010_0000_0000_0001; b = 64'h0010_0000_0000_0000; op = OP_FSUB; expect_y(64'd1, "denormal");
    a = 64'd3; b = 64'd1; op = OP_FADD; expect_y(64'd4, "denormal add");
    checks++; if (!status[ST_DEN]) begin failures++; $display("den flag"); end
    // +0 from exact cancellation
    a = $realtobits(1.5); b = a; op = OP_FSUB; expect_y(64'd0, "cancel");
    // overflow to infinity
    a = 64'h7FEF_FFFF_FFFF_FFFF; b = $realtobits(2.0); op = OP_FMUL; expect_y(64'h7FF0_0000_0000_0000, "fmul ovf");
    checks++; if (!status[ST_OF]) begin failures++; $display("fmul of flag"); end
    // divide and square root special cases and denormals
    a = $realtobits(1.0); b = 64'd0; op = OP_FDIV; expect_y(64'h7FF0_0000_0000_0000, "1/0");
    checks++; if (!status[ST_DIVZ]) begin failures++; $display("divz flag"); end
    a = 64'd0; op = OP_FDIV; expect_y(64'h7FF8_0000_0000_0000, "0/0");
    a = 64'd3; b = $realtobits(2.0); expect_y($realtobits($bitstoreal(a) / 2.0), "denormal div");
    a = $realtobits(1.0); b = 64'h7FEF_FFFF_FFFF_FFFF; expect_y($realtobits(1.0 / $bitstoreal(b)), "tiny quotient");
    a = $realtobits(10.0); b = $realtobits(4.0); expect_y($realtobits(2.5), "10/4");
    checks++; if (status[ST_INX]) begin failures++; $display("exact quotient inx"); end
    a = $realtobits(2.0); op = OP_FSQRT; expect_y($realtobits($sqrt(2.0)), "sqrt 2");
    checks++; if (!status[ST_INX]) begin failures++; $display("sqrt inx"); end
    a = $realtobits(-1.0); expect_y(64'h7FF8_0000_0000_0000, "sqrt -1");
    a = 64'h8000_0000_0000_0000; expect_y(a, "sqrt -0");
    a = 64'd4; expect_y($realtobits($sqrt($bitstoreal(a))), "sqrt denormal");
    a = $realtobits(9.0); expect_y($realtobits(3.0), "sqrt 9");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
