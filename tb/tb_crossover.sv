// tb_crossover: checks the l,r -> A,B mapping for every PORT / FLIP pair:
// FLIP = 0 gives A = l, B = r, FLIP = 1 the reverse, where l is the VALUE
// of a left-port token and temp otherwise.
module tb_crossover;
  import monsoon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  word_t value, temp, a, b, l, rr;
  logic  port, flip;

  crossover dut (.value(value), .temp(temp), .port(port), .flip(flip), .a(a), .b(b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      value = word_t'({$urandom, $urandom, $urandom});
      temp  = word_t'({$urandom, $urandom, $urandom});
      port  = 1'($urandom);
      flip  = 1'($urandom);
      #1;
      l  = port ? temp : value;
      rr = port ? value : temp;
      checks++;
      if (a !== (flip ? rr : l) || b !== (flip ? l : rr)) begin
        failures++;
        $display("port %b flip %b wrong", port, flip);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
