// tb_approx_fa -- checks the four full-adder cells against their truth table.
//
// The expected sum and carry of every input combination are typed in from
// the truth table of the exact and approximate cells, independently of the
// RTL. The total error distance of each cell (0, 4, 3, 2) is recomputed from
// the outputs and compared too.
module tb_approx_fa;
  import magic_pkg::*;

  fa_kind_t kind;
  logic a, b, c, sum, cout;
  int checks = 0, failures = 0;

  approx_fa dut (.kind, .a, .b, .c, .sum, .cout);

  // {cout,sum} per input index {a,b,c} = 0..7, one string per kind
  logic [1:0] tab [4][8] = '{
    '{2'b00, 2'b01, 2'b01, 2'b10, 2'b01, 2'b10, 2'b10, 2'b11},   // exact
    '{2'b01, 2'b01, 2'b10, 2'b10, 2'b01, 2'b01, 2'b10, 2'b10},   // MAFA-1
    '{2'b01, 2'b01, 2'b10, 2'b10, 2'b01, 2'b10, 2'b10, 2'b10},   // MAFA-2
    '{2'b01, 2'b01, 2'b01, 2'b10, 2'b01, 2'b10, 2'b10, 2'b10}    // MAFA-3
  };
  int ed_expected [4] = '{0, 4, 3, 2};

  initial begin
    #100000;
    failures++;
    $display("tb_approx_fa: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      int ed;
      ed = 0;
      kind = fa_kind_t'(k);
      for (int v = 0; v < 8; v++) begin
        {a, b, c} = 3'(v);
        #1;
        checks++;
        if ({cout, sum} !== tab[k][v]) begin
          failures++;
          $display("kind %0d inputs %03b: got cout=%b sum=%b, expected %02b", k, v[2:0], cout, sum, tab[k][v]);
        end
        ed += (2 * int'(cout) + int'(sum) > int'(a) + int'(b) + int'(c)) ?
              (2 * int'(cout) + int'(sum) - (int'(a) + int'(b) + int'(c))) :
              ((int'(a) + int'(b) + int'(c)) - (2 * int'(cout) + int'(sum)));
      end
      checks++;
      if (ed != ed_expected[k]) begin
        failures++;
        $display("kind %0d: total error distance %0d, expected %0d", k, ed, ed_expected[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
