// tb_approx_rca -- exhaustive error metrics of the approximate 8-bit adders.
//
// Runs all 65,536 operand pairs (carry-in 0) through the exact adder and the
// nine approximate ones (MAFA-1/2/3 with k = 3, 4, 5 approximate LSBs). The
// exact adder must equal a+b everywhere. For each approximate adder the mean
// error distance (MED) is computed and compared with the published values
// (tolerance 0.01); the result must also match a bit-by-bit ripple of the
// cell truth tables typed in here.
module tb_approx_rca;
  import magic_pkg::*;

  logic [7:0] a, b;
  logic [8:0] r [10];
  int checks = 0, failures = 0;

  approx_rca #(.N(8), .K(0), .KIND(FA_EXACT)) u_ex (.a, .b, .cin(1'b0), .sum(r[0][7:0]), .cout(r[0][8]));
  approx_rca #(.N(8), .K(3), .KIND(FA_MAFA1)) u13 (.a, .b, .cin(1'b0), .sum(r[1][7:0]), .cout(r[1][8]));
  approx_rca #(.N(8), .K(4), .KIND(FA_MAFA1)) u14 (.a, .b, .cin(1'b0), .sum(r[2][7:0]), .cout(r[2][8]));
  approx_rca #(.N(8), .K(5), .KIND(FA_MAFA1)) u15 (.a, .b, .cin(1'b0), .sum(r[3][7:0]), .cout(r[3][8]));
  approx_rca #(.N(8), .K(3), .KIND(FA_MAFA2)) u23 (.a, .b, .cin(1'b0), .sum(r[4][7:0]), .cout(r[4][8]));
  approx_rca #(.N(8), .K(4), .KIND(FA_MAFA2)) u24 (.a, .b, .cin(1'b0), .sum(r[5][7:0]), .cout(r[5][8]));
  approx_rca #(.N(8), .K(5), .KIND(FA_MAFA2)) u25 (.a, .b, .cin(1'b0), .sum(r[6][7:0]), .cout(r[6][8]));
  approx_rca #(.N(8), .K(3), .KIND(FA_MAFA3)) u33 (.a, .b, .cin(1'b0), .sum(r[7][7:0]), .cout(r[7][8]));
  approx_rca #(.N(8), .K(4), .KIND(FA_MAFA3)) u34 (.a, .b, .cin(1'b0), .sum(r[8][7:0]), .cout(r[8][8]));
  approx_rca #(.N(8), .K(5), .KIND(FA_MAFA3)) u35 (.a, .b, .cin(1'b0), .sum(r[9][7:0]), .cout(r[9][8]));

  // published MED per adder (index 1..9 as above)
  real med_pub [10] = '{0.0, 2.625, 5.312, 10.656, 2.25, 4.468, 8.912, 1.718, 3.617, 7.376};
  int  kk      [10] = '{0, 3, 4, 5, 3, 4, 5, 3, 4, 5};
  int  kind_of [10] = '{0, 1, 1, 1, 2, 2, 2, 3, 3, 3};

  function automatic logic [8:0] ripple(int kind, int k, logic [7:0] x, logic [7:0] y);
    logic [8:0] v;
    logic c, maj;
    c = 1'b0;
    for (int i = 0; i < 8; i++) begin
      maj = (x[i] & y[i]) | (x[i] & c) | (y[i] & c);
      if (i >= k || kind == 0) begin v[i] = x[i] ^ y[i] ^ c; c = maj; end
      else if (kind == 1)      begin v[i] = ~y[i]; c = y[i]; end
      else if (kind == 2)      begin c = y[i] | (x[i] & c); v[i] = ~c; end
      else                     begin c = maj; v[i] = ~c; end
    end
    v[8] = c;
    return v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("tb_approx_rca: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ed [10];
    int mism [10];
    for (int i = 0; i < 10; i++) begin ed[i] = 0; mism[i] = 0; end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        int exact;
        a = 8'(x); b = 8'(y);
        #1;
        exact = x + y;
        for (int i = 0; i < 10; i++) begin
          ed[i] += (int'(r[i]) > exact) ? int'(r[i]) - exact : exact - int'(r[i]);
          if (r[i] !== ripple(kind_of[i], kk[i], a, b)) mism[i]++;
        end
      end
    for (int i = 0; i < 10; i++) begin
      real med, d;
      med = real'(ed[i]) / 65536.0;
      d = med - med_pub[i];
      checks += 2;
      if (mism[i] != 0) begin
        failures++;
        $display("adder %0d: %0d results differ from the cell ripple", i, mism[i]);
      end
      if (d > 0.01 || d < -0.01) begin
        failures++;
        $display("adder %0d: MED %f, published %f", i, med, med_pub[i]);
      end else
        $display("adder kind=%0d k=%0d: MED %f (published %f)", kind_of[i], kk[i], med, med_pub[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
