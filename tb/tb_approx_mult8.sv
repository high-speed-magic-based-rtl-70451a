// tb_approx_mult8 -- exhaustive check of the approximate signed multipliers.
//
// Runs all 65,536 signed operand pairs through the exact multiplier (Y = 0),
// which must equal a*b everywhere, and through all fifteen approximate ones
// (MULx_y: cell MAFA-x, stage s approximating y-s+1 low bits, y = 4..8). Their
// mean error distance is compared with the published values (tolerance 0.1);
// the mean relative error is compared too (tolerance 0.02). Every product is
// also compared with a reference written here with integer arithmetic: the
// Baugh-Wooley rows added stage by stage with an 8-bit ripple of the cell
// truth tables, stage s approximating Y-s+1 low bits.
module tb_approx_mult8;
  import magic_pkg::*;

  logic signed [7:0]  a, b;
  localparam int NM = 16;
  logic signed [15:0] p [NM];
  int checks = 0, failures = 0;

  // index 0: exact (Y = 0); then MUL1_4..MUL1_8, MUL2_4..MUL2_8, MUL3_4..MUL3_8
  localparam fa_kind_t MK [NM] = '{FA_EXACT,
                                   FA_MAFA1, FA_MAFA1, FA_MAFA1, FA_MAFA1, FA_MAFA1,
                                   FA_MAFA2, FA_MAFA2, FA_MAFA2, FA_MAFA2, FA_MAFA2,
                                   FA_MAFA3, FA_MAFA3, FA_MAFA3, FA_MAFA3, FA_MAFA3};
  localparam int       MY [NM] = '{0, 4, 5, 6, 7, 8, 4, 5, 6, 7, 8, 4, 5, 6, 7, 8};

  for (genvar m = 0; m < NM; m++) begin : g_mul
    approx_mult8 #(.KIND(MK[m]), .Y(MY[m])) u_mul (.a, .b, .p(p[m]));
  end

  real med_pub [NM] = '{0.0, 23.4, 48.7, 99.7, 147.2, 212.3,
                             30.3, 70.6, 160.7, 311.8, 467.6,
                             23.0, 52.9, 118.5, 216.8, 356.4};
  // published mean relative error (relative error averaged over the pairs
  // whose exact product is not 0); printed with two decimals, so the
  // tolerance is 0.02
  real mred_pub [NM] = '{0.0, 0.03, 0.08, 0.16, 0.26, 0.34,
                              0.05, 0.12, 0.28, 0.53, 0.81,
                              0.04, 0.09, 0.22, 0.42, 0.68};

  function automatic int ripple(int kind, int k, int x, int y);
    int v, c, xa, yb, maj;
    v = 0; c = 0;
    for (int i = 0; i < 8; i++) begin
      xa = (x >> i) & 1; yb = (y >> i) & 1;
      maj = (xa & yb) | (xa & c) | (yb & c);
      if (i >= k || kind == 0) begin v |= (xa ^ yb ^ c) << i; c = maj; end
      else if (kind == 1)      begin v |= (1 - yb) << i; c = yb; end
      else if (kind == 2)      begin c = yb | (xa & c); v |= (1 - c) << i; end
      else                     begin c = maj; v |= (1 - c) << i; end
    end
    return v | (c << 8);
  endfunction

  function automatic int ref_mul(int kind, int ymax, int x, int y);
    int row [8];
    int res, acc, r, k;
    for (int i = 0; i < 8; i++) begin
      row[i] = 0;
      for (int j = 0; j < 8; j++)
        row[i] |= ((((x >> j) & (y >> i)) & 1) ^ (((i == 7) != (j == 7)) ? 1 : 0)) << j;
    end
    res = row[0] & 1;
    acc = (row[0] >> 1) | 128;
    for (int s = 1; s < 8; s++) begin
      k = (ymax == 0) ? 0 : ymax - s + 1;
      if (k < 0) k = 0;
      if (k > 8) k = 8;
      r = ripple(kind, k, acc, row[s]);
      res |= (r & 1) << s;
      acc = r >> 1;
    end
    res |= (acc & 127) << 8;
    res |= (((acc >> 7) & 1) ^ 1) << 15;
    return (res >= 32768) ? res - 65536 : res;
  endfunction

  function automatic int kind_of(int m);
    return (m == 0) ? 0 : (m - 1) / 5 + 1;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("tb_approx_mult8: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ed [NM];
    real    red [NM];
    int bad_exact, ref_mismatch [NM];
    bad_exact = 0;
    for (int i = 0; i < NM; i++) begin ed[i] = 0; red[i] = 0.0; ref_mismatch[i] = 0; end
    for (int x = -128; x < 128; x++)
      for (int y = -128; y < 128; y++) begin
        int exact;
        a = 8'(x); b = 8'(y);
        #1;
        exact = x * y;
        if (int'(p[0]) != exact) bad_exact++;
        for (int i = 1; i < NM; i++) begin
          int e;
          e = int'(p[i]) - exact;
          if (e < 0) e = -e;
          ed[i] += e;
          if (exact != 0) red[i] += real'(e) / real'((exact < 0) ? -exact : exact);
          if (int'(p[i]) != ref_mul(kind_of(i), MY[i], x, y)) ref_mismatch[i]++;
        end
      end
    checks++;
    if (bad_exact != 0) begin
      failures++;
      $display("exact multiplier wrong for %0d operand pairs", bad_exact);
    end
    for (int i = 1; i < NM; i++) begin
      real med, d;
      med = real'(ed[i]) / 65536.0;
      checks += 3;
      d = red[i] / 65536.0 - mred_pub[i];
      if (d > 0.02 || d < -0.02) begin
        failures++;
        $display("MUL%0d_%0d: mean relative error %f, published %f", kind_of(i), MY[i],
                 red[i] / 65536.0, mred_pub[i]);
      end
      d = med - med_pub[i];
      if (d > 0.1 || d < -0.1) begin
        failures++;
        $display("MUL%0d_%0d: MED %f, published %f", kind_of(i), MY[i], med, med_pub[i]);
      end else
        $display("MUL%0d_%0d: MED %f (published %f), mean relative error %f",
                 kind_of(i), MY[i], med, med_pub[i], red[i] / 65536.0);
      if (ref_mismatch[i] != 0) begin
        failures++;
        $display("multiplier %0d: %0d products differ from the reference", i, ref_mismatch[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
