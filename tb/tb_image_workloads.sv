// tb_image_workloads -- the four image-processing workloads run through the
// exact adder and the nine approximate 8-bit adders.
//
// Each workload is run at its published image size on images generated here
// (gradients, blocks and a little pseudo-random texture; no photographs are
// read), once per adder configuration: exact, and MAFA-1/2/3 with 3, 4 and 5
// approximate LSBs ("Outlines" 1, 2 and 3).
//   addition     256 x 256: out = (a + b) >> 1, carry-in 0
//   subtraction  320 x 240: a - b as a + ~b + 1; a borrow clips the pixel to 0
//                (how negative differences are shown is this bench's choice)
//   grayscale    768 x 512: Y = (R' + G') + B' with R' = floor(0.299 R),
//                G' = floor(0.587 G), B' = floor(0.114 B) formed here; an
//                approximate carry out of the second addition saturates to 255
//   pooling      768 x 512 -> 384 x 256, 2 x 2 windows, three halving additions
//                ((p00+p01)/2 + (p10+p11)/2) / 2
// For every adder and workload the bench checks that each adder result equals
// a bit-level ripple of the cell truth tables written out below, and that no
// result is further than 2^(k+1) from the exact sum (the most a k-bit
// approximate low part can be off by). It prints the PSNR of every output
// image against the exact one and checks the published trends on these
// images: with five approximate bits MAFA-3 gives an image at least as good as
// MAFA-1 (addition, subtraction, pooling), every approximate addition stays
// above 30 dB, and grayscale with five MAFA-1 bits falls below 30 dB.
// Finally 200 pixel pairs of the addition workload go through the in-memory
// adder (magic_rca, Outline 1, MAFA-1): each result must equal the functional
// one and take 40 crossbar steps.
module tb_image_workloads;
  import magic_pkg::*;

  localparam int NC = 10;
  localparam int       KK [NC] = '{0, 3, 4, 5, 3, 4, 5, 3, 4, 5};
  localparam fa_kind_t KD [NC] = '{FA_EXACT, FA_MAFA1, FA_MAFA1, FA_MAFA1,
                                   FA_MAFA2, FA_MAFA2, FA_MAFA2,
                                   FA_MAFA3, FA_MAFA3, FA_MAFA3};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // shared operand buses of the combinational workloads
  logic [7:0] add_a, add_b, sub_a, sub_b, g_r, g_g, g_b;
  logic [7:0] p00, p01, p10, p11;
  logic [8:0] add_s [NC], sub_s [NC], gy1 [NC], gy2 [NC];
  logic [8:0] ph0 [NC], ph1 [NC], pq [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    approx_rca #(.N(8), .K(KK[g]), .KIND(KD[g])) u_add (
      .a(add_a), .b(add_b), .cin(1'b0), .sum(add_s[g][7:0]), .cout(add_s[g][8]));
    approx_rca #(.N(8), .K(KK[g]), .KIND(KD[g])) u_sub (
      .a(sub_a), .b(~sub_b), .cin(1'b1), .sum(sub_s[g][7:0]), .cout(sub_s[g][8]));
    approx_rca #(.N(8), .K(KK[g]), .KIND(KD[g])) u_gy1 (
      .a(g_r), .b(g_g), .cin(1'b0), .sum(gy1[g][7:0]), .cout(gy1[g][8]));
    approx_rca #(.N(8), .K(KK[g]), .KIND(KD[g])) u_gy2 (
      .a(gy1[g][7:0]), .b(g_b), .cin(1'b0), .sum(gy2[g][7:0]), .cout(gy2[g][8]));
    approx_rca #(.N(8), .K(KK[g]), .KIND(KD[g])) u_ph0 (
      .a(p00), .b(p01), .cin(1'b0), .sum(ph0[g][7:0]), .cout(ph0[g][8]));
    approx_rca #(.N(8), .K(KK[g]), .KIND(KD[g])) u_ph1 (
      .a(p10), .b(p11), .cin(1'b0), .sum(ph1[g][7:0]), .cout(ph1[g][8]));
    approx_rca #(.N(8), .K(KK[g]), .KIND(KD[g])) u_pq (
      .a(ph0[g][8:1]), .b(ph1[g][8:1]), .cin(1'b0), .sum(pq[g][7:0]), .cout(pq[g][8]));
  end

  // in-memory adder at its default configuration
  logic       m_start = 0, m_busy, m_done, m_cout;
  logic [7:0] m_a = 0, m_b = 0, m_sum;
  logic [15:0] m_steps;
  magic_rca u_mem (
    .clk, .rst_n, .start(m_start), .a(m_a), .b(m_b), .cin(1'b0),
    .busy(m_busy), .done(m_done), .sum(m_sum), .cout(m_cout), .steps(m_steps));

  // ---------------------------------------------------------------- models
  // kind: 0 exact, 1 MAFA-1, 2 MAFA-2, 3 MAFA-3; the k LSBs are approximate
  function automatic logic [8:0] ref_add(int kind, int k, logic [7:0] x, logic [7:0] y, logic ci);
    logic [8:0] v;
    logic c, maj;
    c = ci;
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

  function automatic int kind_num(int g);
    return (g == 0) ? 0 : (g - 1) / 3 + 1;
  endfunction

  // synthetic test image number img, pixel (x, y)
  function automatic logic [7:0] pix(int img, int x, int y);
    int unsigned h;
    logic [31:0] v;
    h = (32'(x) * 32'd73856093) ^ (32'(y) * 32'd19349663) ^ (32'(img) * 32'd83492791);
    v = ((x * (3 + img % 4)) >> 1) + ((y * (5 + img % 3)) >> 2)
        + (((x >> 4) ^ (y >> 4)) & 7) * 23 + ((h >> 9) & 15);
    return v[7:0];
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // per configuration: mismatches against ref_add, results outside the error
  // bound, squared error of the output image against the exact one
  int  mism [NC], bound_bad [NC];
  real se [NC];

  task automatic clear_stats();
    for (int g = 0; g < NC; g++) begin mism[g] = 0; bound_bad[g] = 0; se[g] = 0.0; end
  endtask

  // one adder result of configuration g for operands x, y, ci
  task automatic judge(int g, logic [8:0] got, logic [7:0] x, logic [7:0] y, logic ci);
    logic [8:0] expv;
    int k;
    k    = (g == 0) ? 0 : KK[g];
    expv = ref_add(kind_num(g), k, x, y, ci);
    if (got != expv) mism[g]++;
    if (iabs(int'(got) - (int'(x) + int'(y) + int'(ci))) >= (1 << (k + 1))) bound_bad[g]++;
  endtask

  task automatic report(string wl, int npix, output real psnr [NC]);
    for (int g = 0; g < NC; g++) begin
      real mse;
      mse = se[g] / real'(npix);
      psnr[g] = (mse == 0.0) ? 99.0 : 10.0 * $log10(65025.0 / mse);
      checks++;
      if (mism[g] != 0 || bound_bad[g] != 0) begin
        failures++;
        $display("%s cfg %0d: %0d results differ from the cell model, %0d beyond the error bound",
                 wl, g, mism[g], bound_bad[g]);
      end
      if (g == 0) $display("%-12s exact        PSNR %6.2f dB", wl, psnr[g]);
      else        $display("%-12s MAFA-%0d k=%0d  PSNR %6.2f dB", wl, kind_num(g), KK[g], psnr[g]);
    end
    checks++;
    if (psnr[0] != 99.0) begin
      failures++;
      $display("%s: exact adder output differs from the exact image", wl);
    end
  endtask

  real ps_add [NC], ps_sub [NC], ps_gray [NC], ps_pool [NC];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("tb_image_workloads: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_mem;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- image addition, 256 x 256
    clear_stats();
    for (int y = 0; y < 256; y++)
      for (int x = 0; x < 256; x++) begin
        add_a = pix(0, x, y); add_b = pix(1, x, y);
        #1;
        for (int g = 0; g < NC; g++) begin
          judge(g, add_s[g], add_a, add_b, 1'b0);
          se[g] += real'((int'(add_s[g][8:1]) - int'(add_s[0][8:1])) ** 2);
        end
      end
    report("addition", 256 * 256, ps_add);

    // ---- image subtraction (motion), 320 x 240; second frame shifted by 3
    clear_stats();
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 320; x++) begin
        int e, o;
        sub_a = pix(4, x, y); sub_b = pix(4, x + 3, y + 1);
        #1;
        e = sub_s[0][8] ? int'(sub_s[0][7:0]) : 0;
        for (int g = 0; g < NC; g++) begin
          judge(g, sub_s[g], sub_a, ~sub_b, 1'b1);
          o = sub_s[g][8] ? int'(sub_s[g][7:0]) : 0;
          se[g] += real'((o - e) ** 2);
        end
        if (e != ((sub_a >= sub_b) ? int'(sub_a) - int'(sub_b) : 0)) mism[0]++;
      end
    report("subtraction", 320 * 240, ps_sub);

    // ---- RGB to grayscale, 768 x 512
    clear_stats();
    for (int y = 0; y < 512; y++)
      for (int x = 0; x < 768; x++) begin
        int e, o;
        g_r = 8'((int'(pix(8, x, y)) * 299) / 1000);
        g_g = 8'((int'(pix(9, x, y)) * 587) / 1000);
        g_b = 8'((int'(pix(10, x, y)) * 114) / 1000);
        #1;
        e = int'(gy2[0][7:0]);
        if (e != int'(g_r) + int'(g_g) + int'(g_b)) mism[0]++;
        for (int g = 0; g < NC; g++) begin
          judge(g, gy1[g], g_r, g_g, 1'b0);
          judge(g, gy2[g], gy1[g][7:0], g_b, 1'b0);
          o = (gy1[g][8] | gy2[g][8]) ? 255 : int'(gy2[g][7:0]);
          se[g] += real'((o - e) ** 2);
        end
      end
    report("grayscale", 768 * 512, ps_gray);

    // ---- 2 x 2 average pooling, 768 x 512 -> 384 x 256
    clear_stats();
    for (int y = 0; y < 256; y++)
      for (int x = 0; x < 384; x++) begin
        int e;
        p00 = pix(12, 2 * x, 2 * y);     p01 = pix(12, 2 * x + 1, 2 * y);
        p10 = pix(12, 2 * x, 2 * y + 1); p11 = pix(12, 2 * x + 1, 2 * y + 1);
        #1;
        e = ((int'(p00) + int'(p01)) / 2 + (int'(p10) + int'(p11)) / 2) / 2;
        if (int'(pq[0][8:1]) != e) mism[0]++;
        for (int g = 0; g < NC; g++) begin
          judge(g, ph0[g], p00, p01, 1'b0);
          judge(g, ph1[g], p10, p11, 1'b0);
          judge(g, pq[g], ph0[g][8:1], ph1[g][8:1], 1'b0);
          se[g] += real'((int'(pq[g][8:1]) - e) ** 2);
        end
      end
    report("pooling", 384 * 256, ps_pool);

    // ---- quality ordering with five approximate bits (index 3: MAFA-1, 9: MAFA-3)
    checks++;
    if (ps_add[9] < ps_add[3]) begin
      failures++;
      $display("addition: MAFA-3 PSNR %f below MAFA-1 %f", ps_add[9], ps_add[3]);
    end
    checks++;
    if (ps_pool[9] < ps_pool[3]) begin
      failures++;
      $display("pooling: MAFA-3 PSNR %f below MAFA-1 %f", ps_pool[9], ps_pool[3]);
    end

    // ---- published trends: image addition stays above 30 dB for every
    // outline, grayscale with five MAFA-1 bits falls below it
    for (int g = 1; g < NC; g++) begin
      checks++;
      if (ps_add[g] <= 30.0) begin
        failures++;
        $display("addition cfg %0d: PSNR %f not above 30 dB", g, ps_add[g]);
      end
    end
    checks++;
    if (ps_gray[3] >= 30.0) begin
      failures++;
      $display("grayscale MAFA-1 k=5: PSNR %f expected below 30 dB", ps_gray[3]);
    end
    checks++;
    if (ps_sub[9] < ps_sub[3]) begin
      failures++;
      $display("subtraction: MAFA-3 PSNR %f below MAFA-1 %f", ps_sub[9], ps_sub[3]);
    end

    // ---- part of the addition workload on the in-memory adder
    n_mem = 0;
    for (int i = 0; i < 200; i++) begin
      logic [8:0] expv;
      int x, y;
      x = (i * 37) % 256; y = (i * 91) % 256;
      @(negedge clk);
      m_a = pix(0, x, y); m_b = pix(1, x, y); m_start = 1;
      @(negedge clk);
      m_start = 0;
      checks++;
      if (!m_busy) begin
        failures++;
        $display("in-memory adder not busy after start");
      end
      while (!m_done) @(negedge clk);
      expv = ref_add(1, 3, m_a, m_b, 1'b0);
      checks++;
      if ({m_cout, m_sum} != expv || m_steps != 16'd40) begin
        failures++;
        $display("in-memory pixel %0d: %0d+%0d gave %0d in %0d steps, expected %0d in 40",
                 i, m_a, m_b, {m_cout, m_sum}, m_steps, expv);
      end
      n_mem++;
    end
    checks++;
    if (n_mem != 200) failures++;
    $display("in-memory additions: %0d", n_mem);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
