// tb_magic_imc_top -- end-to-end test of magic_imc_top at its default sizes.
//
// Adder side: the published example (170 + 85 -> 2, carry 1), then 3000
// random additions, each checked against a ripple of the cell truth tables
// written here and against the 40-step latency. Multiplier side: 20000 random
// signed products checked against an integer Baugh-Wooley reference with the
// same approximate stages. Each mechanism of the design must be seen at least
// once: an approximate adder result that differs from the exact sum, a carry
// of 1 handed from the approximate to the exact bits, a carry rippling through
// all exact bits, a carry-out of 1, a non-zero carry-in, an exact multiplier
// result and an approximate (wrong) one. A mechanism never seen is a failure.
module tb_magic_imc_top;
  import magic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        add_start = 0, add_cin = 0, add_busy, add_done, add_cout;
  logic [7:0]  add_a = 0, add_b = 0, add_sum;
  logic [15:0] add_steps;
  logic signed [7:0]  mul_a = 0, mul_b = 0;
  logic signed [15:0] mul_p;

  magic_imc_top dut (.*);

  int checks = 0, failures = 0;
  int n_apx_err = 0, n_handover = 0, n_full_ripple = 0, n_cout = 0, n_cin = 0;
  int n_mul_exact = 0, n_mul_apx = 0;

  // adder reference: 3 MAFA-1 bits (sum = ~b, carry = b), then exact bits
  function automatic logic [8:0] add_ref(logic [7:0] x, logic [7:0] y, logic ci,
                                         output logic hand, output logic ripple_all);
    logic [8:0] v;
    logic c;
    c = ci;
    ripple_all = 1;
    hand = 0;
    for (int i = 0; i < 8; i++) begin
      if (i == 3) hand = c;
      if (i < 3) begin
        v[i] = ~y[i];
        c    = y[i];
      end else begin
        v[i] = x[i] ^ y[i] ^ c;
        if (!(x[i] ^ y[i])) ripple_all = 0;
        c = (x[i] & y[i]) | (x[i] & c) | (y[i] & c);
      end
    end
    ripple_all = ripple_all & hand;
    v[8] = c;
    return v;
  endfunction

  function automatic int ripple(int k, int x, int y);
    int v, c, xa, yb;
    v = 0; c = 0;
    for (int i = 0; i < 8; i++) begin
      xa = (x >> i) & 1; yb = (y >> i) & 1;
      if (i < k) begin v |= (1 - yb) << i; c = yb; end
      else begin
        v |= (xa ^ yb ^ c) << i;
        c = (xa & yb) | (xa & c) | (yb & c);
      end
    end
    return v | (c << 8);
  endfunction

  // MUL1_7 reference
  function automatic int mul_ref(int x, int y);
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
      k = 7 - s + 1;
      r = ripple(k, acc, row[s]);
      res |= (r & 1) << s;
      acc = r >> 1;
    end
    res |= (acc & 127) << 8;
    res |= (((acc >> 7) & 1) ^ 1) << 15;
    return (res >= 32768) ? res - 65536 : res;
  endfunction

  task automatic add_once(logic [7:0] x, logic [7:0] y, logic ci);
    logic [8:0] exp_v;
    logic hand, rip;
    int t0;
    exp_v = add_ref(x, y, ci, hand, rip);
    add_a <= x; add_b <= y; add_cin <= ci;
    add_start <= 1;
    @(posedge clk);
    add_start <= 0;
    @(posedge clk iff add_done);
    checks += 2;
    if ({add_cout, add_sum} !== exp_v) begin
      failures++;
      if (failures < 10) $display("add %0d+%0d+%0d: got %0d expected %0d", x, y, ci, {add_cout, add_sum}, exp_v);
    end
    if (add_steps !== 16'd40) begin
      failures++;
      if (failures < 10) $display("add: %0d steps, expected 40", add_steps);
    end
    if (exp_v != {1'b0, x} + {1'b0, y} + 9'(ci)) n_apx_err++;
    if (hand) n_handover++;
    if (rip) n_full_ripple++;
    if (exp_v[8]) n_cout++;
    if (ci) n_cin++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("tb_magic_imc_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    add_once(8'd170, 8'd85, 1'b0);
    checks++;
    if (add_sum !== 8'd2 || add_cout !== 1'b1) begin
      failures++;
      $display("published example: got %0d carry %0d", add_sum, add_cout);
    end
    for (int t = 0; t < 3000; t++)
      add_once(8'($urandom), 8'($urandom), (t % 5 == 0) ? 1'b1 : 1'b0);

    for (int t = 0; t < 20000; t++) begin
      int x, y, e;
      x = $urandom_range(0, 255) - 128;
      y = $urandom_range(0, 255) - 128;
      mul_a = 8'(x); mul_b = 8'(y);
      #1;
      e = mul_ref(x, y);
      checks++;
      if (int'(mul_p) != e) begin
        failures++;
        if (failures < 10) $display("mul %0d*%0d: got %0d expected %0d", x, y, mul_p, e);
      end
      if (e == x * y) n_mul_exact++; else n_mul_apx++;
    end

    $display("mechanisms: approx-add-error=%0d handover-carry=%0d full-ripple=%0d cout=%0d cin=%0d mul-exact=%0d mul-approx=%0d",
             n_apx_err, n_handover, n_full_ripple, n_cout, n_cin, n_mul_exact, n_mul_apx);
    checks += 7;
    if (n_apx_err == 0)     begin failures++; $display("no approximate adder error seen"); end
    if (n_handover == 0)    begin failures++; $display("no carry handover seen"); end
    if (n_full_ripple == 0) begin failures++; $display("no full carry ripple seen"); end
    if (n_cout == 0)        begin failures++; $display("no carry-out seen"); end
    if (n_cin == 0)         begin failures++; $display("no carry-in seen"); end
    if (n_mul_exact == 0)   begin failures++; $display("no exact product seen"); end
    if (n_mul_apx == 0)     begin failures++; $display("no approximate product seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
