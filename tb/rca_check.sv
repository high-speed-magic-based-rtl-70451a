// rca_check -- test driver for one magic_rca configuration.
//
// Runs TESTS additions through a magic_rca with the given N, K and KIND
// (all operand combinations when 2N+1 input bits fit in 12 bits, random ones
// otherwise) and compares sum, carry-out and the crossbar step count with a
// reference computed here: the per-cell truth tables of the exact and
// approximate full adders rippled bit by bit, and the step-count formula
// 7(N-K) + s*K + 5 (7N + 4 without approximate bits). Starts when go rises;
// raises finished when all additions are checked. Also counts how often the
// carry into the first exact bit was 1 and how often an approximate result
// differed from the exact sum, so callers can see those cases happened.
module rca_check
  import magic_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned K     = 3,
  parameter fa_kind_t    KIND  = FA_MAFA1,
  parameter int unsigned TESTS = 200
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_carry_handover,
  output int   n_approx_error
);
  localparam int unsigned KA = (KIND == FA_EXACT) ? 0 : K;
  localparam bit EXHAUSTIVE = (2 * N + 1) <= 12;
  localparam int unsigned RUNS = EXHAUSTIVE ? (1 << (2 * N + 1)) : TESTS;

  logic         start, busy, done, cout;
  logic [N-1:0] a, b, sum;
  logic         cin;
  logic [15:0]  steps;

  magic_rca #(.N(N), .K(K), .KIND(KIND)) dut (
    .clk, .rst_n, .start, .a, .b, .cin, .busy, .done, .sum, .cout, .steps
  );

  // truth tables indexed by {a,b,c}
  function automatic logic [1:0] cell_ref(int unsigned kind, logic x, logic y, logic z);
    logic [7:0] s_tab, c_tab;
    case (kind)
      1: begin c_tab = 8'b1100_1100; s_tab = ~c_tab; end   // MAFA-1
      2: begin c_tab = 8'b1110_1100; s_tab = ~c_tab; end   // MAFA-2
      3: begin c_tab = 8'b1110_1000; s_tab = ~c_tab; end   // MAFA-3
      default: begin c_tab = 8'b1110_1000; s_tab = 8'b1001_0110; end
    endcase
    return {c_tab[{x, y, z}], s_tab[{x, y, z}]};
  endfunction

  function automatic int unsigned expected_steps();
    int unsigned s;
    s = (KIND == FA_MAFA2) ? 3 : (KIND == FA_MAFA3) ? 4 : 0;
    if (KA == 0) return 7 * N + 4;
    if (KA == N) return 3 + s * KA;
    return 7 * (N - KA) + s * KA + 5;
  endfunction

  initial begin
    logic [N:0] ref_val, exact_val;
    logic       c, hand;
    logic [1:0] r;
    start = 0; a = '0; b = '0; cin = 0;
    finished = 0; checks = 0; failures = 0;
    n_carry_handover = 0; n_approx_error = 0;
    wait (go);
    for (int unsigned t = 0; t < RUNS; t++) begin
      if (EXHAUSTIVE) begin
        logic [2*N:0] v;
        v = (2 * N + 1)'(t);
        {cin, b, a} = v;
      end else begin
        a   = N'($urandom);
        b   = N'($urandom);
        cin = (t % 4 == 3) ? $urandom_range(0, 1) : 1'b0;
      end
      // reference ripple
      c = cin;
      hand = 0;
      for (int unsigned i = 0; i < N; i++) begin
        if (i == KA) hand = c;
        r = cell_ref((i < KA) ? 32'(KIND) : 0, a[i], b[i], c);
        ref_val[i] = r[0];
        c = r[1];
      end
      ref_val[N] = c;
      exact_val  = {1'b0, a} + {1'b0, b} + (N+1)'(cin);
      @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      @(posedge clk iff done);
      checks += 2;
      if ({cout, sum} !== ref_val) begin
        failures++;
        if (failures < 10)
          $display("rca_check N=%0d K=%0d kind=%0d: a=%0d b=%0d cin=%0d got %0d expected %0d",
                   N, KA, KIND, a, b, cin, {cout, sum}, ref_val);
      end
      if (32'(steps) != expected_steps()) begin
        failures++;
        if (failures < 10)
          $display("rca_check N=%0d K=%0d kind=%0d: %0d steps, expected %0d",
                   N, KA, KIND, steps, expected_steps());
      end
      if (KA > 0 && KA < N && hand) n_carry_handover++;
      if (ref_val != exact_val) n_approx_error++;
    end
    finished = 1;
  end
endmodule
