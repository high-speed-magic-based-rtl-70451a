// tb_magic_rca -- self-checking testbench of the in-memory adder magic_rca.
//
// Checks, against truth tables and step formulas computed in rca_check:
//   - the single exact MFA (N=1): all 8 inputs, 11 steps;
//   - exact 4-bit and 8-bit adders (7N+4 = 32 and 60 steps);
//   - the three 8-bit outlines with MAFA-1, -2 and -3 (k = 3, 4, 5), e.g.
//     40, 45 and 46 steps, random operands;
//   - whole-word MAFA-2 and MAFA-3 adders (3n+3 and 4n+3 steps);
//   - the published example A=170, B=85, Cin=0 on Outline 1 with MAFA-1,
//     which must give SUM=2 with carry-out 1 after 40 steps.
module tb_magic_rca;
  import magic_pkg::*;

  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 11;
  logic [NCFG-1:0] fin;
  int chk [NCFG];
  int fl  [NCFG];
  int ho  [NCFG];
  int ae  [NCFG];

  rca_check #(.N(1), .K(0), .KIND(FA_EXACT))         c0  (.clk, .rst_n, .go, .finished(fin[0]),  .checks(chk[0]),  .failures(fl[0]),  .n_carry_handover(ho[0]),  .n_approx_error(ae[0]));
  rca_check #(.N(4), .K(0), .KIND(FA_EXACT))         c1  (.clk, .rst_n, .go, .finished(fin[1]),  .checks(chk[1]),  .failures(fl[1]),  .n_carry_handover(ho[1]),  .n_approx_error(ae[1]));
  rca_check #(.N(8), .K(0), .KIND(FA_EXACT), .TESTS(150)) c2 (.clk, .rst_n, .go, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]), .n_carry_handover(ho[2]), .n_approx_error(ae[2]));
  rca_check #(.N(8), .K(3), .KIND(FA_MAFA1))         c3  (.clk, .rst_n, .go, .finished(fin[3]),  .checks(chk[3]),  .failures(fl[3]),  .n_carry_handover(ho[3]),  .n_approx_error(ae[3]));
  rca_check #(.N(8), .K(4), .KIND(FA_MAFA2))         c4  (.clk, .rst_n, .go, .finished(fin[4]),  .checks(chk[4]),  .failures(fl[4]),  .n_carry_handover(ho[4]),  .n_approx_error(ae[4]));
  rca_check #(.N(8), .K(5), .KIND(FA_MAFA3))         c5  (.clk, .rst_n, .go, .finished(fin[5]),  .checks(chk[5]),  .failures(fl[5]),  .n_carry_handover(ho[5]),  .n_approx_error(ae[5]));
  rca_check #(.N(8), .K(5), .KIND(FA_MAFA1))         c6  (.clk, .rst_n, .go, .finished(fin[6]),  .checks(chk[6]),  .failures(fl[6]),  .n_carry_handover(ho[6]),  .n_approx_error(ae[6]));
  rca_check #(.N(8), .K(3), .KIND(FA_MAFA2))         c7  (.clk, .rst_n, .go, .finished(fin[7]),  .checks(chk[7]),  .failures(fl[7]),  .n_carry_handover(ho[7]),  .n_approx_error(ae[7]));
  rca_check #(.N(8), .K(4), .KIND(FA_MAFA3))         c8  (.clk, .rst_n, .go, .finished(fin[8]),  .checks(chk[8]),  .failures(fl[8]),  .n_carry_handover(ho[8]),  .n_approx_error(ae[8]));
  rca_check #(.N(4), .K(4), .KIND(FA_MAFA2))         c9  (.clk, .rst_n, .go, .finished(fin[9]),  .checks(chk[9]),  .failures(fl[9]),  .n_carry_handover(ho[9]),  .n_approx_error(ae[9]));
  rca_check #(.N(4), .K(4), .KIND(FA_MAFA3))         c10 (.clk, .rst_n, .go, .finished(fin[10]), .checks(chk[10]), .failures(fl[10]), .n_carry_handover(ho[10]), .n_approx_error(ae[10]));

  // default instance (Outline 1, MAFA-1) for the published example
  logic       start = 0, busy, done, cout;
  logic [7:0] a, b, sum;
  logic [15:0] steps;
  magic_rca dut (.clk, .rst_n, .start, .a, .b, .cin(1'b0), .busy, .done, .sum, .cout, .steps);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("tb_magic_rca: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // published example
    a = 8'd170; b = 8'd85;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk iff done);
    checks++;
    if (sum !== 8'd2 || cout !== 1'b1) begin
      failures++;
      $display("example: got sum=%0d cout=%0d, expected 2 and 1", sum, cout);
    end
    checks++;
    if (steps !== 16'd40) begin
      failures++;
      $display("example: %0d steps, expected 40", steps);
    end
    go = 1;
    wait (&fin);
    for (int i = 0; i < NCFG; i++) begin
      checks   += chk[i];
      failures += fl[i];
    end
    // the carry handed from the approximate to the exact part must have
    // been 1 sometimes, and the approximate outlines must have erred
    for (int i = 3; i < 9; i++) begin
      checks++;
      if (ho[i] == 0 || ae[i] == 0) begin
        failures++;
        $display("config %0d: handover=1 seen %0d times, approximate errors %0d", i, ho[i], ae[i]);
      end
    end
    checks++;
    if (ae[0] != 0 || ae[1] != 0 || ae[2] != 0) begin
      failures++;
      $display("exact configurations differ from the exact sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
