// tb_magic_rca_ctrl -- step counts of the sequencer against the published ones.
//
// Runs the sequencer alone for the 8-bit exact adder, the nine 8-bit outlines
// (MAFA-1/2/3 with k = 3, 4, 5) and the 1-bit cells, and compares the number
// of crossbar steps with the published step counts: 60 for the exact adder;
// 40/33/26, 49/45/41 and 52/49/46 for the outlines; 11, 6 and 7 for the
// single MFA, MAFA-2 and MAFA-3 cells. It also checks that every program
// starts with exactly two initialisation steps, that each MAGIC step drives
// V0 and ground along one orientation only, and the number of column steps
// of the exact 8-bit adder (8 of step 2, and 3 per bit for steps 5, 7, 9).
module tb_magic_rca_ctrl;
  import magic_pkg::*;

  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  localparam int NC = 13;
  logic [NC-1:0] fin;
  int st [NC], ini [NC], rw [NC], cl [NC], bad [NC];
  int exp_steps [NC] = '{60, 40, 33, 26, 49, 45, 41, 52, 49, 46, 11, 6, 7};
  int checks = 0, failures = 0;

  ctrl_probe #(.N(8), .K(0), .KIND(FA_EXACT)) p0  (.clk, .rst_n, .go, .finished(fin[0]),  .n_steps(st[0]),  .n_init(ini[0]),  .n_row(rw[0]),  .n_col(cl[0]),  .n_bad(bad[0]));
  ctrl_probe #(.N(8), .K(3), .KIND(FA_MAFA1)) p1  (.clk, .rst_n, .go, .finished(fin[1]),  .n_steps(st[1]),  .n_init(ini[1]),  .n_row(rw[1]),  .n_col(cl[1]),  .n_bad(bad[1]));
  ctrl_probe #(.N(8), .K(4), .KIND(FA_MAFA1)) p2  (.clk, .rst_n, .go, .finished(fin[2]),  .n_steps(st[2]),  .n_init(ini[2]),  .n_row(rw[2]),  .n_col(cl[2]),  .n_bad(bad[2]));
  ctrl_probe #(.N(8), .K(5), .KIND(FA_MAFA1)) p3  (.clk, .rst_n, .go, .finished(fin[3]),  .n_steps(st[3]),  .n_init(ini[3]),  .n_row(rw[3]),  .n_col(cl[3]),  .n_bad(bad[3]));
  ctrl_probe #(.N(8), .K(3), .KIND(FA_MAFA2)) p4  (.clk, .rst_n, .go, .finished(fin[4]),  .n_steps(st[4]),  .n_init(ini[4]),  .n_row(rw[4]),  .n_col(cl[4]),  .n_bad(bad[4]));
  ctrl_probe #(.N(8), .K(4), .KIND(FA_MAFA2)) p5  (.clk, .rst_n, .go, .finished(fin[5]),  .n_steps(st[5]),  .n_init(ini[5]),  .n_row(rw[5]),  .n_col(cl[5]),  .n_bad(bad[5]));
  ctrl_probe #(.N(8), .K(5), .KIND(FA_MAFA2)) p6  (.clk, .rst_n, .go, .finished(fin[6]),  .n_steps(st[6]),  .n_init(ini[6]),  .n_row(rw[6]),  .n_col(cl[6]),  .n_bad(bad[6]));
  ctrl_probe #(.N(8), .K(3), .KIND(FA_MAFA3)) p7  (.clk, .rst_n, .go, .finished(fin[7]),  .n_steps(st[7]),  .n_init(ini[7]),  .n_row(rw[7]),  .n_col(cl[7]),  .n_bad(bad[7]));
  ctrl_probe #(.N(8), .K(4), .KIND(FA_MAFA3)) p8  (.clk, .rst_n, .go, .finished(fin[8]),  .n_steps(st[8]),  .n_init(ini[8]),  .n_row(rw[8]),  .n_col(cl[8]),  .n_bad(bad[8]));
  ctrl_probe #(.N(8), .K(5), .KIND(FA_MAFA3)) p9  (.clk, .rst_n, .go, .finished(fin[9]),  .n_steps(st[9]),  .n_init(ini[9]),  .n_row(rw[9]),  .n_col(cl[9]),  .n_bad(bad[9]));
  ctrl_probe #(.N(1), .K(0), .KIND(FA_EXACT)) p10 (.clk, .rst_n, .go, .finished(fin[10]), .n_steps(st[10]), .n_init(ini[10]), .n_row(rw[10]), .n_col(cl[10]), .n_bad(bad[10]));
  ctrl_probe #(.N(1), .K(1), .KIND(FA_MAFA2)) p11 (.clk, .rst_n, .go, .finished(fin[11]), .n_steps(st[11]), .n_init(ini[11]), .n_row(rw[11]), .n_col(cl[11]), .n_bad(bad[11]));
  ctrl_probe #(.N(1), .K(1), .KIND(FA_MAFA3)) p12 (.clk, .rst_n, .go, .finished(fin[12]), .n_steps(st[12]), .n_init(ini[12]), .n_row(rw[12]), .n_col(cl[12]), .n_bad(bad[12]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("tb_magic_rca_ctrl: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    go = 1;
    wait (&fin);
    for (int i = 0; i < NC; i++) begin
      checks += 3;
      if (st[i] != exp_steps[i]) begin
        failures++;
        $display("config %0d: %0d steps, published %0d", i, st[i], exp_steps[i]);
      end
      if (ini[i] != 2) begin
        failures++;
        $display("config %0d: %0d initialisation steps", i, ini[i]);
      end
      if (bad[i] != 0) begin
        failures++;
        $display("config %0d: %0d MAGIC steps with mixed or missing lines", i, bad[i]);
      end
    end
    checks++;
    if (cl[0] != 8 + 3 * 8 || rw[0] != 60 - 2 - 32) begin
      failures++;
      $display("exact adder: %0d column and %0d row steps", cl[0], rw[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
