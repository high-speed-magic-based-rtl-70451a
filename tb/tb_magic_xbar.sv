// tb_magic_xbar -- drives a 4x5 crossbar model by hand through the exact
// full-adder program and through a few single-step cases.
//
// The nine MAGIC steps of the exact full adder are written out here line by
// line (V0, GND and isolation per row and column, rows R1..R4 and columns
// C1..C5 numbered 0..3 and 0..4), independently of the sequencer RTL. With
// A at (0,0), B at (1,0) and Cin at (0,2), SUM must appear at (3,0) after
// step 6 and Cout at (2,4) after step 9, for all eight inputs. Further checks:
// an isolated row is left alone, a MAGIC output that was not initialised
// stays '0', and a three-input column NOR.
module tb_magic_xbar;
  import magic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                op_valid = 0, wr_en = 0, wr_bit = 0;
  xop_t                op_kind = XOP_NOP;
  line_drv_t [3:0]     row_drv;
  line_drv_t [4:0]     col_drv;
  logic [3:0][4:0]     init_mask = '0;
  logic [2:0]          wr_row = 0, rd_row = 0;
  logic [2:0]          wr_col = 0;
  logic [4:0]          rd_data;
  int checks = 0, failures = 0;

  magic_xbar #(.ROWS(4), .COLS(5)) dut (.*);

  localparam line_drv_t F = LD_FLOAT, V = LD_V0, G = LD_GND, I = LD_ISO;

  task automatic write_cell(int r, int c, logic v);
    wr_en <= 1; wr_row <= 3'(r); wr_col <= 3'(c); wr_bit <= v;
    @(posedge clk);
    wr_en <= 0;
    #1;
  endtask

  task automatic init(logic [3:0][4:0] m);
    op_valid <= 1; op_kind <= XOP_INIT; init_mask <= m;
    @(posedge clk);
    op_valid <= 0; op_kind <= XOP_NOP;
  endtask

  // rows given R1..R4, columns C1..C5 (left to right in the arguments)
  task automatic step(line_drv_t r1, r2, r3, r4, line_drv_t c1, c2, c3, c4, c5);
    op_valid <= 1; op_kind <= XOP_MAGIC;
    row_drv <= {r4, r3, r2, r1};
    col_drv <= {c5, c4, c3, c2, c1};
    @(posedge clk);
    op_valid <= 0; op_kind <= XOP_NOP;
    #1;
  endtask

  // read one cell through the combinational row read port
  task automatic chk_cell(string what, int r, int c, logic exp);
    rd_row = 3'(r);
    #1;
    check(what, rd_data[c], exp);
  endtask

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("tb_magic_xbar: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_drv = '{default: F};
    col_drv = '{default: F};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 8; v++) begin
      logic a, b, c;
      {a, b, c} = 3'(v);
      write_cell(0, 0, a);
      write_cell(1, 0, b);
      write_cell(0, 2, c);
      // initialise the working cells: rows R3, R4 whole, then R1/R2 cells
      init({5'b11111, 5'b11111, 5'b00000, 5'b00000});
      init({5'b00000, 5'b00000, 5'b00010, 5'b01010});
      //    R1 R2 R3 R4   C1 C2 C3 C4 C5
      step(F, F, I, I,   V, G, F, F, F);   // 1: ~A, ~B
      step(G, G, V, F,   F, F, I, I, I);   // 2: NOR(A,B), AB
      step(I, I, F, I,   V, V, G, F, F);   // 3: X
      step(F, I, F, I,   F, F, V, G, F);   // 4: ~Cin, ~X
      step(G, F, G, V,   I, I, F, F, I);   // 5: NOR(X,Cin), X&Cin
      step(I, I, I, F,   G, F, V, V, F);   // 6: SUM
      chk_cell($sformatf("SUM after step 6, abc=%03b", v[2:0]), 3, 0, a ^ b ^ c);
      step(G, G, F, V,   I, F, I, I, I);   // 7: AB in R4
      step(I, I, I, F,   F, V, F, V, G);   // 8: ~Cout
      chk_cell($sformatf("~Cout after step 8, abc=%03b", v[2:0]), 3, 4,
            ~((a & b) | (a & c) | (b & c)));
      step(F, F, V, G,   I, I, I, I, F);   // 9: Cout
      chk_cell($sformatf("Cout after step 9, abc=%03b", v[2:0]), 2, 4,
            (a & b) | (a & c) | (b & c));
      // operands untouched by the program
      chk_cell("A kept", 0, 0, a);
      chk_cell("B kept", 1, 0, b);
      chk_cell("Cin kept", 0, 2, c);
      // row read port
      rd_row = 3'd3;
      #1;
      check("read port", rd_data[0], a ^ b ^ c);
    end

    // an isolated row is not changed; an uninitialised output stays 0
    write_cell(0, 0, 1'b0);
    write_cell(0, 1, 1'b0);        // output not initialised
    write_cell(1, 0, 1'b0);
    write_cell(1, 1, 1'b1);        // initialised output, but row isolated
    step(F, I, I, I,   V, G, F, F, F);
    chk_cell("uninitialised output stays 0", 0, 1, 1'b0);
    chk_cell("isolated row unchanged", 1, 1, 1'b1);

    // three-input NOR along a column
    write_cell(0, 3, 1'b0);
    write_cell(1, 3, 1'b0);
    write_cell(2, 3, 1'b1);
    write_cell(3, 3, 1'b1);
    step(G, G, G, V,   I, I, I, F, I);
    chk_cell("3-input column NOR of 0,0,1", 3, 3, 1'b0);
    write_cell(2, 3, 1'b0);
    write_cell(3, 3, 1'b1);
    step(G, G, G, V,   I, I, I, F, I);
    chk_cell("3-input column NOR of 0,0,0", 3, 3, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
