// magic_xbar -- behavioural model of a memristive crossbar computing with MAGIC.
//
// Behavioural model: the real part is an analog array of bipolar memristors
// (low resistance = logic '1', high resistance = logic '0') with voltage
// drivers on every row and column line. This model keeps one bit per cell and
// reproduces the logic effect of each step; it is written so that it also
// synthesizes, but it stands for the memristor array, not for CMOS logic.
//
// Each clock edge with op_valid performs one step:
//   XOP_INIT  : every cell whose init_mask bit is set is SET to '1'. MAGIC
//               outputs must be initialised like this before they are used.
//   XOP_MAGIC : one MAGIC NOR (NOT for a single input), in one of two
//               orientations decided by where V0 is applied:
//     row step    -- V0 on one or more columns, GND on one or more columns.
//                    In every row that is not isolated (row line not LD_ISO)
//                    the cells under the GND columns take the NOR of the cells
//                    under the V0 columns. Several rows evaluate in parallel.
//     column step -- V0 on one or more rows, GND on one or more rows. In every
//                    column that is not isolated the cells in the V0 rows take
//                    the NOR of the cells in the GND rows.
//   The roles of V0 and GND in the two orientations follow the step tables of
//   the description (for a row step V0 marks the inputs, for a column step it
//   marks the output row). A MAGIC output can only switch from '1' to '0', so
//   a cell that was not initialised keeps '0': new = old & NOR(inputs).
// Operands are written one cell per cycle through the write port; a row is
// read combinationally through the read port. Writes and steps in the same
// cycle are not allowed (the write wins). Reset clears the array to '0'.
module magic_xbar
  import magic_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // step port
  input  logic                     op_valid,
  input  xop_t                     op_kind,
  input  line_drv_t [ROWS-1:0]     row_drv,
  input  line_drv_t [COLS-1:0]     col_drv,
  input  logic [ROWS-1:0][COLS-1:0] init_mask,
  // single-cell write port (operand programming)
  input  logic                     wr_en,
  input  logic [$clog2(ROWS+1)-1:0] wr_row,
  input  logic [$clog2(COLS+1)-1:0] wr_col,
  input  logic                     wr_bit,
  // row read port
  input  logic [$clog2(ROWS+1)-1:0] rd_row,
  output logic [COLS-1:0]          rd_data
);

  logic [ROWS-1:0][COLS-1:0] cell_q, cell_d;

  // orientation of a MAGIC step, and which line kinds carry V0/GND
  logic row_step, col_gnd, row_v0, row_gnd;
  always_comb begin
    row_step = 1'b0;
    col_gnd  = 1'b0;
    row_v0   = 1'b0;
    row_gnd  = 1'b0;
    for (int c = 0; c < COLS; c++) begin
      if (col_drv[c] == LD_V0)  row_step = 1'b1;
      if (col_drv[c] == LD_GND) col_gnd  = 1'b1;
    end
    for (int r = 0; r < ROWS; r++) begin
      if (row_drv[r] == LD_V0)  row_v0  = 1'b1;
      if (row_drv[r] == LD_GND) row_gnd = 1'b1;
    end
  end

  // NOR inputs seen by every row (row step) and every column (column step)
  logic [ROWS-1:0] row_in_or;
  logic [COLS-1:0] col_in_or;
  always_comb begin
    row_in_or = '0;
    col_in_or = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (col_drv[c] == LD_V0)  row_in_or[r] |= cell_q[r][c];
        if (row_drv[r] == LD_GND) col_in_or[c] |= cell_q[r][c];
      end
  end

  always_comb begin
    cell_d = cell_q;
    if (wr_en) begin
      if (int'(wr_row) < ROWS && int'(wr_col) < COLS) cell_d[wr_row][wr_col] = wr_bit;
    end else if (op_valid && op_kind == XOP_INIT) begin
      cell_d = cell_q | init_mask;
    end else if (op_valid && op_kind == XOP_MAGIC) begin
      if (row_step) begin
        for (int r = 0; r < ROWS; r++) begin
          if (row_drv[r] != LD_ISO)
            for (int c = 0; c < COLS; c++)
              if (col_drv[c] == LD_GND) cell_d[r][c] = cell_q[r][c] & ~row_in_or[r];
        end
      end else begin
        for (int c = 0; c < COLS; c++) begin
          if (col_drv[c] != LD_ISO)
            for (int r = 0; r < ROWS; r++)
              if (row_drv[r] == LD_V0) cell_d[r][c] = cell_q[r][c] & ~col_in_or[c];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cell_q <= '0;
    else        cell_q <= cell_d;
  end

  assign rd_data = (int'(rd_row) < ROWS) ? cell_q[rd_row] : '0;

  // A MAGIC step puts V0 and GND on lines of one orientation only.
  a_one_orientation: assert property (
    @(posedge clk) disable iff (!rst_n)
      (op_valid && op_kind == XOP_MAGIC && !wr_en) |->
        (row_step ? (col_gnd && !row_v0 && !row_gnd) : (row_v0 && row_gnd && !col_gnd)))
    else $error("magic_xbar: MAGIC step with mixed or missing V0/GND lines");

endmodule
