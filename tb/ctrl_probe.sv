// ctrl_probe -- runs one magic_rca_ctrl configuration and measures its program.
//
// Pulses start once go is high, then counts the cycles with op_valid, the
// initialisation steps, the row-oriented and column-oriented MAGIC steps, and
// flags any MAGIC step whose V0/GND lines are missing or mixed between rows
// and columns. Reports finished after done has pulsed.
module ctrl_probe
  import magic_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 3,
  parameter fa_kind_t    KIND = FA_MAFA1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   n_steps,
  output int   n_init,
  output int   n_row,
  output int   n_col,
  output int   n_bad
);
  localparam int unsigned ROWS = rca_rows(KIND, N, (KIND == FA_EXACT) ? 0 : K);

  logic start = 0, busy, done, op_valid;
  xop_t op_kind;
  line_drv_t [ROWS-1:0] row_drv;
  line_drv_t [XB_COLS-1:0] col_drv;
  logic [ROWS-1:0][XB_COLS-1:0] init_mask;

  magic_rca_ctrl #(.N(N), .K(K), .KIND(KIND)) dut (.*);

  initial begin
    finished = 0; n_steps = 0; n_init = 0; n_row = 0; n_col = 0; n_bad = 0;
    wait (go);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    forever begin
      @(posedge clk);
      if (op_valid) begin
        n_steps++;
        if (op_kind == XOP_INIT) n_init++;
        else begin
          bit cv0, cg, rv0, rg;
          cv0 = 0; cg = 0; rv0 = 0; rg = 0;
          for (int c = 0; c < XB_COLS; c++) begin
            if (col_drv[c] == LD_V0)  cv0 = 1;
            if (col_drv[c] == LD_GND) cg  = 1;
          end
          for (int r = 0; r < ROWS; r++) begin
            if (row_drv[r] == LD_V0)  rv0 = 1;
            if (row_drv[r] == LD_GND) rg  = 1;
          end
          if (cv0 && cg && !rv0 && !rg)      n_row++;
          else if (rv0 && rg && !cv0 && !cg) n_col++;
          else                               n_bad++;
        end
      end
      if (done) break;
    end
    finished = 1;
  end
endmodule
