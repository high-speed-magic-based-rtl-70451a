// magic_rca -- in-memory N-bit ripple-carry adder built from MAGIC full adders.
//
// One memristive crossbar (magic_xbar, ROWS x 5 cells) holds the operands and
// every intermediate value; magic_rca_ctrl drives its lines step by step. The
// K least significant bits use the approximate cell KIND (MAFA-1, -2 or -3),
// the upper N-K bits the exact MFA, which needs 9 MAGIC steps per bit of
// which two are shared by all bits. The default, N = 8 with three MAFA-1
// bits, is "Outline 1" of the description (27 x 5 array, 40 steps).
//
// Operation, after a one-cycle start pulse while idle:
//   LOAD  2N+1 cycles: writes A, B and Cin into their cells, one per cycle.
//   RUN   the step program, one crossbar step per cycle (count in steps).
//   READ  N+1 cycles: reads the rows holding the sum bits and the carry.
//   done  pulses for one cycle; sum, cout and steps stay valid until the next
//         start. Only RUN corresponds to the latency the description counts;
//         loading and read-out stand for peripheral circuits it leaves out.
// Cell placement follows the crossbar figures of the description; the
// load/read sequencing and the handshake are this design's own.
module magic_rca
  import magic_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 3,
  parameter fa_kind_t    KIND = FA_MAFA1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  sum,
  output logic          cout,
  output logic [15:0]   steps     // crossbar steps used by the last addition
);

  localparam int unsigned KA   = (KIND == FA_EXACT) ? 0 : K;
  localparam int unsigned ROWS = rca_rows(KIND, N, KA);
  localparam int unsigned RW   = $clog2(ROWS + 1);
  localparam int unsigned CW   = $clog2(XB_COLS + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_WAIT, S_READ, S_DONE} state_t;

  state_t        state_q;
  logic [15:0]   idx_q;
  logic [N-1:0]  a_q, b_q;
  logic          cin_q;

  // crossbar and sequencer wiring
  logic                         ctl_start, ctl_busy, ctl_done;
  logic                         op_valid;
  xop_t                         op_kind;
  line_drv_t [ROWS-1:0]         row_drv;
  line_drv_t [XB_COLS-1:0]      col_drv;
  logic [ROWS-1:0][XB_COLS-1:0] init_mask;
  logic                         wr_en, wr_bit;
  logic [RW-1:0]                wr_row, rd_row;
  logic [CW-1:0]                wr_col;
  logic [XB_COLS-1:0]           rd_data;

  magic_rca_ctrl #(.N(N), .K(KA), .KIND(KIND), .ROWS(ROWS)) u_ctrl (
    .clk, .rst_n,
    .start (ctl_start),
    .busy  (ctl_busy),
    .done  (ctl_done),
    .op_valid, .op_kind, .row_drv, .col_drv, .init_mask
  );

  magic_xbar #(.ROWS(ROWS), .COLS(XB_COLS)) u_xbar (
    .clk, .rst_n,
    .op_valid, .op_kind, .row_drv, .col_drv, .init_mask,
    .wr_en, .wr_row, .wr_col, .wr_bit,
    .rd_row, .rd_data
  );

  // operand cell addressed by load index: A0..A(N-1), B0..B(N-1), Cin
  cell_pos_t wpos;
  always_comb begin
    int unsigned ix;
    ix = 32'(idx_q);
    if (ix < N)          wpos = pos_a(KIND, KA, ix);
    else if (ix < 2 * N) wpos = pos_b(KIND, KA, ix - N);
    else                 wpos = pos_cin(KIND, KA);
  end

  // result cell addressed by read index: S0..S(N-1), Cout
  cell_pos_t rpos;
  always_comb begin
    int unsigned ix;
    ix = 32'(idx_q);
    if (ix < N) rpos = pos_sum(KIND, KA, ix);
    else        rpos = pos_cout(KIND, N, KA);
  end

  always_comb begin
    int unsigned ix;
    ix     = 32'(idx_q);
    wr_en  = (state_q == S_LOAD);
    wr_row = RW'(wpos.row);
    wr_col = CW'(wpos.col);
    if (ix < N)          wr_bit = a_q[ix];
    else if (ix < 2 * N) wr_bit = b_q[ix - N];
    else                 wr_bit = cin_q;
    rd_row = RW'(rpos.row);
  end

  assign ctl_start = (state_q == S_RUN);
  assign busy      = (state_q != S_IDLE);
  assign done      = (state_q == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
      a_q     <= '0;
      b_q     <= '0;
      cin_q   <= 1'b0;
      sum     <= '0;
      cout    <= 1'b0;
      steps   <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start) begin
          a_q     <= a;
          b_q     <= b;
          cin_q   <= cin;
          idx_q   <= '0;
          state_q <= S_LOAD;
        end
        S_LOAD: begin
          if (32'(idx_q) == 2 * N) begin
            idx_q   <= '0;
            steps   <= '0;
            state_q <= S_RUN;
          end else begin
            idx_q <= idx_q + 16'd1;
          end
        end
        S_RUN: state_q <= S_WAIT;      // sequencer sees start this cycle
        S_WAIT: begin
          if (op_valid) steps <= steps + 16'd1;
          if (ctl_done) begin
            idx_q   <= '0;
            state_q <= S_READ;
          end
        end
        S_READ: begin
          for (int unsigned q = 0; q < N; q++)
            if (32'(idx_q) == q) sum[q] <= rd_data[rpos.col[CW-1:0]];
          if (32'(idx_q) == N) cout <= rd_data[rpos.col[CW-1:0]];
          if (32'(idx_q) == N) state_q <= S_DONE;
          else                 idx_q   <= idx_q + 16'd1;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the sequencer is only started from S_RUN and must be idle then
  a_ctl_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               ctl_start |-> !ctl_busy)
    else $error("magic_rca: sequencer started while busy");

endmodule
