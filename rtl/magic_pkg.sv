// magic_pkg -- shared types for the MAGIC in-memory adders.
//
// A memristive crossbar computes with stateful MAGIC NOR/NOT operations. One
// step drives every row line and every column line of the array with one of
// four levels: left floating (the line takes part in the operation), the
// operating voltage V0, ground, or an isolation voltage (V_IR on rows, V_IC on
// columns) that keeps the cells on that line out of the operation.
//
// The full-adder cells come in four flavours: the exact MFA and the three
// approximate cells MAFA-1, MAFA-2 and MAFA-3. Their Boolean functions are
// given here as functions so that RTL and testbenches can share them:
//   MFA   : sum = a^b^c,         cout = majority(a,b,c)
//   MAFA-1: sum = ~b,            cout = b
//   MAFA-2: cout = b | (a & c),  sum = ~cout
//   MAFA-3: cout = majority,     sum = ~cout
// The step-count constant per approximate bit (0, 3, 4) is that of Eq. 5 of
// the design description: steps(n,k) = 7(n-k) + s*k + 5.
package magic_pkg;

  // Level applied to one row or column line during a step.
  typedef enum logic [1:0] {
    LD_FLOAT = 2'd0,  // line takes part, no voltage source of its own
    LD_V0    = 2'd1,  // operating voltage V0
    LD_GND   = 2'd2,  // ground
    LD_ISO   = 2'd3   // isolation voltage: line excluded from the step
  } line_drv_t;

  // Kind of crossbar step.
  typedef enum logic [1:0] {
    XOP_NOP   = 2'd0,
    XOP_INIT  = 2'd1,  // SET the masked cells to logic '1'
    XOP_MAGIC = 2'd2   // one MAGIC NOR/NOT evaluation
  } xop_t;

  // Full-adder cell flavour.
  typedef enum logic [1:0] {
    FA_EXACT = 2'd0,
    FA_MAFA1 = 2'd1,
    FA_MAFA2 = 2'd2,
    FA_MAFA3 = 2'd3
  } fa_kind_t;

  // Crossbar columns used by the adder layouts (C1..C5 of the figures are
  // columns 0..4 here).
  localparam int unsigned XB_COLS = 5;

  // A cell position in the crossbar.
  typedef struct packed {
    logic [15:0] row;
    logic [3:0]  col;
  } cell_pos_t;

  // Extra MAGIC steps per approximate bit (Eq. 5, s_i).
  function automatic int unsigned apx_steps_per_bit(fa_kind_t kind);
    case (kind)
      FA_MAFA2: return 3;
      FA_MAFA3: return 4;
      default:  return 0;
    endcase
  endfunction

  // Number of crossbar rows taken by k approximate bits (Fig. 4, 5, 6).
  function automatic int unsigned apx_rows(fa_kind_t kind, int unsigned k);
    if (k == 0) return 0;
    case (kind)
      FA_MAFA1: return 2 * k + 1;
      FA_MAFA2: return 5 * k + 1;
      FA_MAFA3: return 6 * k + 1;
      default:  return 0;
    endcase
  endfunction

  // Rows of a whole n-bit adder with k approximate LSBs: the approximate
  // region on top, then four rows per exact MFA bit.
  function automatic int unsigned rca_rows(fa_kind_t kind, int unsigned n, int unsigned k);
    return apx_rows(kind, k) + 4 * (n - k);
  endfunction

  // ---------------------------------------------------------------------
  // Crossbar layout of an n-bit adder whose k LSBs are approximate cells.
  // Rows are numbered from 0 at the top, columns 0..4.
  //
  // Approximate region (rows 0 .. apx_rows-1), bit i:
  //   MAFA-1: A0 row 0, B0 row 1, Cin row 2; A_i row 2i+1, B_i row 2i+2.
  //           SUM_i = ~B_i at (B_i, 1); the carry out is B_i itself.
  //   MAFA-2/3 (P = 5 or 6 rows per bit): A0 0, B0 1, Cin 2, then the NOR
  //           rows, then the carry row C_i = P(i+1); for i >= 1 A_i is row
  //           P*i+1. SUM_i = ~C_i at (C_i, 1).
  // Exact region: four rows per MFA bit j (bit k+j): A, B, N (NOR row), S.
  // ---------------------------------------------------------------------
  function automatic int unsigned apx_pitch(fa_kind_t kind);
    case (kind)
      FA_MAFA2: return 5;
      FA_MAFA3: return 6;
      default:  return 2;
    endcase
  endfunction

  function automatic int unsigned apx_row_a(fa_kind_t kind, int unsigned i);
    return (i == 0) ? 0 : apx_pitch(kind) * i + 1;
  endfunction

  // first NOR row of a MAFA-2/3 bit (N1); N2 and N3 follow it
  function automatic int unsigned apx_row_n1(fa_kind_t kind, int unsigned i);
    return (i == 0) ? 3 : apx_row_a(kind, i) + 2;
  endfunction

  // row holding the carry out of approximate bit i (column 0)
  function automatic int unsigned apx_row_carry(fa_kind_t kind, int unsigned i);
    return (kind == FA_MAFA1) ? apx_row_a(kind, i) + 1 : apx_pitch(kind) * (i + 1);
  endfunction

  // row holding the carry into approximate bit i (column 0)
  function automatic int unsigned apx_row_cin(fa_kind_t kind, int unsigned i);
    return (i == 0) ? 2 : apx_row_carry(kind, i - 1);
  endfunction

  // first row of MFA bit j
  function automatic int unsigned mfa_base(fa_kind_t kind, int unsigned k, int unsigned j);
    return apx_rows(kind, k) + 4 * j;
  endfunction

  // row holding the carry into MFA bit j: the external Cin (k = 0, j = 0,
  // Fig. 3 M1,3), the carry row of the last approximate bit (k > 0, j = 0,
  // Fig. 7 row R7), or the bit's own A row (j > 0, Table II).
  function automatic int unsigned mfa_row_cin(fa_kind_t kind, int unsigned k, int unsigned j);
    if (j == 0 && k > 0) return apx_row_carry(kind, k - 1);
    return mfa_base(kind, k, j);
  endfunction

  // column of the carry-in (and of X) of MFA bit j: the layout alternates
  function automatic int unsigned mfa_col_cin(int unsigned j);
    return (j % 2 == 0) ? 2 : 4;
  endfunction

  // column that receives ~Cout and Cout of MFA bit j
  function automatic int unsigned mfa_col_cout(int unsigned j);
    return (j % 2 == 0) ? 4 : 2;
  endfunction

  // row that receives Cout of MFA bit j
  function automatic int unsigned mfa_row_cout(fa_kind_t kind, int unsigned n,
                                               int unsigned k, int unsigned j);
    if (j + 1 < n - k) return mfa_base(kind, k, j + 1);     // next bit's A row
    if (n - k == 1)    return mfa_base(kind, k, j) + 2;     // single MFA: N row (Fig. 3 M3,5)
    return mfa_base(kind, k, j) + 1;                        // last bit: its B row
  endfunction

  // where operand bit i of A / B is stored
  function automatic cell_pos_t pos_a(fa_kind_t kind, int unsigned k, int unsigned i);
    cell_pos_t p;
    p.row = 16'((i < k) ? apx_row_a(kind, i) : mfa_base(kind, k, i - k));
    p.col = 4'd0;
    return p;
  endfunction

  function automatic cell_pos_t pos_b(fa_kind_t kind, int unsigned k, int unsigned i);
    cell_pos_t p;
    p.row = 16'((i < k) ? apx_row_a(kind, i) + 1 : mfa_base(kind, k, i - k) + 1);
    p.col = 4'd0;
    return p;
  endfunction

  // where the external carry-in is stored
  function automatic cell_pos_t pos_cin(fa_kind_t kind, int unsigned k);
    cell_pos_t p;
    p.row = 16'((k > 0) ? 2 : mfa_base(kind, k, 0));
    p.col = 4'((k > 0) ? 0 : 2);
    return p;
  endfunction

  // where sum bit i ends up
  function automatic cell_pos_t pos_sum(fa_kind_t kind, int unsigned k, int unsigned i);
    cell_pos_t p;
    if (i < k) begin
      p.row = 16'(apx_row_carry(kind, i));
      p.col = 4'd1;
    end else begin
      p.row = 16'(mfa_base(kind, k, i - k) + 3);
      p.col = 4'd0;
    end
    return p;
  endfunction

  // where the final carry-out ends up
  function automatic cell_pos_t pos_cout(fa_kind_t kind, int unsigned n, int unsigned k);
    cell_pos_t p;
    if (n > k) begin
      p.row = 16'(mfa_row_cout(kind, n, k, n - k - 1));
      p.col = 4'(mfa_col_cout(n - k - 1));
    end else begin
      p.row = 16'(apx_row_carry(kind, k - 1));
      p.col = 4'd0;
    end
    return p;
  endfunction

  // Boolean sum/carry of one cell (Table III of the description).
  function automatic logic [1:0] fa_eval(fa_kind_t kind, logic a, logic b, logic c);
    logic s, co;
    case (kind)
      FA_MAFA1: begin co = b;                          s = ~b;  end
      FA_MAFA2: begin co = b | (a & c);                s = ~co; end
      FA_MAFA3: begin co = (a & b) | (b & c) | (a & c); s = ~co; end
      default:  begin co = (a & b) | (b & c) | (a & c); s = a ^ b ^ c; end
    endcase
    return {co, s};
  endfunction

endpackage
