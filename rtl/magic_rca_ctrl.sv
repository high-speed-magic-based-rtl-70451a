// magic_rca_ctrl -- step sequencer of the MAGIC ripple-carry adder.
//
// Issues, one per clock, the steps that turn the operands stored in a
// magic_xbar into sum and carry: which line gets V0, which gets ground and
// which is isolated, or which cells are initialised. The adder has N bits;
// the K least significant ones use the approximate cell KIND (MAFA-1/2/3),
// the others the exact MFA. Cell positions come from the layout functions of
// magic_pkg.
//
// Program (one step per cycle while op_valid is high):
//   INIT1, INIT2  initialise the MAGIC outputs: first the cells in rows that
//                 hold no operand, then the free cells of operand rows.
//   APX           MAFA-2/3 only, per approximate bit i (column steps in C1):
//                 N1 = NOR(A,B), N2 = NOR(Cin,B), [N3 = NOR(Cin,A),]
//                 C = NOR(N1,N2[,N3]).
//   P1            one row step C1 -> C2 for every operand row of the exact
//                 bits (~A, ~B: MFA step 1) and for the approximate sums
//                 (MAFA-1: SUM = ~B; MAFA-2/3: SUM = ~C).
//   S2            per exact bit (column step, C1 and C2): NOR(A,B) and
//                 NOR(~A,~B) = AB into the bit's N row (MFA step 2).
//   S3            one row step over all N rows: X = A xor B (MFA step 3).
//   HO            K > 0 only: copies the last approximate carry into the
//                 carry-in column of the first exact bit (NOT of its sum).
//   MFA           per exact bit, six steps (MFA steps 4..9): ~Cin and ~X;
//                 NOR(X,Cin) and X&Cin; SUM; AB; ~Cout; Cout into the next
//                 bit's carry-in cell.
// Step count: 7(N-K) + s*K + 5 for 0 < K < N (s = 0, 3, 4), 7N + 4 for K = 0.
//
// Interface: pulse start while idle; busy is high until done pulses for one
// cycle after the last step. The sequencer follows the step tables of the
// description, cross-checked against its array drawings; the two-group initialisation, the
// order of the bit-serial steps and the handover step are this design's own.
module magic_rca_ctrl
  import magic_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 3,
  parameter fa_kind_t    KIND = FA_MAFA1,
  parameter int unsigned ROWS = rca_rows(KIND, N, (KIND == FA_EXACT) ? 0 : K)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // step port towards magic_xbar
  output logic                         op_valid,
  output xop_t                         op_kind,
  output line_drv_t [ROWS-1:0]         row_drv,
  output line_drv_t [XB_COLS-1:0]      col_drv,
  output logic [ROWS-1:0][XB_COLS-1:0] init_mask
);

  localparam int unsigned KA = (KIND == FA_EXACT) ? 0 : K;   // approximate bits
  localparam int unsigned NM = N - KA;                        // exact MFA bits
  localparam int unsigned SA = apx_steps_per_bit(KIND);       // steps per approx bit

  typedef logic [ROWS-1:0][XB_COLS-1:0] mask_t;

  // every cell that some MAGIC step of the program writes
  function automatic mask_t work_cells();
    mask_t m;
    m = '0;
    for (int unsigned i = 0; i < KA; i++) begin
      if (KIND == FA_MAFA1) begin
        m[apx_row_carry(KIND, i)][1] = 1'b1;
      end else begin
        m[apx_row_n1(KIND, i)][0]     = 1'b1;
        m[apx_row_n1(KIND, i) + 1][0] = 1'b1;
        if (KIND == FA_MAFA3) m[apx_row_n1(KIND, i) + 2][0] = 1'b1;
        m[apx_row_carry(KIND, i)][0]  = 1'b1;
        m[apx_row_carry(KIND, i)][1]  = 1'b1;
      end
    end
    for (int unsigned j = 0; j < NM; j++) begin
      int unsigned b;
      b = mfa_base(KIND, KA, j);
      m[b][1]     = 1'b1;                       // ~A
      m[b + 1][1] = 1'b1;                       // ~B
      for (int unsigned c = 0; c < 4; c++) m[b + 2][c] = 1'b1;   // NOR, AB, X, ~X
      if (NM >= 2) m[b + 2][4] = 1'b1;          // X in the alternate column
      for (int unsigned c = 0; c < XB_COLS; c++) m[b + 3][c] = 1'b1;
      m[mfa_row_cin(KIND, KA, j)][3] = 1'b1;    // ~Cin
      m[mfa_row_cout(KIND, N, KA, j)][mfa_col_cout(j)] = 1'b1;   // Cout
      if (j == 0 && KA > 0) m[mfa_row_cin(KIND, KA, 0)][2] = 1'b1; // handed-over carry
    end
    return m;
  endfunction

  // rows that hold operands
  function automatic logic [ROWS-1:0] operand_rows();
    logic [ROWS-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < KA; i++) begin
      r[apx_row_a(KIND, i)]     = 1'b1;
      r[apx_row_a(KIND, i) + 1] = 1'b1;
    end
    if (KA > 0) r[2] = 1'b1;
    for (int unsigned j = 0; j < NM; j++) begin
      r[mfa_base(KIND, KA, j)]     = 1'b1;
      r[mfa_base(KIND, KA, j) + 1] = 1'b1;
    end
    return r;
  endfunction

  function automatic mask_t row_mask(logic [ROWS-1:0] r);
    mask_t m;
    for (int unsigned i = 0; i < ROWS; i++) m[i] = {XB_COLS{r[i]}};
    return m;
  endfunction

  localparam mask_t WORK   = work_cells();
  localparam mask_t OPROWS = row_mask(operand_rows());

  typedef enum logic [3:0] {
    PH_IDLE, PH_INIT, PH_APX, PH_P1, PH_S2, PH_S3, PH_HO, PH_MFA, PH_DONE
  } phase_t;

  phase_t phase_q;
  logic [15:0] bit_q;   // bit index inside APX, S2 and MFA
  logic [2:0]  sub_q;   // step index inside one bit (or INIT1/INIT2)

  // ------------------------------------------------------------------
  // phase sequencing
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      bit_q   <= '0;
      sub_q   <= '0;
    end else begin
      case (phase_q)
        PH_IDLE: if (start) begin
          phase_q <= PH_INIT;
          sub_q   <= '0;
        end
        PH_INIT: begin
          if (sub_q == 3'd1) begin
            sub_q <= '0;
            bit_q <= '0;
            phase_q <= (KA > 0 && SA > 0) ? PH_APX : PH_P1;
          end else begin
            sub_q <= sub_q + 3'd1;
          end
        end
        PH_APX: begin
          if (32'(sub_q) == SA - 1) begin
            sub_q <= '0;
            if (32'(bit_q) == KA - 1) begin
              bit_q   <= '0;
              phase_q <= PH_P1;
            end else begin
              bit_q <= bit_q + 16'd1;
            end
          end else begin
            sub_q <= sub_q + 3'd1;
          end
        end
        PH_P1: begin
          bit_q   <= '0;
          phase_q <= (NM > 0) ? PH_S2 : PH_DONE;
        end
        PH_S2: begin
          if (32'(bit_q) == NM - 1) begin
            bit_q   <= '0;
            phase_q <= PH_S3;
          end else begin
            bit_q <= bit_q + 16'd1;
          end
        end
        PH_S3: begin
          sub_q   <= '0;
          phase_q <= (KA > 0) ? PH_HO : PH_MFA;
        end
        PH_HO: phase_q <= PH_MFA;
        PH_MFA: begin
          if (sub_q == 3'd5) begin
            sub_q <= '0;
            if (32'(bit_q) == NM - 1) begin
              bit_q   <= '0;
              phase_q <= PH_DONE;
            end else begin
              bit_q <= bit_q + 16'd1;
            end
          end else begin
            sub_q <= sub_q + 3'd1;
          end
        end
        PH_DONE: phase_q <= PH_IDLE;
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  assign busy = (phase_q != PH_IDLE);
  assign done = (phase_q == PH_DONE);

  // ------------------------------------------------------------------
  // step generation
  // ------------------------------------------------------------------
  // helpers set the line levels of the step being built
  line_drv_t [ROWS-1:0]    rd;
  line_drv_t [XB_COLS-1:0] cd;

  always_comb begin
    int unsigned i, b, cc, oc, cr;
    op_valid  = 1'b0;
    op_kind   = XOP_NOP;
    init_mask = '0;
    rd        = {ROWS{LD_FLOAT}};
    cd        = {XB_COLS{LD_FLOAT}};
    i  = 32'(bit_q);
    b  = mfa_base(KIND, KA, i);
    cc = mfa_col_cin(i);
    oc = mfa_col_cout(i);
    cr = mfa_row_cin(KIND, KA, i);

    case (phase_q)
      PH_INIT: begin
        op_valid  = 1'b1;
        op_kind   = XOP_INIT;
        init_mask = (sub_q == 3'd0) ? (WORK & ~OPROWS) : (WORK & OPROWS);
      end

      // approximate bits: column steps in C1, C2 isolated
      PH_APX: begin
        op_valid = 1'b1;
        op_kind  = XOP_MAGIC;
        cd       = {XB_COLS{LD_ISO}};
        cd[0]    = LD_FLOAT;
        case (sub_q)
          3'd0: begin                          // N1 = NOR(A, B)
            rd[apx_row_n1(KIND, i)]    = LD_V0;
            rd[apx_row_a(KIND, i)]     = LD_GND;
            rd[apx_row_a(KIND, i) + 1] = LD_GND;
          end
          3'd1: begin                          // N2 = NOR(Cin, B)
            rd[apx_row_n1(KIND, i) + 1] = LD_V0;
            rd[apx_row_cin(KIND, i)]    = LD_GND;
            rd[apx_row_a(KIND, i) + 1]  = LD_GND;
          end
          3'd2: begin
            if (KIND == FA_MAFA3) begin        // N3 = NOR(Cin, A)
              rd[apx_row_n1(KIND, i) + 2] = LD_V0;
              rd[apx_row_cin(KIND, i)]    = LD_GND;
              rd[apx_row_a(KIND, i)]      = LD_GND;
            end else begin                     // C = NOR(N1, N2)
              rd[apx_row_carry(KIND, i)]  = LD_V0;
              rd[apx_row_n1(KIND, i)]     = LD_GND;
              rd[apx_row_n1(KIND, i) + 1] = LD_GND;
            end
          end
          default: begin                       // C = NOR(N1, N2, N3)
            rd[apx_row_carry(KIND, i)]  = LD_V0;
            rd[apx_row_n1(KIND, i)]     = LD_GND;
            rd[apx_row_n1(KIND, i) + 1] = LD_GND;
            rd[apx_row_n1(KIND, i) + 2] = LD_GND;
          end
        endcase
      end

      // NOT C1 -> C2 on every operand row of the exact bits and on the
      // rows holding the approximate sums
      PH_P1: begin
        op_valid = 1'b1;
        op_kind  = XOP_MAGIC;
        rd       = {ROWS{LD_ISO}};
        cd[0]    = LD_V0;
        cd[1]    = LD_GND;
        for (int unsigned q = 0; q < KA; q++) rd[apx_row_carry(KIND, q)] = LD_FLOAT;
        for (int unsigned q = 0; q < NM; q++) begin
          rd[mfa_base(KIND, KA, q)]     = LD_FLOAT;
          rd[mfa_base(KIND, KA, q) + 1] = LD_FLOAT;
        end
      end

      // MFA step 2 for bit i: NOR(A,B) -> N[0], NOR(~A,~B) -> N[1]
      PH_S2: begin
        op_valid  = 1'b1;
        op_kind   = XOP_MAGIC;
        cd        = {XB_COLS{LD_ISO}};
        cd[0]     = LD_FLOAT;
        cd[1]     = LD_FLOAT;
        rd[b + 2] = LD_V0;
        rd[b]     = LD_GND;
        rd[b + 1] = LD_GND;
      end

      // MFA step 3 for all bits: X = NOR(N[0], N[1]) -> N[2] (and N[4])
      PH_S3: begin
        op_valid = 1'b1;
        op_kind  = XOP_MAGIC;
        rd       = {ROWS{LD_ISO}};
        cd[0]    = LD_V0;
        cd[1]    = LD_V0;
        cd[2]    = LD_GND;
        if (NM >= 2) cd[4] = LD_GND;
        for (int unsigned q = 0; q < NM; q++) rd[mfa_base(KIND, KA, q) + 2] = LD_FLOAT;
      end

      // carry handover: C2 -> C3 on the last approximate carry row
      PH_HO: begin
        op_valid = 1'b1;
        op_kind  = XOP_MAGIC;
        rd       = {ROWS{LD_ISO}};
        rd[mfa_row_cin(KIND, KA, 0)] = LD_FLOAT;
        cd[1]    = LD_V0;
        cd[2]    = LD_GND;
      end

      // MFA steps 4..9 of bit i
      PH_MFA: begin
        op_valid = 1'b1;
        op_kind  = XOP_MAGIC;
        case (sub_q)
          3'd0: begin                          // step 4: ~Cin, ~X
            rd        = {ROWS{LD_ISO}};
            rd[cr]    = LD_FLOAT;
            rd[b + 2] = LD_FLOAT;
            cd[cc]    = LD_V0;
            cd[3]     = LD_GND;
          end
          3'd1: begin                          // step 5: NOR(X,Cin), X&Cin
            cd        = {XB_COLS{LD_ISO}};
            cd[cc]    = LD_FLOAT;
            cd[3]     = LD_FLOAT;
            rd[b + 3] = LD_V0;
            rd[cr]    = LD_GND;
            rd[b + 2] = LD_GND;
          end
          3'd2: begin                          // step 6: SUM
            rd        = {ROWS{LD_ISO}};
            rd[b + 3] = LD_FLOAT;
            cd[cc]    = LD_V0;
            cd[3]     = LD_V0;
            cd[0]     = LD_GND;
          end
          3'd3: begin                          // step 7: AB into the S row
            cd        = {XB_COLS{LD_ISO}};
            cd[1]     = LD_FLOAT;
            rd[b + 3] = LD_V0;
            rd[b]     = LD_GND;
            rd[b + 1] = LD_GND;
          end
          3'd4: begin                          // step 8: ~Cout
            rd        = {ROWS{LD_ISO}};
            rd[b + 3] = LD_FLOAT;
            cd[1]     = LD_V0;
            cd[3]     = LD_V0;
            cd[oc]    = LD_GND;
          end
          default: begin                       // step 9: Cout
            cd        = {XB_COLS{LD_ISO}};
            cd[oc]    = LD_FLOAT;
            rd[mfa_row_cout(KIND, N, KA, i)] = LD_V0;
            rd[b + 3] = LD_GND;
          end
        endcase
      end

      default: ;
    endcase
  end

  assign row_drv = rd;
  assign col_drv = cd;

  // parameter sanity
  initial begin
    if (K > N) $error("magic_rca_ctrl: K must not exceed N");
    if (N == 0) $error("magic_rca_ctrl: N must be at least 1");
  end

endmodule
