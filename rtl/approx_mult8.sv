// approx_mult8 -- 8x8 signed multiplier summing partial products with
// approximate 8-bit ripple-carry adders.
//
// Partial products follow the Baugh-Wooley form for two's complement: row i
// holds a[j] & b[i], inverted where exactly one of i, j is 7, plus a constant
// '1' at weights 2^8 and 2^15. Product bit 0 is row 0 bit 0. Seven 8-bit
// adders then run in series: stage s (1..7) adds row s to the upper eight
// bits of the previous stage result (for stage 1: row 0 shifted right, with
// the constant '1' as its top bit); its sum bit 0 is product bit s and its
// other seven bits plus the carry feed the next stage. A half adder adds the
// second constant '1' to the final carry to give bit 15.
// Approximation: parameter Y names the highest product bit that may be
// approximated (MUL<KIND>_<Y>). Stage s uses k_s = Y - s + 1 approximate LSBs
// (clipped to 0..8), so that only product bits 0..Y are affected; Y = 0 gives
// the exact multiplier. Combinational.
module approx_mult8
  import magic_pkg::*;
#(
  parameter fa_kind_t    KIND = FA_MAFA1,
  parameter int unsigned Y    = 7
) (
  input  logic signed [7:0]  a,
  input  logic signed [7:0]  b,
  output logic signed [15:0] p
);
  // approximate LSBs of stage s
  function automatic int unsigned stage_k(int unsigned s);
    int signed k;
    k = int'(Y) - int'(s) + 1;
    if (k < 0) k = 0;
    if (k > 8) k = 8;
    return (Y == 0) ? 0 : unsigned'(k);
  endfunction

  logic [7:0] pp [8];
  always_comb begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        pp[i][j] = (a[j] & b[i]) ^ ((i == 7) != (j == 7));
  end

  logic [7:0] acc [8];     // upper bits carried into stage s
  logic [7:0] ssum [8];
  logic       scout [8];

  assign acc[1] = {1'b1, pp[0][7:1]};

  for (genvar s = 1; s < 8; s++) begin : g_stage
    approx_rca #(.N(8), .K(stage_k(s)), .KIND((stage_k(s) == 0) ? FA_EXACT : KIND)) u_add (
      .a    (acc[s]),
      .b    (pp[s]),
      .cin  (1'b0),
      .sum  (ssum[s]),
      .cout (scout[s])
    );
    if (s < 7) begin : g_next
      assign acc[s+1] = {scout[s], ssum[s][7:1]};
    end
  end

  // unused entries of the stage arrays
  assign acc[0]   = '0;
  assign ssum[0]  = '0;
  assign scout[0] = 1'b0;

  always_comb begin
    p[0] = pp[0][0];
    for (int s = 1; s < 8; s++) p[s] = ssum[s][0];
    p[14:8] = ssum[7][7:1];
    p[15]   = scout[7] ^ 1'b1;     // half adder with the constant '1'
  end
endmodule
