// magic_imc_top -- the in-memory adder and the approximate multiplier.
//
// Two parts of the design side by side, each with its own ports:
//   u_add  magic_rca: an N-bit adder computed inside a memristive crossbar
//          with MAGIC NOR/NOT steps; the K low bits use approximate cell
//          ADD_KIND. Default: 8 bits, three MAFA-1 bits ("Outline 1"),
//          40 crossbar steps per addition. Start/busy/done handshake, see
//          magic_rca.
//   u_mul  approx_mult8: an 8x8 signed multiplier whose seven partial-
//          product adders use approximate cell MUL_KIND so that product bits
//          0..MUL_Y are approximated. Default MUL1_7 (MAFA-1, Y = 7).
//          Combinational.
// The choice of these two defaults as the design's main configuration is
// this design's own; the description evaluates all outlines and multipliers.
module magic_imc_top
  import magic_pkg::*;
#(
  parameter int unsigned ADD_N    = 8,
  parameter int unsigned ADD_K    = 3,
  parameter fa_kind_t    ADD_KIND = FA_MAFA1,
  parameter fa_kind_t    MUL_KIND = FA_MAFA1,
  parameter int unsigned MUL_Y    = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // in-memory adder
  input  logic                 add_start,
  input  logic [ADD_N-1:0]     add_a,
  input  logic [ADD_N-1:0]     add_b,
  input  logic                 add_cin,
  output logic                 add_busy,
  output logic                 add_done,
  output logic [ADD_N-1:0]     add_sum,
  output logic                 add_cout,
  output logic [15:0]          add_steps,
  // approximate multiplier
  input  logic signed [7:0]    mul_a,
  input  logic signed [7:0]    mul_b,
  output logic signed [15:0]   mul_p
);

  magic_rca #(.N(ADD_N), .K(ADD_K), .KIND(ADD_KIND)) u_add (
    .clk, .rst_n,
    .start (add_start),
    .a     (add_a),
    .b     (add_b),
    .cin   (add_cin),
    .busy  (add_busy),
    .done  (add_done),
    .sum   (add_sum),
    .cout  (add_cout),
    .steps (add_steps)
  );

  approx_mult8 #(.KIND(MUL_KIND), .Y(MUL_Y)) u_mul (
    .a (mul_a),
    .b (mul_b),
    .p (mul_p)
  );

endmodule
