// approx_fa -- one full-adder cell, exact or approximate, as plain logic.
//
// Gives the Boolean behaviour of the four in-memory cells, written with the
// NOR/NOT structure they are computed with in the crossbar:
//   FA_EXACT (MFA): X = NOR(NOR(a,b), NOR(~a,~b)) = a^b,
//                   sum  = NOR(NOR(X,c), NOR(~X,~c)),
//                   cout = NOT NOR(NOR(~a,~b), NOR(~X,~c)) = ab + Xc.
//   FA_MAFA1      : sum = ~b, cout = b               (total error distance 4)
//   FA_MAFA2      : cout = NOR(NOR(a,b), NOR(c,b)), sum = ~cout   (ED 3)
//   FA_MAFA3      : cout = NOR(NOR(a,b), NOR(c,b), NOR(c,a)), sum = ~cout (ED 2)
// The kind is an input so that one cell can be switched at run time; tie it
// to a constant for a fixed adder. Purely combinational.
module approx_fa
  import magic_pkg::*;
(
  input  fa_kind_t kind,
  input  logic     a,
  input  logic     b,
  input  logic     c,
  output logic     sum,
  output logic     cout
);
  logic nab, anb, x, nxc, xc, n_cb, n_ca;

  always_comb begin
    // shared NOR terms
    nab  = ~(a | b);          // NOR(a,b)
    anb  = ~(~a | ~b);        // NOR(~a,~b) = ab
    x    = ~(nab | anb);      // a ^ b
    nxc  = ~(x | c);          // NOR(X,c)
    xc   = ~(~x | ~c);        // NOR(~X,~c) = Xc
    n_cb = ~(c | b);          // NOR(c,b)
    n_ca = ~(c | a);          // NOR(c,a)
    case (kind)
      FA_MAFA1: begin
        sum  = ~b;
        cout = b;
      end
      FA_MAFA2: begin
        cout = ~(nab | n_cb);
        sum  = ~cout;
      end
      FA_MAFA3: begin
        cout = ~(nab | n_cb | n_ca);
        sum  = ~cout;
      end
      default: begin
        sum  = ~(nxc | xc);
        cout = ~(~(anb | xc));
      end
    endcase
  end
endmodule
