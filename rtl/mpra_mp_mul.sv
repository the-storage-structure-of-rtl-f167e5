// Multi-precision multiplier of one PE tap.
//
// A 16x16 signed multiplier split into four 9x9 signed partial-product
// multipliers (high/low bytes of data and weight). The low bytes are
// zero-extended when they are the lower half of a 16-bit number and
// sign-extended when they are an 8-bit number of their own, so the same four
// multipliers give:
//   PREC_16X16 : lane0 = a * b                       (one product)
//   PREC_16X8  : lane0 = a * b[15:8], lane1 = a * b[7:0]  (two products)
//   PREC_8X8   : lane0 = aH*bH, lane1 = aH*bL, lane2 = aL*bH, lane3 = aL*bL
// Unused lanes are zero. Purely combinational. The document gives the
// 9 / 18 / 36 MAC counts per PE; splitting one 16x16 multiplier into four
// byte multipliers is this design's way of reaching them.
module mpra_mp_mul
  import mpra_pkg::*;
(
  input  prec_e        prec,
  input  logic [15:0]  a,      // data
  input  logic [15:0]  b,      // weight
  output lanes_t       p
);
  logic signed [8:0]  ah, al, bh, bl;
  logic signed [17:0] hh, hl, lh, ll;
  logic               low_signed_a, low_signed_b;

  always_comb begin
    low_signed_a = (prec == PREC_8X8);
    low_signed_b = (prec != PREC_16X16);
    ah = {a[15], a[15:8]};
    bh = {b[15], b[15:8]};
    al = {low_signed_a & a[7], a[7:0]};
    bl = {low_signed_b & b[7], b[7:0]};
    hh = ah * bh;
    hl = ah * bl;
    lh = al * bh;
    ll = al * bl;
    p  = '0;
    case (prec)
      PREC_16X16: begin
        p[0] = 32'(signed'(hh)) * 32'sd65536
             + 32'(signed'(hl)) * 32'sd256
             + 32'(signed'(lh)) * 32'sd256
             + 32'(signed'(ll));
      end
      PREC_16X8: begin
        p[0] = 32'(signed'(hh)) * 32'sd256 + 32'(signed'(lh));
        p[1] = 32'(signed'(hl)) * 32'sd256 + 32'(signed'(ll));
      end
      default: begin
        p[0] = 32'(signed'(hh));
        p[1] = 32'(signed'(hl));
        p[2] = 32'(signed'(lh));
        p[3] = 32'(signed'(ll));
      end
    endcase
  end
endmodule
