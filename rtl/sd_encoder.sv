// sd_encoder: recodes one weight residue of one RNS channel into signed digits.
//
// A channel of modulus m = 2^n, 2^n-1 or 2^n+1 has n digit positions. In binary mode
// the digits are the bits of the residue. In CSD mode the residue is written in
// canonical signed digits (non-adjacent form), which lowers the chance that both
// weights of a pair need the same position's adder. The paper asks for CSD and
// notes the cost is XOR gates for subtraction; how the wrap-around of the top digit
// is handled is this design's choice:
//   - m = 2^n:   a digit at position n is worth 2^n = 0 and is dropped;
//   - m = 2^n-1: if the CSD of w needs position n, w is coded as -(CSD of m-w)
//                (w - m = w mod m), whose CSD never needs position n;
//   - m = 2^n+1: the same rule with m-w; in binary mode the residue 2^n is coded
//                as a single -1 at position 0 (2^n = -1 mod 2^n+1).
// Purely combinational: w in, digits out in the same cycle.
module sd_encoder
  import rns_pkg::*;
#(
  parameter int unsigned MOD = 31,
  parameter enc_e        ENC = ENC_CSD
) (
  input  res_t w,      // weight residue, w < MOD
  output sd_t  d       // signed digits, positions n..MAXD-1 are zero
);

  localparam mod_kind_e KIND = kind_of(MOD);
  localparam int unsigned N  = ndig_of(MOD);
  localparam logic [MAXD:0] LOWN = (MAXD+1)'((1 << N) - 1);   // positions 0..n-1

  // non-adjacent form of x on N+1 digit positions: pos - neg = x
  function automatic logic [2*(MAXD+1)-1:0] naf(logic [MAXD:0] x);
    logic [MAXD+1:0] xh, x3, c, p, m;
    xh = {2'b00, x[MAXD:1]};
    x3 = {1'b0, x} + xh;
    c  = xh ^ x3;
    p  = x3 & c;
    m  = xh & c;
    return {p[MAXD:0], m[MAXD:0]};
  endfunction

  logic [MAXD:0] pos_w, neg_w, pos_c, neg_c;
  logic [MAXD:0] wx, cx;

  always_comb begin
    wx = (MAXD+1)'(w);
    cx = (MAXD+1)'(MOD) - wx;
    {pos_w, neg_w} = naf(wx);
    {pos_c, neg_c} = naf(cx);
    d = '0;
    if (ENC == ENC_BIN) begin
      if (KIND == K_PLUS && wx[N]) begin
        d.nz[0]  = 1'b1;               // 2^n = -1 mod 2^n+1
        d.neg[0] = 1'b1;
      end else begin
        d.nz = MAXD'(wx & LOWN);
      end
    end else begin
      if (KIND == K_POW2 || !(pos_w[N] || neg_w[N])) begin
        d.nz  = MAXD'((pos_w | neg_w) & LOWN);
        d.neg = MAXD'(neg_w & LOWN);
      end else begin
        // w = -(m - w) mod m: negate the CSD of the complement
        d.nz  = MAXD'(pos_c | neg_c);
        d.neg = MAXD'(pos_c);
      end
    end
  end

  initial begin
    assert (N <= MAXD) else $error("sd_encoder: modulus %0d needs more than MAXD digits", MOD);
  end

endmodule
