// opt_encoder: joint signed-digit encoding of a pair of weights of one RNS channel.
//
// Two weights of a step conflict when both have a non-zero digit at the same
// position. A conflict-free signed-digit pair exists exactly when the trailing
// non-zero positions differ, T(Wa) != T(Wb) (paper, Lemma (2)); then the
// conflict probability falls to 1/3 - 1/(3*4^n) (Lemma (3)). This unit builds such
// a pair with one pass from the LSB: below min(T) both digits are 0. From there on
// exactly one of the two remaining values is odd at each position; that value gets
// a digit of +1 or -1, and the sign is chosen so that the value left over is odd
// when the other weight's next bit is 0 and even when it is 1. Both are then never
// odd at the same position, so no conflict arises. Digits above position n-1 are
// worth 0 mod 2^n and are dropped. When T(Wa) = T(Wb) both weights take the CSD
// digit (2 - x mod 4) wherever they are odd, which is the canonical encoding.
// The greedy rule is this design's. For the 2^n-1 and 2^n+1 channels the paper's
// optimal encoding is not reproduced; instead each weight w has up to four digit
// forms that fit in n positions: CSD of w, minus the CSD of m-w, the bits of w and
// minus the bits of m-w (all worth w mod m). Of the 16 pairs the unit takes the
// one with the fewest shared positions, trying CSD first, so it never conflicts
// more often than independent CSD encoding. Combinational.
module opt_encoder
  import rns_pkg::*;
#(
  parameter int unsigned MOD = 32
) (
  input  res_t wa,
  input  res_t wb,
  output sd_t  da,
  output sd_t  db
);

  localparam mod_kind_e   KIND = kind_of(MOD);
  localparam int unsigned N    = ndig_of(MOD);

  if (KIND == K_POW2) begin : g_greedy
    always_comb begin
      logic [RW:0] xa, xb;
      logic        dneg;
      xa = (RW+1)'(wa);
      xb = (RW+1)'(wb);
      da   = '0;
      db   = '0;
      dneg = 1'b0;
      for (int i = 0; i < int'(N); i++) begin
        dneg = 1'b0;
        if (xa[0] && xb[0]) begin
          da.nz[i] = 1'b1;  da.neg[i] = xa[1];      // CSD digit: -1 when x mod 4 = 3
          db.nz[i] = 1'b1;  db.neg[i] = xb[1];
        end else if (xa[0]) begin
          // CSD sign leaves an even rest; flip it when b's next bit is 0
          dneg = xa[1] ^ ~xb[1];
          da.nz[i] = 1'b1;  da.neg[i] = dneg;
        end else if (xb[0]) begin
          dneg = xb[1] ^ ~xa[1];
          db.nz[i] = 1'b1;  db.neg[i] = dneg;
        end
        // x <- (x - d) / 2
        xa = da.nz[i] ? (da.neg[i] ? (xa + 1'b1) : (xa - 1'b1)) : xa;
        xb = db.nz[i] ? (db.neg[i] ? (xb + 1'b1) : (xb - 1'b1)) : xb;
        xa = {1'b0, xa[RW:1]};
        xb = {1'b0, xb[RW:1]};
      end
    end
  end else begin : g_pick
    // 2^n-1 and 2^n+1: each weight has up to four short digit forms (see header);
    // the pair with the fewest shared positions is taken, CSD first on ties.
    localparam logic [MAXD:0] LOWN = (MAXD+1)'((1 << N) - 1);

    function automatic logic [2*(MAXD+1)-1:0] naf(logic [MAXD:0] x);
      logic [MAXD+1:0] xh, x3, c, p, m;
      xh = {2'b00, x[MAXD:1]};
      x3 = {1'b0, x} + xh;
      c  = xh ^ x3;
      p  = x3 & c;
      m  = xh & c;
      return {p[MAXD:0], m[MAXD:0]};
    endfunction

    // candidate k of weight w: {valid, nz, neg}
    function automatic logic [2*MAXD:0] cand(res_t w, int k);
      logic [MAXD:0] x, p, m;
      logic          inv;
      x   = (k == 0 || k == 2) ? (MAXD+1)'(w) : (MAXD+1)'(MOD) - (MAXD+1)'(w);
      inv = (k == 1 || k == 3);
      if (k < 2) {p, m} = naf(x);
      else begin
        p = x;
        m = '0;
      end
      if (((p | m) & ~LOWN) != '0) return '0;
      return {1'b1, MAXD'(p | m), inv ? MAXD'(p) : MAXD'(m)};
    endfunction

    always_comb begin
      logic [2*MAXD:0] ca, cb;
      int              best, cost;
      da   = '0;
      db   = '0;
      best = MAXD + 1;
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 4; k++) begin
          ca   = cand(wa, i);
          cb   = cand(wb, k);
          cost = $countones(ca[2*MAXD-1:MAXD] & cb[2*MAXD-1:MAXD]);
          if (ca[2*MAXD] && cb[2*MAXD] && cost < best) begin
            best   = cost;
            da.nz  = ca[2*MAXD-1:MAXD];
            da.neg = ca[MAXD-1:0];
            db.nz  = cb[2*MAXD-1:MAXD];
            db.neg = cb[MAXD-1:0];
          end
        end
    end
  end

endmodule
