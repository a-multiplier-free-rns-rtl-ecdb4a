// tb_opt_encoder: exhaustive check of the joint pair encoder. For every pair of
// weights of the mod-32 channel it checks that both digit vectors are worth their
// weight mod 32 and that no position is used by both whenever the trailing non-zero
// bits of the two weights differ; it also measures the conflict probability over all
// pairs, which must equal 1/3 - 1/(3*4^5) (341/1024 of the pairs). For the mod-31
// and mod-33 channels it checks the values, that no pair conflicts on more positions
// than with independent CSD, and that fewer pairs conflict than with CSD.
module tb_opt_encoder;
  import rns_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  res_t wa, wb;
  sd_t  da32, db32, da31, db31, da33, db33;
  sd_t  ca31, cb31, ca33, cb33;

  opt_encoder #(.MOD(32)) u_32 (.wa, .wb, .da(da32), .db(db32));
  opt_encoder #(.MOD(31)) u_31 (.wa, .wb, .da(da31), .db(db31));
  opt_encoder #(.MOD(33)) u_33 (.wa, .wb, .da(da33), .db(db33));
  // independent CSD encoding, the bound the pair encoder must meet
  sd_encoder #(.MOD(31), .ENC(ENC_CSD)) u_c31a (.w(wa), .d(ca31));
  sd_encoder #(.MOD(31), .ENC(ENC_CSD)) u_c31b (.w(wb), .d(cb31));
  sd_encoder #(.MOD(33), .ENC(ENC_CSD)) u_c33a (.w(wa), .d(ca33));
  sd_encoder #(.MOD(33), .ENC(ENC_CSD)) u_c33b (.w(wb), .d(cb33));

  function automatic int sd_value(sd_t d);
    int v;
    v = 0;
    for (int j = 0; j < MAXD; j++)
      if (d.nz[j]) v += d.neg[j] ? -(1 << j) : (1 << j);
    return v;
  endfunction

  function automatic int modp(int v, int m);
    int r;
    r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic int trail(int v);
    for (int j = 0; j < 8; j++) if (v[j]) return j;
    return -1;
  endfunction

  int conflicts = 0;
  int conf31 = 0, csd31 = 0, conf33 = 0, csd33 = 0;

  initial begin
    for (int a = 0; a < 33; a++)
      for (int b = 0; b < 33; b++) begin
        wa = RW'(a);
        wb = RW'(b);
        #1;
        if (a < 32 && b < 32) begin
        checks++;
        if (modp(sd_value(da32), 32) != a || modp(sd_value(db32), 32) != b) begin
          failures++;
          $display("FAIL mod32 value a=%0d b=%0d", a, b);
        end
        if ((da32.nz & db32.nz) != 0) conflicts++;
        end
        if (a < 32 && b < 32 && a != 0 && b != 0 && trail(a) != trail(b)) begin
          checks++;
          if ((da32.nz & db32.nz) != 0) begin
            failures++;
            $display("FAIL conflict for a=%0d b=%0d: %b %b", a, b, da32.nz, db32.nz);
          end
        end
        if (a < 31 && b < 31) begin
          checks++;
          if (modp(sd_value(da31), 31) != a || modp(sd_value(db31), 31) != b) begin
            failures++;
            $display("FAIL mod31 value a=%0d b=%0d", a, b);
          end
          checks++;
          if ($countones(da31.nz & db31.nz) > $countones(ca31.nz & cb31.nz)) begin
            failures++;
            $display("FAIL mod31 more conflicts than CSD a=%0d b=%0d", a, b);
          end
          if ((da31.nz & db31.nz) != 0) conf31++;
          if ((ca31.nz & cb31.nz) != 0) csd31++;
        end
        checks++;
        if (modp(sd_value(da33), 33) != a || modp(sd_value(db33), 33) != b ||
            (da33.nz | db33.nz) >> 5 != 0) begin
          failures++;
          $display("FAIL mod33 value a=%0d b=%0d", a, b);
        end
        checks++;
        if ($countones(da33.nz & db33.nz) > $countones(ca33.nz & cb33.nz)) begin
          failures++;
          $display("FAIL mod33 more conflicts than CSD a=%0d b=%0d", a, b);
        end
        if ((da33.nz & db33.nz) != 0) conf33++;
        if ((ca33.nz & cb33.nz) != 0) csd33++;
      end
    checks++;
    if (conflicts != 341) begin
      failures++;
      $display("FAIL conflict count %0d, expected 341 of 1024", conflicts);
    end
    $display("conflict probability %0d/1024", conflicts);
    $display("mod 31: pairs with a conflict %0d/961 (independent CSD %0d)", conf31, csd31);
    $display("mod 33: pairs with a conflict %0d/1089 (independent CSD %0d)", conf33, csd33);
    checks++;
    if (conf31 >= csd31 || conf33 >= csd33) begin
      failures++;
      $display("FAIL pair encoding does not lower the conflict rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
