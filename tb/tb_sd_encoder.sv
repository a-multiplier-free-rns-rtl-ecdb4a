// tb_sd_encoder: exhaustive check of the single-weight encoder on every channel of
// the full base, in binary and in CSD mode. For every residue w < m it checks that
// the digits are worth w mod m, use only positions below n, and (CSD) that no two
// non-zero digits are adjacent and no more digits are used than binary needs plus one.
module tb_sd_encoder;
  import rns_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  res_t w;
  sd_t  db [NCH];
  sd_t  dc [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_c
    sd_encoder #(.MOD(MODS[c]), .ENC(ENC_BIN)) u_b (.w(w), .d(db[c]));
    sd_encoder #(.MOD(MODS[c]), .ENC(ENC_CSD)) u_c (.w(w), .d(dc[c]));
  end

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

  task automatic check_one(int c, sd_t d, bit csd);
    int m, n;
    m = int'(MODS[c]);
    n = int'(NDIG[c]);
    checks++;
    if (modp(sd_value(d), m) != int'(w)) begin
      failures++;
      $display("FAIL ch%0d m=%0d w=%0d csd=%0d value %0d", c, m, w, csd, sd_value(d));
    end
    checks++;
    if ((d.nz >> n) != 0 || (d.neg & ~d.nz) != 0) begin
      failures++;
      $display("FAIL ch%0d w=%0d digits out of range nz=%b neg=%b", c, w, d.nz, d.neg);
    end
    if (csd) begin
      checks++;
      if ((d.nz & (d.nz >> 1)) != 0) begin
        failures++;
        $display("FAIL ch%0d w=%0d adjacent CSD digits nz=%b", c, w, d.nz);
      end
    end
  endtask

  initial begin
    int negs;
    negs = 0;
    for (int v = 0; v < 33; v++) begin
      w = RW'(v);
      #1;
      for (int c = 0; c < NCH; c++) begin
        if (v < int'(MODS[c])) begin
          check_one(c, db[c], 1'b0);
          check_one(c, dc[c], 1'b1);
          if (dc[c].neg != 0) negs++;
        end
      end
    end
    // 14 = 01110 in mod 32 becomes 1 0 0 -1 0
    w = RW'(14);
    #1;
    checks++;
    if (dc[3].nz != 5'b10010 || dc[3].neg != 5'b00010) begin
      failures++;
      $display("FAIL CSD of 14 mod 32: nz=%b neg=%b", dc[3].nz, dc[3].neg);
    end
    checks++;
    if (negs == 0) begin
      failures++;
      $display("FAIL no negative CSD digit seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
