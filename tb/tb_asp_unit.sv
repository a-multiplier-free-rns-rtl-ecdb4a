// tb_asp_unit: random signed results over the whole dynamic range of the full base
// (and small ones near zero) are given in RNS; the unit's reduced-base output is
// compared with the integer reference: arithmetic shift, ReLU, saturation to 12-bit,
// and the maximum of the pair when pooling.
module tb_asp_unit;
  import rns_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int M = 1145760;

  rvec_t      x0, x1, y;
  logic [4:0] shift;
  logic       relu_en, pool_en;

  asp_unit dut (.x0, .x1, .shift, .relu_en, .pool_en, .y);

  function automatic int modp(int v, int m);
    int r;
    r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic rvec_t to_rns(int v);
    rvec_t x;
    for (int c = 0; c < NCH; c++) x[c] = RW'(modp(v, int'(MODS[c])));
    return x;
  endfunction

  function automatic int ref_act(int v, int sh, bit relu);
    int s;
    s = v >>> sh;
    if (relu && s < 0) s = 0;
    if (s > 2047) s = 2047;
    if (s < -2048) s = -2048;
    return s;
  endfunction

  int relu_hits = 0, sat_hits = 0, pool_hits = 0;

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int v0, v1, e, a0, a1;
      if (t % 2) begin
        v0 = int'($urandom % M) - M / 2;
        v1 = int'($urandom % M) - M / 2;
      end else begin
        v0 = int'($urandom % 8000) - 4000;
        v1 = int'($urandom % 8000) - 4000;
      end
      shift   = 5'($urandom % 12);
      relu_en = ($urandom % 4) != 0;
      pool_en = $urandom % 2;
      x0 = to_rns(v0);
      x1 = to_rns(v1);
      a0 = ref_act(v0, int'(shift), relu_en);
      a1 = ref_act(v1, int'(shift), relu_en);
      e  = (pool_en && a1 > a0) ? a1 : a0;
      if (relu_en && (v0 >>> shift) < 0) relu_hits++;
      if ((v0 >>> shift) > 2047) sat_hits++;
      if (pool_en && a1 > a0) pool_hits++;
      #1;
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (int'(y[c]) != (FMAP_BASE[c] ? modp(e, int'(MODS[c])) : 0)) begin
          failures++;
          if (failures < 10) $display("FAIL v0=%0d v1=%0d sh=%0d relu=%0d pool=%0d ch%0d: %0d", v0, v1, shift, relu_en, pool_en, c, y[c]);
        end
      end
    end
    checks++;
    if (relu_hits == 0 || sat_hits == 0 || pool_hits == 0) begin
      failures++;
      $display("FAIL ReLU, saturation or pooling never exercised");
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
