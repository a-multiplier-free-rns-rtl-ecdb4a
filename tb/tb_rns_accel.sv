// tb_rns_accel: end-to-end test of the accelerator at its default size (16 cores of
// 16 PEs, S = 1, CSD, full FMEM and WMEM). The host loads FMAP pairs into FMEM and
// per-core weight pairs into WMEM, runs two passes and reads the outputs back:
//   pass 1: four kernel rows of K = 9 (dense weights) over different input rows,
//           scaling by 2^6, ReLU, no pooling;
//   pass 2: rows of K = 5 with sparse weights, one core with all-zero weights,
//           no ReLU, 1x2 max pooling.
// Each output word is compared with an integer reference: 1-D convolution over the
// streamed rows, wrap to the RNS dynamic range, shift, ReLU, saturation, pooling and
// the reduced-base packing. The test counts the mechanisms of the design and fails
// if one never happened: stalls, stack use, block buffer absorbing a stall, ReLU
// clipping, saturation, pooling, negative digits (subtraction), zero-weight steps.
module tb_rns_accel;
  import rns_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int NCORE = 16, NPE = 16;
  localparam longint M = 1145760;

  logic          h_fm_en, h_fm_we, h_wm_we, start, relu_en, pool_en, busy, done;
  logic [15:0]   h_fm_addr, f_base, o_base;
  logic [25:0]   h_fm_wdata, h_fm_rdata;
  logic [12:0]   h_wm_addr, w_base;
  logic [13:0]   n_steps;
  logic [319:0]  h_wm_wdata;
  logic [4:0]    shift;
  logic [31:0]   cyc_cnt, step_cnt, stall_cnt;

  rns_accel dut (
    .clk, .rst_n, .h_fm_en, .h_fm_we, .h_fm_addr, .h_fm_wdata, .h_fm_rdata,
    .h_wm_we, .h_wm_addr, .h_wm_wdata, .start, .f_base, .w_base, .n_steps, .o_base,
    .shift, .relu_en, .pool_en, .busy, .done, .cyc_cnt, .step_cnt, .stall_cnt
  );

  function automatic int modp(longint v, int m);
    longint r;
    r = v % m;
    return int'((r < 0) ? r + m : r);
  endfunction

  function automatic logic [12:0] fword(int v);
    return {5'(modp(v, 32)), 5'(modp(v, 31)), 3'(modp(v, 7))};
  endfunction

  function automatic logic [9:0] wword(int v);
    return {5'(modp(v, 32)), 5'(modp(v, 31))};
  endfunction

  function automatic int act(longint y, int sh, bit relu);
    longint r, s;
    r = y % M;
    if (r < 0) r += M;
    if (r >= (M + 1) / 2) r -= M;
    s = r >>> sh;
    if (relu && s < 0) s = 0;
    if (s > 2047) s = 2047;
    if (s < -2048) s = -2048;
    return int'(s);
  endfunction

  // stimulus of one pass
  int     xs0 [$], xs1 [$];
  int     ws0 [NCORE][$];
  int     ws1 [NCORE][$];
  longint yref [NCORE][NPE];

  // mechanism counters
  int n_stall = 0, n_stack = 0, n_bbfull = 0, n_relu = 0, n_sat = 0, n_pool = 0, n_negdig = 0, n_zero = 0;

  always @(posedge clk) begin
    if (dut.state == dut.ST_RUN) begin
      if (|dut.c_stall) n_stall++;
      if (!dut.g_core[0].u_core.g_ch[3].u_ctrl.empty) n_stack++;
      if (dut.bb_count >= 3'd2) n_bbfull++;   // the buffer absorbs a stall
      if (dut.g_core[1].u_core.g_ch[2].da.neg != '0) n_negdig++;
    end
  end

  task automatic build(int rows, int k, int sparse_pct, int zero_core);
    xs0.delete(); xs1.delete();
    for (int c = 0; c < NCORE; c++) begin ws0[c].delete(); ws1[c].delete(); end
    for (int r = 0; r < rows; r++) begin
      int ks;
      ks = (k + 1) / 2;
      for (int t = 0; t < NPE / 2 + ks; t++) begin
        xs0.push_back(int'($urandom % 4096) - 2048);
        xs1.push_back(int'($urandom % 4096) - 2048);
        for (int c = 0; c < NCORE; c++) begin
          int a, b;
          a = 0; b = 0;
          if (t >= NPE / 2 && c != zero_core) begin
            if (int'($urandom % 100) >= sparse_pct) a = int'($urandom % 256) - 128;
            if (2 * (t - NPE / 2) + 1 < k && int'($urandom % 100) >= sparse_pct) b = int'($urandom % 256) - 128;
          end
          if (t >= NPE / 2 && a == 0) n_zero++;
          ws0[c].push_back(a);
          ws1[c].push_back(b);
        end
      end
    end
  endtask

  task automatic reference();
    int win [NPE + 2];
    for (int i = 0; i < NPE + 2; i++) win[i] = 0;
    for (int c = 0; c < NCORE; c++) for (int i = 0; i < NPE; i++) yref[c][i] = 0;
    for (int t = 0; t < xs0.size(); t++) begin
      for (int j = 0; j < NPE; j++) win[j] = win[j+2];
      win[NPE]   = xs0[t];
      win[NPE+1] = xs1[t];
      for (int c = 0; c < NCORE; c++)
        for (int i = 0; i < NPE; i++)
          yref[c][i] += longint'(ws0[c][t]) * win[i] + longint'(ws1[c][t]) * win[i+1];
    end
  endtask

  task automatic load(int fb, int wb);
    for (int t = 0; t < xs0.size(); t++) begin
      @(negedge clk);
      h_fm_en = 1'b1; h_fm_we = 1'b1;
      h_fm_addr = 16'(fb + t);
      h_fm_wdata = {fword(xs1[t]), fword(xs0[t])};
      h_wm_we = 1'b1;
      h_wm_addr = 13'(wb + t);
      for (int c = 0; c < NCORE; c++) h_wm_wdata[c*20 +: 20] = {wword(ws1[c][t]), wword(ws0[c][t])};
    end
    @(negedge clk);
    h_fm_en = 1'b0; h_fm_we = 1'b0; h_wm_we = 1'b0;
  endtask

  task automatic run_pass(int fb, int wb, int ob, int sh, bit relu, bit pool);
    int words, t0;
    f_base = 16'(fb); w_base = 13'(wb); o_base = 16'(ob);
    n_steps = 14'(xs0.size());
    shift = 5'(sh); relu_en = relu; pool_en = pool;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = 0;
    while (!done) begin
      @(negedge clk);
      t0++;
    end
    checks++;
    if (int'(step_cnt) != xs0.size()) begin
      failures++;
      $display("FAIL %0d steps retired, expected %0d", step_cnt, xs0.size());
    end
    $display("pass: %0d steps, %0d cycles, %0d stall cycles", step_cnt, cyc_cnt, stall_cnt);
    // read back and compare
    words = pool ? NPE / 4 : NPE / 2;
    @(negedge clk);
    for (int c = 0; c < NCORE; c++)
      for (int q = 0; q < words; q++) begin
        int e0, e1;
        if (pool) begin
          int a0, a1, a2, a3;
          a0 = act(yref[c][4*q], sh, relu);   a1 = act(yref[c][4*q+1], sh, relu);
          a2 = act(yref[c][4*q+2], sh, relu); a3 = act(yref[c][4*q+3], sh, relu);
          e0 = (a1 > a0) ? a1 : a0;
          e1 = (a3 > a2) ? a3 : a2;
          if (a1 != a0 || a3 != a2) n_pool++;
        end else begin
          e0 = act(yref[c][2*q], sh, relu);
          e1 = act(yref[c][2*q+1], sh, relu);
        end
        for (int i = 0; i < (pool ? 4 : 2); i++) begin
          longint r;
          r = yref[c][(pool ? 4 : 2) * q + i] % M;
          if (r < 0) r += M;
          if (r >= (M + 1) / 2) r -= M;
          if (relu && (r >>> sh) < 0) n_relu++;
          if ((r >>> sh) > 2047 || (r >>> sh) < -2048) n_sat++;
        end
        h_fm_en = 1'b1; h_fm_we = 1'b0;
        h_fm_addr = 16'(ob + c * words + q);
        @(negedge clk);
        h_fm_en = 1'b0;
        checks++;
        if (h_fm_rdata != {fword(e1), fword(e0)}) begin
          failures++;
          if (failures < 10) $display("FAIL core %0d word %0d: %h expected %h", c, q, h_fm_rdata, {fword(e1), fword(e0)});
        end
      end
  endtask

  initial begin
    h_fm_en = 0; h_fm_we = 0; h_fm_addr = '0; h_fm_wdata = '0;
    h_wm_we = 0; h_wm_addr = '0; h_wm_wdata = '0;
    start = 0; f_base = '0; w_base = '0; n_steps = '0; o_base = '0;
    shift = '0; relu_en = 0; pool_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    build(4, 9, 0, -1);
    reference();
    load(100, 200);
    run_pass(100, 200, 5000, 6, 1'b1, 1'b0);

    build(2, 5, 40, 7);
    reference();
    load(60000, 6000);
    run_pass(60000, 6000, 40000, 4, 1'b0, 1'b1);

    $display("mechanisms: stall %0d, stack %0d, block buffer filling %0d, relu %0d, saturation %0d, pool %0d, negative digit %0d, zero weight %0d",
             n_stall, n_stack, n_bbfull, n_relu, n_sat, n_pool, n_negdig, n_zero);
    checks++;
    if (n_stall == 0 || n_stack == 0 || n_bbfull == 0 || n_relu == 0 || n_sat == 0 ||
        n_pool == 0 || n_negdig == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
