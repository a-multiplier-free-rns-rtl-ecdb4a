// tb_rns_core: one core with its default 16 PEs, S = 1 and CSD encoding computes
// 1-D convolutions y[i] = sum_k w[k] * x[i+k] (12-bit FMAPs, 8-bit weights, kernel
// rows of random odd and even length K) over several kernel rows, each row preceded
// by NPE/2 fill steps with zero weights. Inputs enter in the reduced bases; every
// PE's full-base result is compared with the integer reference. The FMAP and weight
// streams are offered with random gaps. Stalls, stack draining and zero weights
// (sparsity) must all occur.
module tb_rns_core;
  import rns_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int NPE = 16;

  logic  acc_clr, w_valid, w_ready, fm_valid, step_rdy, step_go, idle, stall;
  rvec_t w0, w1, fm0, fm1;
  rvec_t res [NPE];

  rns_core #(.NPE(NPE)) dut (
    .clk, .rst_n, .acc_clr, .w_valid, .w_ready, .w0, .w1,
    .fm_valid, .fm0, .fm1, .step_rdy, .step_go, .idle, .stall, .res
  );

  assign step_go = step_rdy;

  function automatic int modp(longint v, int m);
    longint r;
    r = v % m;
    return int'((r < 0) ? r + m : r);
  endfunction

  function automatic rvec_t enc(int v, logic [NCH-1:0] mask);
    rvec_t x;
    x = '0;
    for (int c = 0; c < NCH; c++) if (mask[c]) x[c] = RW'(modp(v, int'(MODS[c])));
    return x;
  endfunction

  // step list
  int     xs0 [$], xs1 [$], ws0 [$], ws1 [$];
  longint yref [NPE];
  int     win [NPE + 2];
  int     stall_cyc = 0, zero_w = 0;

  task automatic build(int rows);
    int x [$];
    for (int r = 0; r < rows; r++) begin
      int k, ks;
      k  = 3 + int'($urandom % 6);        // kernel row length 3..8
      ks = (k + 1) / 2;
      for (int t = 0; t < NPE / 2 + ks; t++) begin
        int a, b;
        xs0.push_back(int'($urandom % 4096) - 2048);
        xs1.push_back(int'($urandom % 4096) - 2048);
        a = 0; b = 0;
        if (t >= NPE / 2) begin
          a = (($urandom % 4) == 0) ? 0 : int'($urandom % 256) - 128;
          b = (2 * (t - NPE / 2) + 1 < k) ? int'($urandom % 256) - 128 : 0;
        end
        ws0.push_back(a);
        ws1.push_back(b);
      end
    end
  endtask

  initial begin
    int n, wi, fi, cyc;
    acc_clr = 1'b0; w_valid = 1'b0; fm_valid = 1'b0;
    w0 = '0; w1 = '0; fm0 = '0; fm1 = '0;
    for (int i = 0; i < NPE; i++) yref[i] = 0;
    for (int i = 0; i < NPE + 2; i++) win[i] = 0;
    build(6);
    n = xs0.size();
    // reference: the window after shifting in the pair feeds PE i with win[i], win[i+1]
    for (int t = 0; t < n; t++) begin
      for (int j = 0; j < NPE; j++) win[j] = win[j+2];
      win[NPE]   = xs0[t];
      win[NPE+1] = xs1[t];
      if (ws0[t] == 0 && t % (NPE / 2) != 0) zero_w++;
      for (int i = 0; i < NPE; i++) yref[i] += longint'(ws0[t]) * win[i] + longint'(ws1[t]) * win[i+1];
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    acc_clr = 1'b1;
    @(negedge clk);
    acc_clr = 1'b0;
    wi = 0; fi = 0; cyc = 0;
    while (fi < n) begin
      // offer the next weight pair and FMAP pair (with random gaps)
      w_valid  = (wi < n) && (($urandom % 4) != 0);
      if (w_valid) begin
        w0 = enc(ws0[wi], WGT_BASE);
        w1 = enc(ws1[wi], WGT_BASE);
      end
      fm_valid = (fi < wi) && (($urandom % 5) != 0);
      fm0 = enc(xs0[fi], FMAP_BASE);
      fm1 = enc(xs1[fi], FMAP_BASE);
      @(posedge clk);
      cyc++;
      if (stall) stall_cyc++;
      if (w_valid && w_ready) wi++;
      if (step_go) fi++;
      @(negedge clk);
      // keep the FMAP pair stable while not retired
    end
    w_valid = 1'b0;
    fm_valid = 1'b0;
    checks++;
    if (idle) begin
      // the last step normally leaves entries on the stacks
      $display("note: stacks already empty after the last step");
    end
    while (!idle) @(negedge clk);
    for (int i = 0; i < NPE; i++)
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (int'(res[i][c]) != modp(yref[i], int'(MODS[c]))) begin
          failures++;
          if (failures < 10) $display("FAIL PE %0d channel %0d: %0d expected %0d", i, c, res[i][c], modp(yref[i], int'(MODS[c])));
        end
      end
    $display("%0d steps in %0d cycles, %0d stall cycles, %0d zero weights", n, cyc, stall_cyc, zero_w);
    checks++;
    if (stall_cyc == 0 || zero_w == 0) begin
      failures++;
      $display("FAIL stalls or zero weights never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
