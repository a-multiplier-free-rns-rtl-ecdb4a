// tb_mfds_pe_ch: drives the PE channel datapath with random legal control words and
// compares every accumulator, every cycle, with an integer model of the adders and
// stacks. Runs the mod-33 channel with S = 2 (both stack writes in use) and the
// mod-7 channel with S = 0 (no stacks).
module tb_mfds_pe_ch;
  import rns_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int M1 = 33, S1 = 2, M2 = 7;

  logic      clr;
  res_t      f0, f1, g0, g1;
  pos_ctrl_t pc1 [MAXD];
  pos_ctrl_t pc2 [MAXD];
  res_t      y1 [MAXD];
  res_t      y2 [MAXD];

  mfds_pe_ch #(.MOD(M1), .S(S1)) u_a (.clk, .rst_n, .acc_clr(clr), .f0, .f1, .pc(pc1), .y(y1));
  mfds_pe_ch #(.MOD(M2), .S(0))  u_b (.clk, .rst_n, .acc_clr(clr), .f0(g0), .f1(g1), .pc(pc2), .y(y2));

  int acc1 [MAXD];
  int acc2 [MAXD];
  int stk  [MAXD][S1];
  bit sv   [MAXD][S1];     // stack entry written at least once
  int negs = 0, pops = 0, pushes2 = 0;

  function automatic int sgn(int v, bit neg, int m);
    return neg ? (m - v) % m : v;
  endfunction

  initial begin
    clr = 1'b0;
    f0 = '0; f1 = '0; g0 = '0; g1 = '0;
    for (int j = 0; j < MAXD; j++) begin
      pc1[j] = '0; pc2[j] = '0; acc1[j] = 0; acc2[j] = 0;
      for (int k = 0; k < S1; k++) sv[j][k] = 1'b0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      clr = (($urandom % 200) == 0);
      f0 = RW'($urandom % M1);
      f1 = RW'($urandom % M1);
      g0 = RW'($urandom % M2);
      g1 = RW'($urandom % M2);
      for (int j = 0; j < MAXD; j++) begin
        int add, v;
        pc1[j] = '0;
        pc2[j] = '0;
        // channel 1: mod 33, 5 positions, S = 2
        pc1[j].add_src = src_e'($urandom % 4);
        pc1[j].add_neg = $urandom % 2;
        pc1[j].rd_idx  = IW'($urandom % S1);
        if (pc1[j].add_src == SRC_STK && !sv[j][pc1[j].rd_idx]) pc1[j].add_src = SRC_NONE;
        pc1[j].wr0_en  = $urandom % 2;
        pc1[j].wr0_f1  = $urandom % 2;
        pc1[j].wr0_neg = $urandom % 2;
        pc1[j].wr0_idx = IW'($urandom % S1);
        pc1[j].wr1_en  = $urandom % 2;
        pc1[j].wr1_neg = $urandom % 2;
        pc1[j].wr1_idx = IW'(S1 - 1) - pc1[j].wr0_idx;
        unique case (pc1[j].add_src)
          SRC_STK: begin add = stk[j][pc1[j].rd_idx]; pops++; end
          SRC_F0:  add = sgn(int'(f0), pc1[j].add_neg, M1);
          SRC_F1:  add = sgn(int'(f1), pc1[j].add_neg, M1);
          default: add = 0;
        endcase
        if (pc1[j].add_neg && pc1[j].add_src inside {SRC_F0, SRC_F1}) negs++;
        acc1[j] = clr ? 0 : (acc1[j] + add) % M1;
        if (pc1[j].wr0_en) begin
          stk[j][pc1[j].wr0_idx] = sgn(pc1[j].wr0_f1 ? int'(f1) : int'(f0), pc1[j].wr0_neg, M1);
          sv[j][pc1[j].wr0_idx] = 1'b1;
        end
        if (pc1[j].wr1_en) begin
          stk[j][pc1[j].wr1_idx] = sgn(int'(f1), pc1[j].wr1_neg, M1);
          sv[j][pc1[j].wr1_idx] = 1'b1;
          if (pc1[j].wr0_en) pushes2++;
        end
        // channel 2: mod 7, 3 positions, no stack
        if (j < 3) begin
          pc2[j].add_src = src_e'($urandom % 3 == 0 ? 0 : 2 + $urandom % 2);
          pc2[j].add_neg = $urandom % 2;
          v = (pc2[j].add_src == SRC_F0) ? int'(g0) : int'(g1);
          add = (pc2[j].add_src == SRC_NONE) ? 0 : sgn(v, pc2[j].add_neg, M2);
          acc2[j] = clr ? 0 : (acc2[j] + add) % M2;
        end
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < MAXD; j++) begin
        checks++;
        if (int'(y1[j]) != acc1[j]) begin
          failures++;
          if (failures < 10) $display("FAIL mod33 cycle %0d Y%0d = %0d, expected %0d", cyc, j, y1[j], acc1[j]);
        end
        checks++;
        if (int'(y2[j]) != ((j < 3) ? acc2[j] : 0)) begin
          failures++;
          if (failures < 10) $display("FAIL mod7 cycle %0d Y%0d = %0d, expected %0d", cyc, j, y2[j], acc2[j]);
        end
      end
    end
    checks++;
    if (negs == 0 || pops == 0 || pushes2 == 0) begin
      failures++;
      $display("FAIL not every operation was exercised");
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
