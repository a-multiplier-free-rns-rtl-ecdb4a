// tb_mfds_ctrl: checks the MF-D-S controller (with one PE channel as its datapath).
// Each configuration streams random weight pairs; every digit must reach its
// accumulator exactly once with the right sign (checked in ctrl_harness), and the
// throughput must match what the stall rules give:
//  - S = 0 (plain MF-D): a pair takes exactly 2 cycles when its digits conflict,
//    1 cycle otherwise (cycle count checked exactly);
//  - the mod-32 channel with dense weights (sp = 0) reaches the paper's speedups
//    for S = 0 (binary 1.13, CSD 1.32, optimal 1.50) and S = 1 (CSD 1.65,
//    optimal 1.74) within 0.06; for binary S = 1 this stall rule gives 1.45
//    (paper: 1.32), checked against 1.45 within 0.06.
//  - higher weight sparsity raises throughput (sp = 50 % vs 0 %, S = 1, CSD).
// Other channels (mod 5, 7, 31, 33), S = 2 and the pair encoder on mod 7 are
// checked for correct sums.
module tb_mfds_ctrl;
  import rns_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 11;
  localparam int NP = 3000;
  logic fin [NC];
  int   ck [NC], fl [NC], cy [NC], cf [NC], st [NC];

  ctrl_harness #(.MOD(32), .S(0), .ENC(ENC_BIN), .NPAIR(NP)) h0 (.clk, .rst_n, .start, .fin(fin[0]), .checks(ck[0]), .failures(fl[0]), .cycles(cy[0]), .conflicts(cf[0]), .stall_cycles(st[0]));
  ctrl_harness #(.MOD(32), .S(0), .ENC(ENC_CSD), .NPAIR(NP)) h1 (.clk, .rst_n, .start, .fin(fin[1]), .checks(ck[1]), .failures(fl[1]), .cycles(cy[1]), .conflicts(cf[1]), .stall_cycles(st[1]));
  ctrl_harness #(.MOD(32), .S(0), .ENC(ENC_OPT), .NPAIR(NP)) h2 (.clk, .rst_n, .start, .fin(fin[2]), .checks(ck[2]), .failures(fl[2]), .cycles(cy[2]), .conflicts(cf[2]), .stall_cycles(st[2]));
  ctrl_harness #(.MOD(32), .S(1), .ENC(ENC_BIN), .NPAIR(NP)) h3 (.clk, .rst_n, .start, .fin(fin[3]), .checks(ck[3]), .failures(fl[3]), .cycles(cy[3]), .conflicts(cf[3]), .stall_cycles(st[3]));
  ctrl_harness #(.MOD(32), .S(1), .ENC(ENC_CSD), .NPAIR(NP)) h4 (.clk, .rst_n, .start, .fin(fin[4]), .checks(ck[4]), .failures(fl[4]), .cycles(cy[4]), .conflicts(cf[4]), .stall_cycles(st[4]));
  ctrl_harness #(.MOD(32), .S(1), .ENC(ENC_OPT), .NPAIR(NP)) h5 (.clk, .rst_n, .start, .fin(fin[5]), .checks(ck[5]), .failures(fl[5]), .cycles(cy[5]), .conflicts(cf[5]), .stall_cycles(st[5]));
  ctrl_harness #(.MOD(32), .S(1), .ENC(ENC_CSD), .SP_PCT(50), .NPAIR(NP)) h6 (.clk, .rst_n, .start, .fin(fin[6]), .checks(ck[6]), .failures(fl[6]), .cycles(cy[6]), .conflicts(cf[6]), .stall_cycles(st[6]));
  ctrl_harness #(.MOD(33), .S(1), .ENC(ENC_CSD), .NPAIR(500)) h7 (.clk, .rst_n, .start, .fin(fin[7]), .checks(ck[7]), .failures(fl[7]), .cycles(cy[7]), .conflicts(cf[7]), .stall_cycles(st[7]));
  ctrl_harness #(.MOD(31), .S(2), .ENC(ENC_BIN), .NPAIR(500)) h8 (.clk, .rst_n, .start, .fin(fin[8]), .checks(ck[8]), .failures(fl[8]), .cycles(cy[8]), .conflicts(cf[8]), .stall_cycles(st[8]));
  ctrl_harness #(.MOD(7),  .S(1), .ENC(ENC_OPT), .NPAIR(500)) h9 (.clk, .rst_n, .start, .fin(fin[9]), .checks(ck[9]), .failures(fl[9]), .cycles(cy[9]), .conflicts(cf[9]), .stall_cycles(st[9]));
  ctrl_harness #(.MOD(5),  .S(0), .ENC(ENC_BIN), .NPAIR(500)) h10 (.clk, .rst_n, .start, .fin(fin[10]), .checks(ck[10]), .failures(fl[10]), .cycles(cy[10]), .conflicts(cf[10]), .stall_cycles(st[10]));

  int checks = 0;
  int failures = 0;

  function automatic real thr(int i);
    return 2.0 * real'((i >= 7) ? 500 : NP) / real'(cy[i]);
  endfunction

  task automatic near(string what, real got, real want, real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %s: throughput %f, expected %f +- %f", what, got, want, tol);
    end else $display("%s: throughput %f (expected %f)", what, got, want);
  endtask

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int i = 0; i < NC; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < NC; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    // S = 0: exactly one extra cycle per conflicting pair
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (cy[i] != NP + cf[i]) begin
        failures++;
        $display("FAIL S=0 config %0d: %0d cycles for %0d pairs with %0d conflicts", i, cy[i], NP, cf[i]);
      end
    end
    checks++;
    if (cy[10] != 500 + cf[10]) begin
      failures++;
      $display("FAIL mod-5 S=0: %0d cycles, %0d conflicts", cy[10], cf[10]);
    end
    near("mod32 S=0 binary", thr(0), 1.13, 0.06);
    near("mod32 S=0 CSD",    thr(1), 1.32, 0.06);
    near("mod32 S=0 opt",    thr(2), 1.50, 0.06);
    near("mod32 S=1 binary", thr(3), 1.45, 0.06);
    near("mod32 S=1 CSD",    thr(4), 1.65, 0.06);
    near("mod32 S=1 opt",    thr(5), 1.74, 0.06);
    checks++;
    if (!(thr(6) > thr(4) + 0.2)) begin
      failures++;
      $display("FAIL sparsity did not raise throughput: %f vs %f", thr(6), thr(4));
    end
    // the stack must have removed stalls: S=1 stalls fewer cycles than S=0 (binary)
    checks++;
    if (!(st[3] < st[0])) begin
      failures++;
      $display("FAIL stack did not reduce stalls: %0d vs %0d", st[3], st[0]);
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
