// ctrl_harness: drives one MF-D-S channel (encoders, mfds_ctrl, one mfds_pe_ch) with
// NPAIR random weight pairs of sparsity SP_PCT percent and random FMAPs. A step is
// retired as soon as the controller reports it done. At the end the stacks must have
// drained and every accumulator Y_j must equal sum(digit_j(Wa)*F0 + digit_j(Wb)*F1)
// mod m, computed here from the digits and FMAPs. It reports the cycles used, so the
// caller can check the throughput 2*NPAIR/cycles, and the pairs that had a conflict.
module ctrl_harness
  import rns_pkg::*;
#(
  parameter int unsigned MOD    = 32,
  parameter int unsigned S      = 1,
  parameter enc_e        ENC    = ENC_CSD,
  parameter int unsigned SP_PCT = 0,
  parameter int unsigned NPAIR  = 2000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   conflicts,
  output int   stall_cycles
);

  localparam int unsigned N = ndig_of(MOD);

  res_t      wa, wb, f0, f1;
  sd_t       da, db;
  logic      in_valid, done, empty, clr;
  pos_ctrl_t pc [MAXD];
  res_t      y [MAXD];

  if (ENC == ENC_OPT) begin : g_opt
    opt_encoder #(.MOD(MOD)) u_enc (.wa, .wb, .da, .db);
  end else begin : g_sd
    sd_encoder #(.MOD(MOD), .ENC(ENC)) u_a (.w(wa), .d(da));
    sd_encoder #(.MOD(MOD), .ENC(ENC)) u_b (.w(wb), .d(db));
  end

  mfds_ctrl #(.MOD(MOD), .S(S)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_accept(in_valid & done), .a(da), .b(db),
    .done, .empty, .pc
  );

  mfds_pe_ch #(.MOD(MOD), .S(S)) u_pe (
    .clk, .rst_n, .acc_clr(clr), .f0, .f1, .pc, .y
  );

  function automatic res_t rnd_w();
    if (($urandom % 100) < SP_PCT) return '0;
    return RW'(1 + ($urandom % (MOD - 1)));
  endfunction

  int exp_y [MAXD];

  initial begin
    fin = 1'b0; checks = 0; failures = 0; cycles = 0; conflicts = 0; stall_cycles = 0;
    in_valid = 1'b0; clr = 1'b0;
    wa = '0; wb = '0; f0 = '0; f1 = '0;
    for (int j = 0; j < MAXD; j++) exp_y[j] = 0;
    wait (start);
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int p = 0; p < int'(NPAIR); p++) begin
      wa = rnd_w();
      wb = rnd_w();
      f0 = RW'($urandom % MOD);
      f1 = RW'($urandom % MOD);
      in_valid = 1'b1;
      #1;
      if ((da.nz & db.nz) != '0) conflicts++;
      for (int j = 0; j < int'(N); j++) begin
        if (da.nz[j]) exp_y[j] += da.neg[j] ? int'(MOD) - int'(f0) : int'(f0);
        if (db.nz[j]) exp_y[j] += db.neg[j] ? int'(MOD) - int'(f1) : int'(f1);
        exp_y[j] = exp_y[j] % int'(MOD);
      end
      forever begin
        @(posedge clk);
        cycles++;
        if (done) break;
        stall_cycles++;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!empty) @(negedge clk);
    @(negedge clk);
    for (int j = 0; j < int'(N); j++) begin
      checks++;
      if (int'(y[j]) != exp_y[j]) begin
        failures++;
        $display("FAIL m=%0d S=%0d enc=%0d Y%0d = %0d, expected %0d", MOD, S, ENC, j, y[j], exp_y[j]);
      end
    end
    fin = 1'b1;
  end

endmodule
