// rns_core: processing core of NPE multiplier-free RNS PEs that share one weight stream.
//
// The PEs of a core compute NPE neighbouring outputs of one output row with the same
// weights, so they run in lockstep: the weight-dependent schedule (which operand each
// digit position's adder takes, which stack entry is written, when to stall) is made
// once per RNS channel by mfds_ctrl and broadcast to all PEs. The per-weight encoders
// and the control logic are thus shared by all PEs, as in the paper.
//
// Data path of one step (one pair of kernel weights, applied to two FMAPs):
//   weight pair (reduced base) -> weight FIFO -> 2 weight base extensions -> per channel
//     encoders (binary, CSD or joint pair) -> mfds_ctrl -> control words pc
//   FMAP pair (reduced base) -> 2 FMAP base extensions -> fmap_shreg -> F0, F1 of each PE
//   PE i, channel c: mfds_pe_ch accumulators Y_j -> shift_add -> res[i][c]
//
// Step handshake: step_rdy = a weight pair is queued, an FMAP pair is offered
// (fm_valid) and every channel controller has handled all digits of the step in this
// cycle. step_go (driven by the owner, only when step_rdy; several cores can be
// retired together) retires the step: the weight FIFO pops, the shift register
// shifts and the controllers start the next step. While step_go is low the inputs
// must be held. idle = all stacks empty and no weight queued: res is final.
// acc_clr zeroes the accumulators (start of a new output).
// The paper gives the grouping (4x4 = 16 PEs), the shared control, the overheads
// (shift-add units, one more base extension unit, larger shift register, weight
// FIFO); the linear dataflow, interfaces and FIFO depth are this design's.
module rns_core
  import rns_pkg::*;
#(
  parameter int unsigned NPE   = 16,
  parameter int unsigned S     = 1,
  parameter enc_e        ENC   = ENC_CSD,
  parameter int unsigned WFIFO = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  acc_clr,
  // weight pair stream, values in the reduced weight base
  input  logic  w_valid,
  output logic  w_ready,
  input  rvec_t w0,
  input  rvec_t w1,
  // FMAP pair, values in the reduced FMAP base
  input  logic  fm_valid,
  input  rvec_t fm0,
  input  rvec_t fm1,
  output logic  step_rdy,
  input  logic  step_go,
  output logic  idle,
  output logic  stall,          // a step is present but not finished this cycle
  output rvec_t res [NPE]
);

  localparam int unsigned WW = 2 * NCH * RW;

  // ---------------------------------------------------------------- weight FIFO
  logic                          wq_valid;
  logic [WW-1:0]                 wq_data;
  logic [$clog2(WFIFO+1)-1:0]    wq_count;
  rvec_t                         wq0, wq1, we0, we1;

  sync_fifo #(.W(WW), .DEPTH(WFIFO)) u_wfifo (
    .clk, .rst_n,
    .in_valid (w_valid), .in_ready (w_ready), .in_data ({w1, w0}),
    .out_valid(wq_valid), .out_ready(step_go), .out_data(wq_data),
    .count    (wq_count)
  );
  assign {wq1, wq0} = wq_data;

  base_ext #(.PRESENT(WGT_BASE)) u_wbe0 (.r(wq0), .x(we0));
  base_ext #(.PRESENT(WGT_BASE)) u_wbe1 (.r(wq1), .x(we1));

  // ---------------------------------------------------------------- FMAP path
  rvec_t fe0, fe1;
  rvec_t pf0 [NPE];
  rvec_t pf1 [NPE];

  base_ext #(.PRESENT(FMAP_BASE)) u_fbe0 (.r(fm0), .x(fe0));
  base_ext #(.PRESENT(FMAP_BASE)) u_fbe1 (.r(fm1), .x(fe1));

  fmap_shreg #(.NPE(NPE)) u_shreg (
    .clk, .rst_n, .shift(step_go), .n0(fe0), .n1(fe1), .f0(pf0), .f1(pf1)
  );

  // ---------------------------------------------------------------- per channel
  logic             step_valid;
  logic [NCH-1:0]   ch_done, ch_empty;

  assign step_valid = wq_valid & fm_valid;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    localparam int unsigned M = MODS[c];
    sd_t       da, db;
    pos_ctrl_t pc [MAXD];

    if (ENC == ENC_OPT) begin : g_opt
      opt_encoder #(.MOD(M)) u_enc (.wa(we0[c]), .wb(we1[c]), .da, .db);
    end else begin : g_sd
      sd_encoder #(.MOD(M), .ENC(ENC)) u_enca (.w(we0[c]), .d(da));
      sd_encoder #(.MOD(M), .ENC(ENC)) u_encb (.w(we1[c]), .d(db));
    end

    mfds_ctrl #(.MOD(M), .S(S)) u_ctrl (
      .clk, .rst_n,
      .in_valid (step_valid), .in_accept(step_go),
      .a(da), .b(db),
      .done(ch_done[c]), .empty(ch_empty[c]), .pc
    );

    for (genvar i = 0; i < NPE; i++) begin : g_pe
      res_t y [MAXD];
      mfds_pe_ch #(.MOD(M), .S(S)) u_pe (
        .clk, .rst_n, .acc_clr,
        .f0(pf0[i][c]), .f1(pf1[i][c]), .pc, .y
      );
      shift_add #(.MOD(M)) u_sa (.y, .r(res[i][c]));
    end
  end

  assign step_rdy = step_valid & (&ch_done);
  assign stall    = step_valid & ~(&ch_done);
  assign idle     = (&ch_empty) & ~wq_valid;

  assert property (@(posedge clk) disable iff (!rst_n) step_go |-> step_rdy)
    else $error("rns_core: step retired before it was ready");

endmodule
