// mfds_ctrl: stall/stack controller of one RNS channel of a group of MF-D-S PEs.
//
// Each step brings a pair of weights (A for FMAP F0, B for FMAP F1) in signed digits.
// Digit position j of the channel has one adder (accumulator Y_j) and a stack of
// depth S. Per cycle and per position the adder takes one operand: the top of the
// stack if the stack holds anything, otherwise A's digit, otherwise B's digit. The
// operands the adder cannot take are pushed on the stack while there is room. What
// still does not fit stays pending: the step is not done, the inputs must be held,
// and the next cycle retries only the digits not yet consumed (a stall). With S = 0
// this is the plain MF-D PE, which needs a second cycle on every conflict.
// Because the schedule depends on the weights only, one controller serves all PEs
// that share the weights (the paper groups PEs by weight for this reason); its
// output pc[j] is broadcast to the datapaths (mfds_pe_ch).
//
// Interface: in_valid says a step (weights and FMAPs) is present; done says every
// digit of it is handled by the end of this cycle; in_accept (only with in_valid and
// done) retires the step. Keeping in_accept separate from done lets several
// controllers (channels, cores) retire a step together: a controller that finished
// early holds, with nothing left to add. The stack always drains into idle adders,
// also without a step; empty says all stacks are empty (results can be read).
// Source priority and partial consumption are this design's choices.
module mfds_ctrl
  import rns_pkg::*;
#(
  parameter int unsigned MOD = 31,
  parameter int unsigned S   = 1      // stack depth per digit position
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      in_accept,
  input  sd_t       a,
  input  sd_t       b,
  output logic      done,
  output logic      empty,
  output pos_ctrl_t pc [MAXD]
);

  localparam int unsigned N = ndig_of(MOD);

  logic [IW-1:0]   cnt   [MAXD];
  logic [IW-1:0]   cnt_n [MAXD];
  logic [MAXD-1:0] ca, cb;           // digits of the current step already consumed
  logic [MAXD-1:0] ta, tb;           // digits consumed this cycle
  logic [MAXD-1:0] pos_done;

  always_comb begin
    for (int j = 0; j < MAXD; j++) begin
      logic          ra, rb, pop;
      logic [IW-1:0] base;
      int unsigned   space;
      logic          l0_v, l0_b, l1_v;   // leftovers after the adder: first may be A or B, second is B
      pc[j]       = '0;
      ta[j]       = 1'b0;
      tb[j]       = 1'b0;
      cnt_n[j]    = cnt[j];
      pos_done[j] = 1'b1;
      if (j < int'(N)) begin
        ra   = in_valid & a.nz[j] & ~ca[j];
        rb   = in_valid & b.nz[j] & ~cb[j];
        pop  = (cnt[j] != '0);
        base = pop ? cnt[j] - 1'b1 : '0;
        space = S - int'(base);
        l0_v = 1'b0; l0_b = 1'b0; l1_v = 1'b0;
        if (pop) begin
          pc[j].add_src = SRC_STK;
          pc[j].rd_idx  = cnt[j] - 1'b1;
          l0_v = ra | rb;
          l0_b = ~ra;
          l1_v = ra & rb;
        end else if (ra) begin
          pc[j].add_src = SRC_F0;
          pc[j].add_neg = a.neg[j];
          ta[j] = 1'b1;
          l0_v = rb;
          l0_b = 1'b1;
        end else if (rb) begin
          pc[j].add_src = SRC_F1;
          pc[j].add_neg = b.neg[j];
          tb[j] = 1'b1;
        end
        if (l0_v && space >= 1) begin
          pc[j].wr0_en  = 1'b1;
          pc[j].wr0_f1  = l0_b;
          pc[j].wr0_neg = l0_b ? b.neg[j] : a.neg[j];
          pc[j].wr0_idx = base;
          if (l0_b) tb[j] = 1'b1; else ta[j] = 1'b1;
        end
        if (l1_v && space >= 2) begin
          pc[j].wr1_en  = 1'b1;
          pc[j].wr1_neg = b.neg[j];
          pc[j].wr1_idx = base + 1'b1;
          tb[j] = 1'b1;
        end
        cnt_n[j]    = base + IW'(pc[j].wr0_en) + IW'(pc[j].wr1_en);
        pos_done[j] = ~(ra & ~ta[j]) & ~(rb & ~tb[j]);
      end
    end
  end

  assign done = &pos_done;

  always_comb begin
    empty = 1'b1;
    for (int j = 0; j < MAXD; j++) if (cnt[j] != '0) empty = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ca <= '0;
      cb <= '0;
      for (int j = 0; j < MAXD; j++) cnt[j] <= '0;
    end else begin
      for (int j = 0; j < MAXD; j++) cnt[j] <= cnt_n[j];
      if (in_accept) begin
        ca <= '0;
        cb <= '0;
      end else if (in_valid) begin
        ca <= ca | ta;
        cb <= cb | tb;
      end
    end
  end

  initial begin
    assert (S <= 3) else $error("mfds_ctrl: stack depth S must be 0..3");
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_accept |-> (in_valid && done))
    else $error("mfds_ctrl: step retired before all its digits were handled");

endmodule
