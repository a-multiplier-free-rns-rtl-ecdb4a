// mfds_pe_ch: datapath of one RNS channel of one MF-D-S processing element.
//
// Multiplier-free distributed PE with stacks: digit position j owns a modular adder
// and an accumulator Y_j. A weight digit of +1 (-1) at position j means "add (subtract)
// the FMAP to (from) Y_j"; the product w*F is never formed. The channel result
// sum_j 2^j * Y_j mod m is formed later by shift_add. Two FMAPs F0, F1 arrive per
// step; the per-position control word pc[j] from mfds_ctrl selects the adder operand
// (stack entry, F0 or F1, negated or not) and writes conflicting operands into the
// position's stack, already negated where needed. This follows the MF-D-S PE of the
// paper (one select per adder, one write enable per stack); the operand negation
// by m - F is this design's generic form of the paper's XOR-based subtraction.
// Timing: Y and the stacks update on the clock edge after pc is applied. acc_clr
// zeroes all Y_j (it wins over a same-cycle addition). Stack contents need no reset:
// a stack entry is only read after it was written.
module mfds_pe_ch
  import rns_pkg::*;
#(
  parameter int unsigned MOD = 31,
  parameter int unsigned S   = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      acc_clr,
  input  res_t      f0,
  input  res_t      f1,
  input  pos_ctrl_t pc [MAXD],
  output res_t      y  [MAXD]     // accumulators Y_j, positions >= n stay 0
);

  localparam int unsigned N  = ndig_of(MOD);
  localparam int unsigned SD = (S > 0) ? S : 1;

  res_t acc [MAXD];
  res_t stk [MAXD][SD];
  res_t nf0, nf1;

  assign nf0 = mod_neg(f0, MOD);
  assign nf1 = mod_neg(f1, MOD);

  for (genvar j = 0; j < MAXD; j++) begin : g_pos
    if (j < int'(N)) begin : g_used
      res_t opnd;
      always_comb begin
        unique case (pc[j].add_src)
          SRC_STK: opnd = stk[j][pc[j].rd_idx];
          SRC_F0:  opnd = pc[j].add_neg ? nf0 : f0;
          SRC_F1:  opnd = pc[j].add_neg ? nf1 : f1;
          default: opnd = '0;
        endcase
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)        acc[j] <= '0;
        else if (acc_clr)  acc[j] <= '0;
        else               acc[j] <= mod_add(acc[j], opnd, MOD);
      end

      if (S > 0) begin : g_stk
        always_ff @(posedge clk) begin
          if (pc[j].wr0_en)
            stk[j][pc[j].wr0_idx] <= pc[j].wr0_f1 ? (pc[j].wr0_neg ? nf1 : f1)
                                                   : (pc[j].wr0_neg ? nf0 : f0);
          if (pc[j].wr1_en)
            stk[j][pc[j].wr1_idx] <= pc[j].wr1_neg ? nf1 : f1;
        end
      end else begin : g_nostk
        always_comb stk[j][0] = '0;
      end
    end else begin : g_unused
      always_comb acc[j] = '0;
      always_comb for (int s = 0; s < int'(SD); s++) stk[j][s] = '0;
    end
    assign y[j] = acc[j];
  end

endmodule
