// fmap_shreg: FMAP shift register array of a core.
//
// The NPE PEs of a core compute NPE neighbouring outputs of one output row and share
// the weights, so at kernel offset k PE i needs input x[i+k]. An MF-D-S core retires
// two weights (k, k+1) per step, so PE i needs x[i+k] and x[i+k+1], and the array
// shifts by two per step, taking in two new FMAPs (this is why the paper's core
// needs a larger shift register array and one more base extension unit than a plain
// RNS core). The array holds L = NPE+2 entries. On a step, the window the PEs see is
// the array after the shift (nw): PE i gets F0 = nw[i], F1 = nw[i+1]. So NPE/2 steps
// with zero weights fill the array, after which each step applies one weight pair.
// The linear arrangement and the fill-by-zero-weight scheme are this design's.
// Timing: the window is combinational from the held array and the inputs, so it stays
// stable while a step stalls; shift (step retired) commits it on the clock edge.
module fmap_shreg
  import rns_pkg::*;
#(
  parameter int unsigned NPE = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift,
  input  rvec_t n0,            // new FMAP x[2t]
  input  rvec_t n1,            // new FMAP x[2t+1]
  output rvec_t f0 [NPE],
  output rvec_t f1 [NPE]
);

  localparam int unsigned L = NPE + 2;

  rvec_t sr [L];
  rvec_t nw [L];

  always_comb begin
    for (int j = 0; j < int'(L) - 2; j++) nw[j] = sr[j+2];
    nw[L-2] = n0;
    nw[L-1] = n1;
  end

  always_comb begin
    for (int i = 0; i < int'(NPE); i++) begin
      f0[i] = nw[i];
      f1[i] = nw[i+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(L); j++) sr[j] <= '0;
    end else if (shift) begin
      for (int j = 0; j < int'(L); j++) sr[j] <= nw[j];
    end
  end

  initial begin
    assert (NPE % 2 == 0) else $error("fmap_shreg: NPE must be even");
  end

endmodule
