// shift_add: combines the distributed accumulators of one channel of one PE.
//
// The MF-D(-S) PE keeps one accumulator Y_j per digit position j, so the channel's
// dot product is sum_j 2^j * Y_j mod m. This unit evaluates it by Horner's rule,
// r = 2*r + Y_j from the top position down, every doubling and addition reduced
// mod m (a shift and a conditional subtraction: no multiplier). The paper names
// the shift-add unit as part of the core; its structure here is this design's own.
// Purely combinational.
module shift_add
  import rns_pkg::*;
#(
  parameter int unsigned MOD = 31
) (
  input  res_t y [MAXD],
  output res_t r
);

  localparam int unsigned N = ndig_of(MOD);

  always_comb begin
    r = '0;
    for (int j = MAXD - 1; j >= 0; j--)
      if (j < int'(N)) r = mod_add(mod_dbl(r, MOD), y[j], MOD);
  end

endmodule
