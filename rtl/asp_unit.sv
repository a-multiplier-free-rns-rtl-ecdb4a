// asp_unit: activation, scaling and pooling of accumulated results.
//
// The accumulated dot products leave the cores in the full RNS base, but the next
// layer reads its FMAPs from FMEM in the reduced FMAP base. This unit converts a
// result to signed binary (rns2bin), scales it by an arithmetic right shift of
// `shift` bits, applies ReLU if relu_en, saturates to the FMAP range
// [-2^(FB-1), 2^(FB-1)-1], optionally takes the maximum with a second result
// (pool_en: 1x2 max pooling of two neighbouring outputs) and writes the value back
// as residues of the reduced FMAP base {7,31,32} (other channels read 0).
// The paper names the unit (scaling + ReLU + pooling, per core); the binary
// conversion, shift scaling, saturation and the 1x2 pooling window are this design's.
// Combinational; the owner registers the result.
module asp_unit
  import rns_pkg::*;
#(
  parameter int unsigned FB = 12           // FMAP precision in bits
) (
  input  rvec_t      x0,
  input  rvec_t      x1,
  input  logic [4:0] shift,
  input  logic       relu_en,
  input  logic       pool_en,
  output rvec_t      y
);

  localparam int FMAX = (1 << (FB - 1)) - 1;
  localparam int FMIN = -(1 << (FB - 1));

  logic signed [31:0] v0, v1, p0, p1, m;

  rns2bin u_r0 (.r(x0), .v(v0));
  rns2bin u_r1 (.r(x1), .v(v1));

  function automatic logic signed [31:0] act(logic signed [31:0] v, logic [4:0] sh, logic relu);
    logic signed [31:0] s;
    s = v >>> sh;
    if (relu && s < 0) s = 0;
    if (s > FMAX) s = FMAX;
    if (s < FMIN) s = FMIN;
    return s;
  endfunction

  always_comb begin
    p0 = act(v0, shift, relu_en);
    p1 = act(v1, shift, relu_en);
    m  = (pool_en && p1 > p0) ? p1 : p0;
    y  = '0;
    for (int c = 0; c < NCH; c++)
      if (FMAP_BASE[c]) begin
        int r;
        r = int'(m) % int'(MODS[c]);
        if (r < 0) r = r + int'(MODS[c]);
        y[c] = RW'(r);
      end
  end

endmodule
