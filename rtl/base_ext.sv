// base_ext: base extension from a reduced RNS base to the full base (5,7,31,32,33).
//
// Feature maps and weights are stored in a reduced base that only covers their own
// range; the MAC needs every channel of the full base. The missing residues are
// found by the Chinese remainder theorem over the reduced base:
//   X = sum_i ((r_i * inv_i) mod m_i) * (M_R / m_i)  mod M_R,
// X is read as signed (X >= ceil(M_R/2) means X - M_R), and each missing residue is
// X mod m_j, corrected by M_R mod m_j for negative values. All factors are constants,
// so the unit has no general multiplier. The paper gives the function (FMAP and
// weight base extension units); the CRT form, the signed range and the choice of
// reduced bases (rns_pkg::FMAP_BASE, WGT_BASE) are this design's.
// Parameter PRESENT marks the channels of the reduced base. Combinational.
module base_ext
  import rns_pkg::*;
#(
  parameter logic [NCH-1:0] PRESENT = FMAP_BASE
) (
  input  rvec_t r,           // residues; only channels in PRESENT are read
  output rvec_t x            // all residues of the full base
);

  function automatic int unsigned prod_r();
    int unsigned p;
    p = 1;
    for (int i = 0; i < NCH; i++) if (PRESENT[i]) p = p * MODS[i];
    return p;
  endfunction

  localparam int unsigned MR = prod_r();

  function automatic int_arr_t crt_w();   // ((M_R/m_i)^-1 mod m_i)
    int_arr_t w;
    for (int i = 0; i < NCH; i++) begin
      w[i] = 0;
      if (PRESENT[i])
        for (int unsigned k = 1; k < MODS[i]; k++)
          if (((MR / MODS[i]) % MODS[i]) * k % MODS[i] == 1) w[i] = k;
    end
    return w;
  endfunction

  localparam int_arr_t INV = crt_w();

  logic [31:0] xs;     // X in [0, M_R)
  logic        xneg;

  always_comb begin
    logic [31:0] acc;
    acc = '0;
    for (int i = 0; i < NCH; i++)
      if (PRESENT[i])
        acc = acc + ((32'(r[i]) * INV[i]) % MODS[i]) * (MR / MODS[i]);
    xs   = acc % MR;
    xneg = (xs >= (MR + 1) / 2);
    for (int j = 0; j < NCH; j++) begin
      if (PRESENT[j]) x[j] = r[j];
      else x[j] = RW'((xs % MODS[j] + MODS[j] - (xneg ? MR % MODS[j] : 0)) % MODS[j]);
    end
  end

endmodule
