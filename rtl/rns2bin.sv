// rns2bin: reverse conversion of a full-base RNS value to a signed binary integer.
//
// Chinese remainder theorem over the full base (5,7,31,32,33), M = 1,145,760:
//   X = sum_i ((r_i * inv_i) mod m_i) * (M / m_i)  mod M,
// read as signed: X >= M/2 stands for X - M, so the range is [-572880, 572879].
// All factors are constants. Helper of the ASP unit, which needs the sign for ReLU
// and the magnitude for scaling and pooling. The CRT form is this design's choice.
// Combinational.
module rns2bin
  import rns_pkg::*;
(
  input  rvec_t              r,
  output logic signed [31:0] v
);

  function automatic int unsigned prod_all();
    int unsigned p;
    p = 1;
    for (int i = 0; i < NCH; i++) p = p * MODS[i];
    return p;
  endfunction

  localparam int unsigned M = prod_all();

  function automatic int_arr_t crt_w();
    int_arr_t w;
    for (int i = 0; i < NCH; i++) begin
      w[i] = 0;
      for (int unsigned k = 1; k < MODS[i]; k++)
        if (((M / MODS[i]) % MODS[i]) * k % MODS[i] == 1) w[i] = k;
    end
    return w;
  endfunction

  localparam int_arr_t INV = crt_w();

  always_comb begin
    logic [31:0] acc, xs;
    acc = '0;
    for (int i = 0; i < NCH; i++)
      acc = acc + ((32'(r[i]) * INV[i]) % MODS[i]) * (M / MODS[i]);
    xs = acc % M;
    v  = (xs >= (M + 1) / 2) ? $signed(xs) - $signed(M) : $signed(xs);
  end

endmodule
