// rns_pkg: shared types and constants of the multiplier-free RNS accelerator.
//
// The full RNS base is (5, 7, 31, 32, 33). Every modulus is of the form 2^n, 2^n-1
// or 2^n+1, so a weight residue can be written with n signed digits and each digit
// position j of a channel owns one accumulator Y_j (distributed multiplier-free PE).
// All residues travel on RW = 6 bit buses; each channel uses the low bits it needs.
// The base and the channel word lengths follow the paper. The reduced bases
// (FMAP base {7,31,32}, weight base {31,32}), the residue bus width, the digit
// encoding on wires and the per-position control word are this design's choices.
package rns_pkg;

  localparam int NCH  = 5;      // channels of the full base
  localparam int RW   = 6;      // residue bus width (enough for mod 33)
  localparam int MAXD = 5;      // largest number of digit positions (n) of a channel
  localparam int IW   = 2;      // stack index width: stack depth S up to 3

  typedef int unsigned int_arr_t [NCH];

  // full base and the n of each modulus (m = 2^n, 2^n-1 or 2^n+1)
  localparam int_arr_t MODS = '{5, 7, 31, 32, 33};
  localparam int_arr_t NDIG = '{2, 3, 5, 5, 5};

  typedef enum logic [1:0] {K_POW2 = 2'd0, K_MINUS = 2'd1, K_PLUS = 2'd2} mod_kind_e;

  // digit encodings the weight encoders support
  typedef enum logic [1:0] {ENC_BIN = 2'd0, ENC_CSD = 2'd1, ENC_OPT = 2'd2} enc_e;

  // reduced bases, as masks over the full base (bit i = channel i present)
  localparam logic [NCH-1:0] FMAP_BASE = 5'b01110;  // {7, 31, 32}: M = 6944
  localparam logic [NCH-1:0] WGT_BASE  = 5'b01100;  // {31, 32}:    M = 992

  typedef logic [RW-1:0] res_t;
  typedef logic [NCH-1:0][RW-1:0] rvec_t;   // one value in the full base, channel i at [i]

  // a signed-digit weight: nz[j] = digit j non-zero, neg[j] = that digit is -1
  typedef struct packed {
    logic [MAXD-1:0] nz;
    logic [MAXD-1:0] neg;
  } sd_t;

  // adder source of one digit position
  typedef enum logic [1:0] {SRC_NONE = 2'd0, SRC_STK = 2'd1, SRC_F0 = 2'd2, SRC_F1 = 2'd3} src_e;

  // control of one digit position of one channel, broadcast to all PEs of a core
  typedef struct packed {
    src_e          add_src;   // what the position's adder adds this cycle
    logic          add_neg;   // negate an F0/F1 operand (stack entries are stored signed)
    logic [IW-1:0] rd_idx;    // stack entry read when add_src == SRC_STK
    logic          wr0_en;    // first stack write
    logic          wr0_f1;    // 0: F0, 1: F1
    logic          wr0_neg;
    logic [IW-1:0] wr0_idx;
    logic          wr1_en;    // second stack write (always F1)
    logic          wr1_neg;
    logic [IW-1:0] wr1_idx;
  } pos_ctrl_t;

  function automatic mod_kind_e kind_of(int unsigned m);
    int unsigned p;
    p = 1;
    while (p < m) p = p * 2;
    if (p == m) return K_POW2;
    if (p == m + 1) return K_MINUS;
    return K_PLUS;
  endfunction

  // packed storage formats of the memories: only the reduced-base residues are kept
  localparam int FW = 13;     // FMAP word: {r32[4:0], r31[4:0], r7[2:0]}
  localparam int WB = 10;     // weight word: {r32[4:0], r31[4:0]}

  function automatic logic [FW-1:0] fpack(rvec_t v);
    return {v[3][4:0], v[2][4:0], v[1][2:0]};
  endfunction

  function automatic rvec_t funpack(logic [FW-1:0] p);
    rvec_t v;
    v    = '0;
    v[1] = RW'(p[2:0]);
    v[2] = RW'(p[7:3]);
    v[3] = RW'(p[12:8]);
    return v;
  endfunction

  function automatic rvec_t wunpack(logic [WB-1:0] p);
    rvec_t v;
    v    = '0;
    v[2] = RW'(p[4:0]);
    v[3] = RW'(p[9:5]);
    return v;
  endfunction

  // number of digit positions n of m = 2^n, 2^n-1 or 2^n+1
  function automatic int unsigned ndig_of(int unsigned m);
    int unsigned n;
    n = 0;
    while ((1 << n) < m - 1) n++;   // smallest n with 2^n >= m-1
    return n;
  endfunction

  // (a + b) mod m for a, b < m
  function automatic res_t mod_add(res_t a, res_t b, int unsigned m);
    logic [RW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= (RW+1)'(m)) s = s - (RW+1)'(m);
    return s[RW-1:0];
  endfunction

  // (-a) mod m for a < m
  function automatic res_t mod_neg(res_t a, int unsigned m);
    return (a == '0) ? '0 : RW'(m) - a;
  endfunction

  // (2a) mod m for a < m
  function automatic res_t mod_dbl(res_t a, int unsigned m);
    return mod_add(a, a, m);
  endfunction

endpackage
