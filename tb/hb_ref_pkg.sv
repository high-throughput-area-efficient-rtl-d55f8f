// hb_ref_pkg: behavioural reference model of Hummingbird for the testbenches.
//
// Written round by round from the algorithm, independently of the RTL: the
// S-box tables are typed in as arrays, the linear transform is built from
// bit rotations, and the whole cipher (initialization, encryption, state
// update, LFSR) is a class holding the internal state.
package hb_ref_pkg;

  typedef int unsigned table_t[16];

  localparam table_t S1 = '{8, 6, 5, 15, 1, 12, 10, 9, 14, 11, 2, 4, 7, 0, 13, 3};
  localparam table_t S2 = '{0, 7, 14, 1, 5, 11, 8, 2, 3, 10, 13, 6, 15, 12, 4, 9};
  localparam table_t S3 = '{2, 14, 15, 5, 12, 1, 9, 10, 11, 4, 6, 8, 0, 7, 3, 13};
  localparam table_t S4 = '{0, 7, 3, 4, 12, 1, 10, 15, 13, 14, 6, 11, 2, 8, 9, 5};

  function automatic int unsigned ref_sbox(int which, int unsigned x);
    case (which)
      1: return S1[x];
      2: return S2[x];
      3: return S3[x];
      default: return S4[x];
    endcase
  endfunction

  function automatic logic [15:0] ref_rot(logic [15:0] x, int n);
    logic [15:0] y;
    for (int i = 0; i < 16; i++) y[(i + n) % 16] = x[i];
    return y;
  endfunction

  function automatic logic [15:0] ref_lin(logic [15:0] x);
    return x ^ ref_rot(x, 6) ^ ref_rot(x, 10);
  endfunction

  function automatic logic [15:0] ref_sub(logic [15:0] x, bit single);
    logic [15:0] y;
    for (int n = 0; n < 4; n++)
      y[15 - 4*n -: 4] = 4'(ref_sbox(single ? 3 : n + 1, int'(x[15 - 4*n -: 4])));
    return y;
  endfunction

  // E_K with a 64-bit sub-key, round key k1 in bits 63:48.
  function automatic logic [15:0] ref_e(logic [15:0] x, logic [63:0] k, bit single);
    logic [15:0] rk[4];
    logic [15:0] m;
    for (int i = 0; i < 4; i++) rk[i] = k[63 - 16*i -: 16];
    m = x;
    for (int i = 0; i < 4; i++) m = ref_lin(ref_sub(m ^ rk[i], single));
    m = m ^ rk[0] ^ rk[2];
    m = ref_sub(m, single);
    return m ^ rk[1] ^ rk[3];
  endfunction

  function automatic logic [15:0] ref_lfsr_step(logic [15:0] q);
    logic fb;
    fb = q[0] ^ q[3] ^ q[7] ^ q[10] ^ q[12] ^ q[15];
    return {fb, q[15:1]};
  endfunction

  class hb_model;
    logic [255:0] key;
    logic [15:0]  rs[4];
    logic [15:0]  lfsr;
    bit           single;

    function new(bit single_sbox = 1'b1);
      single = single_sbox;
    endfunction

    function logic [63:0] sk(int i);
      return key[255 - 64*i -: 64];
    endfunction

    function void init(logic [255:0] k, logic [63:0] nonce);
      logic [15:0] v12, v23, v34, tv;
      key = k;
      for (int i = 0; i < 4; i++) rs[i] = nonce[63 - 16*i -: 16];
      for (int t = 0; t < 4; t++) begin
        v12 = ref_e(rs[0] + rs[2], sk(0), single);
        v23 = ref_e(v12 + rs[1], sk(1), single);
        v34 = ref_e(v23 + rs[2], sk(2), single);
        tv  = ref_e(v34 + rs[3], sk(3), single);
        rs[0] += tv;
        rs[1] += v12;
        rs[2] += v23;
        rs[3] += v34;
      end
      lfsr = tv | 16'h1000;
    endfunction

    function void update(logic [15:0] v12, logic [15:0] v23, logic [15:0] v34);
      lfsr  = ref_lfsr_step(lfsr);
      rs[0] = rs[0] + v34;
      rs[2] = rs[2] + v23 + lfsr;
      rs[3] = rs[3] + v12 + rs[0];
      rs[1] = rs[1] + v12 + rs[3];
    endfunction

    function logic [15:0] encrypt(logic [15:0] pt);
      logic [15:0] v12, v23, v34, ct;
      v12 = ref_e(pt + rs[0], sk(0), single);
      v23 = ref_e(v12 + rs[1], sk(1), single);
      v34 = ref_e(v23 + rs[2], sk(2), single);
      ct  = ref_e(v34 + rs[3], sk(3), single);
      update(v12, v23, v34);
      return ct;
    endfunction
  endclass

  function automatic logic [255:0] rand_key();
    logic [255:0] k;
    for (int i = 0; i < 8; i++) k[32*i +: 32] = $urandom;
    return k;
  endfunction

endpackage
