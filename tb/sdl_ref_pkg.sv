// sdl_ref_pkg: reference models used by the testbenches.
//
// Bit-level re-statements of each transformation of the secure data link,
// written independently of the RTL (different loop structure, explicit bit
// indices) so that a testbench compares the RTL with a second derivation.
// Also holds the known-answer vectors of the transmitter chain: modified DES
// of 128'h3 under key 112'h12, its Hamming (224,128) code and the 256-bit
// padded word.
package sdl_ref_pkg;

  typedef logic [127:0] w128_t;
  typedef logic [95:0]  w96_t;
  typedef logic [63:0]  w64_t;

  localparam w128_t KAT_PLAIN  = 128'h3;
  localparam logic [111:0] KAT_KEY = 112'h12;
  localparam w128_t KAT_MIDDLE = 128'h00008000000080008000200000008003;
  localparam logic [223:0] KAT_HAMMING =
    224'h0000000e0000000000000e000000e00000054000000000000e000043;
  localparam logic [255:0] KAT_CONVERTED =
    256'h000000000000000e0000000000000e000000e00000054000000000000e000043;

  function automatic w128_t rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  // ALU, by operation code (see sdl_pkg::alu_op_e).
  function automatic w128_t ref_alu(w128_t a, w128_t b, logic [3:0] op);
    case (op)
      4'h0: return a + b;
      4'h1: return a - b;
      4'h2: return a + 128'd1;
      4'h3: return a - 128'd1;
      4'h4: return a & b;
      4'h5: return a | b;
      4'h6: return a ^ b;
      4'h7: return ~(a ^ b);
      4'h8: return ~a;
      4'h9: return ~b;
      4'hA: return ~(a & b);
      4'hB: return ~(a | b);
      4'hC: return a << 1;
      4'hD: return a >> 1;
      4'hE: return {a[126:0], a[127]};
      default: return b;
    endcase
  endfunction

  // Round key n (1..16) from the 112-bit key, one equation at a time.
  function automatic w96_t ref_round_key(logic [111:0] key, int n);
    w96_t k = key[95:0];
    w96_t r;
    case (n)
      1: r = {k[0], k[95:1]};
      2: r = {k[1], k[0], k[95:2]};
      3: r = {k[2], k[1], k[0], k[95:3]};
      4: r = {k[3], k[2], k[1], k[0], k[95:4]};
      5, 6, 7: r = ~k;
      8:  r = {k[45], k[95:1]};
      9:  r = {k[48], k[95:1]};
      10: r = {k[41], k[95:1]};
      11: r = {k[45], k[94:1], k[90]};
      12: r = {k[91], k[95:1]};
      13: r = {k[45], k[95:1]};
      14: r = {k[46], k[95:1]};
      15: r = {k[40], k[95:1]};
      default: r = {k[1], k[95:1]};
    endcase
    return r;
  endfunction

  function automatic w128_t ref_perm(w128_t x);
    w128_t y = x;
    y[0] = x[127]; y[1] = x[126]; y[2] = x[125]; y[3] = x[124];
    y[124] = x[3]; y[125] = x[2]; y[126] = x[1]; y[127] = x[0];
    return y;
  endfunction

  function automatic w64_t ref_f(w64_t r, w96_t k);
    w96_t e, x, s;
    e = {r[31:0], r[63:32], 32'h0};
    x = e ^ k;
    s = {x[31:0], x[63:32], x[95:64]};
    return {s[15:0], s[31:16], s[63:32]};
  endfunction

  function automatic w128_t ref_round(w128_t d, w96_t k);
    return {d[63:0], d[127:64] ^ ref_f(d[63:0], k)};
  endfunction

  function automatic w128_t ref_des_enc(w128_t p, logic [111:0] key);
    w128_t x = ref_perm(p);
    for (int n = 1; n <= 16; n++) x = ref_round(x, ref_round_key(key, n));
    return ref_perm(x);
  endfunction

  // Hamming (7,4) code as in the transmitter: p1 p2 B3 p3 B2 B1 B0.
  function automatic logic [6:0] ref_ham7(logic [3:0] b);
    logic p1, p2, p3;
    p1 = b[3] ^ b[2] ^ b[0];
    p2 = b[3] ^ b[1] ^ b[0];
    p3 = b[2] ^ b[1] ^ b[0];
    return {p1, p2, b[3], p3, b[2], b[1], b[0]};
  endfunction

  function automatic logic [223:0] ref_ham224(w128_t m);
    logic [223:0] e;
    for (int i = 0; i < 32; i++) e[7*i +: 7] = ref_ham7(m[4*i +: 4]);
    return e;
  endfunction

  function automatic w128_t ref_pc(w128_t d, w128_t key);
    w128_t x = d ^ key;
    w128_t y;
    for (int w = 0; w < 4; w++)
      for (int j = 0; j < 32; j++) y[32*w + j] = x[32*w + 31 - j];
    return y;
  endfunction

  function automatic logic [255:0] ref_ipc(logic [255:0] d, logic [3:0][127:0] k);
    return {ref_pc(ref_pc(d[255:128], k[0]), k[1]), ref_pc(ref_pc(d[127:0], k[2]), k[3])};
  endfunction

endpackage
