// ddp64_ref_pkg: bit-level reference model of DDP-64 for the testbenches.
//
// Written independently of the RTL: vectors are handled bit by bit with the
// cipher's 1-based numbering (bit i of a word is index i-1), the fixed
// permutations are applied from their cycle lists as printed in the cipher's
// definition (a cycle (a,b,...) moves bit a to position b), and the
// round-key schedule is a table of O-indices. It reproduces the same reading
// of the cipher as the RTL (butterfly P8/12 layers, E with rotations 0/6/12,
// round wiring described in crypt_round), so it checks the implementation of
// those choices, not the choices themselves.
package ddp64_ref_pkg;

  typedef bit [31:0] w32_t;

  // y_i = x_{i+k} (1-based, cyclic) on an n-bit word held in the low bits
  function automatic w32_t r_rot(w32_t x, int n, int k);
    w32_t y = '0;
    for (int i = 1; i <= n; i++)
      y[i-1] = x[((i + k - 1) % n)];
    return y;
  endfunction

  // apply a permutation given as cycles: cyc holds the cycles flattened,
  // each terminated by 0
  function automatic bit [39:0] r_cycles(bit [39:0] x, int n, int cyc[$]);
    bit [39:0] y = x;
    int start = 0;
    for (int p = 0; p < cyc.size(); p++) begin
      if (cyc[p] == 0) begin
        start = p + 1;
      end else begin
        int nxt = (p + 1 < cyc.size() && cyc[p+1] != 0) ? cyc[p+1] : cyc[start];
        y[nxt-1] = x[cyc[p]-1];
      end
    end
    return y;
  endfunction

  // one active layer on 8 bits; ctl[k] drives the k-th pair (a, a+s)
  function automatic bit [7:0] r_layer8(bit [7:0] x, int s, bit [3:0] ctl);
    bit [7:0] y = x;
    int k = 0;
    for (int a = 0; a < 8; a++) begin
      if ((a & s) == 0) begin
        if (ctl[k]) begin y[a] = x[a+s]; y[a+s] = x[a]; end
        k++;
      end
    end
    return y;
  endfunction

  // P8/12 (inv=0) or P^-1 8/12 (inv=1); c1,c2,c3 are V1,V2,V3
  function automatic bit [7:0] r_p812(bit [7:0] x, bit [3:0] c1, bit [3:0] c2, bit [3:0] c3, bit inv);
    if (!inv) return r_layer8(r_layer8(r_layer8(x, 1, c1), 2, c2), 4, c3);
    else      return r_layer8(r_layer8(r_layer8(x, 4, c3), 2, c2), 1, c1);
  endfunction

  function automatic bit [3:0] nib(bit [15:0] v, int b);
    return v[4*b +: 4];
  endfunction

  // P32/48 or its inverse, control (V1,V2,V3) each 16 bits
  function automatic w32_t r_p3248(w32_t x, bit [15:0] v1, bit [15:0] v2, bit [15:0] v3, bit inv);
    w32_t y;
    for (int b = 0; b < 4; b++)
      y[8*b +: 8] = r_p812(x[8*b +: 8], nib(v1,b), nib(v2,b), nib(v3,b), inv);
    return y;
  endfunction

  function automatic w32_t r_mid(w32_t x);
    int c[$] = '{2,9,0, 3,17,0, 4,25,0, 6,13,0, 7,21,0, 8,29,0, 11,18,0, 12,26,0,
                 15,22,0, 16,30,0, 20,27,0, 24,31,0};
    bit [39:0] t = r_cycles({8'h0, x}, 32, c);
    return t[31:0];
  endfunction

  // P32/96 as its definition: layers V1..V6 in order; inverse reversed
  function automatic w32_t r_p3296(w32_t x, bit [95:0] v, bit inv);
    bit [15:0] V [1:6];
    w32_t a, b, y;
    for (int j = 1; j <= 6; j++) V[j] = v[16*(j-1) +: 16];
    if (!inv) begin
      a = r_p3248(x, V[1], V[2], V[3], 0);
      b = r_mid(a);
      for (int bb = 0; bb < 4; bb++)
        y[8*bb +: 8] = r_layer8(r_layer8(r_layer8(b[8*bb +: 8], 4, nib(V[4],bb)), 2, nib(V[5],bb)), 1, nib(V[6],bb));
    end else begin
      for (int bb = 0; bb < 4; bb++)
        a[8*bb +: 8] = r_layer8(r_layer8(r_layer8(x[8*bb +: 8], 1, nib(V[6],bb)), 2, nib(V[5],bb)), 4, nib(V[4],bb));
      b = r_mid(a);
      y = r_p3248(b, V[1], V[2], V[3], 1);
    end
    return y;
  endfunction

  function automatic bit [95:0] r_ext_e(w32_t u);
    w32_t ul = {16'h0, u[15:0]}, uh = {16'h0, u[31:16]};
    w32_t a = r_rot(ul, 16, 6), b = r_rot(ul, 16, 12), c = r_rot(uh, 16, 6), d = r_rot(uh, 16, 12);
    return {d[15:0], c[15:0], uh[15:0], b[15:0], a[15:0], ul[15:0]};
  endfunction

  function automatic w32_t r_fbox(w32_t z, w32_t zc);
    int c[$] = '{1,33,0, 2,9,0, 3,17,0, 4,25,0, 6,13,0, 7,21,0, 8,34,29,40,0,
                 10,35,0, 11,18,0, 12,26,0, 15,36,22,38,0, 16,30,0, 19,37,0,
                 20,27,0, 24,31,0, 28,39,0};
    bit [15:0] W [1:6];
    w32_t zl = {16'h0, zc[15:0]}, zh = {16'h0, zc[31:16]}, t, d;
    bit [39:0] h;
    bit [7:0] cst;
    W[1] = zl[15:0]; t = r_rot(zl, 16, 5); W[2] = t[15:0]; t = r_rot(zl, 16, 10); W[3] = t[15:0];
    W[4] = zh[15:0]; t = r_rot(zh, 16, 5); W[5] = t[15:0];
    d = r_p3248(z, W[1], W[2], W[3], 0);
    // C = (c1..c8) = (1,0,1,0,1,0,1,0)
    for (int i = 1; i <= 8; i++) cst[i-1] = (i % 2 == 1);
    h = r_cycles({cst, d}, 40, c);
    W[6] = {h[39:32], h[39:32]};
    // P^-1 32/48 whose 1st/2nd/3rd layers (pairs 4/2/1 apart) get W4/W5/W6
    for (int b = 0; b < 4; b++)
      t[8*b +: 8] = r_layer8(r_layer8(r_layer8(h[8*b +: 8], 4, nib(W[4],b)), 2, nib(W[5],b)), 1, nib(W[6],b));
    return t;
  endfunction

  function automatic w32_t r_pi(w32_t x, bit esw);
    int c0[$] = '{1,4,7,2,5,8,3,6,0, 9,12,15,10,13,16,11,14,0,
                  17,20,23,18,21,24,19,22,0, 25,28,31,26,29,32,27,30,0};
    bit [39:0] t;
    w32_t y;
    if (!esw) begin
      t = r_cycles({8'h0, x}, 32, c0);
      return t[31:0];
    end
    // Pi(1) is the inverse of Pi(0): find y with Pi(0)(y) = x bit by bit
    for (int i = 0; i < 32; i++) begin
      w32_t unit = w32_t'(1) << i;
      t = r_cycles({8'h0, unit}, 32, c0);
      for (int k = 0; k < 32; k++) if (t[k]) y[i] = x[k];
    end
    return y;
  endfunction

  function automatic w32_t r_invol(w32_t x);
    w32_t lo = r_rot({16'h0, x[15:0]}, 16, 8), hi = r_rot({16'h0, x[31:16]}, 16, 8);
    return {hi[15:0], lo[15:0]};
  endfunction

  // Crypt^(e) with round subkeys q[1..4] and switching bit esw
  function automatic void r_round(w32_t l, w32_t r, w32_t q1, w32_t q2, w32_t q3, w32_t q4,
                                  bit esw, output w32_t lo, output w32_t ro);
    w32_t lp, fa, fb, t;
    lp = r_rot(r_pi(l, esw), 32, 16);
    fa = r_fbox(l ^ q4, l ^ q2);
    fb = r_fbox(lp ^ q2, lp ^ q4);
    t  = r_p3296(r ^ fa, r_ext_e(l ^ q1), 0);
    t  = r_invol(t);
    t  = r_p3296(t, r_ext_e(lp ^ q3), 1);
    lo = lp;
    ro = t ^ fb;
  endfunction

  // Table 1: O-index of Q(1..4)_j and e'_j for both modes
  function automatic int q_idx(int k, int j);
    int t1[10] = '{3,2,1,4,3,3,4,1,2,3};
    int t2[10] = '{4,3,2,1,2,2,1,2,3,4};
    int t3[10] = '{1,4,3,2,1,1,2,3,4,1};
    int t4[10] = '{2,1,4,3,4,4,3,4,1,2};
    case (k)
      1: return t1[j-1];
      2: return t2[j-1];
      3: return t3[j-1];
      default: return t4[j-1];
    endcase
  endfunction

  function automatic bit e_sw(bit e, int j);
    int enc[10] = '{1,0,1,1,0,1,1,1,0,1};
    int dec[10] = '{0,1,0,0,0,1,0,0,1,0};
    return e ? bit'(dec[j-1]) : bit'(enc[j-1]);
  endfunction

  // subkey O_i (i = 1..4) for key K and mode e
  function automatic w32_t r_o(bit [127:0] k, bit e, int i);
    int src = e ? ((i + 1) % 4) + 1 : i;   // e=1: O1=K3, O2=K4, O3=K1, O4=K2
    return k[32*(src-1) +: 32];
  endfunction

  // round key j packed like ddp64_pkg::round_key_t {esw, q1, q2, q3, q4}
  function automatic bit [128:0] r_rk(bit [127:0] k, bit e, int j);
    return {e_sw(e, j), r_o(k, e, q_idx(1, j)), r_o(k, e, q_idx(2, j)),
            r_o(k, e, q_idx(3, j)), r_o(k, e, q_idx(4, j))};
  endfunction

  // whole cipher T^(e)(M, K); M = (L, R) with L = m[31:0]
  function automatic bit [63:0] r_cipher(bit [63:0] m, bit [127:0] k, bit e);
    w32_t l, r, lo, ro;
    l = m[31:0]  ^ r_o(k, e, 2);
    r = m[63:32] ^ r_o(k, e, 1);
    for (int j = 1; j <= 10; j++) begin
      r_round(l, r, r_o(k, e, q_idx(1, j)), r_o(k, e, q_idx(2, j)),
              r_o(k, e, q_idx(3, j)), r_o(k, e, q_idx(4, j)), e_sw(e, j), lo, ro);
      if (j < 10) begin l = ro; r = lo; end
      else        begin l = lo; r = ro; end
    end
    return {r ^ r_o(k, e, 3), l ^ r_o(k, e, 4)};
  endfunction

  function automatic bit [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic bit [63:0] rand64();
    return {$urandom, $urandom};
  endfunction

endpackage
