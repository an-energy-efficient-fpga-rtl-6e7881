// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL. Half-precision values are decoded to `real`, the operation is done
// in double precision (exact for one FP16 add or multiply) and the result is
// rounded back to binary16 by scaling with powers of two, round to nearest,
// ties to even. Also the convolution reference that follows the accelerator's
// accumulation order, and a small random generator of "nice" FP32 values.
package tb_ref_pkg;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real h2r(input logic [15:0] h);
    int e;
    real m;
    e = int'(h[14:10]);
    if (e == 0) m = real'(h[9:0]) * pow2(-24);
    else        m = (1.0 + real'(h[9:0]) / 1024.0) * pow2(e - 15);
    return h[15] ? -m : m;
  endfunction

  function automatic logic h_nan(input logic [15:0] h);
    return h[14:10] == 5'h1F && h[9:0] != 0;
  endfunction
  function automatic logic h_inf(input logic [15:0] h);
    return h[14:10] == 5'h1F && h[9:0] == 0;
  endfunction

  // Round a real to binary16 (RNE). neg_zero selects the sign of a zero.
  function automatic logic [15:0] r2h(input real x, input logic neg_zero);
    logic s;
    real a, sc, fr;
    longint k;
    int e, q;
    s = (x < 0.0) || (x == 0.0 && neg_zero);
    a = (x < 0.0) ? -x : x;
    if (a == 0.0) return {s, 15'd0};
    e = 0;
    while (a >= pow2(e + 1)) e++;
    while (a < pow2(e)) e--;
    q = (e - 10 > -24) ? e - 10 : -24;
    sc = a / pow2(q);
    k = longint'($floor(sc));
    fr = sc - real'(k);
    if (fr > 0.5 || (fr == 0.5 && k[0])) k++;
    if (k >= 2048) begin k = k / 2; q++; end
    if (k >= 1024) begin
      if (q + 25 >= 31) return {s, 15'h7C00};
      return {s, 5'(q + 25), 10'(k - 1024)};
    end
    return {s, 5'd0, 10'(k)};
  endfunction

  function automatic logic [15:0] ref_add(input logic [15:0] a, input logic [15:0] b);
    real r;
    if (h_nan(a) || h_nan(b)) return 16'h7E00;
    if (h_inf(a) && h_inf(b)) return (a[15] == b[15]) ? a : 16'h7E00;
    if (h_inf(a)) return a;
    if (h_inf(b)) return b;
    r = h2r(a) + h2r(b);
    return r2h(r, (r == 0.0) && a[15] && b[15]);
  endfunction

  function automatic logic [15:0] ref_mul(input logic [15:0] a, input logic [15:0] b);
    logic s;
    s = a[15] ^ b[15];
    if (h_nan(a) || h_nan(b)) return 16'h7E00;
    if ((h_inf(a) && b[14:0] == 0) || (h_inf(b) && a[14:0] == 0)) return 16'h7E00;
    if (h_inf(a) || h_inf(b)) return {s, 15'h7C00};
    return r2h(h2r(a) * h2r(b), s);
  endfunction

  function automatic real f2r(input logic [31:0] f);
    int e;
    real m;
    e = int'(f[30:23]);
    if (e == 0) m = real'(f[22:0]) * pow2(-149);
    else        m = (1.0 + real'(f[22:0]) / 8388608.0) * pow2(e - 127);
    return f[31] ? -m : m;
  endfunction

  function automatic logic [15:0] ref_f2h(input logic [31:0] f);
    if (f[30:23] == 8'hFF) return (f[22:0] != 0) ? 16'h7E00 : {f[31], 15'h7C00};
    return r2h(f2r(f), f[31]);
  endfunction

  // Exact binary32 encoding of a finite binary16 value.
  function automatic logic [31:0] ref_h2f(input logic [15:0] h);
    real a;
    int e;
    logic [31:0] r;
    if (h_inf(h)) return {h[15], 8'hFF, 23'd0};
    if (h_nan(h)) return {h[15], 8'hFF, 1'b1, h[8:0], 13'd0};
    a = h2r(h);
    if (a < 0.0) a = -a;
    if (a == 0.0) return {h[15], 31'd0};
    e = 0;
    while (a >= pow2(e + 1)) e++;
    while (a < pow2(e)) e--;
    r = {h[15], 8'(e + 127), 23'(longint'((a / pow2(e) - 1.0) * 8388608.0))};
    return r;
  endfunction

  // A random binary32 value in about [-2, 2], with coarse mantissa so that
  // dot products stay well inside binary16 range.
  function automatic logic [31:0] rand_f32();
    logic [31:0] v;
    v = {$urandom_range(1, 0) == 1, 8'(127 - $urandom_range(4, 0)), 23'($urandom) };
    if ($urandom_range(15, 0) == 0) v = 32'd0;
    return v;
  endfunction

  // Pairwise reduction of VEC lane sums, as the PE adder tree: node i of a
  // heap of 2*VEC-1 nodes is the sum of nodes 2i+1 and 2i+2.
  function automatic logic [15:0] ref_reduce(input logic [15:0] lanes [], input int vec);
    logic [15:0] node [];
    node = new[2 * vec - 1];
    for (int i = 0; i < vec; i++) node[vec - 1 + i] = lanes[i];
    for (int i = vec - 2; i >= 0; i--) node[i] = ref_add(node[2*i+1], node[2*i+2]);
    return node[0];
  endfunction

endpackage
