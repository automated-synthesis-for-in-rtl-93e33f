// mul_kernel_pkg: generates NOR/INV kernels for the testbenches.
//
// The kernels run inside one wordline, the same in every wordline of every mat, built
// from these in-memory gates (a NOR with one input is an INV):
//   AND(x,y)     = NOR(~x,~y)                                          (1 op, given ~x,~y)
//   half adder   c = NOR(~a,~b), s = NOR(c, NOR(a,b))                   (5 ops)
//   full adder   cout = NOR3(NOR(a,b), NOR(b,c), NOR(c,a))
//                sum  = INV(NOR(NOR3(~a,~b,~c), NOR(NOR3(a,b,c), cout))) (12 ops)
// gen_mul(n) is an n-bit unsigned multiplication that adds the partial-product rows one
// after the other (row-wise accumulation). gen_dot(n, v) is a v-term dot product of
// n-bit operands: all partial-product rows of all terms are added into one accumulator
// of 2n + clog2(v) bits, which starts at zero. gen_copy(n, v) copies every result bit
// into the copy area of the neighbouring mat. gen_sum adds two bit fields of a wordline.
// gen_dot takes an optional wider accumulator width (wacc) for sums that are added up
// further across mats.
//
// Wordline layout for (n, v), from column 0 upwards (see the lay_* functions):
//   input segment    A_k in 2nk .. 2nk+n-1, B_k in 2nk+n .. 2nk+2n-1, k = 0..v-1
//   partial products n cells
//   functional cells ~A (n), ~B (n), 14 scratch cells
//   output segment   2n + clog2(v) cells (the result)
//   copy area        same width, receives the left-hand neighbour's result
package mul_kernel_pkg;
  import imc_pkg::*;

  function automatic int clog2i(input int x);
    int r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction

  function automatic int lay_pp(input int n, input int v);  return 2 * n * v;      endfunction
  function automatic int lay_na(input int n, input int v);  return lay_pp(n, v) + n; endfunction
  function automatic int lay_nb(input int n, input int v);  return lay_na(n, v) + n; endfunction
  function automatic int lay_t (input int n, input int v);  return lay_nb(n, v) + n; endfunction
  function automatic int lay_out(input int n, input int v); return lay_t(n, v) + 14; endfunction
  function automatic int lay_w (input int n, input int v);  return 2 * n + clog2i(v); endfunction
  function automatic int lay_rx(input int n, input int v);  return lay_out(n, v) + lay_w(n, v); endfunction
  function automatic int lay_end(input int n, input int v); return lay_rx(n, v) + lay_w(n, v); endfunction

  // scratch cell numbers inside the 14 functional scratch cells
  localparam int T1 = 0, T2 = 1, T3 = 2, T4 = 3, T5 = 4, T6 = 5, XA = 6, XB = 7, XC = 8,
                 SB = 9, CA = 10, CB = 11, ZR = 12, ON = 13;

  function automatic void half_add(inout mop_t q[$], input int t, input int a, input int b,
                                   input int s, input int c);
    q.push_back(mk_nor(1, a, 0, 0, t + XA));
    q.push_back(mk_nor(1, b, 0, 0, t + XB));
    q.push_back(mk_nor(2, t + XA, t + XB, 0, c));
    q.push_back(mk_nor(2, a, b, 0, t + T1));
    q.push_back(mk_nor(2, c, t + T1, 0, s));
  endfunction

  function automatic void full_add(inout mop_t q[$], input int t, input int a, input int b,
                                   input int ci, input int s, input int co);
    q.push_back(mk_nor(2, a, b, 0, t + T1));
    q.push_back(mk_nor(2, b, ci, 0, t + T2));
    q.push_back(mk_nor(2, ci, a, 0, t + T3));
    q.push_back(mk_nor(3, t + T1, t + T2, t + T3, co));
    q.push_back(mk_nor(1, a, 0, 0, t + XA));
    q.push_back(mk_nor(1, b, 0, 0, t + XB));
    q.push_back(mk_nor(1, ci, 0, 0, t + XC));
    q.push_back(mk_nor(3, t + XA, t + XB, t + XC, t + T4));
    q.push_back(mk_nor(3, a, b, ci, t + T5));
    q.push_back(mk_nor(2, t + T5, co, 0, t + T6));
    q.push_back(mk_nor(2, t + T4, t + T6, 0, t + SB));
    q.push_back(mk_nor(1, t + SB, 0, 0, s));
  endfunction

  function automatic void gen_mul(input int n, inout mop_t q[$]);
    int c, cn;
    int pp = lay_pp(n, 1), na = lay_na(n, 1), nb = lay_nb(n, 1), t = lay_t(n, 1);
    int o = lay_out(n, 1);
    for (int i = 0; i < n; i++) q.push_back(mk_nor(1, i, 0, 0, na + i));
    for (int j = 0; j < n; j++) q.push_back(mk_nor(1, n + j, 0, 0, nb + j));
    // first partial-product row straight into the product
    for (int i = 0; i < n; i++) q.push_back(mk_nor(2, na + i, nb, 0, o + i));
    for (int j = 1; j < n; j++) begin
      for (int i = 0; i < n; i++) q.push_back(mk_nor(2, na + i, nb + j, 0, pp + i));
      c = t + CA;
      half_add(q, t, o + j, pp, o + j, c);
      for (int i = 1; i < n - 1; i++) begin
        cn = (c == t + CA) ? t + CB : t + CA;
        full_add(q, t, o + j + i, pp + i, c, o + j + i, cn);
        c = cn;
      end
      // the top position holds an accumulated bit from step 2 on
      if (j == 1) half_add(q, t, pp + n - 1, c, o + j + n - 1, o + j + n);
      else        full_add(q, t, o + j + n - 1, pp + n - 1, c, o + j + n - 1, o + j + n);
    end
  endfunction

  function automatic void gen_dot(input int n, input int v, inout mop_t q[$],
                                  input int wacc = 0);
    int c, cn;
    int pp = lay_pp(n, v), na = lay_na(n, v), nb = lay_nb(n, v), t = lay_t(n, v);
    int o = lay_out(n, v);
    int w = (wacc > 0) ? wacc : lay_w(n, v);
    // accumulator := 0 (ZR = NOR(a0, ~a0) = 0, ON = INV(ZR), acc bit = INV(ON))
    q.push_back(mk_nor(1, 0, 0, 0, na));
    q.push_back(mk_nor(2, 0, na, 0, t + ZR));
    q.push_back(mk_nor(1, t + ZR, 0, 0, t + ON));
    for (int k = 0; k < w; k++) q.push_back(mk_nor(1, t + ON, 0, 0, o + k));
    for (int k = 0; k < v; k++) begin
      for (int i = 0; i < n; i++) q.push_back(mk_nor(1, 2 * n * k + i, 0, 0, na + i));
      for (int j = 0; j < n; j++) q.push_back(mk_nor(1, 2 * n * k + n + j, 0, 0, nb + j));
      for (int j = 0; j < n; j++) begin
        for (int i = 0; i < n; i++) q.push_back(mk_nor(2, na + i, nb + j, 0, pp + i));
        c = t + CA;
        half_add(q, t, o + j, pp, o + j, c);
        for (int i = 1; i < n; i++) begin
          cn = (c == t + CA) ? t + CB : t + CA;
          full_add(q, t, o + j + i, pp + i, c, o + j + i, cn);
          c = cn;
        end
        // ripple the carry through the upper accumulator bits, drop the last one
        for (int p = j + n; p < w; p++) begin
          cn = (c == t + CA) ? t + CB : t + CA;
          half_add(q, t, o + p, c, o + p, cn);
          c = cn;
        end
      end
    end
  endfunction

  // d := a + b over w bits (columns a.., b.., d..), final carry dropped
  function automatic void gen_sum(inout mop_t q[$], input int t, input int a, input int b,
                                  input int d, input int w);
    int c, cn;
    c = t + CA;
    half_add(q, t, a, b, d, c);
    for (int i = 1; i < w; i++) begin
      cn = (c == t + CA) ? t + CB : t + CA;
      full_add(q, t, a + i, b + i, c, d + i, cn);
      c = cn;
    end
  endfunction

  function automatic void gen_copy(input int n, input int v, inout mop_t q[$]);
    for (int k = 0; k < lay_w(n, v); k++)
      q.push_back(mk_copy(lay_out(n, v) + k, lay_rx(n, v) + k));
  endfunction

endpackage
