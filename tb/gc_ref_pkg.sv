// gc_ref_pkg: reference model of the hybrid stochastic/binary arithmetic,
// written from the number formats only, for the testbenches.
//
// It generates the LFSR sequences from tap lists (not from the RTL masks),
// forms each stochastic product by counting the cycles in which both
// comparator conditions hold, and steps second-order sections in plain
// integer arithmetic. Each operation of width n uses the full sequence of
// 2^n - 1 random values, identical from one operation to the next.
package gc_ref_pkg;

  localparam int MAGMAX = 1023;   // largest magnitude (10 bits)

  // Taps (1-based) of the maximal-length polynomials, width n = 3..10.
  function automatic void taps(input int n, output int t1, output int t2,
                               output int t3, output int t4);
    int a [3:10][4];
    a[3] = '{3, 2, 0, 0};
    a[4] = '{4, 3, 0, 0};
    a[5] = '{5, 3, 0, 0};
    a[6] = '{6, 5, 0, 0};
    a[7] = '{7, 6, 0, 0};
    a[8] = '{8, 6, 5, 4};
    a[9] = '{9, 5, 0, 0};
    a[10] = '{10, 7, 0, 0};
    t1 = a[n][0]; t2 = a[n][1]; t3 = a[n][2]; t4 = a[n][3];
  endfunction

  // Next state of the width-n LFSR.
  function automatic int lfsr_next(input int s, input int n);
    int t1, t2, t3, t4, fb;
    taps(n, t1, t2, t3, t4);
    fb = (s >> (t1 - 1)) & 1;
    fb ^= (s >> (t2 - 1)) & 1;
    if (t3 > 0) fb ^= (s >> (t3 - 1)) & 1;
    if (t4 > 0) fb ^= (s >> (t4 - 1)) & 1;
    return ((s << 1) | fb) & ((1 << n) - 1);
  endfunction

  // The n low bits of v in reversed order.
  function automatic int bitrev(input int v, input int n);
    int o;
    o = 0;
    for (int i = 0; i < n; i++) o = (o << 1) | ((v >> i) & 1);
    return o;
  endfunction

  // Random sequence of one operation, starting from the seed 1: the LFSR
  // state (operand streams) or, with rev set, its bit-reversed value
  // (coefficient streams).
  function automatic void seq(input int n, input bit rev, ref int r [1023]);
    int s;
    s = 1;
    for (int t = 0; t < (1 << n) - 1; t++) begin
      r[t] = rev ? bitrev(s, n) : s;
      s = lfsr_next(s, n);
    end
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // Signed product value of operand x (sample) and coefficient c
  // (signed integer, LSB = 2^-9), formed over one operation of width n.
  function automatic int prod(input int x, input int c, input int n,
                              ref int r [1023], ref int u [1023]);
    int mx, mc, cnt, v;
    mx = iabs(x);
    if (mx > MAGMAX) mx = MAGMAX;
    mx = mx >> (10 - n);
    mc = iabs(c) >> (10 - n);
    cnt = 0;
    for (int t = 0; t < (1 << n) - 1; t++)
      if (mx >= r[t] && mc >= u[t]) cnt++;
    v = cnt << (11 - n);
    return ((x < 0) != (c < 0)) ? -v : v;
  endfunction

  // State of one section.
  typedef struct {
    int x0, x1, x2, y1, y2;
    int c [5];
  } sec_t;

  // One operation of a section: returns y[t], shifts in x_in afterwards.
  function automatic int sec_step(ref sec_t s, input int x_in, input int n,
                                  ref int r [1023], ref int u [1023],
                                  output bit sat);
    int acc, y;
    acc = prod(s.x0, s.c[0], n, r, u) + prod(s.x1, s.c[1], n, r, u)
        + prod(s.x2, s.c[2], n, r, u) + prod(s.y1, s.c[3], n, r, u)
        + prod(s.y2, s.c[4], n, r, u);
    sat = 1'b0;
    y = acc;
    if (acc > MAGMAX)  begin y = MAGMAX;  sat = 1'b1; end
    if (acc < -MAGMAX) begin y = -MAGMAX; sat = 1'b1; end
    s.x2 = s.x1; s.x1 = s.x0; s.x0 = x_in;
    s.y2 = s.y1; s.y1 = y;
    return y;
  endfunction

endpackage
