// reuse_pkg: types, constants and elaboration-time functions shared by the
// data-reuse memory system.
//
// An access pattern is the set of constant offsets c of the references
// A[i0+c0][i1+c1] that one loop iteration makes. It is held as a bit matrix
// pattern_t, bit [r][c] set when offset (r,c) is referenced, with the pattern
// pushed to row 0 and column 0. The loop's move is delta=(0,1) (the inner
// index i1 steps by one), so by the reuse theorem every reference of a row
// can reuse the element read for the row's right-most reference (its head)
// after (c_head - c) iterations. Only the heads go to memory; the functions
// below derive from a pattern everything the hardware needs at elaboration
// time: which rows are used, each row's head and tail column, and the
// smallest bank count N for which the partition vector alpha=(1,0) maps the
// heads of one iteration to distinct banks.
//
// The benchmark patterns are the eight 2-D kernels the method is evaluated
// on; the 3x3-without-centre pattern is also the running example of the
// method (a 1920x1080 image, loop bounds 1918 x 1078).
package reuse_pkg;

  localparam int unsigned MAXR = 8;   // largest pattern height supported
  localparam int unsigned MAXC = 8;   // largest pattern width supported

  typedef logic [MAXR-1:0][MAXC-1:0] pattern_t;

  // Build helpers: one row of a pattern from a column bit string, where bit c
  // of the string is column c.
  function automatic pattern_t pat_rows5(input logic [MAXC-1:0] r0, input logic [MAXC-1:0] r1,
                                         input logic [MAXC-1:0] r2, input logic [MAXC-1:0] r3,
                                         input logic [MAXC-1:0] r4);
    pattern_t p;
    p    = '0;
    p[0] = r0;
    p[1] = r1;
    p[2] = r2;
    p[3] = r3;
    p[4] = r4;
    return p;
  endfunction

  // Benchmark access patterns (column 0 is bit 0 of each row string).
  localparam pattern_t P_BICUBIC   = pat_rows5(8'b101,   8'b000,   8'b101,   8'b0,     8'b0);
  localparam pattern_t P_DENOISE   = pat_rows5(8'b010,   8'b101,   8'b010,   8'b0,     8'b0);
  localparam pattern_t P_MOTION_LH = pat_rows5(8'b111111, 8'b0,    8'b0,     8'b0,     8'b0);
  localparam pattern_t P_DECONV    = pat_rows5(8'b010,   8'b111,   8'b010,   8'b0,     8'b0);
  localparam pattern_t P_PREWITT   = pat_rows5(8'b111,   8'b101,   8'b111,   8'b0,     8'b0);
  localparam pattern_t P_SOBEL     = pat_rows5(8'b111,   8'b111,   8'b111,   8'b0,     8'b0);
  localparam pattern_t P_LOG       = pat_rows5(8'b00100, 8'b01110, 8'b11111, 8'b01110, 8'b00100);
  localparam pattern_t P_CANNY     = pat_rows5(8'b11111, 8'b11111, 8'b11111, 8'b11111, 8'b11111);
  // Running example: the eight neighbours of A[i0+1][i1+1].
  localparam pattern_t P_EXAMPLE   = P_PREWITT;

  function automatic bit row_used(input pattern_t p, input int unsigned r);
    return (r < MAXR) && (p[r] != '0);
  endfunction

  // Right-most referenced column of row r (the head, read from memory).
  function automatic int unsigned row_cmax(input pattern_t p, input int unsigned r);
    int unsigned m;
    m = 0;
    if (r < MAXR)
      for (int unsigned c = 0; c < MAXC; c++)
        if (p[r][c]) m = c;
    return m;
  endfunction

  // Left-most referenced column of row r (the tail of its reuse chain).
  function automatic int unsigned row_cmin(input pattern_t p, input int unsigned r);
    int unsigned m;
    m = 0;
    if (r < MAXR)
      for (int c = MAXC - 1; c >= 0; c--)
        if (p[r][c]) m = c;
    return m;
  endfunction

  // Number of chain registers row r needs: its reuse distance head-to-tail.
  function automatic int unsigned row_len(input pattern_t p, input int unsigned r);
    return row_used(p, r) ? row_cmax(p, r) - row_cmin(p, r) : 0;
  endfunction

  function automatic int unsigned pat_height(input pattern_t p);
    int unsigned h;
    h = 0;
    for (int unsigned r = 0; r < MAXR; r++)
      if (p[r] != '0) h = r + 1;
    return h;
  endfunction

  function automatic int unsigned pat_width(input pattern_t p);
    int unsigned w;
    w = 0;
    for (int unsigned r = 0; r < MAXR; r++)
      for (int unsigned c = 0; c < MAXC; c++)
        if (p[r][c] && c + 1 > w) w = c + 1;
    return w;
  endfunction

  function automatic int unsigned num_refs(input pattern_t p);
    int unsigned n;
    n = 0;
    for (int unsigned r = 0; r < MAXR; r++)
      for (int unsigned c = 0; c < MAXC; c++)
        if (p[r][c]) n++;
    return n;
  endfunction

  function automatic int unsigned num_rows_used(input pattern_t p);
    int unsigned n;
    n = 0;
    for (int unsigned r = 0; r < MAXR; r++)
      if (p[r] != '0) n++;
    return n;
  endfunction

  // Smallest N such that the heads of one iteration, which sit in the used
  // rows i0+r, fall in distinct banks under B(x) = x0 % N (alpha = (1,0)):
  // no two used row offsets may be congruent modulo N (Corollary 1).
  function automatic int unsigned min_banks(input pattern_t p);
    for (int unsigned n = 1; n <= MAXR; n++) begin
      bit ok;
      ok = 1'b1;
      for (int unsigned a = 0; a < MAXR; a++)
        for (int unsigned b = a + 1; b < MAXR; b++)
          if (row_used(p, a) && row_used(p, b) && ((b - a) % n == 0)) ok = 1'b0;
      if (ok) return n;
    end
    return MAXR;
  endfunction

  // Words per bank under the revised padding method for a W0 x W1 array.
  //   alpha1 == 0            : k=1 on dimension 0, F = (x0/N)*W1 + x1
  //   alpha0 == 0            : k=1 on dimension 1, F = (x1/N)*W0 + x0
  //   both non-zero          : k=2, pad dimension 1, F = x0*ceil(W1/N) + x1/N
  function automatic longint unsigned bank_depth(input longint unsigned w0, input longint unsigned w1,
                                                 input longint unsigned n, input int unsigned a0,
                                                 input int unsigned a1);
    if (a1 == 0) return ((w0 + n - 1) / n) * w1;
    if (a0 == 0) return ((w1 + n - 1) / n) * w0;
    return w0 * ((w1 + n - 1) / n);
  endfunction

  // Words of bank b alone. With alpha = (1,0) (k = 1) bank b holds exactly
  // the rows x0 = b, b+N, b+2N, ... of the array, so each bank is sized to
  // its own rows and nothing is wasted even when N does not divide W0.
  // Other partition vectors use the common depth of bank_depth().
  function automatic longint unsigned bank_depth_of(input longint unsigned w0, input longint unsigned w1,
                                                    input longint unsigned n, input int unsigned a0,
                                                    input int unsigned a1, input longint unsigned b);
    if (a0 == 1 && a1 == 0) return ((w0 + n - 1 - b) / n) * w1;
    return bank_depth(w0, w1, n, a0, a1);
  endfunction

  function automatic int unsigned gcd(input int unsigned a, input int unsigned b);
    while (b != 0) begin
      int unsigned t;
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Bit width able to index n items (at least 1).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
