// tb_ref_pkg: reference model for the testbenches.
//
// binary32 arithmetic is done here in double precision and rounded once to
// binary32 (round to nearest even, subnormals flushed to zero), which gives
// the correctly rounded single-precision sum and product independently of the
// RTL's own adder and multiplier.  The stencil kernels below apply the same
// formulas, in the same operation order, as the SSTs, on whole grids held in
// dynamic arrays (index = x + W*(y + H*z)).
package tb_ref_pkg;

  typedef logic [31:0] word_t;

  function automatic real f2r(input word_t a);
    logic [63:0] d;
    if (a[30:23] == 8'd0) return 0.0;
    d = {a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic word_t r2f(input real r);
    logic [63:0] d;
    logic        s, up;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    up = d[28] && ((|d[27:0]) || d[29]);
    m  = m + 25'(up);
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, e[7:0], m[22:0]};
  endfunction

  function automatic word_t radd(input word_t a, input word_t b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic word_t rmul(input word_t a, input word_t b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // random binary32 value with magnitude roughly 2^-7 .. 2^8
  function automatic word_t rand_f();
    logic [31:0] r;
    r = $urandom;
    return {r[31], 8'(120 + ($urandom % 16)), r[22:0]};
  endfunction

  // random Game-of-Life cell: mostly 0/1, now and then another non-zero value
  function automatic word_t rand_cell();
    int u;
    u = int'($urandom % 100);
    if (u < 60) return 32'd0;
    if (u < 95) return 32'd1;
    return $urandom | 32'd1;
  endfunction

  localparam word_t C_FIFTH   = 32'h3E4C_CCCD;
  localparam word_t C_SEVENTH = 32'h3E12_4925;
  localparam word_t C_NINTH   = 32'h3DE3_8E39;
  localparam word_t C_EIGHTH  = 32'h3E00_0000;
  localparam word_t C_SIX     = 32'h40C0_0000;

  function automatic bit on_border(int x, int y, int z, int W, int H, int D);
    return x == 0 || x == W-1 || y == 0 || y == H-1 || (D > 1 && (z == 0 || z == D-1));
  endfunction

  // kind: 0 jacobi2d, 1 seidel2d, 2 life2d, 3 jacobi3d, 4 heat3d
  function automatic void step(input int kind, input int W, input int H, input int D,
                               ref word_t g[]);
    word_t o[];
    o = new[g.size()];
    for (int z = 0; z < D; z++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int    i;
          word_t acc, lap, t6;
          i = x + W * (y + H * z);
          if (on_border(x, y, z, W, H, D)) begin
            o[i] = g[i];
          end else begin
            case (kind)
              0: begin
                acc = radd(g[i], g[i-1]);
                acc = radd(acc, g[i+1]);
                acc = radd(acc, g[i+W]);
                acc = radd(acc, g[i-W]);
                o[i] = rmul(C_FIFTH, acc);
              end
              1: begin  // in place: rows above and left neighbour already new
                acc = radd(o[i-W-1], o[i-W]);
                acc = radd(acc, o[i-W+1]);
                acc = radd(acc, o[i-1]);
                acc = radd(acc, g[i]);
                acc = radd(acc, g[i+1]);
                acc = radd(acc, g[i+W-1]);
                acc = radd(acc, g[i+W]);
                acc = radd(acc, g[i+W+1]);
                o[i] = rmul(C_NINTH, acc);
              end
              2: begin
                int n;
                n = 0;
                for (int dy = -1; dy <= 1; dy++)
                  for (int dx = -1; dx <= 1; dx++)
                    if ((dx != 0 || dy != 0) && g[i + dx + W*dy] != 0) n++;
                o[i] = (n == 3 || (n == 2 && g[i] != 0)) ? 32'd1 : 32'd0;
              end
              3: begin
                acc = radd(g[i], g[i-1]);
                acc = radd(acc, g[i+1]);
                acc = radd(acc, g[i-W]);
                acc = radd(acc, g[i+W]);
                acc = radd(acc, g[i-W*H]);
                acc = radd(acc, g[i+W*H]);
                o[i] = rmul(C_SEVENTH, acc);
              end
              default: begin
                acc = radd(g[i-1], g[i+1]);
                acc = radd(acc, g[i-W]);
                acc = radd(acc, g[i+W]);
                acc = radd(acc, g[i-W*H]);
                acc = radd(acc, g[i+W*H]);
                t6  = rmul(C_SIX, g[i]);
                lap = radd(acc, {~t6[31], t6[30:0]});
                o[i] = radd(g[i], rmul(C_EIGHTH, lap));
              end
            endcase
          end
        end
    g = o;
  endfunction

endpackage
