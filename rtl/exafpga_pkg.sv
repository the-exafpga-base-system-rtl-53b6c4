// exafpga_pkg: types, constants and arithmetic shared by the streaming
// stencil pipeline.
//
// The grid elements travel as 32-bit words.  Four of the five kernels work on
// IEEE-754 binary32 values, the Game-of-Life kernel on 32-bit integers.  The
// binary32 adder and multiplier below are combinational functions: round to
// nearest even, subnormal inputs and results flushed to zero, overflow goes
// to infinity, NaN is not produced or propagated specially.  Single-cycle
// combinational arithmetic is this design's own choice; the kernels it
// replaces were generated by high-level synthesis and are pipelined.
package exafpga_pkg;

  typedef logic [31:0] word_t;

  // Stencil kernel carried by the SSTs of a queue.
  typedef enum logic [2:0] {
    K_JACOBI2D = 3'd0,
    K_SEIDEL2D = 3'd1,
    K_LIFE2D   = 3'd2,
    K_JACOBI3D = 3'd3,
    K_HEAT3D   = 3'd4
  } kernel_e;

  // binary32 constants used by the kernels
  localparam word_t FP_ONE_FIFTH   = 32'h3E4C_CCCD;  // 0.2f
  localparam word_t FP_ONE_SEVENTH = 32'h3E12_4925;  // 1/7f
  localparam word_t FP_ONE_NINTH   = 32'h3DE3_8E39;  // 1/9f
  localparam word_t FP_ONE_EIGHTH  = 32'h3E00_0000;  // 0.125f
  localparam word_t FP_SIX         = 32'h40C0_0000;  // 6.0f

  // Round a normalised 27-bit significand (bit 26 = hidden one, bits 2:0 =
  // guard, round, sticky) with a biased exponent, and pack the result.
  function automatic word_t fp_pack(input logic s, input int e, input logic [26:0] x);
    logic [24:0] m;
    logic        up;
    int          ee;
    up = x[2] & (x[1] | x[0] | x[3]);
    m  = {1'b0, x[26:3]} + {24'd0, up};
    ee = e;
    if (m[24]) begin
      m  = m >> 1;
      ee = ee + 1;
    end
    if (ee >= 255)      return {s, 8'hFF, 23'd0};
    else if (ee <= 0)   return {s, 31'd0};
    else                return {s, ee[7:0], m[22:0]};
  endfunction

  function automatic word_t fp_add(input word_t a, input word_t b);
    word_t       hi, lo;
    logic [26:0] mb, ms;
    logic [27:0] sum;
    logic [26:0] x;
    int          d, e, lz;
    logic        sticky;
    // infinities and zeros
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (a[30:23] == 8'd0 && b[30:23] == 8'd0) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 8'd0) return b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:0] >= b[30:0]) begin hi = a; lo = b; end
    else                    begin hi = b; lo = a; end
    d  = int'(hi[30:23]) - int'(lo[30:23]);
    mb = {1'b1, hi[22:0], 3'b000};
    ms = {1'b1, lo[22:0], 3'b000};
    if (d >= 27) begin
      ms = 27'd1;                       // only the sticky bit remains
    end else if (d > 0) begin
      sticky = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < d && ms[i]) sticky = 1'b1;
      ms = (ms >> d) | {26'd0, sticky};
    end
    e = int'(hi[30:23]);
    if (hi[31] == lo[31]) begin
      sum = {1'b0, mb} + {1'b0, ms};
      if (sum[27]) begin
        x = sum[27:1] | {26'd0, sum[0]};
        e = e + 1;
      end else begin
        x = sum[26:0];
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, ms};
      if (sum == 28'd0) return 32'd0;
      lz = 0;
      for (int i = 26; i >= 0; i--)
        if (sum[i] && lz == 0) lz = 27 - i;
      lz = lz - 1;
      x = sum[26:0] << lz;
      e = e - lz;
    end
    return fp_pack(hi[31], e, x);
  endfunction

  function automatic word_t fp_mul(input word_t a, input word_t b);
    logic        s;
    logic [47:0] p;
    logic [26:0] x;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    if (a[30:23] == 8'd0  || b[30:23] == 8'd0)  return {s, 31'd0};
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      x = {p[47:22], |p[21:0]};
      e = e + 1;
    end else begin
      x = {p[46:21], |p[20:0]};
    end
    return fp_pack(s, e, x);
  endfunction

  function automatic word_t fp_neg(input word_t a);
    return {~a[31], a[30:0]};
  endfunction

endpackage
