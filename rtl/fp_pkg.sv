// fp_pkg: IEEE-754 single precision add and multiply as combinational
// functions, used by the ALU's floating point instructions.
//
// The design description has the floating point instructions written as
// functions inside the ALU that use neither clock nor reset; how they work is
// not given, so these are this design's own. Both round to nearest, ties to
// even. Subnormal inputs are read as zero and results that would be subnormal
// are flushed to a signed zero; an overflow gives infinity; an input with the
// maximum exponent (infinity or NaN) is passed through unchanged.
package fp_pkg;

  typedef logic [31:0] f32_t;

  // Round a 24-bit significand with guard and sticky bits, then pack.
  // exp_in is the biased exponent of the unrounded value (may be out of range).
  function automatic f32_t fp_pack(input logic sign, input int exp_in,
                                   input logic [23:0] man, input logic guard,
                                   input logic sticky);
    logic [24:0] rounded;
    logic        up;
    int e;
    e = exp_in;
    up = guard & (sticky | man[0]);
    rounded = {1'b0, man} + {24'd0, up};
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e = e + 1;
    end
    if (e >= 255)     return {sign, 8'hff, 23'd0};
    else if (e <= 0)  return {sign, 31'd0};
    else              return {sign, e[7:0], rounded[22:0]};
  endfunction

  function automatic f32_t fp_add(input f32_t a, input f32_t b);
    logic        sa, sb, sx, sy;
    logic [7:0]  ea, eb;
    logic [23:0] mx, my;
    int          ex, d, lz;
    logic [26:0] ax, by;          // significand, guard, round, sticky
    logic [27:0] s;
    logic        st;
    sa = a[31]; ea = a[30:23];
    sb = b[31]; eb = b[30:23];
    if (ea == 8'hff) return a;
    if (eb == 8'hff) return b;
    if (ea == 8'd0 && eb == 8'd0) return {sa & sb, 31'd0};
    if (ea == 8'd0) return b;
    if (eb == 8'd0) return a;
    // order the operands so that |x| >= |y|
    if (a[30:0] >= b[30:0]) begin
      sx = sa; ex = int'(ea); mx = {1'b1, a[22:0]};
      sy = sb; d  = int'(ea) - int'(eb); my = {1'b1, b[22:0]};
    end else begin
      sx = sb; ex = int'(eb); mx = {1'b1, b[22:0]};
      sy = sa; d  = int'(eb) - int'(ea); my = {1'b1, a[22:0]};
    end
    ax = {mx, 3'b000};
    if (d >= 27) begin
      by = 27'd1;                               // only the sticky bit is left
    end else begin
      by = {my, 3'b000} >> d;
      st = |({my, 3'b000} & ((27'd1 << d) - 27'd1));   // bits shifted out
      by[0] = by[0] | st;
    end
    if (sx == sy) begin
      s = {1'b0, ax} + {1'b0, by};
      if (s[27]) begin
        s  = {1'b0, s[27:2], s[1] | s[0]};
        ex = ex + 1;
      end
    end else begin
      s = {1'b0, ax} - {1'b0, by};
      if (s == 28'd0) return 32'd0;            // exact cancellation gives +0
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (s[i]) break;
        lz++;
      end
      s  = s << lz;
      ex = ex - lz;
    end
    return fp_pack(sx, ex, s[26:3], s[2], s[1] | s[0]);
  endfunction

  function automatic f32_t fp_mul(input f32_t a, input f32_t b);
    logic        sg;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    int          e;
    sg = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    if (ea == 8'hff) return {sg, a[30:0]};
    if (eb == 8'hff) return {sg, b[30:0]};
    if (ea == 8'd0 || eb == 8'd0) return {sg, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(ea) + int'(eb) - 127;
    if (p[47]) return fp_pack(sg, e + 1, p[47:24], p[23], |p[22:0]);
    else       return fp_pack(sg, e,     p[46:23], p[22], |p[21:0]);
  endfunction

endpackage
