// tb_img_ref_pkg: reference models shared by the testbenches.
//
// sensor_pix gives the 10-bit value the sensor model outputs for a pixel of a
// frame (a fixed hash of frame, column and row, chosen to reach dark, bright
// and strongly coloured quads, so U and V hit the clamp at 0).  ref_rgb and ref_yuv compute, from first
// principles, what the core must write for one output pixel: the 2x2 Bayer
// quad with its top-left corner at (x, y) (row even: G R, row odd: B G),
// 8 most significant bits of each sample, greens averaged; then the 8-bit
// fixed-point YUV formulas with clamping to 0..255.
package tb_img_ref_pkg;

  function automatic int unsigned sensor_pix(int unsigned frame, int unsigned x, int unsigned y);
    int unsigned h;
    h = (x * 32'd2654435761) ^ (y * 32'd40503) ^ (frame * 32'd97531);
    h = h ^ (h >> 13);
    h = h * 32'd1103515245;
    // mix of random, fully dark and fully bright samples, so that colour
    // differences swing both ways
    case ((h >> 20) & 3)
      0: return (h >> 7) & 32'h3FF;
      1: return ((x ^ y) & 32'd1) != 0 ? 32'h3FF : 32'h000;
      2: return ((x & 32'd1) != 0 && (y & 32'd1) == 0) ? 32'h3FF : ((h >> 9) & 32'h03F);
      default: return (h >> 11) & 32'h3FF;
    endcase
  endfunction

  typedef struct { int r, g, b; } rgb_s;
  typedef struct { int y, u, v; } yuv_s;

  function automatic int clamp(int a);
    return a < 0 ? 0 : (a > 255 ? 255 : a);
  endfunction

  // a is floor-divided by 128
  function automatic int fdiv128(int a);
    return (a >= 0) ? a / 128 : -((-a + 127) / 128);
  endfunction

  function automatic yuv_s ref_yuv_of(rgb_s c);
    yuv_s o;
    o.y = clamp(fdiv128( 38 * c.r + 75 * c.g + 15 * c.b));
    o.u = clamp(fdiv128(-22 * c.r - 42 * c.g + 64 * c.b));
    o.v = clamp(fdiv128( 64 * c.r - 54 * c.g - 10 * c.b));
    return o;
  endfunction

  function automatic rgb_s ref_rgb(int unsigned frame, int unsigned x, int unsigned y);
    rgb_s c;
    int g0, g1;
    g0  = int'(sensor_pix(frame, x,     y    ) >> 2);
    c.r = int'(sensor_pix(frame, x + 1, y    ) >> 2);
    c.b = int'(sensor_pix(frame, x,     y + 1) >> 2);
    g1  = int'(sensor_pix(frame, x + 1, y + 1) >> 2);
    c.g = (g0 + g1) / 2;
    return c;
  endfunction

  function automatic int unsigned ref_word(int unsigned frame, int unsigned x, int unsigned y);
    yuv_s o;
    o = ref_yuv_of(ref_rgb(frame, x, y));
    return (o.y << 16) | (o.u << 8) | o.v;
  endfunction

endpackage
