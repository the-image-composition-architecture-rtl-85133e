// Reference model and stimulus generator shared by the Compositor testbenches.
//
// The model computes a composed pixel arithmetically, with plain integer
// operations, from the composition equations and the number formats of the
// design (alpha 255 -> 256 on entry and back on exit, beta in sixteenths from
// the nine weighted Z comparisons, products truncated). It does not reuse any
// RTL. The generator produces test rasters: each is a tilted plane of Z
// carrying a disc-shaped object with an anti-aliased rim and some
// semi-transparent pixels on a transparent black, far background, with
// colours premultiplied by alpha, as a graphics processor would render it.
package comp_ref_pkg;

  typedef struct packed {
    logic [15:0] z;
    logic [7:0]  a;
    logic [7:0]  r;
    logic [7:0]  g;
    logic [7:0]  b;
  } rpix_t;

  // Occurrence counters of the mechanisms the model exercises.
  typedef struct {
    int confused;       // 0 < beta < 1
    int all_front;      // beta = 1
    int all_back;       // beta = 0
    int min_back;       // Back Z chosen
    int min_front;      // Front Z chosen
    int alpha_wrap;     // alpha_F + alpha_B = 2.0 wraps to 0
    int one_bypass;     // a multiplier operand equals 1.0
    int alpha_augment;  // incoming alpha >= 0.5 incremented
    int big_z_diff;     // corner Z difference beyond 16 signed bits
  } mech_t;

  function automatic int ainc(int a);
    return (a >= 128) ? a + 1 : a;
  endfunction

  function automatic int adec(int a9);
    return (a9 >= 128) ? (a9 - 1) : a9;
  endfunction

  function automatic int one_minus9(int x);
    return 256 - x;
  endfunction

  // Corners in the order TL, TR, BR, BL. Front wins where it is nearer or level.
  function automatic int beta16(int zf[4], int zb[4]);
    int d[4];
    int e[4];
    int s;
    for (int i = 0; i < 4; i++) d[i] = zb[i] - zf[i];
    e[0] = d[0] + d[1];   // top
    e[1] = d[1] + d[2];   // right
    e[2] = d[2] + d[3];   // bottom
    e[3] = d[3] + d[0];   // left
    s = 0;
    for (int i = 0; i < 4; i++) begin
      if (d[i] >= 0) s += 1;
      if (e[i] >= 0) s += 2;
    end
    if (e[1] + e[3] >= 0) s += 4;
    return s;
  endfunction

  function automatic rpix_t compose(rpix_t f, rpix_t b, int beta, ref mech_t m);
    rpix_t o;
    int af, ab, fb, ff, a9;
    af = ainc(int'(f.a));
    ab = ainc(int'(b.a));
    fb = one_minus9((beta * af) >> 4);
    ff = one_minus9(((16 - beta) * ab) >> 4);
    a9 = af + ab - ((af * ab) >> 8);
    o.z = (b.z < f.z) ? b.z : f.z;
    o.a = 8'(adec(a9));
    o.r = 8'(((int'(b.r) * fb) >> 8) + ((int'(f.r) * ff) >> 8));
    o.g = 8'(((int'(b.g) * fb) >> 8) + ((int'(f.g) * ff) >> 8));
    o.b = 8'(((int'(b.b) * fb) >> 8) + ((int'(f.b) * ff) >> 8));
    if (beta == 16) m.all_front++;
    else if (beta == 0) m.all_back++;
    else m.confused++;
    if (b.z < f.z) m.min_back++; else m.min_front++;
    if (af == 256 && ab == 256) m.alpha_wrap++;
    if (af == 256 || ab == 256 || fb == 256 || ff == 256 || beta == 16) m.one_bypass++;
    if (f.a >= 128 || b.a >= 128) m.alpha_augment++;
    return o;
  endfunction

  function automatic int unsigned mix(int unsigned a, int unsigned b, int unsigned c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D;
    h ^= h >> 15;
    h *= 32'h2C1B3C6D;
    h ^= h >> 12;
    return h;
  endfunction

  // Pixel (x, y) of test raster number seed, for a w x h raster.
  function automatic rpix_t gen_pixel(int seed, int x, int y, int w, int h);
    rpix_t p;
    int cx, cy, rad, dx, dy, d2, z, alpha;
    int unsigned hsh;
    int sx, sy;
    cx  = (w * (1 + (seed * 5) % 7)) / 8;
    cy  = (h * (1 + (seed * 3) % 7)) / 8;
    rad = (w + h) / 5 + seed % 4;
    sx  = ((seed % 3) - 1) * (37 + 11 * seed);
    sy  = (((seed / 3) % 3) - 1) * (29 + 7 * seed) + 3;
    dx  = x - cx;
    dy  = y - cy;
    d2  = dx * dx + dy * dy;
    hsh = mix(seed, x, y);
    z   = 20000 + seed * 1500 + sx * dx + sy * dy + int'(hsh % 7);
    if (z < 0) z = 0;
    if (z > 60000) z = 60000;
    if (d2 <= (rad - 1) * (rad - 1))
      alpha = (hsh % 9 == 0) ? int'((hsh >> 8) % 256) : 255;
    else if (d2 <= (rad + 1) * (rad + 1))
      alpha = int'((hsh >> 8) % 256);
    else
      alpha = 0;
    if (alpha == 0) begin
      p = '0;
      p.z = (hsh % 5 == 0) ? 16'd0 : 16'hFFFF;  // a few near background points
    end else begin
      p.z = 16'(z);
      p.a = 8'(alpha);
      p.r = 8'(((40 + seed * 53) % 256) * alpha / 255);
      p.g = 8'(((90 + seed * 97) % 256) * alpha / 255);
      p.b = 8'(((200 + seed * 31) % 256) * alpha / 255);
    end
    return p;
  endfunction

  function automatic logic [7:0] pix_byte(rpix_t p, int k);
    case (k)
      0: return p.z[7:0];
      1: return p.z[15:8];
      2: return p.a;
      3: return p.r;
      4: return p.g;
      default: return p.b;
    endcase
  endfunction

endpackage
