// sobel_ref_pkg: reference model used by the testbenches. It computes, pixel
// by pixel and independently of the RTL, the Sobel gradients of Eq. (1), the
// edge decision |Gx|+|Gy| > threshold and the orientation atan(|Gy|/|Gx|) in
// half degrees (computed with real arithmetic). Border pixels (first/last row
// and column) have no full 3x3 neighbourhood and are defined as Gx = Gy = 0.
package sobel_ref_pkg;

  // image stored as a flat byte array, row-major, width w, height h
  function automatic int ref_gx(const ref byte unsigned img[], input int w, input int h,
                                input int x, input int y);
    if (x < 1 || y < 1 || x > w - 2 || y > h - 2) return 0;
    return (int'(img[(y-1)*w + x+1]) + 2*int'(img[y*w + x+1]) + int'(img[(y+1)*w + x+1]))
         - (int'(img[(y-1)*w + x-1]) + 2*int'(img[y*w + x-1]) + int'(img[(y+1)*w + x-1]));
  endfunction

  function automatic int ref_gy(const ref byte unsigned img[], input int w, input int h,
                                input int x, input int y);
    if (x < 1 || y < 1 || x > w - 2 || y > h - 2) return 0;
    return (int'(img[(y-1)*w + x-1]) + 2*int'(img[(y-1)*w + x]) + int'(img[(y-1)*w + x+1]))
         - (int'(img[(y+1)*w + x-1]) + 2*int'(img[(y+1)*w + x]) + int'(img[(y+1)*w + x+1]));
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic byte unsigned ref_edge(input int gx, input int gy, input int thr);
    return ((iabs(gx) + iabs(gy)) > thr) ? 8'hFF : 8'h00;
  endfunction

  // exact orientation in half degrees (real); 0 when gx = gy = 0
  function automatic real ref_angle(input int gx, input int gy);
    if (gx == 0 && gy == 0) return 0.0;
    return $atan2(real'(iabs(gy)), real'(iabs(gx))) * 360.0 / 3.14159265358979;
  endfunction

  // |hw - exact| <= 1 half-degree unit
  function automatic bit angle_ok(input int hw, input int gx, input int gy);
    real d;
    d = real'(hw) - ref_angle(gx, gy);
    return (d <= 1.0) && (d >= -1.0);
  endfunction

  // test picture: checkerboard of 16x16 tiles (40 / 200) plus noise, and a
  // diagonal ramp band, so edges of every orientation appear
  function automatic byte unsigned test_pixel(input int x, input int y, input int seed);
    int v;
    v = ((((x >> 4) + (y >> 4) + seed) & 1) != 0) ? 200 : 40;
    if (((x + 2*y + seed) % 37) < 6) v = (x * 7 + y * 3) & 255;
    v = v + int'($urandom_range(0, 15)) - 8;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return byte'(v);
  endfunction

endpackage
