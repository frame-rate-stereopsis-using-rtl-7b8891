// stereo_ref_pkg: behavioural reference model of the census stereo matcher,
// written directly from the definitions (no sliding sums, no pipelines) and
// used by the testbenches to compute expected values.
//
// Images are flat arrays indexed y*W + x. census_ref() returns the census word
// of image pixel (x, y), zero within 2 pixels of the border.
// disparity_ref() returns, for every pixel, the disparity 0..NDISP*NPASS-1
// that maximises the 11x11 sum of equal census bits between right pixel
// (p, q) and left pixel (p+d, q); a left pixel without a valid census word
// (p+d > W-3) contributes 0. Ties go to the smaller disparity; pixels closer
// than 7 to the border get 0.
package stereo_ref_pkg;
  import stereo_pkg::*;

  typedef int unsigned uarr_t [];

  function automatic census_t census_ref(uarr_t img, int w, int h, int x, int y);
    census_t cw = '0;
    int k = 0;
    if (x < 2 || x > w-3 || y < 2 || y > h-3) return '0;
    for (int r = 0; r < CWIN; r++)
      for (int c = 0; c < CWIN; c++)
        if (CENSUS_MASK[r*CWIN+c]) begin
          cw[k] = img[(y-2+r)*w + (x-2+c)] < img[y*w + x];
          k++;
        end
    return cw;
  endfunction

  function automatic int unsigned equal_bits(census_t a, census_t b);
    census_t s = ~(a ^ b);
    int unsigned n = 0;
    for (int i = 0; i < CENSUS_BITS; i++) n += s[i];
    return n;
  endfunction

  // census words of a whole image
  function automatic uarr_t census_image(uarr_t img, int w, int h);
    uarr_t cw = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        cw[y*w+x] = 32'(census_ref(img, w, h, x, y));
    return cw;
  endfunction

  // window score of right pixel (u, v) at disparity d, from census images
  function automatic int unsigned score_ref(uarr_t cl, uarr_t cr, int w, int h,
                                            int u, int v, int d);
    int unsigned s = 0;
    for (int q = v - MWIN/2; q <= v + MWIN/2; q++)
      for (int p = u - MWIN/2; p <= u + MWIN/2; p++)
        if (q >= 0 && q < h && p >= 0 && p < w && p + d <= w - 3)
          s += equal_bits(census_t'(cr[q*w+p]), census_t'(cl[q*w+p+d]));
    return s;
  endfunction

  // full disparity image from census images; window sums are taken from a
  // summed-area table of the per-pixel terms of each disparity
  function automatic uarr_t disparity_ref(uarr_t cl, uarr_t cr, int w, int h);
    uarr_t dm = new[w*h];
    uarr_t best = new[w*h];
    uarr_t sat = new[(w+1)*(h+1)];
    for (int d = 0; d < NDISP*NPASS; d++) begin
      foreach (sat[i]) sat[i] = 0;
      for (int q = 0; q < h; q++)
        for (int p = 0; p < w; p++) begin
          int unsigned e = (p + d <= w - 3) ? equal_bits(census_t'(cr[q*w+p]), census_t'(cl[q*w+p+d])) : 0;
          sat[(q+1)*(w+1)+p+1] = e + sat[q*(w+1)+p+1] + sat[(q+1)*(w+1)+p] - sat[q*(w+1)+p];
        end
      for (int v = 7; v <= h-8; v++)
        for (int u = 7; u <= w-8; u++) begin
          int x0 = u - MWIN/2, x1 = u + MWIN/2 + 1, y0 = v - MWIN/2, y1 = v + MWIN/2 + 1;
          int unsigned s = sat[y1*(w+1)+x1] - sat[y0*(w+1)+x1] - sat[y1*(w+1)+x0] + sat[y0*(w+1)+x0];
          if (d == 0 || s > best[v*w+u]) begin best[v*w+u] = s; dm[v*w+u] = d; end
        end
    end
    return dm;
  endfunction

endpackage
