// tb_pix_pkg: test-image generator shared by the testbenches. pix() gives
// the 8-bit value sensor s (0 = A .. 3 = D) reports for pixel k of its t-th
// exposure at gain setting g. The mix of terms makes neighbouring pixels,
// lines, sensors and gains all differ.
package tb_pix_pkg;
  function automatic logic [7:0] pix(int s, int t, int k, int g);
    return 8'((s * 61) + (t * 17) + (k * 3) + (k >> 4) + (g * 29) + ((t * k) >> 5));
  endfunction

  // Pdata word of a group of four sensors, sensors base .. base+3.
  function automatic logic [31:0] pix_word(int t, int k, int g, int base = 0);
    return {pix(base, t, k, g), pix(base + 1, t, k, g),
            pix(base + 2, t, k, g), pix(base + 3, t, k, g)};
  endfunction
endpackage
