// tb_video_pkg: the test picture shared by the decoder model and the
// testbenches. Luminance of sample s (0-based, before decimation) of frame
// line l in frame f is 16 + ((f*37 + l*11 + s*5) mod 220), which stays in the
// legal BT.656 range 16..235 (never FF or 00, so it cannot mimic a timing
// reference code) and gives every decimated pixel a value that differs from
// its neighbours.
package tb_video_pkg;
  function automatic logic [7:0] y_of(int unsigned f, int unsigned l, int unsigned s);
    return 8'(16 + ((f * 37 + l * 11 + s * 5) % 220));
  endfunction

  // The 4-bit pixel x of frame line l, as the design should store it.
  function automatic logic [3:0] pix_of(int unsigned f, int unsigned l, int unsigned x,
                                        int unsigned decimate);
    logic [7:0] y;
    y = y_of(f, l, x * decimate);
    return y[7:4];
  endfunction

  // 16-bit word w of a stored line: pixels 4w .. 4w+3, leftmost in the low nibble.
  function automatic logic [15:0] word_of(int unsigned f, int unsigned l, int unsigned w,
                                          int unsigned decimate);
    logic [15:0] r;
    for (int unsigned k = 0; k < 4; k++) r[4*k +: 4] = pix_of(f, l, 4 * w + k, decimate);
    return r;
  endfunction
endpackage
