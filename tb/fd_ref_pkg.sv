// fd_ref_pkg: behavioural reference of the face detector for the testbenches.
// It holds a gray image and a copy of the cascade (loaded by the testbench
// from the classifier ROM), and computes integral images, window verdicts
// and the expected detection list with plain integer arithmetic, following
// the definitions in the RTL headers but none of its structure.
package fd_ref_pkg;
  import fd_pkg::*;

  int gray [IMG_H][IMG_W];

  // cascade copy
  int st_first [16], st_nfeat [16], st_thr [16];
  int f_nrect [256], f_thr [256], f_left [256], f_right [256];
  int r_x [256][3], r_y [256][3], r_w [256][3], r_h [256][3], r_wt [256][3];

  function automatic int gray_of(logic [11:0] rgb);
    int r8 = int'(rgb[11:8]) * 17, g8 = int'(rgb[7:4]) * 17, b8 = int'(rgb[3:0]) * 17;
    return (77 * r8 + 150 * g8 + 29 * b8) / 256;
  endfunction

  function automatic longint isqrt(longint v);
    longint r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic longint isqrt_fast(longint v);
    longint r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // sum over a rectangle of the image
  function automatic longint rsum(int x, int y, int w, int h, bit sq);
    longint s = 0;
    for (int j = y; j < y + h; j++)
      for (int i = x; i < x + w; i++)
        s += sq ? longint'(gray[j][i]) * gray[j][i] : longint'(gray[j][i]);
    return s;
  endfunction

  // integral image S(r,c) of the strip starting at row y0 (r = 0..WIN, c = 0..IMG_W)
  longint strip_s [WIN+1][IMG_W+1];
  longint strip_q [WIN+1][IMG_W+1];
  function automatic void build_strip(int y0);
    for (int r = 0; r <= WIN; r++)
      for (int c = 0; c <= IMG_W; c++) begin
        if (r == 0 || c == 0) begin
          strip_s[r][c] = 0; strip_q[r][c] = 0;
        end else begin
          strip_s[r][c] = strip_s[r-1][c] + strip_s[r][c-1] - strip_s[r-1][c-1] + gray[y0+r-1][c-1];
          strip_q[r][c] = strip_q[r-1][c] + strip_q[r][c-1] - strip_q[r-1][c-1]
                          + longint'(gray[y0+r-1][c-1]) * gray[y0+r-1][c-1];
        end
      end
  endfunction

  function automatic longint srect(int x, int y, int w, int h, bit sq);
    if (sq) return strip_q[y+h][x+w] - strip_q[y][x+w] - strip_q[y+h][x] + strip_q[y][x];
    return strip_s[y+h][x+w] - strip_s[y][x+w] - strip_s[y+h][x] + strip_s[y][x];
  endfunction

  // verdict of the window at column x of the strip held in strip_s/strip_q;
  // also returns how many stages it passed
  function automatic bit eval_window(int x, output int passed);
    longint s = srect(x, 0, WIN, WIN, 0);
    longint q = srect(x, 0, WIN, WIN, 1);
    longint vn = longint'(WIN_AREA) * q - s * s;
    longint sd;
    if (vn < 0) vn = 0;
    sd = isqrt_fast(vn);
    passed = 0;
    for (int st = 0; st < NUM_STAGES; st++) begin
      longint ssum = 0;
      for (int k = 0; k < st_nfeat[st]; k++) begin
        int f = st_first[st] + k;
        longint v = 0;
        for (int r = 0; r < f_nrect[f]; r++)
          v += longint'(r_wt[f][r]) * srect(x + r_x[f][r], r_y[f][r], r_w[f][r], r_h[f][r], 0);
        ssum += (v * 4096 < longint'(f_thr[f]) * sd) ? f_left[f] : f_right[f];
      end
      if (!(ssum > st_thr[st])) return 0;
      passed++;
    end
    return 1;
  endfunction

  // face pattern used by the testbenches: value (0..15, one nibble per
  // colour channel, gray) of pixel (i, j) of a 24x24 face
  function automatic int face_nibble(int i, int j);
    if (j >= 5 && j <= 9 && ((i >= 3 && i <= 8) || (i >= 15 && i <= 20))) return 2;   // eyes
    if (j >= 15 && j <= 17 && i >= 6 && i <= 17) return 3;                            // mouth
    return 12;                                                                        // skin
  endfunction
endpackage
