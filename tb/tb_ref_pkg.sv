// Reference models for the testbenches: an arithmetic model of one PIM
// operation (charge-domain MAV with ramp ADC, offset and calibration) and
// of the whole CNN, written from the formulas, not from the RTL's timing.
package tb_ref_pkg;

  // Offsets of the analog model's four rows, in 1/16 of a ramp step
  // (the defaults of the PIM).
  localparam int OFFS [4] = '{21, 40, 9, 30};

  function automatic int ceil16(int v);
    return (v + 15) / 16;
  endfunction

  // Ideal multiply-and-average: round-half-up of sum(W*X)/16.
  function automatic int mav_ideal(int x [16], logic [15:0] w);
    int s = 0;
    for (int i = 0; i < 16; i++) if (w[i]) s += x[i];
    return (s + 8) / 16;
  endfunction

  // What the PIM returns for row k after calibration: inputs clip at 255
  // ramp steps, the ADC counts ceil((S + offset)/16) steps (at most 255) and
  // subtracts the calibration count ceil(offset/16).
  function automatic int pim_ref(int x [16], logic [15:0] w, int k);
    int s = 0;
    int n, c;
    for (int i = 0; i < 16; i++) if (w[i]) s += (x[i] > 255) ? 255 : x[i];
    n = ceil16(s + OFFS[k]);
    if (n > 255) n = 255;
    c = ceil16(OFFS[k]);
    return (n > c) ? n - c : 0;
  endfunction

  function automatic int relu10(int v);
    if (v < 0) return 0;
    if (v > 1023) return 1023;
    return v;
  endfunction

  typedef logic [3:0][15:0] wword_t;

  // Full CNN: returns the class, fills scores. wm: 26 weight words,
  // bm: 18 biases, img: 32x32 codes (already clipped to 10 bits).
  // Event counters: relu_zero / relu_sat count clipped conv outputs.
  function automatic int cnn_ref(input int img [32][32], input wword_t wm [26],
                                 input int bm [18], output int scores [10],
                                 output int relu_zero, output int relu_sat);
    int f1 [4][29][29];
    int p1 [4][14][14];
    int f2 [4][11][11];
    int p2 [4][5][5];
    int v  [100];
    int x  [16];
    int best;
    relu_zero = 0;
    relu_sat  = 0;
    for (int r = 0; r < 29; r++)
      for (int c = 0; c < 29; c++) begin
        for (int t = 0; t < 16; t++) x[t] = img[r + t/4][c + t%4];
        for (int k = 0; k < 4; k++) begin
          int a = pim_ref(x, wm[0][k], k) + bm[k];
          if (a < 0) relu_zero++;
          if (a > 1023) relu_sat++;
          f1[k][r][c] = relu10(a);
        end
      end
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 14; r++)
        for (int c = 0; c < 14; c++) begin
          int m = f1[k][2*r][2*c];
          if (f1[k][2*r][2*c+1] > m) m = f1[k][2*r][2*c+1];
          if (f1[k][2*r+1][2*c] > m) m = f1[k][2*r+1][2*c];
          if (f1[k][2*r+1][2*c+1] > m) m = f1[k][2*r+1][2*c+1];
          p1[k][r][c] = m;
        end
    for (int r = 0; r < 11; r++)
      for (int c = 0; c < 11; c++) begin
        int acc [4] = '{0, 0, 0, 0};
        for (int ci = 0; ci < 4; ci++) begin
          for (int t = 0; t < 16; t++) x[t] = p1[ci][r + t/4][c + t%4];
          for (int k = 0; k < 4; k++) acc[k] += pim_ref(x, wm[1 + ci][k], k);
        end
        for (int k = 0; k < 4; k++) begin
          int a = acc[k] + bm[4 + k];
          if (a < 0) relu_zero++;
          if (a > 1023) relu_sat++;
          f2[k][r][c] = relu10(a);
        end
      end
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          int m = f2[k][2*r][2*c];
          if (f2[k][2*r][2*c+1] > m) m = f2[k][2*r][2*c+1];
          if (f2[k][2*r+1][2*c] > m) m = f2[k][2*r+1][2*c];
          if (f2[k][2*r+1][2*c+1] > m) m = f2[k][2*r+1][2*c+1];
          p2[k][r][c] = m;
        end
    for (int n = 0; n < 100; n++) v[n] = p2[n/25][(n%25)/5][n%5];
    for (int j = 0; j < 10; j++) scores[j] = bm[8 + j];
    for (int g = 0; g < 3; g++)
      for (int m = 0; m < 7; m++) begin
        for (int t = 0; t < 16; t++) x[t] = (16*m + t < 100) ? v[16*m + t] : 0;
        for (int k = 0; k < 4; k++)
          if (4*g + k < 10) scores[4*g + k] += pim_ref(x, wm[5 + 7*g + m][k], k);
      end
    best = 0;
    for (int j = 1; j < 10; j++) if (scores[j] > scores[best]) best = j;
    return best;
  endfunction

  // Biosensor-like image: background 0..20, a 6x6 patch of 790..810 codes
  // at the position of the chosen disease.
  function automatic void make_image(input int disease, input int seed, output int img [32][32]);
    int r0 = 2 + 6 * (disease / 5) + 3 * (disease % 2);
    int c0 = 1 + 6 * (disease % 5);
    int s  = seed;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) begin
        s = s * 1103515245 + 12345;
        img[r][c] = ((s >>> 16) & 32'h7fff) % 21;
        if (r >= r0 && r < r0 + 6 && c >= c0 && c < c0 + 6)
          img[r][c] += 790;
      end
  endfunction

endpackage
