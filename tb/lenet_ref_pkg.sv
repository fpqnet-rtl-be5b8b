// lenet_ref_pkg: integer reference model of the binary-input LeNet-5 used by the
// kernel and system testbenches, written directly from the layer definitions
// (loops over the maps), independent of the streaming hardware.
//
//   C1: c1[o][y][x] = (b1[o] + sum_{ky,kx} w1[o][ky*5+kx] * img[y+ky][x+kx]) > 0
//   S2: s2[o][y][x] = sum of c1 over the 2x2 block (0..4)
//   C3: c3[o][y][x] = (b3[o] + sum_{c,ky,kx} w3[o][(c*5+ky)*5+kx] * s2[c][y+ky][x+kx]) > 0
//   S4: like S2
//   vec[c*16 + y*4 + x] = s4[c][y][x]
//   F5, F6: (b + sum w*in) > 0;  F7: b + sum w*in;  class = first index of the maximum
package lenet_ref_pkg;
  typedef bit img_t [28][28];

  int w1 [6][25];    int b1 [6];
  int w3 [16][150];  int b3 [16];
  int w5 [120][256]; int b5 [120];
  int w6 [84][120];  int b6 [84];
  int w7 [10][84];   int b7 [10];

  function automatic int rnd8();
    return int'($urandom_range(0, 255)) - 128;
  endfunction

  // Random parameters; biases are scaled so that activations are not all 0 or 1.
  function automatic void randomize_params();
    foreach (w1[o, i]) w1[o][i] = rnd8();
    foreach (b1[o])    b1[o]    = rnd8();
    foreach (w3[o, i]) w3[o][i] = rnd8();
    foreach (b3[o])    b3[o]    = rnd8();
    foreach (w5[o, i]) w5[o][i] = rnd8();
    foreach (b5[o])    b5[o]    = rnd8();
    foreach (w6[o, i]) w6[o][i] = rnd8();
    foreach (b6[o])    b6[o]    = rnd8();
    foreach (w7[o, i]) w7[o][i] = rnd8();
    foreach (b7[o])    b7[o]    = rnd8();
  endfunction

  // Parameters in the order the host sends them (sections C1W, C1B, C3W ... F7B,
  // each row by row).
  function automatic void param_stream(ref byte q[$]);
    q.delete();
    foreach (w1[o, i]) q.push_back(byte'(w1[o][i]));
    foreach (b1[o])    q.push_back(byte'(b1[o]));
    foreach (w3[o, i]) q.push_back(byte'(w3[o][i]));
    foreach (b3[o])    q.push_back(byte'(b3[o]));
    foreach (w5[o, i]) q.push_back(byte'(w5[o][i]));
    foreach (b5[o])    q.push_back(byte'(b5[o]));
    foreach (w6[o, i]) q.push_back(byte'(w6[o][i]));
    foreach (b6[o])    q.push_back(byte'(b6[o]));
    foreach (w7[o, i]) q.push_back(byte'(w7[o][i]));
    foreach (b7[o])    q.push_back(byte'(b7[o]));
  endfunction

  function automatic void random_image(output img_t img, input int ones_pct);
    foreach (img[y, x]) img[y][x] = ($urandom_range(0, 99) < ones_pct);
  endfunction

  // Full inference; returns the class and the F7 sums.
  function automatic int infer(input img_t img, output int f7 [10]);
    bit c1 [6][24][24];  int s2 [6][12][12];
    bit c3 [16][8][8];   int s4 [16][4][4];
    int vec [256];       bit f5 [120];  bit f6 [84];
    int best;
    foreach (c1[o, y, x]) begin
      int s = b1[o];
      for (int ky = 0; ky < 5; ky++)
        for (int kx = 0; kx < 5; kx++)
          if (img[y+ky][x+kx]) s += w1[o][ky*5+kx];
      c1[o][y][x] = (s > 0);
    end
    foreach (s2[o, y, x])
      s2[o][y][x] = int'(c1[o][2*y][2*x]) + int'(c1[o][2*y][2*x+1]) + int'(c1[o][2*y+1][2*x]) + int'(c1[o][2*y+1][2*x+1]);
    foreach (c3[o, y, x]) begin
      int s = b3[o];
      for (int c = 0; c < 6; c++)
        for (int ky = 0; ky < 5; ky++)
          for (int kx = 0; kx < 5; kx++)
            s += w3[o][(c*5+ky)*5+kx] * s2[c][y+ky][x+kx];
      c3[o][y][x] = (s > 0);
    end
    foreach (s4[o, y, x])
      s4[o][y][x] = int'(c3[o][2*y][2*x]) + int'(c3[o][2*y][2*x+1]) + int'(c3[o][2*y+1][2*x]) + int'(c3[o][2*y+1][2*x+1]);
    foreach (s4[c, y, x]) vec[c*16 + y*4 + x] = s4[c][y][x];
    foreach (f5[o]) begin
      int s = b5[o];
      for (int i = 0; i < 256; i++) s += w5[o][i] * vec[i];
      f5[o] = (s > 0);
    end
    foreach (f6[o]) begin
      int s = b6[o];
      for (int i = 0; i < 120; i++) if (f5[i]) s += w6[o][i];
      f6[o] = (s > 0);
    end
    foreach (f7[o]) begin
      int s = b7[o];
      for (int i = 0; i < 84; i++) if (f6[i]) s += w7[o][i];
      f7[o] = s;
    end
    best = 0;
    for (int o = 1; o < 10; o++) if (f7[o] > f7[best]) best = o;
    return best;
  endfunction
endpackage
