// lenet_ref_pkg: a plain behavioural model of the LeNet-5 forward pass in
// Q1.14, written as loops over integer arrays, used by the end-to-end
// testbenches to predict the accelerator's ten outputs and its digit.
//
// It applies the trojan payload the way the design describes it: the offset
// is added to Conv1 kernel 15 weight 9, to FC2 bias 9, or to every word of
// AvgPool1 feature map 15, with 16-bit wrap-around. It shares only the
// memory contents (lenet_pkg::weight_value / bias_value) with the RTL.
package lenet_ref_pkg;
  import lenet_pkg::*;

  typedef int vec_t [];

  function automatic int wrap16(longint v);
    return int'(q_t'(v));
  endfunction

  // sum (Q2.28) plus bias, back to Q1.14 with floor, wrapped, optional ReLU
  function automatic int finish(longint acc, int b, bit relu);
    int r;
    r = wrap16((acc + longint'(b) * 16384) >>> 14);
    if (relu && r < 0) r = 0;
    return r;
  endfunction

  // Clean parameter contents, filled once by ref_init().
  int WA [5392];
  int WB [73728];
  int BI [122];

  function automatic void ref_init();
    for (int i = 0; i < 5392; i++)  WA[i] = int'(weight_value(1'b0, i));
    for (int i = 0; i < 73728; i++) WB[i] = int'(weight_value(1'b1, i));
    for (int i = 0; i < 122; i++)   BI[i] = int'(bias_value(i));
  endfunction

  // Returns the ten FC2 outputs for a 900-word image.
  function automatic vec_t forward(int img [900], target_e t, int off);
    int c1 [16*28*28];
    int p1 [16*14*14];
    int c2 [32*12*12];
    int p2 [32*6*6];
    int f1 [64];
    vec_t f2;
    int wa [5392];
    int bi [122];
    longint acc;
    f2 = new[10];
    wa = WA;
    bi = BI;
    if (t == TGT_WEIGHT) wa[134] = wrap16(wa[134] + off);
    if (t == TGT_BIAS)   bi[120] = wrap16(bi[120] + off);
    for (int o = 0; o < 16; o++)
      for (int y = 0; y < 28; y++)
        for (int x = 0; x < 28; x++) begin
          acc = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              acc += longint'(img[(y+ky)*30 + x+kx]) * wa[o*9 + ky*3 + kx];
          c1[o*784 + y*28 + x] = finish(acc, bi[o], 1);
        end
    for (int c = 0; c < 16; c++)
      for (int y = 0; y < 14; y++)
        for (int x = 0; x < 14; x++) begin
          acc = 0;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              acc += longint'(c1[c*784 + (2*y+dy)*28 + 2*x+dx]) * 4096;
          p1[c*196 + y*14 + x] = finish(acc, 0, 0);
          if (t == TGT_FMAP && c == 14) p1[c*196 + y*14 + x] = wrap16(p1[c*196 + y*14 + x] + off);
        end
    for (int o = 0; o < 32; o++)
      for (int y = 0; y < 12; y++)
        for (int x = 0; x < 12; x++) begin
          acc = 0;
          for (int c = 0; c < 16; c++)
            for (int ky = 0; ky < 3; ky++)
              for (int kx = 0; kx < 3; kx++)
                acc += longint'(p1[c*196 + (y+ky)*14 + x+kx]) *
                       wa[144 + ((o*16 + c)*3 + ky)*3 + kx];
          c2[o*144 + y*12 + x] = finish(acc, bi[16 + o], 1);
        end
    for (int c = 0; c < 32; c++)
      for (int y = 0; y < 6; y++)
        for (int x = 0; x < 6; x++) begin
          acc = 0;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              acc += longint'(c2[c*144 + (2*y+dy)*12 + 2*x+dx]) * 4096;
          p2[c*36 + y*6 + x] = finish(acc, 0, 0);
        end
    for (int n = 0; n < 64; n++) begin
      acc = 0;
      for (int i = 0; i < 1152; i++)
        acc += longint'(p2[i]) * WB[n*1152 + i];
      f1[n] = finish(acc, bi[48 + n], 1);
    end
    for (int n = 0; n < 10; n++) begin
      acc = 0;
      for (int i = 0; i < 64; i++) acc += longint'(f1[i]) * wa[4752 + n*64 + i];
      f2[n] = finish(acc, bi[112 + n], 0);
    end
    return f2;
  endfunction

  function automatic int argmax(vec_t v);
    int b;
    b = 0;
    for (int i = 1; i < v.size(); i++) if (v[i] > v[b]) b = i;
    return b;
  endfunction

  // An image with a bright stroke pattern on a dark background, loosely like
  // a handwritten digit: about a fifth of the pixels lit, values in [0, 1).
  function automatic void make_image(ref int img [900]);
    int cx, cy, r;
    cx = 10 + $urandom_range(10);
    cy = 10 + $urandom_range(10);
    r  = 4 + $urandom_range(6);
    for (int y = 0; y < 30; y++)
      for (int x = 0; x < 30; x++) begin
        int d;
        d = (x-cx)*(x-cx) + (y-cy)*(y-cy);
        if ((d >= (r-2)*(r-2) && d <= r*r) || $urandom_range(19) == 0)
          img[y*30 + x] = 8192 + $urandom_range(8191);
        else
          img[y*30 + x] = 0;
      end
  endfunction
endpackage
