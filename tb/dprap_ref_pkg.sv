// dprap_ref_pkg: reference model of the two layer kinds, used by testbenches.
//
// Computes, independently of the RTL's dataflow, the strided deconvolution
// (scatter of every input pixel times the whole kernel, then border removal)
// and the valid 3x3 convolution, in 32-bit wrapping arithmetic, followed by
// the Q8.8 rescale (arithmetic shift right by FRAC, saturation to 16 bits).
// conv2_ref sums two input channels, as the array does with accumulating runs.
// Images are square, indexed [y][x], at most BUF_DIM on a side.
package dprap_ref_pkg;
  import dprap_pkg::*;

  typedef data_t img_t [BUF_DIM][BUF_DIM];
  typedef data_t ker_t [NTAP];

  int unsigned n_saturated = 0;

  function automatic data_t rescale_ref(input acc_t v);
    acc_t s;
    s = v >>> FRAC;
    if (s > 32767)  begin n_saturated++; return 16'sd32767; end
    if (s < -32768) begin n_saturated++; return -16'sd32768; end
    return data_t'(s);
  endfunction

  // deconvolution of an n x n image, stride s, border 'crop' removed
  function automatic void deconv_ref(input img_t img, input ker_t w, input int n,
                                     input int s, input int crop, output img_t o);
    acc_t full [BUF_DIM][BUF_DIM];
    int fs;
    fs = (n - 1) * s + K;
    for (int y = 0; y < BUF_DIM; y++)
      for (int x = 0; x < BUF_DIM; x++) begin
        full[y][x] = '0;
        o[y][x]    = '0;
      end
    for (int iy = 0; iy < n; iy++)
      for (int ix = 0; ix < n; ix++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            full[iy*s+ky][ix*s+kx] += acc_t'(img[iy][ix]) * acc_t'(w[ky*K+kx]);
    for (int y = 0; y < fs - 2*crop; y++)
      for (int x = 0; x < fs - 2*crop; x++)
        o[y][x] = rescale_ref(full[y+crop][x+crop]);
  endfunction

  // valid convolution (correlation) of an n x n image with a K x K kernel
  function automatic void conv_ref(input img_t img, input ker_t w, input int n, output img_t o);
    acc_t a;
    for (int y = 0; y < BUF_DIM; y++)
      for (int x = 0; x < BUF_DIM; x++) o[y][x] = '0;
    for (int y = 0; y <= n - K; y++)
      for (int x = 0; x <= n - K; x++) begin
        a = '0;
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            a += acc_t'(img[y+ky][x+kx]) * acc_t'(w[ky*K+kx]);
        o[y][x] = rescale_ref(a);
      end
  endfunction

  // valid convolution of two input channels summed into one output map
  function automatic void conv2_ref(input img_t a, input ker_t wa, input img_t b, input ker_t wb,
                                    input int n, output img_t o);
    acc_t acc;
    for (int y = 0; y < BUF_DIM; y++)
      for (int x = 0; x < BUF_DIM; x++) o[y][x] = '0;
    for (int y = 0; y <= n - K; y++)
      for (int x = 0; x <= n - K; x++) begin
        acc = '0;
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            acc += acc_t'(a[y+ky][x+kx]) * acc_t'(wa[ky*K+kx]) + acc_t'(b[y+ky][x+kx]) * acc_t'(wb[ky*K+kx]);
        o[y][x] = rescale_ref(acc);
      end
  endfunction

endpackage
