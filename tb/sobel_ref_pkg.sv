// sobel_ref_pkg: reference arithmetic for the edge detector testbenches.
//
// Written directly from the kernel matrices, as signed dot products over the
// full 3x3 window (including the zero coefficients), so that it shares no
// structure with the RTL's six-input pipelined form.
package sobel_ref_pkg;

  typedef int kernel_t [9];

  // Row-major, index 0 = top left.
  localparam kernel_t K000 = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
  localparam kernel_t K045 = '{ 0, 1, 2, -1, 0, 1, -2, -1, 0};
  localparam kernel_t K090 = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
  localparam kernel_t K135 = '{ 2, 1, 0, 1, 0, -1, 0, -1, -2};

  function automatic int conv(input kernel_t k, input int w [9]);
    int s = 0;
    for (int i = 0; i < 9; i++) s += k[i] * w[i];
    return (s < 0) ? -s : s;
  endfunction

  // Strongest absolute response of the four kernels, saturated to maxval.
  function automatic int sobel4(input int w [9], input int maxval);
    int m = conv(K000, w);
    if (conv(K045, w) > m) m = conv(K045, w);
    if (conv(K090, w) > m) m = conv(K090, w);
    if (conv(K135, w) > m) m = conv(K135, w);
    return (m > maxval) ? maxval : m;
  endfunction

endpackage
