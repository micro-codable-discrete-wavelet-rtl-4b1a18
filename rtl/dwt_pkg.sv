// dwt_pkg -- constants, types and size formulas shared by the lifting
// wavelet transform unit.
//
// Samples are 16-bit two's complement (two bytes per pixel, as the unit's
// data format).  Filter and lifting coefficients are 18-bit two's complement
// numbers carrying 14 fractional bits (coefficient = round(value * 2^14)),
// which matches an 18x18 hardware multiplier and gives the 14 bits of
// coefficient precision used for the accuracy figures.  Both the predict and
// the update results are scaled back by 2^14 (PS = US = 14) by adding half
// an LSB and shifting right arithmetically, i.e. rounding to nearest with
// halves rounded up.  The widths and the
// scale values are this design's choice where no number was given.
//
// The functions implement the bookkeeping of the lifting transform:
//   * num_levels: n = floor(log2((L-1)/(Nmax-1))), evaluated exactly with
//     integers as the largest n for which 2^n * (Nmax-1) <= L-1;
//   * level_len: coefficients on a line at a level, C = ceil(L / 2^level);
//   * lift_base: where the lifting coefficients of one (direction, level)
//     start in the update filter RAM.  The RAM holds, row direction first,
//     one word per gamma of every level: level 0 of the rows, level 1 of the
//     rows, ..., then level 0 of the columns, and so on.
package dwt_pkg;

  parameter int DATA_W     = 16;
  parameter int COEF_W     = 18;
  parameter int PRED_SCALE = 14;
  parameter int UPD_SCALE  = 14;
  // Upper bound on the number of decomposition levels any size can reach.
  parameter int MAX_LEVELS = 16;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Direction of the lines processed by one pass.
  typedef enum logic {DIR_ROWS = 1'b0, DIR_COLS = 1'b1} dir_e;

  function automatic int max2(int a, int b);
    return (a > b) ? a : b;
  endfunction

  function automatic int ceil_div(int a, int b);
    return (a + b - 1) / b;
  endfunction

  function automatic int num_levels(int len, int nmax);
    int n;
    n = 0;
    for (int k = 1; k < MAX_LEVELS; k++)
      if (((1 << k) * (nmax - 1)) <= (len - 1)) n = k;
    return n;
  endfunction

  function automatic int level_len(int len, int level);
    return ceil_div(len, 1 << level);
  endfunction

  // Total gammas over the first 'levels' levels of a line of length len.
  function automatic int gamma_total(int len, int levels);
    int t;
    t = 0;
    for (int l = 0; l < MAX_LEVELS; l++)
      if (l < levels) t += level_len(len, l) / 2;
    return t;
  endfunction

  function automatic int lift_base(bit cols, int level, int width, int height, int nmax);
    int b;
    if (cols) b = gamma_total(width, num_levels(width, nmax)) + gamma_total(height, level);
    else      b = gamma_total(width, level);
    return b;
  endfunction

  function automatic int lift_depth(int width, int height, int nmax);
    return gamma_total(width, num_levels(width, nmax)) +
           gamma_total(height, num_levels(height, nmax));
  endfunction

endpackage
