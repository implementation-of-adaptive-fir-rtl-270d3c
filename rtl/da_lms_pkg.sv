// da_lms_pkg: types and width rules shared by the DA/OBC LMS adaptive filter.
//
// Number formats used throughout:
//   x, d  : B-bit signed samples (Q1.(B-1) fractions, or plain integers "x units").
//   w     : L-bit signed weights, read as Q1.(L-1) fractions as in the DA
//           expansion w = -w_0 + sum_l w_l 2^-l.
//   y, e  : integers in x units.
// The filter is cut into blocks of P = 4 taps, each with its own 8-entry
// offset-binary-coded DA table; the 4-tap grouping follows the design, the
// width rules below are this implementation's own bounds.
package da_lms_pkg;

  // taps per inner-product block
  localparam int P = 4;
  // entries in an OBC table (half of 2^P)
  localparam int TBL_N = 8;
  // width of the barrel-shifter control word carried in upd_ctrl_t
  localparam int SHW = 5;

  // OBC table entry: sum of four +/-x reaches +2^(B+1), hence B+3 bits
  function automatic int tbl_width(int b);
    return b + 3;
  endfunction

  // carry-save accumulator width: the table entries and the L-bit
  // offset-binary correction preloaded into the carry word, plus headroom
  function automatic int acc_width(int b, int l);
    int m;
    m = (b + 3 > l + 1) ? b + 3 : l + 1;
    return m + 2;
  endfunction

  // filter output width for N taps: |y| <= N * 2^(B-1)
  function automatic int y_width(int n, int b);
    return b + $clog2(n) + 1;
  endfunction

  // error width: d - y
  function automatic int e_width(int n, int b);
    return y_width(n, b) + 1;
  endfunction

  // shift offset of the control word: x>>t ~ mu*e*x in weight units when
  // |e| = 2^p and t = toff - p, with mu = 2^-mu_i / N
  function automatic int t_offset(int n, int b, int l, int mu_i);
    return $clog2(n) + mu_i + 2 * (b - 1) - (l - 1);
  endfunction

  // weight-update command produced from one error sample
  typedef struct packed {
    logic           sgn;    // 1: error negative, subtract
    logic           nz;     // error non-zero, update enabled
    logic [SHW-1:0] shamt;  // barrel-shifter control word t
  } upd_ctrl_t;

endpackage
