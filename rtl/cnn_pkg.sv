// cnn_pkg: constants, types and helper functions shared by the cellular
// neural network (CNN) modules.
//
// The network is a discrete-time CNN: every cell holds a state x, its output
// is y = sgn(x) (+1 for x >= 0, -1 for x < 0) and one iteration computes
//   x(n+1) = sum_k A[k]*y_k(n) + sum_k B[k]*u_k + I
// over the (2r+1) x (2r+1) neighbourhood of the cell.
//
// Number formats (this design's choice where the source is silent):
//   * a cell output y travels as one bit: 1 means +1, 0 means -1;
//   * a DATA_W-bit input or initial state is two's complement for DATA_W >= 2;
//     for DATA_W == 1 the bit is read as 1 -> +1, 0 -> -1;
//   * template coefficients and the bias are COEF_W-bit two's complement;
//   * the state is wide enough that the weighted sum can never overflow.
package cnn_pkg;

  // Controller states.
  typedef enum logic [1:0] {
    CTRL_IDLE = 2'd0,   // waiting for data or a start command
    CTRL_RUN  = 2'd1,   // iterating, one network step per clock
    CTRL_DONE = 2'd2    // settled (or iteration limit reached), results released
  } ctrl_state_e;

  // Number of cells in a neighbourhood of radius r.
  function automatic int unsigned nbr_count(int unsigned r);
    return (2 * r + 1) * (2 * r + 1);
  endfunction

  // Width of the cell state. |B*u| <= 2^(C+D-2), |A*y| <= 2^(C-1) and
  // |I| <= 2^(C-1), so the sum of K B-terms, K A-terms and I is below
  // (2K+1)*2^(C+D-2); one sign bit on top of that.
  function automatic int unsigned state_width(int unsigned data_w,
                                              int unsigned coef_w,
                                              int unsigned r);
    return coef_w + data_w + $clog2(2 * nbr_count(r) + 1);
  endfunction

  // Index of neighbour (dr, dc), each in -r..r, in row-major template order.
  function automatic int unsigned nbr_index(int dr, int dc, int unsigned r);
    return (dr + int'(r)) * (2 * r + 1) + (dc + int'(r));
  endfunction

endpackage
