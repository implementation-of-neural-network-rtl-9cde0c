// cnn_ref_pkg: behavioural reference model of the discrete-time cellular
// neural network, used by the testbenches to work out expected results
// independently of the RTL.
//
// The model holds integer states on a toroidal rows x cols grid and applies
//   x(n+1) = sum A*y(n) + sum B*u + I,  y = (x >= 0) ? +1 : -1
// with plain integer arithmetic. It also provides the number codings of the
// RTL ports (DATA_W-bit two's complement, or 1 -> +1 / 0 -> -1 for one bit)
// and the templates the document-derived tests use.
package cnn_ref_pkg;

  // Value carried by a data_w-bit code.
  function automatic int dec(int unsigned code, int unsigned data_w);
    if (data_w < 32) code = code & ((1 << data_w) - 1);
    if (data_w == 1) return (code & 1) ? 1 : -1;
    if (code & (1 << (data_w - 1))) return int'(code) - (1 << data_w);
    return int'(code);
  endfunction

  // data_w-bit code of a value (value must fit).
  function automatic int unsigned enc(int v, int unsigned data_w);
    if (data_w == 1) return (v >= 0) ? 1 : 0;
    return int'(v) & ((1 << data_w) - 1);
  endfunction

  class CnnModel;
    int rows, cols, r, k;
    int a[], b[];
    int bias;
    int u[], x[];

    function new(int rows_, int cols_, int r_);
      rows = rows_; cols = cols_; r = r_;
      k = (2 * r + 1) * (2 * r + 1);
      a = new[k]; b = new[k];
      u = new[rows * cols]; x = new[rows * cols];
      bias = 0;
    endfunction

    function int yv(int i);
      return (x[i] >= 0) ? 1 : -1;
    endfunction

    function int idx(int row, int col);
      return ((row % rows + rows) % rows) * cols + ((col % cols + cols) % cols);
    endfunction

    // One synchronous iteration; returns the number of outputs that flipped.
    function int step();
      int nx[];
      int flips;
      nx = new[rows * cols];
      flips = 0;
      for (int i = 0; i < rows; i++)
        for (int j = 0; j < cols; j++) begin
          int s;
          s = bias;
          for (int di = -r; di <= r; di++)
            for (int dj = -r; dj <= r; dj++) begin
              int t, n;
              t = (di + r) * (2 * r + 1) + (dj + r);
              n = idx(i + di, j + dj);
              s += a[t] * yv(n) + b[t] * u[n];
            end
          nx[i * cols + j] = s;
        end
      for (int i = 0; i < rows * cols; i++) begin
        if (((nx[i] >= 0) ? 1 : -1) != yv(i)) flips++;
        x[i] = nx[i];
      end
      return flips;
    endfunction

    // Iterates like the controller: stops on the first iteration that flips
    // nothing, or after max_iter iterations. Leaves the iteration count in
    // `iters` and whether equilibrium was reached in `conv`.
    int iters;
    bit conv;
    function void run(int max_iter);
      iters = 0;
      conv = 0;
      for (int i = 0; i < max_iter; i++) begin
        if (!conv) begin
          iters++;
          if (step() == 0) conv = 1;
        end
      end
    endfunction

    // Centre-only helper for templates given as scalars.
    function void set_template(int ac, int an, int bc, int bn, int i_);
      for (int t = 0; t < k; t++) begin
        a[t] = (t == k / 2) ? ac : an;
        b[t] = (t == k / 2) ? bc : bn;
      end
      bias = i_;
    endfunction
  endclass

endpackage
