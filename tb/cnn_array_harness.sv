// cnn_array_harness: drives one cnn_array configuration with random
// templates, inputs and start states, steps it and compares every cell's
// state after every iteration, and the any_change flag before it, with the
// reference model. Reports its counts through ports; used by tb_cnn_array.
module cnn_array_harness
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
#(
  parameter int ROWS = 3,
  parameter int COLS = 3,
  parameter int R = 1,
  parameter int D = 8,
  parameter int C = 8,
  parameter int TRIALS = 20,
  parameter int STEPS = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int K = nbr_count(R);
  localparam int SW = state_width(D, C, R);

  logic clear, load, step, any_change;
  logic [ROWS-1:0][COLS-1:0][D-1:0] u_in, x0_in;
  logic [K-1:0][C-1:0] a_tmpl, b_tmpl;
  logic [C-1:0] bias;
  logic [ROWS-1:0][COLS-1:0] y;
  logic [ROWS-1:0][COLS-1:0][SW-1:0] x;

  cnn_array #(.ROWS(ROWS), .COLS(COLS), .R(R), .DATA_W(D), .COEF_W(C)) dut (
    .clk, .rst_n, .clear, .load, .step, .u_in, .x0_in, .a_tmpl, .b_tmpl,
    .bias, .y, .x, .any_change);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    CnnModel m;
    m = new(ROWS, COLS, R);
    checks = 0; failures = 0; finished = 0;
    clear = 0; load = 0; step = 0;
    u_in = '0; x0_in = '0; a_tmpl = '0; b_tmpl = '0; bias = '0;
    wait (rst_n);
    @(negedge clk);
    for (int t = 0; t < TRIALS; t++) begin
      // Small coefficients on odd trials so that outputs keep flipping.
      for (int k = 0; k < K; k++) begin
        a_tmpl[k] = C'($urandom); b_tmpl[k] = C'($urandom);
        if (t % 2 == 1) begin
          a_tmpl[k] = C'(int'($urandom_range(0, 4)) - 2);
          b_tmpl[k] = C'(int'($urandom_range(0, 2)) - 1);
        end
        m.a[k] = dec(a_tmpl[k], C); m.b[k] = dec(b_tmpl[k], C);
      end
      bias = C'($urandom); m.bias = dec(bias, C);
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          u_in[i][j] = D'($urandom); x0_in[i][j] = D'($urandom);
          m.u[i * COLS + j] = dec(u_in[i][j], D);
          m.x[i * COLS + j] = dec(x0_in[i][j], D);
        end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int s = 0; s < STEPS; s++) begin
        int flips;
        flips = m.step();
        check("any_change", any_change, flips != 0);
        step = 1;
        @(negedge clk);
        step = 0;
        for (int i = 0; i < ROWS; i++)
          for (int j = 0; j < COLS; j++) begin
            check($sformatf("x[%0d][%0d] step %0d", i, j, s),
                  longint'($signed(x[i][j])), m.x[i * COLS + j]);
            check("y", y[i][j], m.x[i * COLS + j] >= 0);
          end
      end
    end
    clear = 1;
    @(negedge clk);
    clear = 0;
    check("clear", x, 0);
    finished = 1;
  end
endmodule
