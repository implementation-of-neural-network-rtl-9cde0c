// cnn_top: complete digital cellular neural network (CNN) for binary image
// processing.
//
// A ROWS x COLS grid of identical cells, each connected only to its
// (2R+1) x (2R+1) toroidal neighbourhood, iterates the discrete-time rule
//   x(n+1) = sum A*y(n) + sum B*u + I,   y = sgn(x)
// until no output changes. With suitable templates the network extracts an
// object from an image, detects edges or corners; the template is held in
// writable registers so that the task can be changed without rebuilding.
//
// Blocks: cnn_template_regs (A, B, I), cnn_array (cells and their local
// wiring), cnn_control (iteration, completion check, release, clear) and
// cnn_output_latch (results presented only after the network has settled).
//
// Use: write the template (tmpl_we/addr/wdata), present the image on u_in
// and the start states on x0_in and pulse `load` (all cells load in
// parallel), then pulse `start`. Each clock performs one iteration; the run
// ends on the first iteration that changes no output (or after MAX_ITER
// iterations). Two clocks later `done` and `y_valid` are high, `y_out` holds
// the results, `converged` tells whether equilibrium was reached and
// `iter_count` how many iterations were taken. `load` and template writes are
// ignored while `busy`. `clear` empties the cells and outputs (templates are
// kept). The defaults are one configuration the source evaluates: a 3 x 3
// network with r = 1, 8-bit signed inputs/outputs and 8-bit signed
// coefficients. The iteration limit, port protocol and encodings are this
// design's own.
module cnn_top
  import cnn_pkg::*;
#(
  parameter  int unsigned ROWS     = 3,
  parameter  int unsigned COLS     = 3,
  parameter  int unsigned R        = 1,
  parameter  int unsigned DATA_W   = 8,
  parameter  int unsigned COEF_W   = 8,
  parameter  int unsigned MAX_ITER = 64,
  localparam int unsigned K        = nbr_count(R),
  localparam int unsigned AW       = $clog2(2 * K + 1),
  localparam int unsigned IT_W     = $clog2(MAX_ITER + 1),
  localparam int unsigned STATE_W  = state_width(DATA_W, COEF_W, R)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // template (pattern) write port
  input  logic                                   tmpl_we,
  input  logic [AW-1:0]                          tmpl_addr,
  input  logic [COEF_W-1:0]                      tmpl_wdata,
  // image and start states
  input  logic                                   load,
  input  logic [ROWS-1:0][COLS-1:0][DATA_W-1:0]  u_in,
  input  logic [ROWS-1:0][COLS-1:0][DATA_W-1:0]  x0_in,
  // control
  input  logic                                   clear,
  input  logic                                   start,
  output logic                                   busy,
  output logic                                   done,
  output logic                                   converged,
  output logic [IT_W-1:0]                        iter_count,
  // results
  output logic [ROWS-1:0][COLS-1:0][DATA_W-1:0]  y_out,
  output logic                                   y_valid,
  output logic [ROWS-1:0][COLS-1:0][STATE_W-1:0] x_state
);

  logic [K-1:0][COEF_W-1:0] a_tmpl, b_tmpl;
  logic [COEF_W-1:0]        bias;
  logic [ROWS-1:0][COLS-1:0] y;
  logic                     step, release_out, any_change;

  cnn_template_regs #(
    .R      (R),
    .COEF_W (COEF_W)
  ) u_tmpl (
    .clk    (clk),
    .rst_n  (rst_n),
    .lock   (busy),
    .we     (tmpl_we),
    .addr   (tmpl_addr),
    .wdata  (tmpl_wdata),
    .a_tmpl (a_tmpl),
    .b_tmpl (b_tmpl),
    .bias   (bias)
  );

  cnn_array #(
    .ROWS   (ROWS),
    .COLS   (COLS),
    .R      (R),
    .DATA_W (DATA_W),
    .COEF_W (COEF_W)
  ) u_array (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (clear),
    .load       (load && !busy),
    .step       (step),
    .u_in       (u_in),
    .x0_in      (x0_in),
    .a_tmpl     (a_tmpl),
    .b_tmpl     (b_tmpl),
    .bias       (bias),
    .y          (y),
    .x          (x_state),
    .any_change (any_change)
  );

  cnn_control #(
    .MAX_ITER (MAX_ITER)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (clear),
    .start       (start),
    .any_change  (any_change),
    .step        (step),
    .release_out (release_out),
    .busy        (busy),
    .done        (done),
    .converged   (converged),
    .iter_count  (iter_count)
  );

  cnn_output_latch #(
    .ROWS   (ROWS),
    .COLS   (COLS),
    .DATA_W (DATA_W)
  ) u_out (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (clear),
    .capture (release_out),
    .y       (y),
    .y_out   (y_out),
    .valid   (y_valid)
  );

endmodule
