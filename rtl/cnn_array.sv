// cnn_array: ROWS x COLS grid of cnn_cell elements with local, toroidal
// connections.
//
// Every cell is wired to the outputs y and stored inputs u of the cells in its
// (2R+1) x (2R+1) neighbourhood. The grid wraps around at its edges (the cell
// beyond the last column is the first column, likewise for rows), which is
// the toroidal structure the source design uses, so no boundary cells need
// artificial signals. All cells share one A template, one B template and one
// bias I, and all update in the same clock: one `step` is one iteration of
// the whole network.
//
// Interface: inputs u and initial states x0 enter all cells in parallel on
// `load`. `y` holds the present output bit of every cell (1 = +1), `x` its
// state, and `any_change` is high when the next iteration would flip at least
// one output, i.e. when some cell has not yet completed its calculation.
// Timing: as cnn_cell; everything is registered in the cells, the neighbour
// connections are plain wires.
module cnn_array
  import cnn_pkg::*;
#(
  parameter  int unsigned ROWS    = 3,
  parameter  int unsigned COLS    = 3,
  parameter  int unsigned R       = 1,
  parameter  int unsigned DATA_W  = 8,
  parameter  int unsigned COEF_W  = 8,
  localparam int unsigned K       = nbr_count(R),
  localparam int unsigned STATE_W = state_width(DATA_W, COEF_W, R)
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic                                          clear,
  input  logic                                          load,
  input  logic                                          step,
  input  logic [ROWS-1:0][COLS-1:0][DATA_W-1:0]         u_in,
  input  logic [ROWS-1:0][COLS-1:0][DATA_W-1:0]         x0_in,
  input  logic [K-1:0][COEF_W-1:0]                      a_tmpl,
  input  logic [K-1:0][COEF_W-1:0]                      b_tmpl,
  input  logic [COEF_W-1:0]                             bias,
  output logic [ROWS-1:0][COLS-1:0]                     y,
  output logic [ROWS-1:0][COLS-1:0][STATE_W-1:0]        x,
  output logic                                          any_change
);

  logic [ROWS-1:0][COLS-1:0][DATA_W-1:0] u_q;
  logic [ROWS-1:0][COLS-1:0]             chg;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [K-1:0]             nbr_y;
      logic [K-1:0][DATA_W-1:0] nbr_u;

      // Toroidal neighbourhood: indices wrap modulo the grid size.
      for (genvar dr = -int'(R); dr <= int'(R); dr++) begin : g_dr
        for (genvar dc = -int'(R); dc <= int'(R); dc++) begin : g_dc
          localparam int unsigned NR  = (r + dr + int'(ROWS) * int'(R)) % ROWS;
          localparam int unsigned NC  = (c + dc + int'(COLS) * int'(R)) % COLS;
          localparam int unsigned IDX = nbr_index(dr, dc, R);
          assign nbr_y[IDX] = y[NR][NC];
          assign nbr_u[IDX] = u_q[NR][NC];
        end
      end

      cnn_cell #(
        .R      (R),
        .DATA_W (DATA_W),
        .COEF_W (COEF_W)
      ) u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .clear   (clear),
        .load    (load),
        .step    (step),
        .u_in    (u_in[r][c]),
        .x0_in   (x0_in[r][c]),
        .nbr_y   (nbr_y),
        .nbr_u   (nbr_u),
        .a_tmpl  (a_tmpl),
        .b_tmpl  (b_tmpl),
        .bias    (bias),
        .y       (y[r][c]),
        .u_q     (u_q[r][c]),
        .x_q     (x[r][c]),
        .changed (chg[r][c])
      );
    end
  end

  assign any_change = |chg;

endmodule
