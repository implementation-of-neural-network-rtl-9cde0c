// cnn_cell: one processing element of the cellular neural network.
//
// The cell follows the cell model of the source design: the outputs y of the
// neighbouring cells are weighted by the feedback template A, the inputs u of
// the neighbouring cells by the control template B, the bias I is added and
// the sum becomes the new state,
//   x(n+1) = sum_k A[k]*y_k(n) + sum_k B[k]*u_k + I,
// whose sign is the cell output, y = +1 for x >= 0 and -1 for x < 0.
// The neighbourhood has K = (2R+1)^2 members, the cell itself included
// (index K/2), ordered row by row from the top-left neighbour.
//
// Interface: the enclosing array supplies the neighbours' y bits (1 = +1)
// and their stored inputs u. The cell exports its own y and u for them.
// Timing: `load` stores u_in and the initial state x0_in; every clock with
// `step` high performs one full iteration (the weighted sum is combinational,
// so all cells of an array update simultaneously). `changed` is high when the
// iteration about to be taken would flip y; the controller uses it to see
// that the cell has finished. `clear` zeroes u and x (x = 0 reads as y = +1).
// Priority: reset, clear, load, step. The widths, encodings and the clear
// value are this design's choices; the update rule and sign function are the
// source's.
module cnn_cell
  import cnn_pkg::*;
#(
  parameter  int unsigned R       = 1,
  parameter  int unsigned DATA_W  = 8,
  parameter  int unsigned COEF_W  = 8,
  localparam int unsigned K       = nbr_count(R),
  localparam int unsigned STATE_W = state_width(DATA_W, COEF_W, R)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          load,
  input  logic                          step,
  input  logic [DATA_W-1:0]             u_in,
  input  logic [DATA_W-1:0]             x0_in,
  input  logic [K-1:0]                  nbr_y,
  input  logic [K-1:0][DATA_W-1:0]      nbr_u,
  input  logic [K-1:0][COEF_W-1:0]      a_tmpl,
  input  logic [K-1:0][COEF_W-1:0]      b_tmpl,
  input  logic [COEF_W-1:0]             bias,
  output logic                          y,
  output logic [DATA_W-1:0]             u_q,
  output logic signed [STATE_W-1:0]     x_q,
  output logic                          changed
);

  // Value of a DATA_W-bit input or initial state.
  function automatic logic signed [STATE_W-1:0] decode(logic [DATA_W-1:0] v);
    if (DATA_W == 1) return v[0] ? STATE_W'(1) : -STATE_W'(1);
    else             return STATE_W'($signed(v));
  endfunction

  logic signed [STATE_W-1:0] x_next;

  always_comb begin
    logic signed [STATE_W-1:0] a_k, b_k;
    x_next = STATE_W'($signed(bias));
    for (int k = 0; k < int'(K); k++) begin
      a_k = STATE_W'($signed(a_tmpl[k]));
      b_k = STATE_W'($signed(b_tmpl[k]));
      x_next += nbr_y[k] ? a_k : -a_k;
      x_next += b_k * decode(nbr_u[k]);
    end
  end

  assign y       = ~x_q[STATE_W-1];
  assign changed = (~x_next[STATE_W-1]) != y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      u_q <= '0;
    end else if (clear) begin
      x_q <= '0;
      u_q <= '0;
    end else if (load) begin
      x_q <= decode(x0_in);
      u_q <= u_in;
    end else if (step) begin
      x_q <= x_next;
    end
  end

endmodule
