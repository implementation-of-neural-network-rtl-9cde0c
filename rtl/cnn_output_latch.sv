// cnn_output_latch: output register of the network.
//
// The cells' outputs change while the network iterates; the source design's
// control lets them reach the outputs only once every cell has completed its
// calculation. This register captures the cell output bits when the
// controller pulses `capture` and holds them, with `valid` set, until the
// next capture or `clear`. Each output is presented as a DATA_W-bit value:
// for DATA_W >= 2 the two's complement number +1 or -1, for DATA_W == 1 the
// bit itself (1 = +1, 0 = -1). Timing: one clock from `capture` to the
// outputs. Reset and clear zero the register and drop `valid`.
module cnn_output_latch #(
  parameter int unsigned ROWS   = 3,
  parameter int unsigned COLS   = 3,
  parameter int unsigned DATA_W = 8
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  clear,
  input  logic                                  capture,
  input  logic [ROWS-1:0][COLS-1:0]             y,
  output logic [ROWS-1:0][COLS-1:0][DATA_W-1:0] y_out,
  output logic                                  valid
);

  function automatic logic [DATA_W-1:0] encode(logic b);
    if (DATA_W == 1) return DATA_W'(b);
    else             return b ? DATA_W'(1) : '1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out <= '0;
      valid <= 1'b0;
    end else if (clear) begin
      y_out <= '0;
      valid <= 1'b0;
    end else if (capture) begin
      for (int r = 0; r < int'(ROWS); r++)
        for (int c = 0; c < int'(COLS); c++)
          y_out[r][c] <= encode(y[r][c]);
      valid <= 1'b1;
    end
  end

endmodule
