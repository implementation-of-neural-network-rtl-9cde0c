// cnn_template_regs: storage for the network's pattern (template), i.e. the
// feedback template A, the control template B and the bias I.
//
// The source design keeps the trained network fixed in the device and notes
// that the same network serves other image-processing tasks once the pattern
// is exchanged; this register file makes that exchange a simple write.
// Address map (this design's choice): addresses 0..K-1 hold A, K..2K-1 hold
// B, 2K holds I, each in row-major template order (index K/2 is the centre),
// as COEF_W-bit two's complement numbers. Writes to higher addresses are
// ignored. Timing: a write with `we` high takes effect at the next clock
// edge; the outputs are the register contents. Writes while `lock` is high
// (the network is iterating) are ignored. All registers reset to zero.
module cnn_template_regs
  import cnn_pkg::*;
#(
  parameter  int unsigned R      = 1,
  parameter  int unsigned COEF_W = 8,
  localparam int unsigned K      = nbr_count(R),
  localparam int unsigned AW     = $clog2(2 * K + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     lock,
  input  logic                     we,
  input  logic [AW-1:0]            addr,
  input  logic [COEF_W-1:0]        wdata,
  output logic [K-1:0][COEF_W-1:0] a_tmpl,
  output logic [K-1:0][COEF_W-1:0] b_tmpl,
  output logic [COEF_W-1:0]        bias
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_tmpl <= '0;
      b_tmpl <= '0;
      bias   <= '0;
    end else if (we && !lock) begin
      if (int'(addr) < int'(K))
        a_tmpl[addr] <= wdata;
      else if (int'(addr) < int'(2 * K))
        b_tmpl[int'(addr) - int'(K)] <= wdata;
      else if (int'(addr) == int'(2 * K))
        bias <= wdata;
    end
  end

endmodule
