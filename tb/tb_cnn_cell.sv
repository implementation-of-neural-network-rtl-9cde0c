// tb_cnn_cell: self-checking test of one CNN cell.
//
// Two cells are tested: r = 1 with 8-bit data and 8-bit coefficients, and
// r = 2 with 1-bit data and 4-bit coefficients (two of the configurations
// the network was evaluated in). For random templates, neighbour outputs and
// neighbour inputs the testbench computes the weighted sum itself and checks
// the new state, the sign output, the `changed` flag, the load of the
// initial state, hold without `step`, and clear.
module tb_cnn_cell;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int D1 = 8, C1 = 8, K1 = 9;
  localparam int D2 = 1, C2 = 4, K2 = 25;
  localparam int SW1 = state_width(D1, C1, 1);
  localparam int SW2 = state_width(D2, C2, 2);

  logic clk = 0, rst_n = 0;
  logic clear, load, step;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // r = 1, 8-bit cell
  logic [D1-1:0] u1, x01;
  logic [K1-1:0] ny1;
  logic [K1-1:0][D1-1:0] nu1;
  logic [K1-1:0][C1-1:0] a1, b1;
  logic [C1-1:0] i1;
  logic y1, chg1;
  logic [D1-1:0] uq1;
  logic signed [SW1-1:0] xq1;

  cnn_cell #(.R(1), .DATA_W(D1), .COEF_W(C1)) dut1 (
    .clk, .rst_n, .clear, .load, .step, .u_in(u1), .x0_in(x01), .nbr_y(ny1),
    .nbr_u(nu1), .a_tmpl(a1), .b_tmpl(b1), .bias(i1), .y(y1), .u_q(uq1),
    .x_q(xq1), .changed(chg1));

  // r = 2, 1-bit cell
  logic [D2-1:0] u2, x02;
  logic [K2-1:0] ny2;
  logic [K2-1:0][D2-1:0] nu2;
  logic [K2-1:0][C2-1:0] a2, b2;
  logic [C2-1:0] i2;
  logic y2, chg2;
  logic [D2-1:0] uq2;
  logic signed [SW2-1:0] xq2;

  cnn_cell #(.R(2), .DATA_W(D2), .COEF_W(C2)) dut2 (
    .clk, .rst_n, .clear, .load, .step, .u_in(u2), .x0_in(x02), .nbr_y(ny2),
    .nbr_u(nu2), .a_tmpl(a2), .b_tmpl(b2), .bias(i2), .y(y2), .u_q(uq2),
    .x_q(xq2), .changed(chg2));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e1, e2, x0v1, x0v2;
    clear = 0; load = 0; step = 0;
    u1 = '0; x01 = '0; ny1 = '0; nu1 = '0; a1 = '0; b1 = '0; i1 = '0;
    u2 = '0; x02 = '0; ny2 = '0; nu2 = '0; a2 = '0; b2 = '0; i2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset x1", xq1, 0);
    check("reset y1", y1, 1);

    for (int trial = 0; trial < 300; trial++) begin
      // random templates and neighbourhood
      for (int k = 0; k < K1; k++) begin
        a1[k] = C1'($urandom); b1[k] = C1'($urandom);
        nu1[k] = D1'($urandom); ny1[k] = 1'($urandom);
      end
      for (int k = 0; k < K2; k++) begin
        a2[k] = C2'($urandom); b2[k] = C2'($urandom);
        nu2[k] = D2'($urandom); ny2[k] = 1'($urandom);
      end
      i1 = C1'($urandom); i2 = C2'($urandom);
      u1 = D1'($urandom); x01 = D1'($urandom);
      u2 = D2'($urandom); x02 = D2'($urandom);

      // load the initial state
      load = 1;
      @(negedge clk);
      load = 0;
      x0v1 = dec(x01, D1); x0v2 = dec(x02, D2);
      check("load x1", xq1, x0v1);
      check("load u1", uq1, u1);
      check("load x2", xq2, x0v2);
      check("load u2", uq2, u2);

      // expected next state
      e1 = dec(i1, C1);
      for (int k = 0; k < K1; k++)
        e1 += dec(a1[k], C1) * (ny1[k] ? 1 : -1) + dec(b1[k], C1) * dec(nu1[k], D1);
      e2 = dec(i2, C2);
      for (int k = 0; k < K2; k++)
        e2 += dec(a2[k], C2) * (ny2[k] ? 1 : -1) + dec(b2[k], C2) * dec(nu2[k], D2);
      check("changed1", chg1, ((e1 >= 0) != (x0v1 >= 0)));
      check("changed2", chg2, ((e2 >= 0) != (x0v2 >= 0)));

      // no step: state holds
      @(negedge clk);
      check("hold x1", xq1, x0v1);

      step = 1;
      @(negedge clk);
      step = 0;
      check("step x1", xq1, e1);
      check("step y1", y1, e1 >= 0);
      check("step x2", xq2, e2);
      check("step y2", y2, e2 >= 0);
    end

    // clear takes priority over load
    clear = 1; load = 1;
    @(negedge clk);
    clear = 0; load = 0;
    check("clear x1", xq1, 0);
    check("clear u1", uq1, 0);
    check("clear x2", xq2, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
