// tb_cnn_object_extraction: the object-extraction task, checked against a
// flood fill instead of the CNN reference model.
//
// An 8 x 8 toroidal network runs the template family
//   A = q around / 1+6q centre, B = 8q centre, I = 5q
// for q = 1, 2 and 3.
// The image u holds +1 for object pixels and -1 for background; the start
// state marks some object pixels +1 and everything else -1. The transformation
// rules then say that exactly the object pixels connected (through the eight
// neighbours, wrapping at the edges) to a marked pixel end at +1: marked
// pixels stay, the marking diffuses through the object, and background stays
// background. The testbench computes that set by flood fill and checks it,
// plus `converged`, on random images.
module tb_cnn_object_extraction;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int N = 8, D = 2, C = 8, MAX_ITER = 64;
  localparam int K = nbr_count(1);
  localparam int AW = $clog2(2 * K + 1);
  localparam int IT_W = $clog2(MAX_ITER + 1);
  localparam int SW = state_width(D, C, 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tmpl_we = 0, load = 0, clear = 0, start = 0;
  logic busy, done, converged, y_valid;
  logic [AW-1:0] tmpl_addr = '0;
  logic [C-1:0] tmpl_wdata = '0;
  logic [N-1:0][N-1:0][D-1:0] u_in = '0, x0_in = '0, y_out;
  logic [IT_W-1:0] iter_count;
  logic [N-1:0][N-1:0][SW-1:0] x_state;

  cnn_top #(.ROWS(N), .COLS(N), .R(1), .DATA_W(D), .COEF_W(C), .MAX_ITER(MAX_ITER)) dut (
    .clk, .rst_n, .tmpl_we, .tmpl_addr, .tmpl_wdata, .load, .u_in, .x0_in,
    .clear, .start, .busy, .done, .converged, .iter_count, .y_out, .y_valid,
    .x_state);

  int checks = 0, failures = 0;
  int diffused = 0, max_iters = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(int a, int v);
    tmpl_we = 1; tmpl_addr = AW'(a); tmpl_wdata = C'(v);
    @(negedge clk);
    tmpl_we = 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit obj [N][N];
    bit mark [N][N];
    bit keep [N][N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      int marked_obj, kept, q;
      bit grew;
      q = 1 + t / 20;
      if (t % 20 == 0) begin
        for (int k = 0; k < K; k++) wr(k, (k == K / 2) ? 1 + 6 * q : q);
        for (int k = 0; k < K; k++) wr(K + k, (k == K / 2) ? 8 * q : 0);
        wr(2 * K, 5 * q);
      end
      marked_obj = 0; kept = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          obj[i][j] = ($urandom_range(0, 99) < 40);
          mark[i][j] = obj[i][j] && ($urandom_range(0, 99) < 8);
          u_in[i][j] = D'(enc(obj[i][j] ? 1 : -1, D));
          x0_in[i][j] = D'(enc(mark[i][j] ? 1 : -1, D));
          keep[i][j] = mark[i][j];
          marked_obj += mark[i][j];
        end
      // flood fill over the 8-neighbourhood, wrapping at the edges
      grew = 1;
      while (grew) begin
        grew = 0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            if (obj[i][j] && !keep[i][j])
              for (int di = -1; di <= 1; di++)
                for (int dj = -1; dj <= 1; dj++)
                  if (keep[(i + di + N) % N][(j + dj + N) % N] && !keep[i][j]) begin
                    keep[i][j] = 1;
                    grew = 1;
                  end
      end
      load = 1;
      @(negedge clk);
      load = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check($sformatf("converged q=%0d", q), converged, 1);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          check($sformatf("q=%0d pixel %0d,%0d", q, i, j), y_out[i][j], enc(keep[i][j] ? 1 : -1, D));
          kept += keep[i][j];
        end
      if (kept > marked_obj) diffused++;
      if (int'(iter_count) > max_iters) max_iters = int'(iter_count);
    end
    $display("runs where the marking diffused: %0d, longest run: %0d iterations",
             diffused, max_iters);
    if (diffused == 0) begin
      failures++;
      $display("FAIL diffusion never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
