// tb_cnn_control: self-checking test of the network controller.
//
// A small model of a network decides when `any_change` drops (after a
// random number of iterations). The testbench checks that the controller
// issues exactly that many steps, releases the results in the clock after
// the last one, reports `converged` and the iteration count, raises `done`
// two clocks after the last step, stops at the iteration limit (MAX_ITER = 8 here) with
// `converged` low, ignores `start` while running, and returns to idle on
// `clear`.
module tb_cnn_control;
  localparam int MAX_ITER = 8;
  localparam int IT_W = $clog2(MAX_ITER + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, start, any_change;
  logic step, release_out, busy, done, converged;
  logic [IT_W-1:0] iter_count;

  cnn_control #(.MAX_ITER(MAX_ITER)) dut (
    .clk, .rst_n, .clear, .start, .any_change, .step, .release_out, .busy,
    .done, .converged, .iter_count);

  int checks = 0, failures = 0;
  int settle_after;      // iterations that still change something
  int steps_seen, releases;
  int n_conv = 0, n_limit = 0, n_clear = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // network stand-in: changes during the first settle_after steps
  always_comb any_change = (steps_seen < settle_after);

  always_ff @(posedge clk) begin
    if (step) steps_seen <= steps_seen + 1;
    if (release_out) releases <= releases + 1;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; start = 0; settle_after = 0; steps_seen = 0; releases = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle busy", busy, 0);
    check("idle done", done, 0);
    check("idle step", step, 0);
    for (int t = 0; t < 200; t++) begin
      int exp_iter, cycles;
      bit exp_conv;
      settle_after = $urandom_range(0, MAX_ITER + 3);
      steps_seen = 0; releases = 0;
      exp_conv = (settle_after < MAX_ITER);
      exp_iter = exp_conv ? settle_after + 1 : MAX_ITER;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      if (t % 7 == 3) begin
        // clear in the middle of a run
        clear = 1;
        @(negedge clk);
        clear = 0;
        check("clear -> idle", busy || done, 0);
        check("clear conv", converged, 0);
        n_clear++;
        continue;
      end
      while (!done && cycles < 40) begin
        check("busy or releasing", busy || release_out, 1);
        if (cycles == 2) start = 1;   // must be ignored
        @(negedge clk);
        start = 0;
        cycles++;
      end
      check("steps", steps_seen, exp_iter);
      check("latency", cycles, exp_iter + 2);
      check("iter_count", iter_count, exp_iter);
      check("converged", converged, exp_conv);
      check("one release", releases, 1);
      check("busy done", busy, 0);
      if (exp_conv) n_conv++; else n_limit++;
      @(negedge clk);
      check("done holds", done, 1);
      check("no step in done", steps_seen, exp_iter);
    end
    if (n_conv == 0 || n_limit == 0 || n_clear == 0) begin
      failures++;
      $display("FAIL coverage conv=%0d limit=%0d clear=%0d", n_conv, n_limit, n_clear);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
