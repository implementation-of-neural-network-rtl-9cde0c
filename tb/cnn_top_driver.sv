// cnn_top_driver: drives and checks one cnn_top instance end to end.
//
// Each run writes a template through the template port (the pattern
// exchange), loads an image and start states, starts the network and waits
// for `done`; then it compares the released outputs, `converged`,
// `iter_count` and the start-to-done latency (iterations + 2 clocks) with the
// reference model. The runs cycle through:
//   random templates (full range and small), the corner ("angle embossment")
//   template A = centre 1, B = 4 centre / -1 around, I = -5, the edge template
//   A = 7 centre / 1 around, B = 4 centre, I = 5, and the object-extraction
//   template with q = 1 (A = 7 centre / 1 around, B = 8 centre, I = 5) on
//   +/-1 images, and a self-inverting template (A centre -1) that never
//   settles and so ends at the iteration limit.
// Besides, it tries a load and a template write while the network runs
// (both must be ignored), clears the network in the middle of a run and
// after one, and restarts a settled network without reloading it. It counts
// how often each of these happened and counts a failure for any that never
// did. The template coefficients of a run must fit COEF_W, else the run
// uses a random template.
module cnn_top_driver
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
#(
  parameter int ROWS = 3,
  parameter int COLS = 3,
  parameter int R = 1,
  parameter int D = 8,
  parameter int C = 8,
  parameter int MAX_ITER = 64,
  parameter int RUNS = 60,
  localparam int K = nbr_count(R),
  localparam int AW = $clog2(2 * K + 1),
  localparam int IT_W = $clog2(MAX_ITER + 1),
  localparam int SW = state_width(D, C, R)
) (
  input  logic                              clk,
  output logic                              rst_n,
  output logic                              tmpl_we,
  output logic [AW-1:0]                     tmpl_addr,
  output logic [C-1:0]                      tmpl_wdata,
  output logic                              load,
  output logic [ROWS-1:0][COLS-1:0][D-1:0]  u_in,
  output logic [ROWS-1:0][COLS-1:0][D-1:0]  x0_in,
  output logic                              clear,
  output logic                              start,
  input  logic                              busy,
  input  logic                              done,
  input  logic                              converged,
  input  logic [IT_W-1:0]                   iter_count,
  input  logic [ROWS-1:0][COLS-1:0][D-1:0]  y_out,
  input  logic                              y_valid,
  input  logic [ROWS-1:0][COLS-1:0][SW-1:0] x_state,
  output int                                checks,
  output int                                failures,
  output logic                              finished
);

  typedef enum int {
    EV_CONVERGED, EV_ITER_LIMIT, EV_LOAD_BLOCKED, EV_WRITE_BLOCKED,
    EV_CLEAR_RUN, EV_CLEAR_DONE, EV_RESTART, EV_TEMPLATE_SWAP, EV_N
  } event_e;
  int events[EV_N];
  string ev_name[EV_N] = '{"converged", "iteration limit", "load while busy",
                           "template write while busy", "clear during run",
                           "clear after run", "restart without reload",
                           "template exchange"};

  CnnModel m;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL [%0dx%0d r%0d d%0d c%0d] %s: got %0d expected %0d",
                                  ROWS, COLS, R, D, C, what, got, exp);
    end
  endtask

  function automatic bit fits(int v);
    return v >= -(1 <<< (C - 1)) && v < (1 <<< (C - 1));
  endfunction

  task automatic write_coef(int addr, int v);
    tmpl_we = 1;
    tmpl_addr = AW'(addr);
    tmpl_wdata = C'(v);
    @(negedge clk);
    tmpl_we = 0;
  endtask

  task automatic write_template();
    for (int k = 0; k < K; k++) write_coef(k, m.a[k]);
    for (int k = 0; k < K; k++) write_coef(K + k, m.b[k]);
    write_coef(2 * K, m.bias);
    events[EV_TEMPLATE_SWAP]++;
  endtask

  // Set the model's template for a run kind; returns 1 for +/-1 images.
  function automatic bit pick_template(int kind);
    int ac, an, bc, bn, i_;
    bit binary;
    binary = 1;
    case (kind)
      2: begin ac = 1; an = 0; bc = 4; bn = -1; i_ = -5; end  // corners
      3: begin ac = 7; an = 1; bc = 4; bn = 0;  i_ = 5;  end  // edges
      4: begin ac = 7; an = 1; bc = 8; bn = 0;  i_ = 5;  end  // object, q = 1
      5: begin ac = -1; an = 0; bc = 0; bn = 0; i_ = 0;  end  // never settles
      default: begin ac = 0; an = 0; bc = 0; bn = 0; i_ = 0; binary = 0; end
    endcase
    if (kind >= 2 && kind <= 5 && fits(ac) && fits(an) && fits(bc) && fits(bn) && fits(i_)) begin
      m.set_template(ac, an, bc, bn, i_);
      // r = 2: the paper's templates are 3 x 3; the outer ring stays zero.
      if (R > 1)
        for (int di = -R; di <= R; di++)
          for (int dj = -R; dj <= R; dj++)
            if (di < -1 || di > 1 || dj < -1 || dj > 1) begin
              m.a[nbr_index(di, dj, R)] = 0;
              m.b[nbr_index(di, dj, R)] = 0;
            end
      return binary;
    end
    for (int k = 0; k < K; k++) begin
      if (kind == 1 || kind >= 2) begin
        m.a[k] = $urandom_range(0, 4) - 2;
        m.b[k] = $urandom_range(0, 2) - 1;
      end else begin
        m.a[k] = dec($urandom, C);
        m.b[k] = dec($urandom, C);
      end
    end
    m.bias = dec($urandom, C);
    return 0;
  endfunction

  task automatic load_image(bit binary);
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        int uv, xv;
        uv = binary ? (($urandom_range(0, 2) != 0) ? 1 : -1) : dec($urandom, D);
        xv = binary ? (($urandom_range(0, 3) == 0) ? 1 : -1) : dec($urandom, D);
        u_in[i][j] = D'(enc(uv, D));
        x0_in[i][j] = D'(enc(xv, D));
        m.u[i * COLS + j] = uv;
        m.x[i * COLS + j] = xv;
      end
    load = 1;
    @(negedge clk);
    load = 0;
  endtask

  // Starts the network, disturbs it on request, waits for done and checks.
  task automatic run_and_check(bit disturb);
    int exp_iter, cycles, flip;
    bit conv;
    logic [ROWS-1:0][COLS-1:0][D-1:0] junk;
    m.run(MAX_ITER);
    exp_iter = m.iters;
    conv = m.conv;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < MAX_ITER + 10) begin
      if (disturb && cycles == 1 && busy) begin
        // a load and a template write while busy must change nothing
        for (int i = 0; i < ROWS; i++)
          for (int j = 0; j < COLS; j++) junk[i][j] = D'($urandom);
        u_in = junk; x0_in = junk; load = 1;
        tmpl_we = 1; tmpl_addr = AW'(K / 2); tmpl_wdata = C'($urandom);
        events[EV_LOAD_BLOCKED]++;
        events[EV_WRITE_BLOCKED]++;
      end
      @(negedge clk);
      load = 0; tmpl_we = 0;
      cycles++;
    end
    check("done", done, 1);
    check("latency", cycles, exp_iter + 2);
    check("iter_count", iter_count, exp_iter);
    check("converged", converged, conv);
    check("valid", y_valid, 1);
    flip = 0;
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        int yv;
        yv = m.yv(i * COLS + j);
        check($sformatf("y_out[%0d][%0d]", i, j), y_out[i][j], enc(yv, D));
        check($sformatf("x[%0d][%0d]", i, j), longint'($signed(x_state[i][j])),
              m.x[i * COLS + j]);
      end
    if (conv) events[EV_CONVERGED]++; else events[EV_ITER_LIMIT]++;
  endtask

  initial begin
    m = new(ROWS, COLS, R);
    foreach (events[i]) events[i] = 0;
    checks = 0; failures = 0; finished = 0;
    rst_n = 0; tmpl_we = 0; tmpl_addr = '0; tmpl_wdata = '0; load = 0;
    u_in = '0; x0_in = '0; clear = 0; start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset valid", y_valid, 0);
    check("reset done", done, 0);
    for (int run = 0; run < RUNS; run++) begin
      int kind;
      bit binary;
      kind = run % 6;
      binary = pick_template(kind);
      write_template();
      load_image(binary);
      if (run % 10 == 7) begin
        // clear in the middle of a run
        start = 1;
        @(negedge clk);
        start = 0;
        if (busy) begin
          clear = 1;
          @(negedge clk);
          clear = 0;
          check("clear run busy", busy || done || y_valid, 0);
          check("clear run state", x_state, 0);
          events[EV_CLEAR_RUN]++;
        end
        continue;
      end
      run_and_check(run % 3 == 1);
      if (run % 5 == 2) begin
        // restart the settled network without reloading
        if (converged) begin
          run_and_check(0);
          events[EV_RESTART]++;
        end
      end
      if (run % 10 == 9) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        check("clear done", done || y_valid, 0);
        check("clear out", y_out, 0);
        events[EV_CLEAR_DONE]++;
      end
    end
    for (int e = 0; e < EV_N; e++) begin
      $display("[%0dx%0d r%0d d%0d c%0d] %s: %0d", ROWS, COLS, R, D, C, ev_name[e], events[e]);
      if (events[e] == 0) begin
        failures++;
        $display("FAIL [%0dx%0d r%0d d%0d c%0d] mechanism never exercised: %s",
                 ROWS, COLS, R, D, C, ev_name[e]);
      end
    end
    finished = 1;
  end
endmodule
