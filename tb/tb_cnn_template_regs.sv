// tb_cnn_template_regs: self-checking test of the template register file.
//
// Writes random A, B and I values through the write port (r = 1, 8-bit
// coefficients) and checks every output against a shadow copy; checks that
// writes are ignored while `lock` is high and that writes past the bias
// address change nothing.
module tb_cnn_template_regs;
  localparam int K = 9, C = 8, AW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lock, we;
  logic [AW-1:0] addr;
  logic [C-1:0] wdata;
  logic [K-1:0][C-1:0] a_tmpl, b_tmpl;
  logic [C-1:0] bias;

  cnn_template_regs #(.R(1), .COEF_W(C)) dut (
    .clk, .rst_n, .lock, .we, .addr, .wdata, .a_tmpl, .b_tmpl, .bias);

  int checks = 0, failures = 0;
  logic [C-1:0] shadow [2 * K + 1];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_all();
    for (int k = 0; k < K; k++) begin
      check($sformatf("A[%0d]", k), a_tmpl[k], shadow[k]);
      check($sformatf("B[%0d]", k), b_tmpl[k], shadow[K + k]);
    end
    check("I", bias, shadow[2 * K]);
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lock = 0; we = 0; addr = '0; wdata = '0;
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 400; n++) begin
      we = 1;
      addr = AW'($urandom_range(0, 31));
      wdata = C'($urandom);
      lock = ($urandom_range(0, 3) == 0);
      @(negedge clk);
      if (!lock && int'(addr) <= 2 * K) shadow[addr] = wdata;
      we = 0; lock = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
