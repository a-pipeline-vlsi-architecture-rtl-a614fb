// Self-checking testbench for stage1_ctrl at N = 128, L = 6.
// Frame 1 streams one sample per clock and checks that windows come every
// second cycle; frame 2 streams with random gaps.  Every window must equal
// x[(2i+k) mod N] (periodic border extension), carry index i, and a frame
// must give exactly N/2 windows, then drop in_ready until restart.
module tb_stage1_ctrl;
  localparam int unsigned N = 128, L = 6, SW = 8;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic in_valid = 1'b0;
  logic signed [SW-1:0] in_data = '0;
  logic in_ready, win_valid, done;
  logic signed [SW-1:0] win [L];
  logic [$clog2(N)-1:0] win_idx;
  int checks = 0, failures = 0;
  int cycle = 0;
  logic signed [SW-1:0] x [N];
  int n_win, last_win_cyc, max_gap_err;

  stage1_ctrl #(.N(N), .L(L), .SW(SW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && win_valid) begin
    checks++;
    if (int'(win_idx) != n_win) begin
      failures++;
      $display("FAIL: window index %0d, expected %0d", win_idx, n_win);
    end
    for (int k = 0; k < L; k++)
      if (win[k] != x[(2 * n_win + k) % N]) begin
        failures++;
        if (failures < 10) $display("FAIL: window %0d tap %0d = %0d, expected %0d", n_win, k, win[k], x[(2*n_win+k)%N]);
      end
    if (n_win > 0 && cycle - last_win_cyc < 2) max_gap_err++;
    last_win_cyc = cycle;
    n_win++;
  end

  task automatic frame(bit gaps);
    int t_first, t_last;
    for (int i = 0; i < N; i++) x[i] = SW'($urandom);
    n_win = 0; max_gap_err = 0;
    for (int i = 0; i < N; i++) begin
      while (gaps && $urandom_range(0, 2) == 0) begin in_valid = 1'b0; @(negedge clk); end
      checks++;
      if (!in_ready) begin failures++; $display("FAIL: in_ready low during frame"); end
      in_valid = 1'b1;
      in_data = x[i];
      @(negedge clk);
      if (i == L - 1) t_first = cycle;
    end
    in_valid = 1'b0;
    checks++;
    if (in_ready) begin failures++; $display("FAIL: in_ready high after N samples"); end
    repeat (L) @(negedge clk);
    t_last = last_win_cyc;
    checks += 3;
    if (n_win != N / 2 || !done) begin
      failures++;
      $display("FAIL: %0d windows, done=%0d", n_win, done);
    end
    if (max_gap_err != 0) begin failures++; $display("FAIL: windows closer than two cycles"); end
    if (!gaps && t_last - t_first != N - L + (L - 2)) begin
      failures++;
      $display("FAIL: windows spread over %0d cycles, expected %0d", t_last - t_first, N - 2);
    end
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    frame(1'b0);
    frame(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
