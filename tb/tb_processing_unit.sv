// Self-checking testbench for processing_unit.
// Random L-sample windows are applied every second cycle (with occasional
// idle cycles), the lowpass and highpass outputs are compared with sums of
// products computed here, and the latency is checked: C two cycles and D
// three cycles after the window.  Halfway through, a new coefficient set is
// loaded and the check continues with it.
module tb_processing_unit;
  import dwt_pkg::*;
  localparam int unsigned L = 6, SW = 8, CW = 8, TW = 4;
  localparam int unsigned OW = out_width(SW, CW, L);

  logic clk = 1'b0, rst_n = 1'b0;
  logic coef_load = 1'b0;
  logic signed [CW-1:0] coef_in [L];
  logic win_valid = 1'b0;
  logic signed [SW-1:0] win [L];
  logic [TW-1:0] tag_in = '0;
  logic y_valid, y_high;
  logic [TW-1:0] y_tag;
  logic signed [OW-1:0] y;

  processing_unit #(.L(L), .SW(SW), .CW(CW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs, queued when a window is applied.
  longint exp_y [$];
  logic   exp_h [$];
  int     exp_t [$];
  int     exp_cyc [$];
  logic signed [CW-1:0] h [L];

  task automatic push_window();
    longint c, d;
    c = 0; d = 0;
    for (int k = 0; k < L; k++) begin
      c += longint'(h[k]) * longint'(win[k]);
      d += ((k % 2 == 1) ? 1 : -1) * longint'(h[L-1-k]) * longint'(win[k]);
    end
    exp_y.push_back(c); exp_h.push_back(1'b0); exp_t.push_back(int'(tag_in)); exp_cyc.push_back(cycle + 2);
    exp_y.push_back(d); exp_h.push_back(1'b1); exp_t.push_back(int'(tag_in)); exp_cyc.push_back(cycle + 3);
  endtask

  always @(posedge clk) if (rst_n && y_valid) begin
    checks++;
    if (exp_y.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output %0d", y);
    end else begin
      longint ey; logic eh; int et, ec;
      ey = exp_y.pop_front(); eh = exp_h.pop_front(); et = exp_t.pop_front(); ec = exp_cyc.pop_front();
      if (longint'(y) != ey || y_high != eh || int'(y_tag) != et || cycle != ec) begin
        failures++;
        if (failures < 10)
          $display("FAIL: y=%0d high=%0d tag=%0d cyc=%0d, expected %0d %0d %0d %0d",
                   y, y_high, y_tag, cycle, ey, eh, et, ec);
      end
    end
  end

  initial begin
    for (int k = 0; k < L; k++) begin
      h[k] = DB6_Q7[k];
      coef_in[k] = '0;
      win[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      if (n == 1000) begin
        // Load a new random coefficient set (no -2^(CW-1), see the sign inversion).
        for (int k = 0; k < L; k++) begin
          coef_in[k] = CW'($urandom_range(0, 254)) - CW'(127);
          h[k] = coef_in[k];
        end
        coef_load = 1'b1;
        @(negedge clk);
        coef_load = 1'b0;
        repeat (4) @(negedge clk);
      end
      for (int k = 0; k < L; k++) win[k] = SW'($urandom);
      tag_in = TW'($urandom);
      win_valid = 1'b1;
      push_window();
      @(negedge clk);
      win_valid = 1'b0;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (exp_y.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", exp_y.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
