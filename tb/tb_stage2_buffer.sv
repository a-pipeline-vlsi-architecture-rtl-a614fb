// Self-checking testbench for stage2_buffer at N = 128, J = 7, L = 6.
// Level-1 samples arrive on the PU1 port while samples of levels 2..6 arrive,
// level after level, on the PU2 port in the same cycles.  Every cycle one
// window whose samples are all available (counting the sample written in
// that very cycle, which exercises the write-through bypass) is read and
// compared with x[(2i+k) mod len] of the rounded and saturated samples; the
// windows at the end of each level exercise the periodic padding store.
module tb_stage2_buffer;
  import dwt_pkg::*;
  localparam int unsigned N = 128, J = 7, L = 6, SW = 8, FRAC = 7;
  localparam int unsigned OW = out_width(SW, CW_DEF, L);
  localparam int unsigned CNTW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic w1_valid = 1'b0, w2_valid = 1'b0, rd_en = 1'b0;
  logic signed [OW-1:0] w1_data = '0, w2_data = '0;
  logic [3:0] w2_level = '0, rd_level = '0;
  logic [CNTW-1:0] rd_idx = '0;
  logic signed [SW-1:0] win [L];
  logic [CNTW-1:0] wcount [J];
  logic [CNTW-1:0] avail [J];

  stage2_buffer #(.N(N), .J(J), .L(L), .SW(SW), .OW(OW), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_bypass = 0, n_pad = 0;
  longint xs [J][N/2];       // stored (rounded) samples per level
  longint yv [J][N/2];       // full-precision values written
  int wr [J];                // samples written per level
  int rdi [J+1];             // next window index per consumer level

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rq(longint y);
    longint r;
    r = (y + 64) >>> 7;
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  function automatic bit ready(int c, int av);  // window rdi[c] of level c
    int len, need;
    len = N >> (c - 1);
    need = 2 * rdi[c] + L;
    if (need > len) need = len;
    return rdi[c] < (N >> c) && av >= need;
  endfunction

  initial begin
    int hl, av1, av2;
    for (int s = 1; s < J; s++)
      for (int m = 0; m < (N >> s); m++) begin
        yv[s][m] = longint'($urandom_range(0, 40000)) - 20000;
        xs[s][m] = rq(yv[s][m]);
      end
    for (int s = 0; s < J; s++) wr[s] = 0;
    for (int c = 0; c <= J; c++) rdi[c] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    hl = 2;
    for (int t = 0; t < 400; t++) begin
      // writes of this cycle
      w1_valid = wr[1] < N / 2;
      if (w1_valid) w1_data = OW'(yv[1][wr[1]]);
      while (hl < J && wr[hl] == (N >> hl)) hl++;
      w2_valid = hl < J;
      w2_level = 4'(hl);
      if (w2_valid) w2_data = OW'(yv[hl][wr[hl]]);
      // pick a ready window (availability includes this cycle's write)
      rd_en = 1'b0;
      for (int c = 2; c <= J && !rd_en; c++) begin
        int av;
        av = wr[c-1] + ((c - 1 == 1 && w1_valid) || (c - 1 >= 2 && w2_valid && hl == c - 1) ? 1 : 0);
        if (ready(c, av)) begin
          rd_en = 1'b1;
          rd_level = 4'(c);
          rd_idx = CNTW'(rdi[c]);
        end
      end
      #1;
      if (rd_en) begin
        int c, len;
        c = int'(rd_level);
        len = N >> (c - 1);
        checks++;
        if (int'(avail[c-1]) < wr[c-1]) begin failures++; $display("FAIL: avail below written"); end
        for (int k = 0; k < L; k++) begin
          int m;
          m = 2 * rdi[c] + k;
          if (m % len == wr[c-1]) n_bypass++;
          if (m >= len) n_pad++;
          if (longint'(win[k]) != xs[c-1][m % len]) begin
            failures++;
            if (failures < 10)
              $display("FAIL: level %0d window %0d tap %0d = %0d, expected %0d", c, rdi[c], k, win[k], xs[c-1][m % len]);
          end
        end
        rdi[c]++;
      end
      @(negedge clk);
      if (w1_valid) wr[1]++;
      if (w2_valid) wr[hl]++;
    end
    rd_en = 1'b0; w1_valid = 1'b0; w2_valid = 1'b0;
    for (int c = 2; c <= J; c++) begin
      checks++;
      if (rdi[c] != (N >> c)) begin failures++; $display("FAIL: level %0d only %0d windows read", c, rdi[c]); end
    end
    for (int s = 1; s < J; s++) begin
      checks++;
      if (int'(wcount[s]) != (N >> s)) begin failures++; $display("FAIL: wcount[%0d] = %0d", s, wcount[s]); end
    end
    checks++;
    if (n_bypass == 0 || n_pad == 0) begin failures++; $display("FAIL: bypass %0d / padding %0d never used", n_bypass, n_pad); end
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    checks++;
    if (wcount[1] != 0) begin failures++; $display("FAIL: restart did not clear the counts"); end
    $display("bypassed taps %0d, padded taps %0d", n_bypass, n_pad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
