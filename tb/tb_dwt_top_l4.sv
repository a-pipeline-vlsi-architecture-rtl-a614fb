// End-to-end testbench for dwt_top with 4-tap filters (N = 128, J = 7,
// L = 4, 8-bit samples and coefficients), the configuration of the timing
// example the architecture is explained with: there n_c = 13, so stage 2
// starts after 14 level-1 samples and its level-1 channel is 14 deep.  The
// default coefficients are the Daubechies 4-tap lowpass filter in Q1.7
// (62, 107, 29, -17).  Besides the checks of the default-size test it
// checks the order of the first two stage-2 samples once level 1 is
// complete (level 4, then the last level-2 sample).  As in that test:
//
// Three frames are transformed:
//   1. small random input, default coefficients, input at one sample/clock;
//   2. full-range random input after a coefficient reload (drives the
//      rounding of stored samples into saturation);
//   3. default coefficients again, input with random gaps.
// A reference model here computes every C and D of every level with periodic
// border extension and the same rounding of stored lowpass samples; all
// outputs are compared in order per level.  It also checks the timing the
// architecture promises: stage 1 emits one output per clock while the input
// streams, stage 2 starts after n_c + 1 level-1 samples, has no idle slot
// while stage 1 is running, and finishes n_c slots after stage 1.  Each mechanism (border replay in stage 1,
// padded windows in stage 2, moves up and back between levels, saturation,
// coefficient reload, frame restart) is counted and must occur.
module tb_dwt_top_l4;
  import dwt_pkg::*;
  localparam int unsigned N = N_DEF, J = J_DEF, L = 4, SW = SW_DEF, CW = CW_DEF;
  localparam logic signed [CW-1:0] DB4_Q7 [L] = '{62, 107, 29, -17};
  localparam int unsigned FRAC = FRAC_DEF;
  localparam int unsigned OW = out_width(SW, CW, L);
  localparam int unsigned NC = calc_nc(L, J);

  logic clk = 1'b0, rst_n = 1'b0;
  logic coef_load = 1'b0;
  logic signed [CW-1:0] coef_in [L];
  logic in_valid = 1'b0;
  logic signed [SW-1:0] in_data = '0;
  logic in_ready;
  logic out1_valid, out1_high, out2_valid, out2_high;
  logic signed [OW-1:0] out1_data, out2_data;
  logic [3:0] out2_level;
  logic stage2_started, stage2_idle_slot, frame_done;

  dwt_top #(.L(L), .COEF_INIT(DB4_Q7)) dut (.*);

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

  // ---------------- reference model ----------------
  longint exp_c [J+1][N/2];
  longint exp_d [J+1][N/2];
  int     got_n [J+1][2];
  int     n_sat = 0;
  logic signed [CW-1:0] h [L];

  function automatic longint q(longint y);
    longint r;
    r = (y + (longint'(1) <<< (FRAC - 1))) >>> FRAC;
    if (r > (longint'(1) <<< (SW - 1)) - 1) r = (longint'(1) <<< (SW - 1)) - 1;
    if (r < -(longint'(1) <<< (SW - 1)))    r = -(longint'(1) <<< (SW - 1));
    return r;
  endfunction

  task automatic reference(input longint x [N]);
    longint a [N];
    longint nxt [N];
    int n;
    for (int i = 0; i < N; i++) a[i] = x[i];
    n = N;
    for (int j = 1; j <= J; j++) begin
      for (int i = 0; i < n / 2; i++) begin
        longint c, d;
        c = 0; d = 0;
        for (int k = 0; k < L; k++) begin
          c += longint'(h[k]) * a[(2*i + k) % n];
          d += ((k % 2 == 1) ? 1 : -1) * longint'(h[L-1-k]) * a[(2*i + k) % n];
        end
        exp_c[j][i] = c;
        exp_d[j][i] = d;
        nxt[i] = q(c);
        if (j < J && nxt[i] != ((c + (longint'(1) <<< (FRAC - 1))) >>> FRAC)) n_sat++;
      end
      n = n / 2;
      for (int i = 0; i < n; i++) a[i] = nxt[i];
    end
  endtask

  task automatic check_out(int j, logic hi, longint y);
    int idx;
    idx = got_n[j][hi];
    got_n[j][hi]++;
    checks++;
    if (idx >= (N >> j)) begin
      failures++;
      $display("FAIL: extra output level %0d high %0d", j, hi);
    end else if (y != (hi ? exp_d[j][idx] : exp_c[j][idx])) begin
      failures++;
      if (failures < 20)
        $display("FAIL: level %0d %s[%0d] = %0d, expected %0d", j, hi ? "D" : "C", idx, y,
                 hi ? exp_d[j][idx] : exp_c[j][idx]);
    end
  endtask

  // ---------------- monitors ----------------
  int  first_out1, last_out1, n_out1;
  int  n_replay = 0, n_pad_win = 0, n_up = 0, n_back = 0;
  int  idle_tb = 0, idle_total = 0, n_frames = 0;
  int  s2_first_issue, s2_last_issue, s1_last_win, n_issue;
  int  wc1_at_start;
  int  prev_level = 2;
  logic s2_seen;
  int  n_after;               // stage-2 windows issued after level 1 is complete
  int  after_lv [2], after_idx [2];

  always @(posedge clk) if (rst_n) begin
    if (out1_valid) begin
      if (n_out1 == 0) first_out1 = cycle;
      last_out1 = cycle;
      n_out1++;
      check_out(1, out1_high, longint'(out1_data));
    end
    if (out2_valid) check_out(int'(out2_level), out2_high, longint'(out2_data));
    if (dut.u_cu1.replay && dut.u_cu1.shift) n_replay++;
    if (dut.u_cu1.win_valid) s1_last_win = cycle;
    if (dut.s2_issue) begin
      if (!s2_seen) begin
        s2_first_issue = cycle;
        wc1_at_start = int'(dut.avail[1]);
      end
      s2_seen = 1'b1;
      s2_last_issue = cycle;
      n_issue++;
      if (2 * int'(dut.s2_idx) + L > (N >> (int'(dut.s2_level) - 1))) n_pad_win++;
      if (int'(dut.wcount[1]) == N / 2) begin
        if (n_after < 2) begin
          after_lv[n_after] = int'(dut.s2_level);
          after_idx[n_after] = int'(dut.s2_idx);
        end
        n_after++;
      end
      if (int'(dut.s2_level) > prev_level) n_up++;
      if (int'(dut.s2_level) < prev_level) n_back++;
      prev_level = int'(dut.s2_level);
    end
    if (stage2_idle_slot) begin
      idle_total++;
      if (!dut.s1_done) idle_tb++;
    end
  end

  task automatic run_frame(input bit gaps, input int amp, input string name);
    longint x [N];
    int t0, tc_slots;
    for (int i = 0; i < N; i++) x[i] = longint'($signed(SW'($urandom_range(0, 2 * amp) - amp)));
    reference(x);
    for (int j = 0; j <= J; j++) begin got_n[j][0] = 0; got_n[j][1] = 0; end
    n_out1 = 0; idle_tb = 0; idle_total = 0; n_issue = 0; s2_seen = 1'b0; prev_level = 2; n_after = 0;
    t0 = cycle;
    for (int i = 0; i < N; i++) begin
      while (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = SW'(x[i]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!frame_done) @(negedge clk);
    @(negedge clk);
    n_frames++;
    // All outputs present.
    for (int j = 1; j <= J; j++) begin
      checks++;
      if (got_n[j][0] != (N >> j) || got_n[j][1] != (N >> j)) begin
        failures++;
        $display("FAIL: %s level %0d got %0d C and %0d D, expected %0d", name, j,
                 got_n[j][0], got_n[j][1], N >> j);
      end
    end
    // Stage 1: N outputs; with continuous input, one per clock.
    checks++;
    if (n_out1 != N || (!gaps && last_out1 - first_out1 + 1 != N)) begin
      failures++;
      $display("FAIL: %s stage 1 gave %0d outputs over %0d cycles", name, n_out1,
               last_out1 - first_out1 + 1);
    end
    // Stage 2 starts with n_c + 1 level-1 samples held, computes N/2 - 1 pairs,
    // and never idles while stage 1 is still running.
    checks++;
    if (wc1_at_start != NC + 1 || n_issue != N / 2 - 1) begin
      failures++;
      $display("FAIL: %s stage 2 started with %0d level-1 samples (n_c+1 = %0d), %0d windows",
               name, wc1_at_start, NC + 1, n_issue);
    end
    if (!gaps) begin
      checks++;
      if (idle_tb != 0) begin
        failures++;
        $display("FAIL: %s stage 2 idled %0d slots while stage 1 was running", name, idle_tb);
      end
    end
    // Worked timing example: with level 1 complete, stage 2 first computes a
    // level-4 sample and then returns for the last level-2 sample, whose
    // window needs two padded samples.
    if (!gaps) begin
      checks++;
      if (after_lv[0] != 4 || after_lv[1] != 2 || after_idx[1] != N / 4 - 1) begin
        failures++;
        $display("FAIL: %s after level 1: level %0d then level %0d[%0d], expected level 4 then level 2[%0d]",
                 name, after_lv[0], after_lv[1], after_idx[1], N / 4 - 1);
      end
    end
    tc_slots = (s2_last_issue - s1_last_win) / 2;
    // With continuous input the tail after stage 1 reaches its lower bound n_c.
    if (!gaps) begin
      checks++;
      if (tc_slots != NC) begin
        failures++;
        $display("FAIL: %s tail after stage 1 is %0d slots, n_c = %0d", name, tc_slots, NC);
      end
    end
    $display("%s: %0d cycles from first input to frame end; stage 2 slots after stage 1: %0d (n_c = %0d), idle slots %0d (during stage 1: %0d)",
             name, cycle - t0, tc_slots, NC, idle_total, idle_tb);
  endtask

  initial begin
    for (int k = 0; k < L; k++) begin
      h[k] = DB4_Q7[k];
      coef_in[k] = '0;
    end
    checks++;
    if (NC != 13) begin
      failures++;
      $display("FAIL: n_c for L = 4, J = 7 is %0d, expected 13", NC);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_frame(1'b0, 12, "frame 1");
    // Coefficient reload: a random coefficient set.
    for (int k = 0; k < L; k++) begin
      coef_in[k] = (k == 1) ? CW'(120) : CW'($urandom_range(0, 240)) - CW'(120);
      h[k] = coef_in[k];
    end
    coef_load = 1'b1;
    @(negedge clk);
    coef_load = 1'b0;
    @(negedge clk);
    run_frame(1'b0, 127, "frame 2");
    for (int k = 0; k < L; k++) begin
      coef_in[k] = DB4_Q7[k];
      h[k] = DB4_Q7[k];
    end
    coef_load = 1'b1;
    @(negedge clk);
    coef_load = 1'b0;
    @(negedge clk);
    run_frame(1'b1, 40, "frame 3");

    $display("mechanisms: border replay %0d, padded stage-2 windows %0d, level moves up %0d, back %0d, saturated samples %0d, frames %0d",
             n_replay, n_pad_win, n_up, n_back, n_sat, n_frames);
    checks++;
    if (n_replay == 0 || n_pad_win == 0 || n_up == 0 || n_back == 0 || n_sat == 0 || n_frames != 3) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
