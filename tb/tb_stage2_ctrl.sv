// Self-checking testbench for stage2_ctrl at N = 128, J = 7, L = 6.
// The environment models stage 1 (a level-1 sample every second cycle) and
// PU2 (a level-j lowpass sample written two cycles after its window, counted
// as available in that cycle).  Each issued window is checked against the
// scheduling rules worked out here: the data must be there, the level must be
// the one the rules pick, and the index must be the next of that level.  The
// run checks that stage 2 starts with n_c + 1 level-1 samples, issues N/2 - 1
// windows, never idles while stage 1 runs and ends n_c slots after it.
// A second frame streams level-1 samples with gaps, so idle slots occur.
module tb_stage2_ctrl;
  import dwt_pkg::*;
  localparam int unsigned N = 128, J = 7, L = 6;
  localparam int unsigned NC = calc_nc(L, J);
  localparam int unsigned CNTW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic [CNTW-1:0] avail [J];
  logic issue, started, idle_slot, done;
  logic [3:0] issue_level;
  logic [CNTW-1:0] issue_idx;

  stage2_ctrl #(.N(N), .J(J), .L(L), .NC(NC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int wr [J+1];          // samples written per level
  int oc [J+1];          // windows issued per level
  int pend_cyc [$];
  int pend_lvl [$];
  int last = 2, n_issue, idle_s1, n_idle, last_s1, last_issue, first_avail;
  bit s1_running, gaps;
  int n1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit rdy(int j, int av);
    int need;
    if (oc[j] >= (N >> j)) return 0;
    need = 2 * oc[j] + L;
    if (need > (N >> (j - 1))) need = N >> (j - 1);
    return av >= need;
  endfunction

  // Drive avail[] for this cycle (called after the negative edge).
  bit w1_now;
  int av [J+1];
  task automatic drive();
    for (int j = 0; j <= J; j++) av[j] = wr[j];
    w1_now = s1_running && (cycle % 2 == 0) && (!gaps || $urandom_range(0, 2) != 0);
    if (w1_now) av[1]++;
    if (pend_cyc.size() > 0 && pend_cyc[0] == cycle) av[pend_lvl[0]]++;
    for (int j = 0; j < J; j++) avail[j] = CNTW'(av[j]);
  endtask

  task automatic run(bit with_gaps, string name);
    gaps = with_gaps;
    for (int j = 0; j <= J; j++) begin wr[j] = 0; oc[j] = 0; end
    last = 2; n_issue = 0; idle_s1 = 0; n_idle = 0; first_avail = -1; n1 = 0;
    s1_running = 1'b1;
    while (!done || n_issue == 0) begin
      drive();
      #1;
      if (issue) begin
        int lo, exp;
        bit ok;
        if (n_issue == 0) first_avail = av[1];
        lo = 0;
        for (int j = J; j >= 2; j--) if (oc[j] < (N >> j)) lo = j;
        exp = 0;
        if (last == lo) begin
          for (int j = lo + 1; j <= J && exp == 0; j++) if (rdy(j, av[j-1])) exp = j;
          if (exp == 0 && rdy(lo, av[lo-1])) exp = lo;
        end else begin
          if (rdy(lo, av[lo-1])) exp = lo;
          for (int j = lo + 1; j <= J && exp == 0; j++) if (rdy(j, av[j-1])) exp = j;
        end
        checks++;
        ok = (int'(issue_level) == exp) && (int'(issue_idx) == oc[exp]) && rdy(exp, av[exp-1]);
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s: cycle %0d issued level %0d idx %0d, expected level %0d idx %0d", name,
                     cycle, issue_level, issue_idx, exp, oc[exp]);
        end
        oc[int'(issue_level)]++;
        last = int'(issue_level);
        n_issue++;
        last_issue = cycle;
        if (int'(issue_level) < J) begin
          pend_cyc.push_back(cycle + 2);
          pend_lvl.push_back(int'(issue_level));
        end
      end
      if (idle_slot) begin
        n_idle++;
        if (s1_running) idle_s1++;
      end
      @(negedge clk);
      cycle++;
      if (w1_now) begin
        wr[1]++;
        if (wr[1] == N / 2) begin s1_running = 1'b0; last_s1 = cycle - 1; end
      end
      if (pend_cyc.size() > 0 && pend_cyc[0] == cycle - 1) begin
        wr[pend_lvl[0]]++;
        void'(pend_cyc.pop_front());
        void'(pend_lvl.pop_front());
      end
    end
    checks += 3;
    if (first_avail != NC + 1) begin failures++; $display("FAIL %s: started with %0d level-1 samples", name, first_avail); end
    if (n_issue != N / 2 - 1) begin failures++; $display("FAIL %s: %0d windows issued", name, n_issue); end
    for (int j = 2; j <= J; j++) if (oc[j] != (N >> j)) begin failures++; $display("FAIL %s: level %0d has %0d windows", name, j, oc[j]); end
    if (!with_gaps) begin
      checks += 2;
      if (idle_s1 != 0) begin failures++; $display("FAIL %s: %0d idle slots while stage 1 runs", name, idle_s1); end
      // The stage-1 slot that yields the last level-1 sample starts two
      // cycles before that sample is written.
      if ((last_issue - (last_s1 - 2)) / 2 != NC) begin
        failures++;
        $display("FAIL %s: tail of %0d slots, n_c = %0d", name, (last_issue - (last_s1 - 2)) / 2, NC);
      end
    end else begin
      checks++;
      if (n_idle == 0) begin failures++; $display("FAIL %s: gaps gave no idle slot", name); end
    end
    $display("%s: %0d windows, %0d idle slots (%0d while stage 1 runs)", name, n_issue, n_idle, idle_s1);
    restart = 1'b1;
    for (int j = 0; j < J; j++) avail[j] = '0;
    @(negedge clk);
    cycle++;
    restart = 1'b0;
  endtask

  initial begin
    for (int j = 0; j < J; j++) avail[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(1'b0, "steady");
    run(1'b1, "gaps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
