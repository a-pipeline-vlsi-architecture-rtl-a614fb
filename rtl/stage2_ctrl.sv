// Control unit 2: decides, slot by slot, which sample stage 2 computes.
//
// Stage 2 computes all levels 2..J with one processing unit, one output
// pair (C and D) per slot of two clock cycles.  It synchronises with stage 1
// through the buffer's sample counts:
//   * Start: stage 2 starts once stage 1 has delivered n_c + 1 level-1
//     samples (NC + 1), i.e. in slot n_c + 2 of stage 1.
//   * Readiness: output i of level j needs level-(j-1) samples up to index
//     2i + L - 1, or the whole of level j-1 when that window runs into the
//     periodic border extension.
//   * Choice in each slot: let lo be the lowest level that is not complete.
//     If the previous sample was at lo, move to the lowest higher level whose
//     next sample is ready, else stay at lo.  If the previous sample was at a
//     level above lo, return to lo, else take the lowest ready higher level.
//     With nothing ready the slot is left idle (the unit delay of the
//     scheduling algorithm).
// A slot-aligned phase bit issues at most one window every two cycles.
//
// Interface: avail[] from the buffer; issue/issue_level/issue_idx drive the
// buffer read and the PU2 window strobe in the same cycle.  idle_slot pulses
// for each started slot in which nothing was issued, done rises when every
// sample of levels 2..J has been issued, restart clears the frame state.
module stage2_ctrl #(
  parameter int unsigned N    = dwt_pkg::N_DEF,
  parameter int unsigned J    = dwt_pkg::J_DEF,
  parameter int unsigned L    = dwt_pkg::L_DEF,
  parameter int unsigned NC   = dwt_pkg::calc_nc(L, J),
  parameter int unsigned LW   = 4,
  parameter int unsigned CNTW = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic [CNTW-1:0] avail [J],   // samples held per level, incl. this cycle's write
  output logic            issue,
  output logic [LW-1:0]   issue_level,
  output logic [CNTW-1:0] issue_idx,
  output logic            started,
  output logic            idle_slot,
  output logic            done
);

  logic [CNTW-1:0] ocnt [J+1];     // outputs issued per level (2..J used)
  logic            phase;
  logic [LW-1:0]   last_level;
  logic [J:0]      ready;
  logic [J:0]      incomplete;
  logic [LW-1:0]   lo;
  logic            pick_ok;
  logic [LW-1:0]   pick;

  function automatic logic [CNTW:0] lvl_len(int unsigned j);
    return (CNTW+1)'(N >> j);
  endfunction

  always_comb begin
    ready      = '0;
    incomplete = '0;
    for (int unsigned j = 2; j <= J; j++) begin
      logic [CNTW+1:0] need;
      incomplete[j] = ((CNTW+1)'(ocnt[j]) < lvl_len(j));
      need = (CNTW+2)'({ocnt[j], 1'b0}) + (CNTW+2)'(L);
      if (need > (CNTW+2)'(lvl_len(j-1))) need = (CNTW+2)'(lvl_len(j-1));
      ready[j] = incomplete[j] && ((CNTW+2)'(avail[j-1]) >= need);
    end
    lo = '0;
    for (int unsigned j = J; j >= 2; j--) if (incomplete[j]) lo = LW'(j);
    pick_ok = 1'b0;
    pick    = '0;
    if (lo != '0) begin
      if (last_level == lo) begin
        // Step 3(a): try the lowest higher level first, else stay.
        for (int unsigned j = J; j >= 2; j--)
          if (LW'(j) > lo && ready[j]) begin pick_ok = 1'b1; pick = LW'(j); end
        if (!pick_ok && ready[lo]) begin pick_ok = 1'b1; pick = lo; end
      end else begin
        // Step 3(b): back to the lowest incomplete level, else go higher.
        if (ready[lo]) begin
          pick_ok = 1'b1; pick = lo;
        end else begin
          for (int unsigned j = J; j >= 2; j--)
            if (LW'(j) > lo && ready[j]) begin pick_ok = 1'b1; pick = LW'(j); end
        end
      end
    end
  end

  // Step 2: stage 2 runs from the cycle in which n_c + 1 level-1 samples
  // are held.
  logic go;
  assign go          = started || ((CNTW+1)'(avail[1]) >= (CNTW+1)'(NC + 1));
  assign done        = started && (lo == '0);
  assign issue       = go && !phase && pick_ok;
  assign issue_level = pick;
  assign issue_idx   = ocnt[pick];
  assign idle_slot   = go && !phase && !pick_ok && !done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= J; j++) ocnt[j] <= '0;
      phase      <= 1'b0;
      started    <= 1'b0;
      last_level <= LW'(2);
    end else if (restart) begin
      for (int j = 0; j <= J; j++) ocnt[j] <= '0;
      phase      <= 1'b0;
      started    <= 1'b0;
      last_level <= LW'(2);
    end else begin
      started <= go;
      if (go) begin
        phase <= ~phase;
        if (issue) begin
          ocnt[pick] <= ocnt[pick] + 1'b1;
          last_level <= pick;
        end
      end
    end
  end

endmodule
