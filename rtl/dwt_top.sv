// Two-stage pipelined 1-D discrete wavelet transform (J levels, L taps).
//
// Stage 1 (control unit 1 + PU1) computes decomposition level 1 from the
// input stream, one output sample per clock.  Stage 2 (buffer + control unit
// 2 + PU2) computes every higher level with a single processing unit of the
// same size: level-1 lowpass samples from PU1 and the level-j lowpass samples
// of PU2 itself go into the buffer, and control unit 2 interleaves the levels
// so that stage 2 starts after n_c + 1 level-1 samples and then keeps its
// processing unit busy while stage 1 is still running.  Highpass samples of
// both units leave the design directly; so do the lowpass samples, PU2's
// final C(J) being the coarsest approximation.
//
// Interface:
//   in_valid/in_data/in_ready  N input samples per frame (SW-bit signed)
//   coef_load/coef_in          reload the L lowpass coefficients of both PUs
//   out1_*                     level-1 outputs, C then D for each index
//   out2_*                     level 2..J outputs with their level number
//   frame_done                 one-cycle pulse when a frame is complete; the
//                              next frame's samples are accepted afterwards
// Output samples are full precision (OW bits); lowpass samples re-enter the
// buffer rounded to SW bits.  Frame sequencing (restart after the last
// output) is this design's own choice.
module dwt_top #(
  parameter int unsigned N    = dwt_pkg::N_DEF,
  parameter int unsigned J    = dwt_pkg::J_DEF,
  parameter int unsigned L    = dwt_pkg::L_DEF,
  parameter int unsigned SW   = dwt_pkg::SW_DEF,
  parameter int unsigned CW   = dwt_pkg::CW_DEF,
  parameter int unsigned FRAC = dwt_pkg::FRAC_DEF,
  parameter int unsigned OW   = dwt_pkg::out_width(SW, CW, L),
  parameter int unsigned NC   = dwt_pkg::calc_nc(L, J),
  parameter int unsigned D1   = NC + 1,
  parameter int unsigned DH   = L + 2,
  parameter logic signed [CW-1:0] COEF_INIT [L] = dwt_pkg::DB6_Q7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_load,
  input  logic signed [CW-1:0] coef_in [L],
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_data,
  output logic                 in_ready,
  output logic                 out1_valid,
  output logic                 out1_high,
  output logic signed [OW-1:0] out1_data,
  output logic                 out2_valid,
  output logic                 out2_high,
  output logic [3:0]           out2_level,
  output logic signed [OW-1:0] out2_data,
  output logic                 stage2_started,
  output logic                 stage2_idle_slot,
  output logic                 frame_done
);

  localparam int unsigned LW   = 4;
  localparam int unsigned CNTW = $clog2(N);

  logic restart;

  // ---------------- Stage 1 ----------------
  logic                 s1_win_valid;
  logic signed [SW-1:0] s1_win [L];
  logic [CNTW-1:0]      s1_win_idx;
  logic                 s1_done;
  logic [LW-1:0]        pu1_tag;

  stage1_ctrl #(.N(N), .L(L), .SW(SW)) u_cu1 (
    .clk, .rst_n, .restart, .in_valid, .in_data, .in_ready,
    .win_valid(s1_win_valid), .win(s1_win), .win_idx(s1_win_idx), .done(s1_done)
  );

  processing_unit #(.L(L), .SW(SW), .CW(CW), .OW(OW), .TW(LW), .COEF_INIT(COEF_INIT)) u_pu1 (
    .clk, .rst_n, .coef_load, .coef_in,
    .win_valid(s1_win_valid), .win(s1_win), .tag_in(LW'(1)),
    .y_valid(out1_valid), .y_high(out1_high), .y_tag(pu1_tag), .y(out1_data)
  );

  // ---------------- Stage 2 ----------------
  logic                 s2_issue;
  logic [LW-1:0]        s2_level;
  logic [CNTW-1:0]      s2_idx;
  logic                 s2_done;
  logic signed [SW-1:0] s2_win [L];
  logic [CNTW-1:0]      wcount [J];
  logic [CNTW-1:0]      avail [J];

  stage2_buffer #(.N(N), .J(J), .L(L), .SW(SW), .OW(OW), .FRAC(FRAC), .D1(D1), .DH(DH),
                  .LW(LW), .CNTW(CNTW)) u_buf (
    .clk, .rst_n, .restart,
    .w1_valid(out1_valid && !out1_high), .w1_data(out1_data),
    .w2_valid(out2_valid && !out2_high && out2_level < LW'(J)), .w2_level(out2_level),
    .w2_data(out2_data),
    .rd_en(s2_issue), .rd_level(s2_level), .rd_idx(s2_idx), .win(s2_win), .wcount, .avail
  );

  stage2_ctrl #(.N(N), .J(J), .L(L), .NC(NC), .LW(LW), .CNTW(CNTW)) u_cu2 (
    .clk, .rst_n, .restart, .avail,
    .issue(s2_issue), .issue_level(s2_level), .issue_idx(s2_idx),
    .started(stage2_started), .idle_slot(stage2_idle_slot), .done(s2_done)
  );

  processing_unit #(.L(L), .SW(SW), .CW(CW), .OW(OW), .TW(LW), .COEF_INIT(COEF_INIT)) u_pu2 (
    .clk, .rst_n, .coef_load, .coef_in,
    .win_valid(s2_issue), .win(s2_win), .tag_in(s2_level),
    .y_valid(out2_valid), .y_high(out2_high), .y_tag(out2_level), .y(out2_data)
  );

  // ---------------- Frame sequencing ----------------
  // After the last stage-2 window, wait for PU2 to drain (D leaves three
  // cycles after its window), then clear both control units and the buffer.
  logic [2:0] drain;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drain   <= '0;
      restart <= 1'b0;
    end else begin
      restart <= 1'b0;
      if (restart) drain <= '0;
      else if (s1_done && s2_done) begin
        if (drain == 3'd4) restart <= 1'b1;
        else drain <= drain + 1'b1;
      end
    end
  end
  assign frame_done = restart;

endmodule
