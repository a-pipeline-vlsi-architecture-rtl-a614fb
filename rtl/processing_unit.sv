// Processing unit (PU): L-tap lowpass/highpass filter of one DWT stage.
//
// For each window x[2i..2i+L-1] of the (padded) input sequence it produces
// the lowpass sample C_i = sum_k h_k x[2i+k] and then the highpass sample
// D_i = sum_k g_k x[2i+k], with g_k = (-1)^(k+1) h(L-1-k).  The L taps are
// split into an even filter block (samples x[2i+2m]) and an odd filter block
// (samples x[2i+2m+1]), each an L/2-MAC-cell network followed by a latch.
// The even block works one cycle ahead of the odd block, so it has a second
// latch (in the accumulation block) to line the two partial sums up before
// the carry-propagate adder.  In every cycle both blocks use the same
// coefficient row, picked by one multiplexer from the coefficient latch
// block:
//
//   cycle 0: even block, row (h0,h2,..)            -> even part of C_i
//   cycle 1: even block, row (h(L-1),h(L-3),..)   negated by the sign
//            inversion block                       -> even part of D_i
//            odd block,  same row, reversed order  -> odd part of C_i
//   cycle 2: odd block,  row (h0,h2,..) reversed   -> odd part of D_i
//            (the even block may start the next window here)
//
// C_i leaves the adder in cycle 2 and D_i in cycle 3 (y_high = 1), so a
// window may be accepted every second cycle and the unit then delivers one
// output sample per clock.  The per-cycle schedule, the reading of the one
// multiplexer as feeding both blocks, and the tag that travels with a window
// are this design's own reading of the block diagram.
//
// Interface: win_valid strobes win[0..L-1] (win[k] = x[2i+k]) and tag_in;
// windows must be at least two cycles apart.  coef_load/coef_in reload the
// coefficient latches.  Outputs are combinational from the latches.
module processing_unit #(
  parameter int unsigned L  = dwt_pkg::L_DEF,
  parameter int unsigned SW = dwt_pkg::SW_DEF,
  parameter int unsigned CW = dwt_pkg::CW_DEF,
  parameter int unsigned OW = dwt_pkg::out_width(SW, CW, L),
  parameter int unsigned TW = 4,
  parameter logic signed [CW-1:0] COEF_INIT [L] = dwt_pkg::DB6_Q7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_load,
  input  logic signed [CW-1:0] coef_in [L],
  input  logic                 win_valid,
  input  logic signed [SW-1:0] win [L],
  input  logic [TW-1:0]        tag_in,
  output logic                 y_valid,
  output logic                 y_high,   // 0: lowpass C, 1: highpass D
  output logic [TW-1:0]        y_tag,
  output logic signed [OW-1:0] y
);

  localparam int unsigned M = L / 2;

  logic signed [CW-1:0] row_even [M];
  logic signed [CW-1:0] row_odd  [M];

  coef_latch_block #(.L(L), .CW(CW), .COEF_INIT(COEF_INIT)) u_coef (
    .clk, .rst_n, .load(coef_load), .coef_in, .row_even, .row_odd
  );

  // Window latch and control pipeline.
  logic signed [SW-1:0] win_r [L];
  logic v1, v2, v3;
  logic [TW-1:0] tg1, tg2, tg3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      tg1 <= '0; tg2 <= '0; tg3 <= '0;
      for (int k = 0; k < L; k++) win_r[k] <= '0;
    end else begin
      v1 <= win_valid; v2 <= v1; v3 <= v2;
      tg1 <= tag_in; tg2 <= tg1; tg3 <= tg2;
      if (win_valid)
        for (int k = 0; k < L; k++) win_r[k] <= win[k];
    end
  end

  // Coefficient multiplexer (odd row while v1, else even row), sign
  // inversion for the even block, order reversal for the odd block.
  logic [SW-1:0] even_s [M];
  logic [SW-1:0] odd_s  [M];
  logic [CW-1:0] even_c [M];
  logic [CW-1:0] odd_c  [M];

  always_comb begin
    for (int m = 0; m < M; m++) begin
      even_s[m] = v1 ? win_r[2*m] : win[2*m];
      odd_s[m]  = win_r[2*m+1];
      even_c[m] = v1 ? -row_odd[m] : row_even[m];
      odd_c[m]  = v1 ? row_odd[M-1-m] : row_even[M-1-m];
    end
  end

  logic [OW-1:0] e_r0, e_r1, o_r0, o_r1;

  mac_cell_network #(.X(SW), .Y(CW), .M(M), .OW(OW), .SIGNED_OPS(1'b1)) u_even (
    .s(even_s), .c(even_c), .row0(e_r0), .row1(e_r1)
  );
  mac_cell_network #(.X(SW), .Y(CW), .M(M), .OW(OW), .SIGNED_OPS(1'b1)) u_odd (
    .s(odd_s), .c(odd_c), .row0(o_r0), .row1(o_r1)
  );

  // Filter-block latches and the accumulation-block latch.
  logic [OW-1:0] e1_0, e1_1, e2_0, e2_1, o1_0, o1_1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_0 <= '0; e1_1 <= '0; e2_0 <= '0; e2_1 <= '0; o1_0 <= '0; o1_1 <= '0;
    end else begin
      e1_0 <= e_r0; e1_1 <= e_r1;
      e2_0 <= e1_0; e2_1 <= e1_1;
      o1_0 <= o_r0; o1_1 <= o_r1;
    end
  end

  // Carry-propagate adder of the accumulation block.
  assign y       = $signed(e2_0 + e2_1 + o1_0 + o1_1);
  assign y_valid = v2 | v3;
  assign y_high  = v3;
  assign y_tag   = v3 ? tg3 : tg2;

  // Windows may not arrive on consecutive cycles.
  a_win_spacing: assert property (@(posedge clk) disable iff (!rst_n) v1 |-> !win_valid)
    else $error("processing_unit: windows less than two cycles apart");

endmodule
