// Buffer of stage 2: stores lowpass samples and supplies L-sample windows.
//
// Lowpass outputs of both processing units are written here: level-1 samples
// from stage 1 and level-j samples (2 <= j < J) from stage 2 itself.  Each
// level has its own channel, a shift register in which the newest sample
// enters at position 0.  Channel 1 (level 1) is D1 registers deep; by default
// D1 = n_c + 1, the largest number of level-1 samples that stage 2 ever has to
// hold under its synchronisation scheme.  The higher levels have DH-register
// channels.  A full-precision processing-unit output is rounded to a stored
// SW-bit sample on the way in (dwt_pkg::quantize).
//
// Reading: for output i of level j (rd_level = j) the window is samples
// 2i .. 2i+L-1 of level j-1.  Sample m sits at shift position
// wcount[j-1] - 1 - m.  Periodic border extension is served from a padding
// store per level that keeps the first L-2 samples of that level: a sample
// index m beyond the level length len is read as sample m mod len.  A sample
// that is being written in the same cycle is passed straight from the write
// port to the window (write-through bypass), and avail[] counts it already,
// so a sample computed in one slot can be used in the next.
//
// This design gives every level its own channel and padding store.  It does
// not re-use channels between levels as the architecture proposes (channels
// 2..k holding level-1 samples at the start, channel 2 taking over the top
// levels), so it uses more registers than the minimum of n_c + 1.
//
// Interface: w1_* and w2_* write ports (one sample each per cycle, both may
// be used in the same cycle), combinational window read addressed by
// rd_level/rd_idx, wcount[] = samples written per level, restart clears the
// counts for the next frame.
module stage2_buffer #(
  parameter int unsigned N    = dwt_pkg::N_DEF,
  parameter int unsigned J    = dwt_pkg::J_DEF,
  parameter int unsigned L    = dwt_pkg::L_DEF,
  parameter int unsigned SW   = dwt_pkg::SW_DEF,
  parameter int unsigned OW   = dwt_pkg::out_width(SW, dwt_pkg::CW_DEF, L),
  parameter int unsigned FRAC = dwt_pkg::FRAC_DEF,
  parameter int unsigned D1   = dwt_pkg::calc_nc(L, J) + 1,
  parameter int unsigned DH   = L + 2,
  parameter int unsigned LW   = 4,            // width of a level number
  parameter int unsigned CNTW = $clog2(N)     // width of a sample count
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  // from PU1: level-1 lowpass samples
  input  logic                 w1_valid,
  input  logic signed [OW-1:0] w1_data,
  // from PU2: level-j lowpass samples, 2 <= j <= J-1
  input  logic                 w2_valid,
  input  logic [LW-1:0]        w2_level,
  input  logic signed [OW-1:0] w2_data,
  // window read for output rd_idx of level rd_level (2..J)
  input  logic                 rd_en,
  input  logic [LW-1:0]        rd_level,
  input  logic [CNTW-1:0]      rd_idx,
  output logic signed [SW-1:0] win [L],
  // samples written so far per level (index 1..J-1 used), and the same
  // count including a sample being written in this cycle
  output logic [CNTW-1:0]      wcount [J],
  output logic [CNTW-1:0]      avail  [J]
);

  localparam int unsigned P  = (L > 2) ? L - 2 : 1;
  localparam int unsigned NH = (J > 2) ? J - 2 : 1;  // levels 2..J-1

  logic signed [SW-1:0] ch1 [D1];
  logic signed [SW-1:0] chh [NH][DH];
  logic signed [SW-1:0] pad [J][P];

  logic signed [SW-1:0] q1, q2;
  assign q1 = SW'(dwt_pkg::quantize(32'(w1_data), FRAC, SW));
  assign q2 = SW'(dwt_pkg::quantize(32'(w2_data), FRAC, SW));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < D1; d++) ch1[d] <= '0;
      for (int j = 0; j < NH; j++)
        for (int d = 0; d < DH; d++) chh[j][d] <= '0;
      for (int j = 0; j < J; j++) begin
        wcount[j] <= '0;
        for (int p = 0; p < P; p++) pad[j][p] <= '0;
      end
    end else if (restart) begin
      for (int j = 0; j < J; j++) wcount[j] <= '0;
    end else begin
      if (w1_valid) begin
        for (int d = D1 - 1; d > 0; d--) ch1[d] <= ch1[d-1];
        ch1[0] <= q1;
        if (wcount[1] < CNTW'(P)) pad[1][wcount[1]] <= q1;
        wcount[1] <= wcount[1] + 1'b1;
      end
      if (w2_valid && w2_level >= 2 && w2_level < LW'(J)) begin
        for (int d = DH - 1; d > 0; d--) chh[w2_level-2][d] <= chh[w2_level-2][d-1];
        chh[w2_level-2][0] <= q2;
        if (wcount[w2_level] < CNTW'(P)) pad[w2_level][wcount[w2_level]] <= q2;
        wcount[w2_level] <= wcount[w2_level] + 1'b1;
      end
    end
  end

  // Availability including this cycle's writes (write-through bypass).
  logic w2_ok;
  assign w2_ok = w2_valid && w2_level >= 2 && w2_level < LW'(J);
  always_comb begin
    for (int j = 0; j < J; j++) begin
      avail[j] = wcount[j];
      if (j == 1 && w1_valid) avail[j] = wcount[j] + 1'b1;
      if (j >= 2 && w2_ok && w2_level == LW'(j)) avail[j] = wcount[j] + 1'b1;
    end
  end

  // Window read.
  logic [LW-1:0]   src;                 // level the window is taken from
  logic [CNTW:0]   len;                 // its length N / 2^src
  logic [CNTW+1:0] m;
  logic [CNTW+1:0] pos;
  logic [CNTW+1:0] pidx;

  always_comb begin
    src = rd_level - 1'b1;
    len = (CNTW+1)'(N) >> src;
    m   = '0;
    pos = '0;
    pidx = '0;
    for (int k = 0; k < L; k++) begin
      m = (CNTW+2)'({rd_idx, 1'b0}) + (CNTW+2)'(k);
      if (m < (CNTW+2)'(len)) begin
        pos = (CNTW+2)'(wcount[src]) - 1'b1 - m;
        if (m == (CNTW+2)'(wcount[src]))  win[k] = (src == 1) ? q1 : q2;  // bypass
        else if (src == 1) win[k] = ch1[pos < (CNTW+2)'(D1) ? pos : '0];
        else               win[k] = chh[src - 2][pos < (CNTW+2)'(DH) ? pos : '0];
      end else begin
        pidx = m & ((CNTW+2)'(len) - 1'b1);
        if (pidx == (CNTW+2)'(wcount[src])) win[k] = (src == 1) ? q1 : q2;  // bypass
        else                                win[k] = pad[src][pidx];
      end
    end
  end

  // A sample that a window needs must still be in its channel.
  always_ff @(posedge clk) begin
    if (rst_n && rd_en) begin
      for (int k = 0; k < L; k++) begin
        automatic logic [CNTW+1:0] mm = (CNTW+2)'({rd_idx, 1'b0}) + (CNTW+2)'(k);
        automatic logic [CNTW+1:0] ln = (CNTW+2)'(N >> (rd_level - 1));
        automatic logic [CNTW+1:0] ps = (CNTW+2)'(wcount[rd_level-1]) - 1'b1 - mm;
        assert (mm >= ln || mm == (CNTW+2)'(wcount[rd_level-1])
                || ps < (CNTW+2)'((rd_level == 2) ? D1 : DH))
          else $error("stage2_buffer: level %0d sample %0d no longer held", rd_level - 1, mm);
        assert (mm >= ln || mm < (CNTW+2)'(avail[rd_level-1]))
          else $error("stage2_buffer: level %0d sample %0d not yet written", rd_level - 1, mm);
      end
    end
  end

endmodule
