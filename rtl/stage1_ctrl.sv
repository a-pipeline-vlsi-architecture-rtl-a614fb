// Control unit 1: feeds the stage-1 processing unit.
//
// Stage 1 computes decomposition level 1 without ever waiting for stage 2.
// The serial input enters an L-sample shift register; after the L-th sample,
// and after every second sample from then on, the register holds the window
// x[2i..2i+L-1] of the next level-1 output and win_valid is raised for one
// cycle.  Border extension is periodic: the first L-2 input samples are also
// kept in a padding store and, once the N-th sample has arrived, are shifted
// in again one per cycle, which yields the last (L-2)/2 windows.  A frame
// therefore produces exactly N/2 windows, at most one every two cycles, so
// the processing unit delivers one output sample per clock while the input
// streams at one sample per clock.
//
// Interface: in_valid/in_data is a stream with in_ready; in_ready falls while
// the padding is replayed and after the N-th sample, until restart is pulsed
// for the next frame.  win_idx is the index i of the window, done is high
// once all N/2 windows of the frame have been issued.  The ready/restart
// handshake is this design's own choice.
module stage1_ctrl #(
  parameter int unsigned N  = dwt_pkg::N_DEF,
  parameter int unsigned L  = dwt_pkg::L_DEF,
  parameter int unsigned SW = dwt_pkg::SW_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_data,
  output logic                 in_ready,
  output logic                 win_valid,
  output logic signed [SW-1:0] win [L],
  output logic [$clog2(N)-1:0] win_idx,
  output logic                 done
);

  localparam int unsigned P  = L - 2;            // padding samples
  localparam int unsigned CB = $clog2(N + L);    // shift counter width

  logic signed [SW-1:0] sr  [L];
  logic signed [SW-1:0] pad [P > 0 ? P : 1];
  logic [CB-1:0] n_in;      // samples shifted in this frame (input + replay)
  logic [$clog2(N):0] n_win;
  logic replay;
  logic shift;
  logic signed [SW-1:0] shift_data;

  assign replay     = (n_in >= CB'(N)) && (n_in < CB'(N + P));
  assign in_ready   = (n_in < CB'(N));
  assign shift      = replay || (in_valid && in_ready);
  assign shift_data = replay ? pad[(n_in - CB'(N)) % CB'(P > 0 ? P : 1)] : in_data;
  assign done       = (n_win == ($clog2(N)+1)'(N / 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) sr[k] <= '0;
      for (int k = 0; k < (P > 0 ? P : 1); k++) pad[k] <= '0;
      n_in      <= '0;
      n_win     <= '0;
      win_valid <= 1'b0;
      win_idx   <= '0;
    end else if (restart) begin
      n_in      <= '0;
      n_win     <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      if (shift) begin
        for (int k = 0; k < L - 1; k++) sr[k] <= sr[k+1];
        sr[L-1] <= shift_data;
        if (!replay && n_in < CB'(P)) pad[n_in] <= in_data;
        n_in <= n_in + 1'b1;
        // After this shift n_in + 1 samples are in; a window is complete
        // when that count is L, L+2, L+4, ...
        if (n_in + 1'b1 >= CB'(L) && ((n_in + 1'b1 - CB'(L)) % 2 == 0)) begin
          win_valid <= 1'b1;
          win_idx   <= n_win[$clog2(N)-1:0];
          n_win     <= n_win + 1'b1;
        end
      end
    end
  end

  assign win = sr;

endmodule
