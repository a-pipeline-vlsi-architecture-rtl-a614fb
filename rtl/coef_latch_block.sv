// Latch block for the filter coefficients of one processing unit.
//
// Holds the L lowpass coefficients h0..h(L-1) in registers, arranged as the
// two rows the processing unit selects between: the even-indexed row
// (h0, h2, ..., h(L-2)) and the odd-indexed row read from the top,
// (h(L-1), h(L-3), ..., h1).  Only the lowpass coefficients are stored; the
// highpass ones follow from the perfect-reconstruction relation
// g_i = (-1)^(i+1) h(L-1-i) and are formed by the processing unit.
//
// Interface: a one-cycle load strobe copies coef_in into the registers; reset
// restores COEF_INIT.  Outputs are registered values, valid one cycle after
// a load.  The load port and the reset value are this design's own choices.
module coef_latch_block #(
  parameter int unsigned L  = 6,
  parameter int unsigned CW = 8,
  parameter logic signed [CW-1:0] COEF_INIT [L] = dwt_pkg::DB6_Q7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [CW-1:0] coef_in [L],
  output logic signed [CW-1:0] row_even [L/2],  // h0, h2, ..., h(L-2)
  output logic signed [CW-1:0] row_odd  [L/2]   // h(L-1), h(L-3), ..., h1
);

  logic signed [CW-1:0] h [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) h[i] <= COEF_INIT[i];
    end else if (load) begin
      for (int i = 0; i < L; i++) h[i] <= coef_in[i];
    end
  end

  always_comb begin
    for (int m = 0; m < L / 2; m++) begin
      row_even[m] = h[2*m];
      row_odd[m]  = h[L-1-2*m];
    end
  end

endmodule
