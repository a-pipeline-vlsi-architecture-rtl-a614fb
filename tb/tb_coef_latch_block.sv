// Self-checking testbench for coef_latch_block: after reset the two rows hold
// the default coefficients in even-indexed and odd-indexed (reversed) order;
// random loads replace them, and without a load the registers hold.
module tb_coef_latch_block;
  localparam int unsigned L = 6, CW = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic signed [CW-1:0] coef_in [L];
  logic signed [CW-1:0] row_even [L/2];
  logic signed [CW-1:0] row_odd  [L/2];
  logic signed [CW-1:0] h [L];
  int checks = 0, failures = 0;

  coef_latch_block #(.L(L), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rows(string what);
    for (int m = 0; m < L / 2; m++) begin
      checks += 2;
      if (row_even[m] != h[2*m]) begin
        failures++;
        $display("FAIL %s: row_even[%0d] = %0d, expected h%0d = %0d", what, m, row_even[m], 2*m, h[2*m]);
      end
      if (row_odd[m] != h[L-1-2*m]) begin
        failures++;
        $display("FAIL %s: row_odd[%0d] = %0d, expected h%0d = %0d", what, m, row_odd[m], L-1-2*m, h[L-1-2*m]);
      end
    end
  endtask

  initial begin
    // Daubechies 6-tap lowpass in Q1.7, written out independently.
    h = '{8'sd43, 8'sd103, 8'sd59, -8'sd17, -8'sd11, 8'sd5};
    for (int k = 0; k < L; k++) coef_in[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_rows("reset");
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < L; k++) coef_in[k] = CW'($urandom);
      load = ($urandom_range(0, 1) == 1);
      @(negedge clk);
      if (load) for (int k = 0; k < L; k++) h[k] = coef_in[k];
      load = 1'b0;
      check_rows("load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
