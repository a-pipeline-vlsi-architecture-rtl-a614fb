// Self-checking testbench for mac_cell_network.
// Two instances: the default signed 8-bit x 8-bit network with three products
// (one half of the 6-tap filter), and the unsigned 6-bit x 3-bit network with
// two products used as the worked example of the layered adder array, whose
// array is built in three adder layers.  Random operands are applied and the
// sum of the two output rows is compared with the products computed here.
module tb_mac_cell_network;
  localparam int unsigned X = 8, Y = 8, M = 3, OW = 19;
  localparam int unsigned X2 = 6, Y2 = 3, M2 = 2, OW2 = 11;

  logic [X-1:0]   s  [M];
  logic [Y-1:0]   c  [M];
  logic [OW-1:0]  r0, r1;
  logic [X2-1:0]  s2 [M2];
  logic [Y2-1:0]  c2 [M2];
  logic [OW2-1:0] q0, q1;

  int checks = 0, failures = 0;

  mac_cell_network #(.X(X), .Y(Y), .M(M), .OW(OW), .SIGNED_OPS(1'b1)) dut
    (.s(s), .c(c), .row0(r0), .row1(r1));
  mac_cell_network #(.X(X2), .Y(Y2), .M(M2), .OW(OW2), .SIGNED_OPS(1'b0)) dut2
    (.s(s2), .c(c2), .row0(q0), .row1(q1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp, got;
    logic [OW-1:0] sum;
    logic [OW2-1:0] sum2;
    // Layer count of the worked example (three layers) and of the default.
    checks++;
    if (dut2.LAYERS != 3) begin
      failures++;
      $display("FAIL: example network has %0d layers, expected 3", dut2.LAYERS);
    end
    // Z = ceil(log_1.5(min(X,Y) * L / 4)) = ceil(log_1.5(12)) = 7 for 8x8, L = 6.
    checks++;
    if (dut.LAYERS != 7) begin
      failures++;
      $display("FAIL: default network has %0d layers, expected 7", dut.LAYERS);
    end
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < M; k++) begin
        s[k] = X'($urandom);
        c[k] = Y'($urandom);
        if (n < 4) begin  // corner operands first
          s[k] = (n[0]) ? {1'b1, {(X-1){1'b0}}} : {1'b0, {(X-1){1'b1}}};
          c[k] = (n[1]) ? {1'b1, {(Y-1){1'b0}}} : {1'b0, {(Y-1){1'b1}}};
        end
      end
      for (int k = 0; k < M2; k++) begin
        s2[k] = X2'($urandom);
        c2[k] = Y2'($urandom);
      end
      #1;
      exp = 0;
      for (int k = 0; k < M; k++) exp += longint'($signed(s[k])) * longint'($signed(c[k]));
      sum = r0 + r1;
      got = longint'($signed(sum));
      checks++;
      if (got != exp) begin
        failures++;
        if (failures < 10) $display("FAIL signed: got %0d expected %0d", got, exp);
      end
      exp = 0;
      for (int k = 0; k < M2; k++) exp += longint'(s2[k]) * longint'(c2[k]);
      sum2 = q0 + q1;
      checks++;
      if (longint'(sum2) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL unsigned: got %0d expected %0d", sum2, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
