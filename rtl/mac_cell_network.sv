// L/2-MAC-cell network: sum of M = L/2 products s[k] * c[k], left in
// carry-save form (two rows whose sum is the result modulo 2^OW).
//
// Layer 0 forms every partial-product bit of the M products at once.  The
// bits are kept as a "bit heap": one list of bits per column (bit weight).
// Each following layer scans the columns from the least significant one up
// and, following the layer-building procedure of the architecture, feeds
// groups of three bits of a column to full adders (3:2, sum to the same
// column, carry one column up); when exactly two bits of a column are left
// and the next column up still holds at least two bits, the 2+2 bits go to a
// double adder (2x2:3, a 2-bit adder: two sums in the two columns, one carry
// two columns up); a single leftover bit, or two bits without a partner, is
// passed on to the next layer.  Layers are added until no column holds more
// than two bits.  The last heap is returned as two rows, row0 and row1.
//
// Signed operands (SIGNED_OPS = 1) use the modified Baugh-Wooley form: the
// partial-product bits that carry the weight of exactly one sign bit are
// inverted, and a constant correction word for all M products is added to
// the heap as extra one-bits.  This signed handling is this design's own
// choice; the architecture describes the bit array for unsigned operands.
//
// Purely combinational: the caller latches row0/row1.  LAYERS reports the
// number of adder layers the procedure built for this configuration.
module mac_cell_network #(
  parameter int unsigned X  = 8,                    // sample word length
  parameter int unsigned Y  = 8,                    // coefficient word length
  parameter int unsigned M  = 3,                    // products per network (L/2)
  parameter int unsigned OW = X + Y + $clog2(M) + 1, // result columns kept
  parameter bit SIGNED_OPS  = 1'b1
) (
  input  logic [X-1:0]  s [M],   // input samples
  input  logic [Y-1:0]  c [M],   // filter coefficients
  output logic [OW-1:0] row0,    // carry-save result, row 0
  output logic [OW-1:0] row1     // carry-save result, row 1
);

  localparam int unsigned MINXY = (X < Y) ? X : Y;
  localparam int unsigned H     = M * MINXY + 4;   // heap column capacity
  localparam int unsigned MAXL  = 24;              // bound on layer count

  // Baugh-Wooley correction, M * (2^(X-1) + 2^(Y-1) - 2^(X+Y-1)) mod 2^OW.
  localparam logic [63:0] BW_K64 = 64'(M) * ((64'd1 << (X-1)) + (64'd1 << (Y-1))
                                             - (64'd1 << (X+Y-1)));
  localparam logic [OW-1:0] BW_K = SIGNED_OPS ? BW_K64[OW-1:0] : '0;

  // Column heights of the initial heap.
  function automatic int unsigned init_height(int unsigned col);
    int unsigned h;
    h = 0;
    for (int unsigned i = 0; i < X; i++)
      for (int unsigned j = 0; j < Y; j++)
        if (i + j == col) h += M;
    if (BW_K[col]) h += 1;
    return h;
  endfunction

  // Runs the layer-building procedure on column heights only.
  function automatic int unsigned count_layers();
    int unsigned cnt [OW];
    int unsigned nc  [OW];
    int unsigned p, rem, z;
    logic any3;
    for (int unsigned col = 0; col < OW; col++) cnt[col] = init_height(col);
    z = 0;
    for (int unsigned lay = 0; lay < MAXL; lay++) begin
      any3 = 1'b0;
      for (int unsigned col = 0; col < OW; col++) if (cnt[col] >= 3) any3 = 1'b1;
      if (any3) begin
        z++;
        for (int unsigned col = 0; col < OW; col++) nc[col] = 0;
        for (int unsigned col = 0; col < OW; col++) begin
          p = 0;
          while (cnt[col] - p >= 3) begin
            p += 3;
            nc[col]++;
            if (col + 1 < OW) nc[col+1]++;
          end
          rem = cnt[col] - p;
          if (rem == 2 && col + 1 < OW && cnt[col+1] >= 2) begin
            cnt[col+1] -= 2;
            nc[col]++;
            nc[col+1]++;
            if (col + 2 < OW) nc[col+2]++;
          end else begin
            nc[col] += rem;
          end
        end
        for (int unsigned col = 0; col < OW; col++) cnt[col] = nc[col];
      end
    end
    return z;
  endfunction

  localparam int unsigned LAYERS = count_layers();

  logic heap [MAXL+1][OW][H];
  int unsigned hcnt [MAXL+1][OW];

  always_comb begin
    int unsigned p, rem, top, col;
    logic any3;
    logic [2:0] da;
    logic a, b, d;
    p = 0; rem = 0; top = 0; col = 0; any3 = 1'b0; da = '0;
    a = 1'b0; b = 1'b0; d = 1'b0;
    row0 = '0;
    row1 = '0;
    for (int unsigned l = 0; l <= MAXL; l++)
      for (int unsigned cc = 0; cc < OW; cc++) begin
        hcnt[l][cc] = 0;
        for (int unsigned r = 0; r < H; r++) heap[l][cc][r] = 1'b0;
      end

    // Layer 0: partial-product generator.
    for (int unsigned k = 0; k < M; k++)
      for (int unsigned i = 0; i < X; i++)
        for (int unsigned j = 0; j < Y; j++) begin
          col = i + j;
          if (col < OW && hcnt[0][col] < H) begin
            heap[0][col][hcnt[0][col]] =
              (SIGNED_OPS && ((i == X-1) != (j == Y-1))) ? ~(s[k][i] & c[k][j])
                                                         :  (s[k][i] & c[k][j]);
            hcnt[0][col]++;
          end
        end
    for (int unsigned cc = 0; cc < OW; cc++)
      if (BW_K[cc] && hcnt[0][cc] < H) begin
        heap[0][cc][hcnt[0][cc]] = 1'b1;
        hcnt[0][cc]++;
      end

    // Layers 1..LAYERS: full adders first, then double adders.
    for (int unsigned l = 0; l < MAXL; l++) begin
      any3 = 1'b0;
      for (int unsigned cc = 0; cc < OW; cc++) if (hcnt[l][cc] >= 3) any3 = 1'b1;
      for (int unsigned cc = 0; cc < OW; cc++) begin
        if (!any3) begin
          // Reduction finished: carry the heap through unchanged.
          hcnt[l+1][cc] = hcnt[l][cc];
          for (int unsigned r = 0; r < H; r++) heap[l+1][cc][r] = heap[l][cc][r];
        end else begin
          p = 0;
          for (int unsigned t = 0; t < H / 3; t++) begin
            if (hcnt[l][cc] >= p + 3) begin
              a = heap[l][cc][p];
              b = heap[l][cc][p+1];
              d = heap[l][cc][p+2];
              p += 3;
              if (hcnt[l+1][cc] < H) begin
                heap[l+1][cc][hcnt[l+1][cc]] = a ^ b ^ d;
                hcnt[l+1][cc]++;
              end
              if (cc + 1 < OW && hcnt[l+1][cc+1] < H) begin
                heap[l+1][cc+1][hcnt[l+1][cc+1]] = (a & b) | (a & d) | (b & d);
                hcnt[l+1][cc+1]++;
              end
            end
          end
          rem = hcnt[l][cc] - p;
          if (rem == 2 && cc + 1 < OW && hcnt[l][cc+1] >= 2) begin
            // Double adder: two bits of this column, the top two of the next.
            top = hcnt[l][cc+1];
            da  = {1'b0, heap[l][cc+1][top-1], heap[l][cc][p]}
                + {1'b0, heap[l][cc+1][top-2], heap[l][cc][p+1]};
            hcnt[l][cc+1] = top - 2;
            if (hcnt[l+1][cc] < H) begin
              heap[l+1][cc][hcnt[l+1][cc]] = da[0];
              hcnt[l+1][cc]++;
            end
            if (hcnt[l+1][cc+1] < H) begin
              heap[l+1][cc+1][hcnt[l+1][cc+1]] = da[1];
              hcnt[l+1][cc+1]++;
            end
            if (cc + 2 < OW && hcnt[l+1][cc+2] < H) begin
              heap[l+1][cc+2][hcnt[l+1][cc+2]] = da[2];
              hcnt[l+1][cc+2]++;
            end
          end else begin
            for (int unsigned r = 0; r < 2; r++)
              if (r < rem && hcnt[l+1][cc] < H) begin
                heap[l+1][cc][hcnt[l+1][cc]] = heap[l][cc][p+r];
                hcnt[l+1][cc]++;
              end
          end
        end
      end
    end

    for (int unsigned cc = 0; cc < OW; cc++) begin
      row0[cc] = (hcnt[MAXL][cc] >= 1) ? heap[MAXL][cc][0] : 1'b0;
      row1[cc] = (hcnt[MAXL][cc] >= 2) ? heap[MAXL][cc][1] : 1'b0;
    end
  end

endmodule
