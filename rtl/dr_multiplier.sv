// Dual-rail (NCL-X) unsigned W x W multiplier of minimum logic depth, with
// reduced completion detection.
//
// Structure, all in monotone dual-rail gates (see dr_pkg):
//  1. Partial-product matrix: bit a[i]&b[j] goes to column i+j. In silicon
//     this is a NAND matrix whose inversion is absorbed into the next gates;
//     in dual-rail logic an inversion is only a swap of the two rails.
//  2. Wallace tree: in every reduction level each column is cut into groups of
//     three bits (full adder: sum stays, carry moves one column up) and a
//     leftover pair (half adder); a single leftover bit passes. Levels repeat
//     until no column holds more than two bits (2 levels for W = 4, 4 levels
//     for W = 8).
//  3. Kogge-Stone adder over the two remaining rows: per-column generate and
//     propagate, log2(2W) prefix levels, sum = propagate xor carry-in. Where a
//     column has only one bit left, the missing bit is a dual-rail zero that
//     takes its validity from the present bit, so the spacer still travels.
// The whole array is combinational: with both operands valid every product
// bit becomes valid, with both at the spacer every product bit returns to
// the spacer. NCL-X gates are not input-complete, so validity of the product
// is judged by a completion detector on the outputs only. That detector
// leaves out the CD_OMIT_LSBS lowest product bits, which leave the Wallace
// tree early and are never the last outputs to settle.
//
// Timing: cd rises once every monitored product bit is valid and falls once
// every monitored bit has returned to the spacer (hysteretic C-element join).
// The structure (gate matrix, Wallace tree, Kogge-Stone adder, reduced output
// completion detection) follows the document; unsigned operands, the grouping
// rule of the tree and the default of two omitted bits are this design's
// choices.
module dr_multiplier
  import dr_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned CD_OMIT_LSBS = 2
) (
  input  logic          rst,
  input  dr_t [W-1:0]   a,
  input  dr_t [W-1:0]   b,
  output dr_t [2*W-1:0] p,
  output logic          cd
);

  localparam int unsigned NC   = 2 * W;       // product columns
  localparam int unsigned H    = W + 2;       // column capacity
  localparam int unsigned NLEV = W;           // upper bound on tree levels
  localparam int unsigned NPFX = $clog2(NC);  // prefix levels

  dr_t [NC-1:0] row0, row1;

  // Partial products and Wallace reduction.
  always_comb begin
    dr_t col [NC][H];
    dr_t nxt [NC][H];
    int  h [NC];
    int  nh [NC];
    int  k;
    bit  busy;

    k = 0;
    row0 = '0;
    row1 = '0;
    for (int c = 0; c < NC; c++) begin
      h[c]  = 0;
      nh[c] = 0;
      for (int s = 0; s < H; s++) begin
        col[c][s] = DR_NULL;
        nxt[c][s] = DR_NULL;
      end
    end
    for (int i = 0; i < W; i++) begin
      for (int j = 0; j < W; j++) begin
        col[i+j][h[i+j]] = dr_and(a[i], b[j]);
        h[i+j]++;
      end
    end

    for (int lev = 0; lev < NLEV; lev++) begin
      busy = 1'b0;
      for (int c = 0; c < NC; c++) if (h[c] > 2) busy = 1'b1;
      if (busy) begin
        for (int c = 0; c < NC; c++) begin
          nh[c] = 0;
          for (int s = 0; s < H; s++) nxt[c][s] = DR_NULL;
        end
        for (int c = 0; c < NC; c++) begin
          k = 0;
          begin
            for (int g = 0; g < H / 3; g++) begin
              if (h[c] - k >= 3) begin
                nxt[c][nh[c]] = dr_xor(dr_xor(col[c][k], col[c][k+1]), col[c][k+2]);
                nh[c]++;
                if (c + 1 < NC) begin
                  nxt[c+1][nh[c+1]] = dr_maj(col[c][k], col[c][k+1], col[c][k+2]);
                  nh[c+1]++;
                end
                k += 3;
              end
            end
            if (h[c] - k == 2) begin
              nxt[c][nh[c]] = dr_xor(col[c][k], col[c][k+1]);
              nh[c]++;
              if (c + 1 < NC) begin
                nxt[c+1][nh[c+1]] = dr_and(col[c][k], col[c][k+1]);
                nh[c+1]++;
              end
            end else if (h[c] - k == 1) begin
              nxt[c][nh[c]] = col[c][k];
              nh[c]++;
            end
          end
        end
        for (int c = 0; c < NC; c++) begin
          h[c] = nh[c];
          for (int s = 0; s < H; s++) col[c][s] = nxt[c][s];
        end
      end
    end

    for (int c = 0; c < NC; c++) begin
      if (h[c] >= 2) begin
        row0[c] = col[c][0];
        row1[c] = col[c][1];
      end else if (h[c] == 1) begin
        row0[c] = col[c][0];
        row1[c] = dr_zero_like(col[c][0]);
      end else begin
        row0[c] = dr_zero_like(a[0]);
        row1[c] = dr_zero_like(a[0]);
      end
    end
  end

  // Kogge-Stone final adder.
  always_comb begin
    dr_t gp [NPFX+1][NC];
    dr_t pp [NPFX+1][NC];
    dr_t pr [NC];
    int  span;

    for (int c = 0; c < NC; c++) begin
      gp[0][c] = dr_and(row0[c], row1[c]);
      pr[c]    = dr_xor(row0[c], row1[c]);
      pp[0][c] = pr[c];
    end
    for (int l = 0; l < NPFX; l++) begin
      span = 1 << l;
      for (int c = 0; c < NC; c++) begin
        if (c >= span) begin
          gp[l+1][c] = dr_or(gp[l][c], dr_and(pp[l][c], gp[l][c-span]));
          pp[l+1][c] = dr_and(pp[l][c], pp[l][c-span]);
        end else begin
          gp[l+1][c] = gp[l][c];
          pp[l+1][c] = pp[l][c];
        end
      end
    end
    p[0] = pr[0];
    for (int c = 1; c < NC; c++) p[c] = dr_xor(pr[c], gp[NPFX][c-1]);
  end

  localparam logic [NC-1:0] CD_MASK = {NC{1'b1}} << CD_OMIT_LSBS;

  completion_detector #(.W(NC), .MASK(CD_MASK)) u_cd (.rst(rst), .d(p), .cd(cd));

endmodule
