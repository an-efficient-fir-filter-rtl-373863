// pg_logic: stage 3 of the three-operand adder, the carry-prefix network.
// Input: bit generate/propagate pairs (G_i, P_i) for W positions. Output: the group
// generate G_{i:0} of every position, which is the carry out of that position.
//
// The network is sparse in the Han-Carlson manner:
//   * The odd positions run a Kogge-Stone prefix among themselves. In row r
//     (r = 1..K, K = clog2(W)) odd position i merges with position j = i - 2^(r-1);
//     row 1 therefore pairs each odd position with the even position to its right,
//     and later rows pair odd positions with each other. After row r the node at i
//     covers bits i down to max(0, i - 2^r + 1).
//   * A merge whose lower group already reaches bit 0 only needs the generate: it is
//     a grey_cell. Every other merge is a black_cell. A node that has reached bit 0
//     is passed down unchanged.
//   * One last row of grey cells gives every even position i >= 2 its carry from
//     G_{i:0} = G_i | P_i & G_{i-1:0}; position 0 is G_0 itself.
// For W = 17 this reproduces the cell labels of the published diagram (1:0, 3:2 ...
// 15:14, then 3:0, 5:2 ... 15:12, then 5:0, 7:0, 9:2 ... 15:8, then 15:0 and finally
// the even positions). Depth is K + 1 cell delays. Combinational.
module pg_logic #(
  parameter int unsigned W = 17  // number of bit positions (N + 1 for an N-bit adder)
) (
  input  logic [W-1:0] g,   // G_i
  input  logic [W-1:0] p,   // P_i
  output logic [W-1:0] gc   // G_{i:0}
);
  localparam int K = (W > 1) ? $clog2(W) : 1;

  // Row r holds the group signals after r prefix rows; row 0 is the input.
  logic [W-1:0] gr [K+1];
  logic [W-1:0] pr [K+1];

  assign gr[0] = g;
  assign pr[0] = p;

  for (genvar r = 1; r <= K; r++) begin : g_row
    for (genvar i = 0; i < W; i++) begin : g_pos
      localparam int D = 2 ** (r - 1);  // distance to the lower group
      if ((i % 2 == 1) && (i >= D)) begin : g_merge
        localparam int J = i - D;       // lower group's position
        if (J < D) begin : g_grey       // lower group already reaches bit 0
          grey_cell u_grey (
            .g_hi(gr[r-1][i]),
            .p_hi(pr[r-1][i]),
            .g_lo(gr[r-1][J]),
            .g   (gr[r][i])
          );
          // A group reaching bit 0 never supplies its propagate again.
          assign pr[r][i] = 1'b0;
        end else begin : g_black
          black_cell u_black (
            .g_hi(gr[r-1][i]),
            .p_hi(pr[r-1][i]),
            .g_lo(gr[r-1][J]),
            .p_lo(pr[r-1][J]),
            .g   (gr[r][i]),
            .p   (pr[r][i])
          );
        end
      end else begin : g_pass
        assign gr[r][i] = gr[r-1][i];
        assign pr[r][i] = pr[r-1][i];
      end
    end
  end

  // Final row: odd positions and position 0 are complete; even positions take one
  // grey cell each from the completed odd position to their right.
  for (genvar i = 0; i < W; i++) begin : g_final
    if ((i % 2 == 1) || (i == 0)) begin : g_done
      assign gc[i] = gr[K][i];
    end else begin : g_even
      grey_cell u_grey (
        .g_hi(gr[K][i]),
        .p_hi(pr[K][i]),
        .g_lo(gr[K][i-1]),
        .g   (gc[i])
      );
    end
  end
endmodule
