// tsv_pkg: shared types and constant functions for the redundant-TSV interface.
//
// A TSV block is a ROWS x COLS grid of TSVs linked into one TSV-chain. Chain
// position 0 is the head of the chain and position ROWS*COLS-1 is the redundant
// TSV at its tail. When a TSV fails, every signal from the failed position up to
// the tail moves one position towards the redundant TSV, so a signal near the
// head is the least likely to be shifted.
//
// chain_pos() gives the chain position of the TSV at grid cell (r, c) for the
// three chaining policies. All three keep consecutive chain positions on
// neighbouring grid cells, so a shift always spans one grid pitch:
//   SPIRAL  the redundant TSV sits in the middle of the block and the chain
//           winds outwards, so the boundary TSVs form the head. Traversed here
//           clockwise from cell (0,0) inwards; the cell reached last is the
//           redundant one. For blocks inside the tier.
//   SNAKE   the chain runs row by row, turning at each row end, from row 0 to
//           row ROWS-1; the tier boundary is taken to lie along row ROWS-1 and
//           the redundant TSV is at its right end, cell (ROWS-1, COLS-1). For
//           blocks on a tier edge.
//   HYBRID  nested L-shaped rings around the corner cell (ROWS-1, COLS-1),
//           which is taken to face the tier corner and holds the redundant TSV;
//           the ring farthest from the corner is the head. For corner blocks.
// The policies and their purpose follow the chaining styles of the source
// design; the start cell, the turning direction and which side faces the tier
// boundary are this implementation's choices.
package tsv_pkg;

  typedef enum logic [1:0] {
    SPIRAL = 2'd0,
    SNAKE  = 2'd1,
    HYBRID = 2'd2
  } chain_style_e;

  // Spiral: clockwise from (0,0), outer ring first.
  function automatic int spiral_pos(int rows, int cols, int r, int c);
    int top, bot, lft, rgt, k;
    top = 0; bot = rows - 1; lft = 0; rgt = cols - 1; k = 0;
    while (top <= bot && lft <= rgt) begin
      for (int j = lft; j <= rgt; j++) begin
        if (r == top && c == j) return k;
        k++;
      end
      for (int i = top + 1; i <= bot; i++) begin
        if (r == i && c == rgt) return k;
        k++;
      end
      if (top < bot) begin
        for (int j = rgt - 1; j >= lft; j--) begin
          if (r == bot && c == j) return k;
          k++;
        end
      end
      if (lft < rgt) begin
        for (int i = bot - 1; i > top; i--) begin
          if (r == i && c == lft) return k;
          k++;
        end
      end
      top++; bot--; lft++; rgt--;
    end
    return -1;
  endfunction

  // Snake: row by row, the last row running left to right.
  function automatic int snake_pos(int rows, int cols, int r, int c);
    bit to_right;
    to_right = ((rows - 1 - r) % 2) == 0;
    return r * cols + (to_right ? c : cols - 1 - c);
  endfunction

  // Hybrid: L-shaped ring d holds the cells whose larger distance (in rows or
  // columns) from the corner cell is d. Ring d has a horizontal end and a
  // vertical end; rings are walked alternately from one end to the other so
  // that each ring ends next to where the following ring starts.
  function automatic int hybrid_pos(int rows, int cols, int r, int c);
    int k, d, dmax, rr, cc, n, t;
    bit fwd;
    dmax = (rows > cols ? rows : cols) - 1;
    k = 0;
    for (d = dmax; d >= 0; d--) begin
      rr = rows - 1 - d;  // row of the horizontal arm (may be < 0)
      cc = cols - 1 - d;  // column of the vertical arm (may be < 0)
      // Forward walks from the horizontal end to the vertical end. The parity
      // is anchored so that a ring of only one arm hands over to the first
      // full L ring at matching ends.
      if (cols > rows)      fwd = ((d - rows) % 2) == 0;
      else if (rows > cols) fwd = ((d - cols) % 2) != 0;
      else                  fwd = (d % 2) == 0;
      // Ring d as a list: horizontal arm from column cols-1 down to
      // max(cc,0), then vertical arm from row max(rr,0) (skipping the shared
      // corner) to rows-1. A one-arm ring is just a row or a column.
      n = 0;
      if (rr >= 0) n += cols - (cc > 0 ? cc : 0);
      if (cc >= 0) n += rows - (rr > 0 ? rr : 0) - ((rr >= 0) ? 1 : 0);
      t = -1;
      if (rr >= 0 && r == rr && c >= (cc > 0 ? cc : 0)) t = cols - 1 - c;
      else if (cc >= 0 && c == cc && r >= (rr > 0 ? rr : 0))
        t = (rr >= 0 ? cols - cc : 0) + r - (rr >= 0 ? rr + 1 : 0);
      if (t >= 0) return k + (fwd ? t : n - 1 - t);
      k += n;
    end
    return -1;
  endfunction

  function automatic int chain_pos(chain_style_e style, int rows, int cols,
                                   int r, int c);
    case (style)
      SNAKE:   return snake_pos(rows, cols, r, c);
      HYBRID:  return hybrid_pos(rows, cols, r, c);
      default: return spiral_pos(rows, cols, r, c);
    endcase
  endfunction

endpackage
