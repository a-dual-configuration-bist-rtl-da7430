// bist_pkg: shared types and mapping functions of the dual-configuration BIST.
//
// The embedded blocks under test sit on a grid of ROWS x COLS sites. A block's
// physical index is b = col*ROWS + row, with col 0 the leftmost column and row 0
// the bottom row. Two test configurations pair the blocks differently; a block
// that fails in both is the faulty one.
//
// Two pairing algorithms are provided:
//  * MAP_MEANDER (default): configuration 0 orders the blocks along a vertical
//    meander (up column 0, down column 1, ...), configuration 1 along a
//    horizontal meander (right along row 0, left along row 1, ...). In each
//    order positions 2k and 2k+1 form pair k.
//  * MAP_PARTITION: blocks are labelled by their index. Configuration 0 pairs
//    (i, i+1) with i even, configuration 1 pairs (q, (q+1) mod n) with q odd.
// Both need an even number of blocks. The index convention (column-major, row 0
// at the bottom) is this design's choice.
package bist_pkg;

  typedef enum logic [0:0] {
    MAP_MEANDER   = 1'b0,
    MAP_PARTITION = 1'b1
  } map_algo_e;

  // Position of block b in the chain order of configuration cfg.
  function automatic int unsigned pos_of(input int unsigned cfg, input map_algo_e algo,
                                         input int unsigned rows, input int unsigned cols,
                                         input int unsigned b);
    int unsigned col, row;
    col = b / rows;
    row = b % rows;
    if (algo == MAP_PARTITION) return b;
    if (cfg == 0) return col * rows + (((col % 2) == 0) ? row : rows - 1 - row);
    return row * cols + (((row % 2) == 0) ? col : cols - 1 - col);
  endfunction

  // Index of the pair (comparator) that block b belongs to in configuration cfg.
  function automatic int unsigned pair_of(input int unsigned cfg, input map_algo_e algo,
                                          input int unsigned rows, input int unsigned cols,
                                          input int unsigned b);
    int unsigned n;
    n = rows * cols;
    if (algo == MAP_PARTITION && cfg != 0) return ((b + n - 1) % n) / 2;
    return pos_of(cfg, algo, rows, cols, b) / 2;
  endfunction

  // Physical index of member m (0 or 1) of pair k in configuration cfg.
  function automatic int unsigned member_of(input int unsigned cfg, input map_algo_e algo,
                                            input int unsigned rows, input int unsigned cols,
                                            input int unsigned k, input int unsigned m);
    int unsigned n, pos, col, row, r;
    n   = rows * cols;
    pos = 2 * k + m;
    if (algo == MAP_PARTITION) return (cfg == 0) ? pos : (pos + 1) % n;
    if (cfg == 0) begin
      col = pos / rows;
      r   = pos % rows;
      row = ((col % 2) == 0) ? r : rows - 1 - r;
    end else begin
      row = pos / cols;
      r   = pos % cols;
      col = ((row % 2) == 0) ? r : cols - 1 - r;
    end
    return col * rows + row;
  endfunction

  // Feedback taps (bit i set = stage i+1 taps) of maximal-length Fibonacci
  // LFSRs, x^w + ... + 1, for the widths the pattern generator supports.
  function automatic logic [63:0] lfsr_taps(input int unsigned w);
    logic [63:0] t;
    t = '0;
    case (w)
      8:  begin t[7]  = 1; t[5]  = 1; t[4]  = 1; t[3]  = 1; end
      16: begin t[15] = 1; t[14] = 1; t[12] = 1; t[3]  = 1; end
      18: begin t[17] = 1; t[10] = 1; end
      24: begin t[23] = 1; t[22] = 1; t[21] = 1; t[16] = 1; end
      32: begin t[31] = 1; t[21] = 1; t[1]  = 1; t[0]  = 1; end
      36: begin t[35] = 1; t[24] = 1; end
      48: begin t[47] = 1; t[46] = 1; t[20] = 1; t[19] = 1; end
      64: begin t[63] = 1; t[62] = 1; t[60] = 1; t[59] = 1; end
      default: begin t[w-1] = 1; t[0] = 1; end
    endcase
    return t;
  endfunction

endpackage
