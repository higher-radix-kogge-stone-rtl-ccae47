// Shared constants and elaboration-time functions for the higher-radix
// Kogge-Stone adders.
//
// A radix-R Kogge-Stone carry network over N bits has ceil(log_R N) levels.
// At level k every prefix node i looks back by multiples of the span R**k and
// combines up to R generate/propagate groups: the groups ending at bits i,
// i-span, ..., i-(R-1)*span, as many of them as exist (index >= 0). Where
// only one group exists the node is a vacant (dummy) position and simply
// passes its input on; where 2, 3 or 4 exist it is a PP2, PP3 or PP4 cell.
// That rule is what the network generates, and cell_fanin() is the one place
// it is written down, so the same function also gives the depth and the cell
// counts of a configuration (e.g. 129 PP4, 21 PP3 and 21 PP2 cells for the
// 64-bit radix-4 adder) and its largest fan-out (RADIX).
package hrks_pkg;

  // base**exp, for small non-negative arguments.
  function automatic int unsigned ipow(input int unsigned base, input int unsigned exp);
    int unsigned r;
    r = 1;
    for (int unsigned e = 0; e < exp; e++) r = r * base;
    return r;
  endfunction

  // Number of levels (logic depth) of a radix-`radix` network over `width`
  // bits: the smallest L with radix**L >= width.
  function automatic int unsigned num_levels(input int unsigned radix, input int unsigned width);
    int unsigned l;
    int unsigned s;
    l = 0;
    s = 1;
    while (s < width) begin
      s = s * radix;
      l++;
    end
    return l;
  endfunction

  // Number of groups combined by node `bit_idx` at level `level`:
  // 1 = dummy (pass-through), 2..radix = PP2..PP<radix>.
  function automatic int unsigned cell_fanin(input int unsigned radix, input int unsigned level,
                                             input int unsigned bit_idx);
    int unsigned span;
    int unsigned m;
    span = ipow(radix, level);
    m = bit_idx / span + 1;
    return (m < radix) ? m : radix;
  endfunction

  // Number of cells with `fanin` inputs in the whole network
  // (fanin = 1 counts the dummy positions).
  function automatic int unsigned cell_count(input int unsigned radix, input int unsigned width,
                                             input int unsigned fanin);
    int unsigned n;
    n = 0;
    for (int unsigned l = 0; l < num_levels(radix, width); l++)
      for (int unsigned i = 0; i < width; i++)
        if (cell_fanin(radix, l, i) == fanin) n++;
    return n;
  endfunction

  // Number of nodes of level `level`+1 that read the output of node
  // `bit_idx` of level `level` (its own position included). Level 0 here is
  // the row of pre-processing outputs feeding the first prefix level.
  function automatic int unsigned node_fanout(input int unsigned radix, input int unsigned width,
                                              input int unsigned level, input int unsigned bit_idx);
    int unsigned span;
    int unsigned n;
    span = ipow(radix, level);
    n = 0;
    for (int unsigned j = 0; j < radix; j++)
      if (bit_idx + j*span < width && j < cell_fanin(radix, level, bit_idx + j*span)) n++;
    return n;
  endfunction

  // Largest node fan-out anywhere in the network.
  function automatic int unsigned max_fanout(input int unsigned radix, input int unsigned width);
    int unsigned f;
    f = 0;
    for (int unsigned l = 0; l < num_levels(radix, width); l++)
      for (int unsigned i = 0; i < width; i++)
        if (node_fanout(radix, width, l, i) > f) f = node_fanout(radix, width, l, i);
    return f;
  endfunction

endpackage
