// uc_pkg - shared configuration for the compressed-microcode decompression engine.
//
// The engine stores microcode as pointers into dictionaries of unique bit patterns
// (two-level storage). Its shape is fixed at elaboration time by a handful of numbers:
//   N_LINES    number of microinstructions (lines of the original microcode ROM)
//   N_COLS     bits per microinstruction (L)
//   N_DICTS    number of dictionaries / clusters (K)
//   DICT_COLS  columns of the one memory-block design used for every dictionary (L_fix)
//   DICT_LINES lines of that memory block (the largest dictionary's pattern count)
//   N_UNCOMP   columns kept uncompressed beside the pointers (L0)
// plus two tables:
//   PTR_W      pointer width of each dictionary, ceil(log2 M_i) bits
//   COL_SRC    for every microinstruction column, where its bit comes from.
//
// COL_SRC encoding. The engine's second pipeline stage holds one "source vector":
//   bits [N_UNCOMP-1:0]                      the uncompressed columns
//   bits [N_UNCOMP + d*DICT_COLS + j]        column j of dictionary d's output
// COL_SRC[c] is the index into that vector that feeds microinstruction column c.
//
// Pointer-array word layout: [N_UNCOMP-1:0] uncompressed columns, then the pointer of
// dictionary 0, then dictionary 1, ... (see ptr_offset()).
//
// The default configuration is the desktop microcode "A" compressed with two 32-column
// dictionaries and 11 uncompressed columns, 22,528 lines of 75 bits. Its dictionary depth of
// 2,025 patterns is not printed as such; it is the value that reproduces that configuration's
// structure-constrained compression ratio of 51.67% (11-bit pointers). The default column map
// is contiguous (dictionary 0 feeds columns 0..31, dictionary 1 columns 32..63, the
// uncompressed columns 64..74); a real clustering supplies its own map.
package uc_pkg;

  // Upper bounds on the tables passed as parameters (packed, so they can be computed by
  // functions and carried through parameter lists).
  localparam int unsigned MAX_COLS  = 256;
  localparam int unsigned MAX_DICTS = 16;

  typedef logic [MAX_COLS-1:0][15:0] col_map_t;
  typedef logic [MAX_DICTS-1:0][7:0] ptr_w_t;

  // Default configuration (microcode A after structure-constrained clustering).
  localparam int unsigned A_N_LINES    = 22528;
  localparam int unsigned A_N_COLS     = 75;
  localparam int unsigned A_N_DICTS    = 2;
  localparam int unsigned A_DICT_COLS  = 32;
  localparam int unsigned A_DICT_LINES = 2025;
  localparam int unsigned A_N_UNCOMP   = 11;

  // Every dictionary gets the same pointer width.
  function automatic ptr_w_t uniform_ptr_w(int unsigned n_dicts, int unsigned w);
    ptr_w_t r = '0;
    for (int d = 0; d < int'(n_dicts); d++) r[d] = w[7:0];
    return r;
  endfunction

  // Bit offset of dictionary d's pointer inside a pointer-array word.
  function automatic int unsigned ptr_offset(ptr_w_t ptr_w, int unsigned n_uncomp, int unsigned d);
    int unsigned off = n_uncomp;
    for (int i = 0; i < int'(d); i++) off += 32'(ptr_w[i]);
    return off;
  endfunction

  // Width of a pointer-array word: uncompressed columns plus all pointers.
  function automatic int unsigned pa_width(ptr_w_t ptr_w, int unsigned n_uncomp, int unsigned n_dicts);
    return ptr_offset(ptr_w, n_uncomp, n_dicts);
  endfunction

  // Contiguous column map: dictionary d feeds columns d*dict_cols .. d*dict_cols+dict_cols-1,
  // the uncompressed columns come last.
  function automatic col_map_t contiguous_col_map(int unsigned n_cols, int unsigned n_dicts,
                                                  int unsigned dict_cols, int unsigned n_uncomp);
    col_map_t r = '0;
    for (int c = 0; c < int'(n_cols); c++) begin
      if (c < int'(n_dicts * dict_cols)) r[c] = 16'(n_uncomp + c);
      else                               r[c] = 16'(c - int'(n_dicts * dict_cols));
    end
    return r;
  endfunction

endpackage
