// spreader - places the dictionary outputs and the uncompressed columns into their
// microinstruction columns.
//
// Column clustering groups microcode columns that need not be adjacent (cluster 1 may hold
// columns 1, 3 and 5), so each dictionary's output bits must be "spread" back to the columns
// they came from. This block does that for all dictionaries at once, and also routes the
// uncompressed columns read from the pointer array. It is pure wiring, a fixed permutation set
// by the COL_SRC table (encoding in uc_pkg): microinstruction column c takes source bit
// COL_SRC[c] of {dictionary K-1, ..., dictionary 0, uncompressed}. Dictionary columns that
// no entry names (a cluster narrower than the shared block) are left unconnected.
//
// Timing: combinational, no logic cells after synthesis (the described spreader costs only
// wires). Elaboration stops with an error if the table names a source outside the vector or
// uses one source for two columns, since every column belongs to exactly one cluster.
module spreader #(
  parameter int unsigned     N_COLS    = uc_pkg::A_N_COLS,
  parameter int unsigned     N_DICTS   = uc_pkg::A_N_DICTS,
  parameter int unsigned     DICT_COLS = uc_pkg::A_DICT_COLS,
  parameter int unsigned     N_UNCOMP  = uc_pkg::A_N_UNCOMP,
  parameter uc_pkg::col_map_t COL_SRC  = uc_pkg::contiguous_col_map(N_COLS, N_DICTS,
                                                                   DICT_COLS, N_UNCOMP),
  localparam int unsigned    UNC_W     = (N_UNCOMP > 0) ? N_UNCOMP : 1,
  localparam int unsigned    SRC_W     = N_UNCOMP + N_DICTS * DICT_COLS,
  localparam int unsigned    SIW       = (SRC_W > 1) ? $clog2(SRC_W) : 1
) (
  input  logic [UNC_W-1:0]                  uncomp,     // unused when N_UNCOMP = 0
  input  logic [N_DICTS-1:0][DICT_COLS-1:0] dict_data,
  output logic [N_COLS-1:0]                 uinst
);

  // 1 when every entry is in range and no source feeds two columns.
  function automatic bit map_ok();
    bit [SRC_W-1:0] used = '0;
    for (int c = 0; c < int'(N_COLS); c++) begin
      if (int'(COL_SRC[c]) >= int'(SRC_W)) return 1'b0;
      if (used[COL_SRC[c][SIW-1:0]]) return 1'b0;
      used[COL_SRC[c][SIW-1:0]] = 1'b1;
    end
    return 1'b1;
  endfunction

  if (N_COLS > uc_pkg::MAX_COLS) begin : g_too_wide
    $error("spreader: N_COLS %0d exceeds uc_pkg::MAX_COLS", N_COLS);
  end
  if (!map_ok()) begin : g_bad_map
    $error("spreader: COL_SRC has an out-of-range or repeated source");
  end

  logic [SRC_W-1:0] src;

  always_comb begin
    for (int i = 0; i < int'(N_UNCOMP); i++) src[i] = uncomp[i];
    for (int d = 0; d < int'(N_DICTS); d++)
      for (int j = 0; j < int'(DICT_COLS); j++)
        src[N_UNCOMP + d * DICT_COLS + j] = dict_data[d][j];
  end

  always_comb begin
    for (int c = 0; c < int'(N_COLS); c++) uinst[c] = src[COL_SRC[c][SIW-1:0]];
  end

endmodule
