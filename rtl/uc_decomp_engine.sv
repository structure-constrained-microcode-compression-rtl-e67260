// uc_decomp_engine - pipelined decompression engine for two-level compressed microcode.
//
// The microcode ROM is replaced by a pointer array plus K dictionaries of unique bit patterns.
// The microcode columns are split into K clusters of similar columns and a set of uncompressed
// columns; each cluster's distinct row patterns go into its dictionary, and each pointer-array
// line stores, for its micro-address, one pointer per dictionary and the uncompressed bits.
// Every dictionary is an instance of the same memory block (dict_block, DICT_LINES x
// DICT_COLS), so one block layout serves all dictionaries; the clustering that produced the
// contents is expected to keep the clusters similar in width and pattern count so that little
// of each block goes unused.
//
// Pipeline (two stages, one microinstruction per clock):
//   cycle 0  addr_valid, uaddr presented
//   stage 1  ptr_array read: pointers + uncompressed bits registered
//   stage 2  each dict_block reads the pattern its pointer selects; the uncompressed bits
//            move along in a register so both halves stay aligned
//   output   spreader (wiring only) assembles the microinstruction; uinst_valid is high
//            exactly two clocks after addr_valid.
// Reset is synchronous and active low. A pointer narrower than the block's address (a dictionary with fewer patterns, PTR_W[d] <
// clog2(DICT_LINES)) is zero-extended. Only the valid bits are reset; data registers are not,
// and no memory is read while rst_n is low.
//
// Programming: pa_ld_* write pointer-array lines; dict_ld_en[d] with the shared dict_ld_addr
// and dict_ld_data writes dictionary d. These ports and the pipeline register placement are
// this design's choices; the pointer-array/dictionary/spreader organisation, the shared block
// and the single memory for pointers and uncompressed columns follow the described engine.
// Defaults are the two-dictionary configuration of uc_pkg (75-bit, 22,528-line microcode).
module uc_decomp_engine #(
  parameter int unsigned      N_LINES    = uc_pkg::A_N_LINES,
  parameter int unsigned      N_COLS     = uc_pkg::A_N_COLS,
  parameter int unsigned      N_DICTS    = uc_pkg::A_N_DICTS,
  parameter int unsigned      DICT_COLS  = uc_pkg::A_DICT_COLS,
  parameter int unsigned      DICT_LINES = uc_pkg::A_DICT_LINES,
  parameter int unsigned      N_UNCOMP   = uc_pkg::A_N_UNCOMP,
  parameter uc_pkg::ptr_w_t   PTR_W      = uc_pkg::uniform_ptr_w(N_DICTS, $clog2(DICT_LINES)),
  parameter uc_pkg::col_map_t COL_SRC    = uc_pkg::contiguous_col_map(N_COLS, N_DICTS,
                                                                     DICT_COLS, N_UNCOMP),
  localparam int unsigned     UAW        = (N_LINES > 1) ? $clog2(N_LINES) : 1,
  localparam int unsigned     DAW        = (DICT_LINES > 1) ? $clog2(DICT_LINES) : 1,
  localparam int unsigned     PA_W       = uc_pkg::pa_width(PTR_W, N_UNCOMP, N_DICTS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // fetch
  input  logic                  addr_valid,
  input  logic [UAW-1:0]        uaddr,
  output logic                  uinst_valid,
  output logic [N_COLS-1:0]     uinst,
  // programming of the pointer array
  input  logic                  pa_ld_en,
  input  logic [UAW-1:0]        pa_ld_addr,
  input  logic [PA_W-1:0]       pa_ld_data,
  // programming of the dictionaries
  input  logic [N_DICTS-1:0]    dict_ld_en,
  input  logic [DAW-1:0]        dict_ld_addr,
  input  logic [DICT_COLS-1:0]  dict_ld_data
);

  localparam int unsigned UNC_W = (N_UNCOMP > 0) ? N_UNCOMP : 1;

  if (N_DICTS < 1 || N_DICTS > uc_pkg::MAX_DICTS) begin : g_bad_k
    $error("uc_decomp_engine: N_DICTS %0d outside 1..%0d", N_DICTS, uc_pkg::MAX_DICTS);
  end

  // ---------------- stage 1: pointer array ----------------
  logic [PA_W-1:0] pa_word;
  logic            s1_valid;

  ptr_array #(.LINES(N_LINES), .WIDTH(PA_W)) u_ptr_array (
    .clk    (clk),
    .rd_en  (addr_valid && rst_n),
    .rd_addr(uaddr),
    .rd_data(pa_word),
    .ld_en  (pa_ld_en),
    .ld_addr(pa_ld_addr),
    .ld_data(pa_ld_data)
  );

  // ---------------- stage 2: dictionaries ----------------
  logic [N_DICTS-1:0][DICT_COLS-1:0] dict_data;
  logic [UNC_W-1:0]                  s2_uncomp;
  logic                              s2_valid;

  for (genvar d = 0; d < int'(N_DICTS); d++) begin : g_dict
    localparam int unsigned OFF = uc_pkg::ptr_offset(PTR_W, N_UNCOMP, d);
    localparam int unsigned PW  = 32'(PTR_W[d]);

    if (PW < 1 || PW > DAW) begin : g_bad_ptr_w
      $error("uc_decomp_engine: PTR_W[%0d] = %0d outside 1..%0d", d, PW, DAW);
    end

    logic [DAW-1:0] ptr;
    always_comb begin
      ptr = '0;
      ptr[PW-1:0] = pa_word[OFF +: PW];
    end

    dict_block #(.LINES(DICT_LINES), .COLS(DICT_COLS)) u_dict (
      .clk    (clk),
      .rd_en  (s1_valid && rst_n),
      .rd_addr(ptr),
      .rd_data(dict_data[d]),
      .ld_en  (dict_ld_en[d]),
      .ld_addr(dict_ld_addr),
      .ld_data(dict_ld_data)
    );
  end

  if (N_UNCOMP > 0) begin : g_unc
    always_ff @(posedge clk) begin
      if (s1_valid) s2_uncomp <= pa_word[N_UNCOMP-1:0];
    end
  end else begin : g_no_unc
    assign s2_uncomp = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
    end else begin
      s1_valid <= addr_valid;
      s2_valid <= s1_valid;
    end
  end

  // ---------------- output: spreader ----------------
  spreader #(
    .N_COLS   (N_COLS),
    .N_DICTS  (N_DICTS),
    .DICT_COLS(DICT_COLS),
    .N_UNCOMP (N_UNCOMP),
    .COL_SRC  (COL_SRC)
  ) u_spreader (
    .uncomp   (s2_uncomp),
    .dict_data(dict_data),
    .uinst    (uinst)
  );

  assign uinst_valid = s2_valid;

  // Programming and fetching at once is not supported: a load could race a read of the
  // same line.
  a_no_load_during_fetch: assert property (@(posedge clk) disable iff (!rst_n)
      (pa_ld_en || (|dict_ld_en)) |-> !(addr_valid || s1_valid))
    else $error("uc_decomp_engine: programming while a fetch is in flight");

endmodule
