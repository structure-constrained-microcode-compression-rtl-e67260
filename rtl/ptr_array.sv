// ptr_array - pointer array of the compressed microcode store (first pipeline stage).
//
// One memory block with as many lines as the original microcode ROM, addressed directly by
// the micro-address, so compressed and uncompressed microcode share one address space and no
// address translation is needed. Each line holds the pointers into all dictionaries and, next
// to them, the columns that are kept uncompressed; keeping all of these in a single block
// (rather than one block per dictionary) follows the described layout. The word layout is
// given in uc_pkg (uncompressed bits at the bottom, then pointer 0, pointer 1, ...), but this
// block just stores WIDTH-bit words.
//
// Timing: synchronous read. rd_data is registered and shows the word at rd_addr one clock
// after rd_en; it holds its value while rd_en is low.
//
// Programming: the described store is a ROM. Its contents can be set at elaboration from a
// $readmemh file (INIT_FILE), and the ld_* write port fills it at run time (used by the
// testbenches, or to patch the microcode). Both are choices of this design.
module ptr_array #(
  parameter int unsigned LINES     = uc_pkg::A_N_LINES,
  parameter int unsigned WIDTH     = uc_pkg::pa_width(
                                       uc_pkg::uniform_ptr_w(uc_pkg::A_N_DICTS,
                                                             $clog2(uc_pkg::A_DICT_LINES)),
                                       uc_pkg::A_N_UNCOMP, uc_pkg::A_N_DICTS),
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic             clk,
  // read port (micro-address)
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  // programming port
  input  logic             ld_en,
  input  logic [AW-1:0]    ld_addr,
  input  logic [WIDTH-1:0] ld_data
);

  logic [WIDTH-1:0] mem [LINES];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr] <= ld_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  // A micro-address past the last microinstruction is a sequencer error.
  a_rd_in_range: assert property (@(posedge clk) rd_en |-> (32'(rd_addr) < LINES))
    else $error("ptr_array: read address %0d beyond %0d lines", rd_addr, LINES);
  a_ld_in_range: assert property (@(posedge clk) ld_en |-> (32'(ld_addr) < LINES))
    else $error("ptr_array: load address %0d beyond %0d lines", ld_addr, LINES);

endmodule
