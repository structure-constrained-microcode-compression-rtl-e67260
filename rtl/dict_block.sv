// dict_block - the single dictionary memory-block design (second pipeline stage).
//
// Every dictionary of the engine is one instance of this block with the same LINES x COLS
// shape: one layout, designed and verified once, reused K times. A dictionary stores the
// unique bit patterns of one column cluster; a pointer from the pointer array selects one
// pattern. A dictionary with fewer patterns than LINES leaves the top lines unused, and one
// with fewer columns than COLS leaves the top columns unused (the spreader ignores them);
// that unused area is the price of reuse that the column clustering tries to keep small.
//
// Timing: synchronous read, registered output one clock after rd_en; holds while rd_en is
// low. LINES need not be a power of two; reading a line at or beyond LINES is flagged by an
// assertion (a pointer can never legally point there).
//
// Programming: like ptr_array, an optional $readmemh image (INIT_FILE) and a ld_* write port
// stand in for the ROM's mask programming; both are choices of this design.
module dict_block #(
  parameter int unsigned LINES     = uc_pkg::A_DICT_LINES,
  parameter int unsigned COLS      = uc_pkg::A_DICT_COLS,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic            clk,
  // read port (pointer)
  input  logic            rd_en,
  input  logic [AW-1:0]   rd_addr,
  output logic [COLS-1:0] rd_data,
  // programming port
  input  logic            ld_en,
  input  logic [AW-1:0]   ld_addr,
  input  logic [COLS-1:0] ld_data
);

  logic [COLS-1:0] mem [LINES];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr] <= ld_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  a_ptr_in_range: assert property (@(posedge clk) rd_en |-> (32'(rd_addr) < LINES))
    else $error("dict_block: pointer %0d beyond %0d patterns", rd_addr, LINES);
  a_ld_in_range: assert property (@(posedge clk) ld_en |-> (32'(ld_addr) < LINES))
    else $error("dict_block: load address %0d beyond %0d lines", ld_addr, LINES);

endmodule
