// tb_spreader - self-checking testbench for the column spreader.
//
// A 13-column microinstruction is built from three 4-column dictionary outputs (the middle
// cluster uses only 3 of its 4 columns) and 2 uncompressed columns, with the clusters'
// columns interleaved across the word. The column assignment is written out below as
// (source kind, dictionary, column) per microinstruction column; the expected word is
// assembled from that table and compared with the spreader's output for random inputs.
module tb_spreader;
  localparam int unsigned N_COLS = 13, N_DICTS = 3, DICT_COLS = 4, N_UNCOMP = 2;

  // Per microinstruction column: dictionary index, or -1 for an uncompressed column, and the
  // column within that source.
  localparam int SRC_DICT [N_COLS] = '{ 0, 1, 2, -1, 0, 1, 2, 0, 2, -1, 1, 0, 2};
  localparam int SRC_COL  [N_COLS] = '{ 2, 0, 3,  1, 0, 2, 0, 3, 1,  0, 1, 1, 2};

  function automatic uc_pkg::col_map_t build_map();
    uc_pkg::col_map_t m = '0;
    for (int c = 0; c < int'(N_COLS); c++)
      m[c] = (SRC_DICT[c] < 0) ? 16'(SRC_COL[c])
                               : 16'(int'(N_UNCOMP) + SRC_DICT[c] * int'(DICT_COLS) + SRC_COL[c]);
    return m;
  endfunction

  logic [N_UNCOMP-1:0]               uncomp;
  logic [N_DICTS-1:0][DICT_COLS-1:0] dict_data;
  logic [N_COLS-1:0]                 uinst, expected;
  int checks = 0, failures = 0;

  spreader #(
    .N_COLS(N_COLS), .N_DICTS(N_DICTS), .DICT_COLS(DICT_COLS), .N_UNCOMP(N_UNCOMP),
    .COL_SRC(build_map())
  ) dut (.uncomp, .dict_data, .uinst);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      uncomp    = N_UNCOMP'($urandom());
      dict_data = (N_DICTS*DICT_COLS)'($urandom());
      if (i < int'(N_DICTS * DICT_COLS + N_UNCOMP)) begin
        // walking one across every source bit first
        {dict_data, uncomp} = (N_DICTS*DICT_COLS+N_UNCOMP)'(1) << i;
      end
      #1;
      for (int c = 0; c < int'(N_COLS); c++)
        expected[c] = (SRC_DICT[c] < 0) ? uncomp[SRC_COL[c]] : dict_data[SRC_DICT[c]][SRC_COL[c]];
      checks++;
      if (uinst !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL: uinst %b expected %b", uinst, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
