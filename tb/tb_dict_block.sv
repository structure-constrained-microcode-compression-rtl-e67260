// tb_dict_block - self-checking testbench for the shared dictionary block at its default 2025 x 32 shape.
//
// Fills every line through the programming port with random words kept in a reference
// array, then issues random reads, some with rd_en low. Each read must return the reference
// word exactly one clock later; with rd_en low the output must hold the previous word.
// A final pass reads every line in order. A watchdog ends the run if it hangs.
module tb_dict_block;
  localparam int unsigned LINES = uc_pkg::A_DICT_LINES;
  localparam int unsigned W     = uc_pkg::A_DICT_COLS;
  localparam int unsigned AW    = $clog2(LINES);

  logic          clk = 1'b0;
  logic          rd_en, ld_en;
  logic [AW-1:0] rd_addr, ld_addr;
  logic [W-1:0]  rd_data, ld_data;
  logic [W-1:0]  ref_mem [LINES];
  logic [W-1:0]  expected;
  int            checks = 0, failures = 0;

  dict_block  dut (
    .clk, .rd_en, .rd_addr, .rd_data, .ld_en, .ld_addr, .ld_data
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int i = 0; i < int'(W); i += 32) w = {w, $urandom()};
    return w;
  endfunction

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, rd_data, exp);
    end
  endtask

  initial begin
    rd_en = 1'b0; ld_en = 1'b0; rd_addr = '0; ld_addr = '0; ld_data = '0;
    @(negedge clk);
    // program every line
    for (int a = 0; a < int'(LINES); a++) begin
      ref_mem[a] = rand_word();
      ld_en = 1'b1; ld_addr = AW'(a); ld_data = ref_mem[a];
      @(negedge clk);
    end
    ld_en = 1'b0;
    // first read, then random reads with random enables
    rd_en = 1'b1; rd_addr = AW'(LINES - 1); expected = ref_mem[LINES-1];
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      check(expected, "read/hold");
      rd_en   = ($urandom_range(0, 3) != 0);
      rd_addr = AW'($urandom_range(0, LINES - 1));
      if (rd_en) expected = ref_mem[rd_addr];
      @(negedge clk);
    end
    // sequential sweep, checked one clock after each address
    for (int a = 0; a < int'(LINES); a++) begin
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
      check(ref_mem[a], "sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
