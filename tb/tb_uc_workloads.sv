// tb_uc_workloads - the engine in the evaluated structure-constrained configurations.
//
// Three engines, each run by tb_uc_workload_run on a synthetic microcode of the stated shape:
//   pair : 2,000 x 54 microcode, dictionaries of 20 and 34 columns with up to 500 and 100
//          patterns in two identical 500 x 34 blocks, no uncompressed columns, 9- and 7-bit
//          pointers (CR_str 61.11%)
//   C    : 5,632 x 236 mobile-class microcode, 8 dictionaries of 26 columns, 28 uncompressed,
//          595-line blocks, 10-bit pointers (CR_str 55.07%)
//   D    : 5,632 x 240 mobile-class microcode, 9 dictionaries of 22 columns, 42 uncompressed,
//          785-line blocks, 10-bit pointers (CR_str 66.50%)
// The block depths of C and D are the values that give those compression ratios. Each run
// checks every microinstruction, its latency, and its configuration's CR_str.
module tb_uc_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] done;
  int         checks [3], failures [3];

  tb_uc_workload_run #(
    .NAME("pair"), .N_LINES(2000), .N_COLS(54), .K(2), .DC(34), .DL(500), .L0(0),
    .LW(uc_pkg::ptr_w_t'({8'd34, 8'd20})), .PW(uc_pkg::ptr_w_t'({8'd7, 8'd9})),
    .POOL(256'({16'd100, 16'd500})), .STRIDE(7), .CR_STR_BP(6111), .SEED(11)
  ) u_pair (.clk, .done(done[0]), .checks(checks[0]), .failures(failures[0]));

  tb_uc_workload_run #(
    .NAME("C"), .N_LINES(5632), .N_COLS(236), .K(8), .DC(26), .DL(595), .L0(28),
    .LW(uc_pkg::uniform_ptr_w(8, 26)), .PW(uc_pkg::uniform_ptr_w(8, 10)),
    .POOL(256'({8{16'd595}})), .STRIDE(11), .CR_STR_BP(5507), .SEED(22)
  ) u_c (.clk, .done(done[1]), .checks(checks[1]), .failures(failures[1]));

  tb_uc_workload_run #(
    .NAME("D"), .N_LINES(5632), .N_COLS(240), .K(9), .DC(22), .DL(785), .L0(42),
    .LW(uc_pkg::uniform_ptr_w(9, 22)), .PW(uc_pkg::uniform_ptr_w(9, 10)),
    .POOL(256'({9{16'd785}})), .STRIDE(7), .CR_STR_BP(6650), .SEED(33)
  ) u_d (.clk, .done(done[2]), .checks(checks[2]), .failures(failures[2]));

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end
endmodule
