// tb_uc_decomp_full - the decompression engine at its default configuration, end to end.
//
// The engine is instantiated with no parameter overrides: a 22,528-line, 75-bit microcode
// with two 32-column dictionaries in identical 2025-line blocks and 11 uncompressed columns,
// columns assigned contiguously (dictionary 0 -> columns 0..31, dictionary 1 -> 32..63,
// uncompressed -> 64..74). Each cluster's rows are drawn from a pool of 2025 random patterns.
//
// Flow as in tb_uc_decomp_engine: generate the microcode, compress it independently here,
// program pointer array and dictionaries, fetch every micro-address once in order and a set
// of random ones with random idle cycles, and compare every microinstruction and its
// two-clock latency, and check that the configuration's structure-constrained compression
// ratio is 51.67%. Mechanism counters: back-to-back fetches, idle cycles, uncompressed
// columns in use.
module tb_uc_decomp_full;
  localparam int unsigned N_LINES = uc_pkg::A_N_LINES, N_COLS = uc_pkg::A_N_COLS;
  localparam int unsigned K = uc_pkg::A_N_DICTS, DC = uc_pkg::A_DICT_COLS;
  localparam int unsigned DL = uc_pkg::A_DICT_LINES, L0 = uc_pkg::A_N_UNCOMP;
  localparam int LW   [K] = '{32, 32};
  localparam int PW   [K] = '{11, 11};
  localparam int POOL [K] = '{2025, 2025};
  localparam int unsigned UAW = $clog2(N_LINES), DAW = $clog2(DL);
  localparam int unsigned PA_W = L0 + 11 + 11;
  localparam int unsigned N_RANDOM = 5000;

  // Contiguous assignment: dictionaries first, uncompressed columns last.
  function automatic int colk(int c);   // -1 = uncompressed, else dictionary
    return (c < int'(K * DC)) ? c / int'(DC) : -1;
  endfunction
  function automatic int colj(int c);   // column within its source
    return (c < int'(K * DC)) ? c % int'(DC) : c - int'(K * DC);
  endfunction

  logic                 clk = 1'b0, rst_n;
  logic                 addr_valid, uinst_valid;
  logic [UAW-1:0]       uaddr;
  logic [N_COLS-1:0]    uinst;
  logic                 pa_ld_en;
  logic [UAW-1:0]       pa_ld_addr;
  logic [PA_W-1:0]      pa_ld_data;
  logic [K-1:0]         dict_ld_en;
  logic [DAW-1:0]       dict_ld_addr;
  logic [DC-1:0]        dict_ld_data;

  uc_decomp_engine dut (.*);

  always #5 clk = ~clk;

  logic [N_COLS-1:0] ucode    [N_LINES];
  logic [DC-1:0]     pool     [K][];
  logic [DC-1:0]     dict_pat [K][DL];
  int                n_pat    [K];
  int                ptr      [N_LINES][K];
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  // mechanism counters
  int n_back_to_back = 0, n_idle = 0, n_uncomp_ones = 0, n_narrow_ptr = 0;
  int n_unused_lines = 0, n_unused_cols = 0, n_interleaved = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [DC-1:0] rand_dc();
    return DC'({$urandom(), $urandom()});
  endfunction

  // Expected results in flight: address and issue cycle.
  int              q_addr  [$];
  longint unsigned q_cycle [$];
  int              n_out = 0;

  always @(posedge clk) begin
    if (rst_n && uinst_valid) begin
      int a; longint unsigned c0;
      checks++;
      if (q_addr.size() == 0) begin
        failures++; $display("FAIL: output with no fetch in flight");
      end else begin
        a = q_addr.pop_front(); c0 = q_cycle.pop_front();
        n_out++;
        if (uinst !== ucode[a]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d: got %h expected %h", a, uinst, ucode[a]);
        end
        checks++;
        if (cycle - c0 != 2) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d: latency %0d, expected 2", a, cycle - c0);
        end
      end
    end
  end

  task automatic fetch(input int a);
    // an idle cycle before this fetch, one time in four
    if ($urandom_range(0, 3) == 0) begin
      addr_valid = 1'b0; n_idle++;
      @(negedge clk);
    end else if (addr_valid) n_back_to_back++;
    addr_valid = 1'b1; uaddr = UAW'(a);
    q_addr.push_back(a); q_cycle.push_back(cycle);
    @(negedge clk);
  endtask

  initial begin
    int idx_of [logic [DC-1:0]];
    logic [DC-1:0] pat;
    logic [PA_W-1:0] word;
    int off;

    rst_n = 1'b0; addr_valid = 1'b0; uaddr = '0;
    pa_ld_en = 1'b0; pa_ld_addr = '0; pa_ld_data = '0;
    dict_ld_en = '0; dict_ld_addr = '0; dict_ld_data = '0;

    // 1. microcode with compressible clusters
    for (int d = 0; d < int'(K); d++) begin
      pool[d] = new[POOL[d]];
      foreach (pool[d][i]) pool[d][i] = rand_dc();
    end
    for (int n = 0; n < int'(N_LINES); n++) begin
      int sel [K];
      for (int d = 0; d < int'(K); d++) sel[d] = $urandom_range(0, POOL[d] - 1);
      for (int c = 0; c < int'(N_COLS); c++)
        ucode[n][c] = (colk(c) < 0) ? 1'($urandom()) : pool[colk(c)][sel[colk(c)]][colj(c)];
    end

    // 2. reference compression
    for (int d = 0; d < int'(K); d++) begin
      idx_of.delete();
      n_pat[d] = 0;
      for (int n = 0; n < int'(N_LINES); n++) begin
        pat = '0;
        for (int c = 0; c < int'(N_COLS); c++) if (colk(c) == d) pat[colj(c)] = ucode[n][c];
        if (!idx_of.exists(pat)) begin
          idx_of[pat] = n_pat[d];
          dict_pat[d][n_pat[d]] = pat;
          n_pat[d]++;
        end
        ptr[n][d] = idx_of[pat];
      end
      $display("dictionary %0d: %0d columns, %0d unique patterns", d, LW[d], n_pat[d]);
      checks++;
      if (n_pat[d] > (1 << PW[d]) || n_pat[d] > int'(DL)) begin
        failures++; $display("FAIL: dictionary %0d does not fit", d);
      end
      if (n_pat[d] < int'(DL)) n_unused_lines++;
      if (LW[d] < int'(DC))    n_unused_cols++;
      if (PW[d] < int'(DAW))   n_narrow_ptr++;
    end
    for (int c = 1; c < int'(N_COLS); c++) if (colk(c) != colk(c - 1)) n_interleaved++;
    $display("structure-constrained size %0d bits vs %0d uncompressed",
             N_LINES * PA_W + K * DL * DC, N_LINES * N_COLS);
    // the default configuration must reproduce the structure-constrained compression ratio
    // of 51.67 % (in 0.01 % units, rounded)
    checks++;
    if (((64'(N_LINES) * PA_W + 64'(K) * DL * DC) * 20000 / (64'(N_LINES) * N_COLS) + 1) / 2
        != 64'd5167) begin
      failures++; $display("FAIL: CR_str of the default configuration is not 51.67%%");
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 3. programming
    for (int n = 0; n < int'(N_LINES); n++) begin
      word = '0;
      for (int c = 0; c < int'(N_COLS); c++) if (colk(c) < 0) word[colj(c)] = ucode[n][c];
      if (word[L0-1:0] != '0) n_uncomp_ones++;
      off = L0;
      for (int d = 0; d < int'(K); d++) begin
        for (int b = 0; b < PW[d]; b++) word[off + b] = 1'(ptr[n][d] >> b);
        off += PW[d];
      end
      pa_ld_en = 1'b1; pa_ld_addr = UAW'(n); pa_ld_data = word;
      @(negedge clk);
    end
    pa_ld_en = 1'b0;
    for (int d = 0; d < int'(K); d++) begin
      for (int i = 0; i < int'(DL); i++) begin
        pat = rand_dc();                                  // junk in unused lines / columns
        if (i < n_pat[d]) for (int j = 0; j < LW[d]; j++) pat[j] = dict_pat[d][i][j];
        dict_ld_en = '0; dict_ld_en[d] = 1'b1;
        dict_ld_addr = DAW'(i); dict_ld_data = pat;
        @(negedge clk);
      end
    end
    dict_ld_en = '0;
    @(negedge clk);

    // 4. fetches
    for (int n = 0; n < int'(N_LINES); n++) fetch(n);
    for (int i = 0; i < int'(N_RANDOM); i++) fetch($urandom_range(0, N_LINES - 1));
    addr_valid = 1'b0;
    repeat (4) @(negedge clk);

    checks++;
    if (n_out != int'(N_LINES + N_RANDOM) || q_addr.size() != 0) begin
      failures++; $display("FAIL: %0d outputs for %0d fetches", n_out, N_LINES + N_RANDOM);
    end
    $display("mechanisms: back_to_back=%0d idle=%0d uncompressed_lines=%0d narrow_ptr=%0d unused_lines=%0d unused_cols=%0d interleaved=%0d",
             n_back_to_back, n_idle, n_uncomp_ones, n_narrow_ptr, n_unused_lines, n_unused_cols, n_interleaved);
    checks += 3;
    if (n_back_to_back == 0) begin failures++; $display("FAIL: no back-to-back fetch"); end
    if (n_idle == 0)         begin failures++; $display("FAIL: no idle cycle"); end
    if (n_uncomp_ones == 0)  begin failures++; $display("FAIL: uncompressed columns never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
