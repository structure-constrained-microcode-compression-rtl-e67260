// tb_uc_workload_run - runs one compressed-microcode configuration through the engine.
//
// Used by tb_uc_workloads, once per configuration. It generates a synthetic microcode of
// N_LINES x N_COLS bits whose K column clusters draw their rows from pattern pools of POOL[d]
// entries, compresses it independently (unique patterns per cluster, numbered by first
// appearance), programs an engine built with the configuration, fetches every line once with
// random idle cycles and compares each microinstruction and its two-clock latency.
//
// It also checks the configuration's size: the structure-constrained compression ratio,
// (N_LINES * pointer-array width + K * DICT_LINES * DICT_COLS) / (N_LINES * N_COLS), in
// units of 0.01%, must equal CR_STR_BP; and every cluster's unique patterns must fit its
// pointer and block.
//
// Column map: microcode column c takes position p = (STRIDE*c + 5) mod N_COLS of the source
// sequence [uncompressed columns][cluster 0][cluster 1]...; STRIDE = 1 gives a rotated
// contiguous map, other strides coprime to N_COLS interleave the clusters.
//
// Results come out on done / checks / failures.
module tb_uc_workload_run #(
  parameter string          NAME       = "cfg",
  parameter int unsigned    N_LINES    = 2000,
  parameter int unsigned    N_COLS     = 54,
  parameter int unsigned    K          = 2,
  parameter int unsigned    DC         = 34,
  parameter int unsigned    DL         = 500,
  parameter int unsigned    L0         = 0,
  parameter uc_pkg::ptr_w_t LW         = '0,   // columns per cluster
  parameter uc_pkg::ptr_w_t PW         = '0,   // pointer width per dictionary
  parameter logic [15:0][15:0] POOL    = '0,   // pattern pool size per cluster
  parameter int unsigned    STRIDE     = 1,
  parameter int unsigned    CR_STR_BP  = 0,   // expected CR_str in 0.01 %
  parameter int unsigned    SEED       = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned UAW  = $clog2(N_LINES), DAW = $clog2(DL);
  localparam int unsigned PA_W = uc_pkg::pa_width(PW, L0, K);

  function automatic int pos(int c);
    return (int'(STRIDE) * c + 5) % int'(N_COLS);
  endfunction
  function automatic int colk(int c);   // -1 = uncompressed, else cluster
    int p = pos(c) - int'(L0);
    if (p < 0) return -1;
    for (int d = 0; d < int'(K); d++) begin
      if (p < int'(LW[d])) return d;
      p -= int'(LW[d]);
    end
    return -2;                          // not covered: configuration error
  endfunction
  function automatic int colj(int c);
    int p = pos(c) - int'(L0);
    if (p < 0) return pos(c);
    for (int d = 0; d < int'(K); d++) begin
      if (p < int'(LW[d])) return p;
      p -= int'(LW[d]);
    end
    return 0;
  endfunction
  function automatic uc_pkg::col_map_t build_map();
    uc_pkg::col_map_t m = '0;
    for (int c = 0; c < int'(N_COLS); c++)
      m[c] = (colk(c) < 0) ? 16'(colj(c)) : 16'(int'(L0) + colk(c) * int'(DC) + colj(c));
    return m;
  endfunction

  logic                 rst_n, addr_valid, uinst_valid, pa_ld_en;
  logic [UAW-1:0]       uaddr, pa_ld_addr;
  logic [N_COLS-1:0]    uinst;
  logic [PA_W-1:0]      pa_ld_data;
  logic [K-1:0]         dict_ld_en;
  logic [DAW-1:0]       dict_ld_addr;
  logic [DC-1:0]        dict_ld_data;

  uc_decomp_engine #(
    .N_LINES(N_LINES), .N_COLS(N_COLS), .N_DICTS(K), .DICT_COLS(DC), .DICT_LINES(DL),
    .N_UNCOMP(L0), .PTR_W(PW), .COL_SRC(build_map())
  ) dut (.*);

  logic [N_COLS-1:0] ucode    [N_LINES];
  logic [DC-1:0]     pool     [K][];
  logic [DC-1:0]     dict_pat [K][DL];
  int                n_pat    [K];
  int                ptr      [N_LINES][K];
  longint unsigned   cycle = 0;
  int                q_addr  [$];
  longint unsigned   q_cycle [$];
  int                n_out = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [DC-1:0] rand_dc();
    logic [DC-1:0] w;
    for (int i = 0; i < int'(DC); i += 32) w = DC'({w, $urandom()});
    return w;
  endfunction

  always @(posedge clk) begin
    if (rst_n && uinst_valid) begin
      int a; longint unsigned c0;
      checks++;
      if (q_addr.size() == 0) begin
        failures++; $display("FAIL %s: output with no fetch in flight", NAME);
      end else begin
        a = q_addr.pop_front(); c0 = q_cycle.pop_front();
        n_out++;
        if (uinst !== ucode[a] || cycle - c0 != 2) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s addr %0d: got %h expected %h, latency %0d", NAME, a, uinst,
                     ucode[a], cycle - c0);
        end
      end
    end
  end

  initial begin
    int idx_of [logic [DC-1:0]];
    logic [DC-1:0] pat;
    logic [PA_W-1:0] word;
    int off, bits_reg, sel;
    longint unsigned cr_bp;

    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; addr_valid = 1'b0; uaddr = '0;
    pa_ld_en = 1'b0; pa_ld_addr = '0; pa_ld_data = '0;
    dict_ld_en = '0; dict_ld_addr = '0; dict_ld_data = '0;
    void'($urandom(SEED));

    for (int c = 0; c < int'(N_COLS); c++) if (colk(c) == -2) begin
      failures++; $display("FAIL %s: column %0d not covered", NAME, c);
    end

    // microcode
    for (int d = 0; d < int'(K); d++) begin
      pool[d] = new[32'(POOL[d])];
      foreach (pool[d][i]) pool[d][i] = rand_dc();
    end
    for (int n = 0; n < int'(N_LINES); n++) begin
      for (int c = 0; c < int'(N_COLS); c++) ucode[n][c] = 1'($urandom());
      for (int d = 0; d < int'(K); d++) begin
        sel = $urandom_range(0, int'(POOL[d]) - 1);
        for (int c = 0; c < int'(N_COLS); c++)
          if (colk(c) == d) ucode[n][c] = pool[d][sel][colj(c)];
      end
    end

    // reference compression
    bits_reg = int'(N_LINES * PA_W);
    for (int d = 0; d < int'(K); d++) begin
      idx_of.delete();
      n_pat[d] = 0;
      for (int n = 0; n < int'(N_LINES); n++) begin
        pat = '0;
        for (int c = 0; c < int'(N_COLS); c++) if (colk(c) == d) pat[colj(c)] = ucode[n][c];
        if (!idx_of.exists(pat)) begin
          if (n_pat[d] < int'(DL)) dict_pat[d][n_pat[d]] = pat;
          idx_of[pat] = n_pat[d];
          n_pat[d]++;
        end
        ptr[n][d] = idx_of[pat];
      end
      bits_reg += n_pat[d] * int'(LW[d]);
      checks++;
      if (n_pat[d] > (1 << PW[d]) || n_pat[d] > int'(DL)) begin
        failures++; $display("FAIL %s: dictionary %0d (%0d patterns) does not fit", NAME, d, n_pat[d]);
      end
    end
    // round to nearest 0.01 %
    cr_bp = ((64'(N_LINES) * PA_W + 64'(K) * DL * DC) * 20000 / (64'(N_LINES) * N_COLS) + 1) / 2;
    $display("%s: %0d lines x %0d cols, %0d dictionaries of %0d x %0d, %0d uncompressed; CR_str %0d.%02d%%, CR_reg of this microcode %0d.%02d%%",
             NAME, N_LINES, N_COLS, K, DL, DC, L0, cr_bp / 100, cr_bp % 100,
             (longint'(bits_reg) * 10000 / (N_LINES * N_COLS)) / 100,
             (longint'(bits_reg) * 10000 / (N_LINES * N_COLS)) % 100);
    checks++;
    if (cr_bp != 64'(CR_STR_BP)) begin
      failures++; $display("FAIL %s: CR_str %0d, expected %0d (0.01%%)", NAME, cr_bp, CR_STR_BP);
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // program
    for (int n = 0; n < int'(N_LINES); n++) begin
      word = '0;
      for (int c = 0; c < int'(N_COLS); c++) if (colk(c) == -1) word[colj(c)] = ucode[n][c];
      off = int'(L0);
      for (int d = 0; d < int'(K); d++) begin
        for (int b = 0; b < int'(PW[d]); b++) word[off + b] = 1'(ptr[n][d] >> b);
        off += int'(PW[d]);
      end
      pa_ld_en = 1'b1; pa_ld_addr = UAW'(n); pa_ld_data = word;
      @(negedge clk);
    end
    pa_ld_en = 1'b0;
    for (int d = 0; d < int'(K); d++) begin
      for (int i = 0; i < int'(DL); i++) begin
        pat = rand_dc();
        if (i < n_pat[d]) for (int j = 0; j < int'(LW[d]); j++) pat[j] = dict_pat[d][i][j];
        dict_ld_en = '0; dict_ld_en[d] = 1'b1;
        dict_ld_addr = DAW'(i); dict_ld_data = pat;
        @(negedge clk);
      end
    end
    dict_ld_en = '0;
    @(negedge clk);

    // fetch every line
    for (int n = 0; n < int'(N_LINES); n++) begin
      if ($urandom_range(0, 3) == 0) begin
        addr_valid = 1'b0;
        @(negedge clk);
      end
      addr_valid = 1'b1; uaddr = UAW'(n);
      q_addr.push_back(n); q_cycle.push_back(cycle);
      @(negedge clk);
    end
    addr_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != int'(N_LINES) || q_addr.size() != 0) begin
      failures++; $display("FAIL %s: %0d outputs for %0d fetches", NAME, n_out, N_LINES);
    end
    done = 1'b1;
  end
endmodule
