// scaler_bench: end-to-end stimulus and checker for scaler_top.
//
// It generates a random sparse matrix A of size N (diagonally dominant, with
// values exactly representable in single precision, a few denser columns and
// one column whose only entry is a zero diagonal), and prepares everything
// the host would: the symbolic L/U pattern, the dependency levels, the four
// dependency arrays, the matrix-A datawords (row-mod-8 packing with dummy
// padding) and both layout arrays, and loads them into HBM models. It then
// starts the accelerator, waits for 'done', reads every L/U column back from
// the L/U channel models and compares it entry by entry with a
// double-precision left-looking factorisation (relative tolerance 1e-3).
// It also counts how often each mechanism of the design occurred and
// fails a mechanism that never did (REQUIRE_ALL selects whether the
// Shared Memory miss path and prefetch stalls must be seen).
// Ends with the TB_RESULT line and $finish; a watchdog ends a stuck run.
module scaler_bench #(
  parameter int unsigned N           = 48,
  parameter int unsigned NUM_PEG     = 12,
  parameter int unsigned WORDS       = 1024,
  parameter int unsigned DENS_PCT    = 8,
  parameter int unsigned SEED        = 1,
  parameter bit          REQUIRE_ALL = 1'b1,
  parameter int unsigned MAX_CYCLES  = 400000
) (
  output logic                clk,
  output logic                rst_n,
  output logic                start,
  input  logic                ready,
  input  logic                busy,
  input  logic                done,
  input  logic                a_ar_valid  [NUM_PEG],
  output logic                a_ar_ready  [NUM_PEG],
  input  scaler_pkg::haddr_t  a_ar_addr   [NUM_PEG],
  output logic                a_r_valid   [NUM_PEG],
  output scaler_pkg::dword_t  a_r_data    [NUM_PEG],
  input  logic                m_ar_valid  [2],
  output logic                m_ar_ready  [2],
  input  scaler_pkg::haddr_t  m_ar_addr   [2],
  output logic                m_r_valid   [2],
  output scaler_pkg::dword_t  m_r_data    [2],
  input  logic                lu_aw_valid [NUM_PEG],
  output logic                lu_aw_ready [NUM_PEG],
  input  scaler_pkg::haddr_t  lu_aw_addr,
  input  scaler_pkg::dword_t  lu_w_data,
  input  logic                lu_ar_valid [NUM_PEG],
  output logic                lu_ar_ready [NUM_PEG],
  input  scaler_pkg::haddr_t  lu_ar_addr,
  output logic                lu_r_valid  [NUM_PEG],
  output scaler_pkg::dword_t  lu_r_data   [NUM_PEG],
  input  logic [31:0]         lm_hits,
  input  logic [31:0]         lm_misses,
  input  logic [31:0]         sm_hits,
  input  logic [31:0]         sm_misses,
  input  logic [31:0]         piv_fixes,
  input  logic [31:0]         pf_stall_cycles,
  input  logic [31:0]         barrier_cycles,
  input  logic [31:0]         levels_done,
  input  logic [31:0]         lu_overflows,
  input  logic [31:0]         lu_words_written,
  input  logic [31:0]         meta_reads
);
  import scaler_pkg::*;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ HBM models
  logic   unused_aw_v [NUM_PEG];
  haddr_t unused_aw_a [NUM_PEG];
  dword_t unused_w_d  [NUM_PEG];
  logic   unused_aw_r [NUM_PEG];
  logic   m_aw_v [2];
  haddr_t m_aw_a [2];
  dword_t m_w_d  [2];
  logic   m_aw_r [2];
  haddr_t lu_aw_a [NUM_PEG], lu_ar_a [NUM_PEG];
  dword_t lu_w_d [NUM_PEG];

  always_comb begin
    for (int c = 0; c < NUM_PEG; c++) begin
      unused_aw_v[c] = 1'b0;
      unused_aw_a[c] = '0;
      unused_w_d[c]  = '0;
      lu_aw_a[c]     = lu_aw_addr;
      lu_ar_a[c]     = lu_ar_addr;
      lu_w_d[c]      = lu_w_data;
    end
    for (int c = 0; c < 2; c++) begin
      m_aw_v[c] = 1'b0;
      m_aw_a[c] = '0;
      m_w_d[c]  = '0;
    end
  end

  hbm_model #(.NCH(NUM_PEG), .WORDS(WORDS)) u_ha (
    .clk, .ar_valid (a_ar_valid), .ar_ready (a_ar_ready), .ar_addr (a_ar_addr),
    .r_valid (a_r_valid), .r_data (a_r_data),
    .aw_valid (unused_aw_v), .aw_ready (unused_aw_r), .aw_addr (unused_aw_a), .w_data (unused_w_d)
  );
  hbm_model #(.NCH(2), .WORDS(WORDS)) u_hm (
    .clk, .ar_valid (m_ar_valid), .ar_ready (m_ar_ready), .ar_addr (m_ar_addr),
    .r_valid (m_r_valid), .r_data (m_r_data),
    .aw_valid (m_aw_v), .aw_ready (m_aw_r), .aw_addr (m_aw_a), .w_data (m_w_d)
  );
  hbm_model #(.NCH(NUM_PEG), .WORDS(WORDS)) u_hl (
    .clk, .ar_valid (lu_ar_valid), .ar_ready (lu_ar_ready), .ar_addr (lu_ar_a),
    .r_valid (lu_r_valid), .r_data (lu_r_data),
    .aw_valid (lu_aw_valid), .aw_ready (lu_aw_ready), .aw_addr (lu_aw_a), .w_data (lu_w_d)
  );

  // ------------------------------------------------------------ helpers
  function automatic real f2r(logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'h00) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  // exact for values of the form k/64 with |k| < 2^20
  function automatic logic [31:0] r2f(real v);
    logic s;
    int   e;
    real  a;
    longint unsigned fr;
    if (v == 0.0) return 32'h0;
    s = v < 0.0;
    a = s ? -v : v;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    fr = longint'((a - 1.0) * 8388608.0);
    return {s, 8'(e + 127), fr[22:0]};
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // ------------------------------------------------------------ matrix and host preparation
  bit  ap  [N][N];   // [row][col]
  real av  [N][N];
  bit  lp  [N][N];   // L/U pattern
  real ref_lu [N][N];
  int  lev [N];
  int  nlev;
  int  levcol [N];
  int  levptr [N+1];
  int  depptr [N+1];
  int  depidx [N*N];
  int  ndep;
  int  a_off [N], a_cnt [N], lu_off [N], lu_cnt [N], lu_nnz [N];
  int  dummy_lanes, mod_breaks, zero_col;

  function automatic void meta_put(int ch, int base, int idx, int val);
    u_hm.mem[ch][base + idx / 16][32 * (idx % 16) +: 32] = 32'(val);
  endfunction

  task automatic prepare();
    int s, pos, aw, lw, b;
    real x [N];
    real piv;
    void'($urandom(SEED));
    zero_col = N / 2;
    for (int c = 0; c < N; c++)
      for (int r = 0; r < N; r++) begin
        int dens;
        dens = (c % 11 == 3) ? 35 : int'(DENS_PCT);
        ap[r][c] = 1'b0;
        av[r][c] = 0.0;
        if (r == c) begin
          ap[r][c] = 1'b1;
          av[r][c] = 4.0 + real'($urandom % 64) / 64.0;
        end else if (c != zero_col && r != zero_col && ($urandom % 100) < dens) begin
          ap[r][c] = 1'b1;
          av[r][c] = (real'($urandom % 128) - 64.0) / 64.0;
        end
      end
    av[zero_col][zero_col] = 0.0;
    // a few entries in row zero_col (dependencies on a column with no L part)
    ap[zero_col][N-1] = 1'b1;
    av[zero_col][N-1] = 0.5;

    // symbolic factorisation and levels (equation 3)
    nlev = 0;
    for (int j = 0; j < N; j++) begin
      for (int r = 0; r < N; r++) lp[r][j] = ap[r][j];
      for (int k = 0; k < j; k++)
        if (lp[k][j])
          for (int r = k + 1; r < N; r++) if (lp[r][k]) lp[r][j] = 1'b1;
      lev[j] = 0;
      for (int k = 0; k < j; k++) if (lp[k][j] && lev[k] + 1 > lev[j]) lev[j] = lev[k] + 1;
      if (lev[j] + 1 > nlev) nlev = lev[j] + 1;
    end

    // numeric reference, left-looking with the same pivot guard
    for (int j = 0; j < N; j++) begin
      for (int r = 0; r < N; r++) x[r] = av[r][j];
      for (int k = 0; k < j; k++)
        if (lp[k][j])
          for (int r = k + 1; r < N; r++) if (lp[r][k]) x[r] = x[r] - ref_lu[r][k] * x[k];
      piv = x[j];
      if (absr(piv) < 2.0 ** (-27)) piv = (piv < 0.0) ? -(2.0 ** (-27)) : (2.0 ** (-27));
      for (int r = 0; r < N; r++) begin
        if (r < j) ref_lu[r][j] = x[r];
        else if (r == j) ref_lu[r][j] = piv;
        else ref_lu[r][j] = x[r] / piv;
      end
    end

    // dependency arrays
    pos = 0;
    ndep = 0;
    for (int l = 0; l < nlev; l++) begin
      levptr[l] = pos;
      for (int j = 0; j < N; j++)
        if (lev[j] == l) begin
          levcol[pos] = j;
          depptr[pos] = ndep;
          for (int k = 0; k < j; k++) if (lp[k][j]) begin depidx[ndep] = k; ndep++; end
          pos++;
        end
    end
    levptr[nlev] = pos;
    depptr[N] = ndep;

    // matrix-A datawords: sequential lanes, a new dataword when row mod 8 repeats
    aw = 0;
    dummy_lanes = 0;
    mod_breaks = 0;
    for (int j = 0; j < N; j++) begin
      logic [7:0] used;
      int lane, w;
      dword_t word;
      a_off[j] = aw;
      w = 0;
      used = '0;
      lane = 0;
      for (int l = 0; l < 8; l++) word[64*l +: 64] = DUMMY_ELEM;
      for (int r = 0; r < N; r++)
        if (ap[r][j]) begin
          if (used[r % 8]) begin
            u_ha.mem[j % NUM_PEG][aw + w] = word;
            dummy_lanes += 8 - lane;
            mod_breaks++;
            w++;
            used = '0;
            lane = 0;
            for (int l = 0; l < 8; l++) word[64*l +: 64] = DUMMY_ELEM;
          end
          word[64*lane +: 64] = {r2f(av[r][j]), 16'(j), 16'(r)};
          used[r % 8] = 1'b1;
          lane++;
        end
      u_ha.mem[j % NUM_PEG][aw + w] = word;
      dummy_lanes += 8 - lane;
      w++;
      a_cnt[j] = w;
      aw += w;
    end

    // L/U layout
    lw = 0;
    for (int j = 0; j < N; j++) begin
      lu_nnz[j] = 0;
      for (int r = 0; r < N; r++) if (lp[r][j]) lu_nnz[j]++;
      lu_off[j] = lw;
      lu_cnt[j] = (lu_nnz[j] + 7) / 8;
      lw += lu_cnt[j];
    end
    if (aw > int'(WORDS) || lw > int'(WORDS)) begin
      $display("bench: matrix does not fit the HBM models");
      failures++;
    end

    // metadata channel 0: header, LevelPtr, LevelColIdx, DepPtr, DepIdx, A offsets, A counts
    b = 1;
    meta_put(0, 0, HDR_N, N);
    meta_put(0, 0, HDR_NLEV, nlev);
    meta_put(0, 0, HDR_LEVPTR, b); for (int i = 0; i <= nlev; i++) meta_put(0, b, i, levptr[i]); b += (nlev + 1 + 15) / 16;
    meta_put(0, 0, HDR_LEVCOL, b); for (int i = 0; i < N; i++)     meta_put(0, b, i, levcol[i]); b += (N + 15) / 16;
    meta_put(0, 0, HDR_DEPPTR, b); for (int i = 0; i <= N; i++)    meta_put(0, b, i, depptr[i]); b += (N + 1 + 15) / 16;
    meta_put(0, 0, HDR_DEPIDX, b); for (int i = 0; i < ndep; i++)  meta_put(0, b, i, depidx[i]); b += (ndep + 15) / 16 + 1;
    meta_put(0, 0, HDR_AOFF, b);   for (int i = 0; i < N; i++)     meta_put(0, b, i, a_off[i]);  b += (N + 15) / 16;
    meta_put(0, 0, HDR_ACNT, b);   for (int i = 0; i < N; i++)     meta_put(0, b, i, a_cnt[i]);
    // metadata channel 1: header, L/U offsets, L/U counts
    b = 1;
    meta_put(1, 0, HDR_LUOFF, b);  for (int i = 0; i < N; i++)     meta_put(1, b, i, lu_off[i]); b += (N + 15) / 16;
    meta_put(1, 0, HDR_LUCNT, b);  for (int i = 0; i < N; i++)     meta_put(1, b, i, lu_cnt[i]);
    $display("bench: N=%0d levels=%0d deps=%0d A-words=%0d LU-words=%0d dummy-lanes=%0d mod8-breaks=%0d",
             N, nlev, ndep, aw, lw, dummy_lanes, mod_breaks);
  endtask

  // ------------------------------------------------------------ check
  task automatic check_result();
    bit seen [N];
    for (int j = 0; j < N; j++) begin
      int found;
      for (int r = 0; r < N; r++) seen[r] = 1'b0;
      found = 0;
      for (int w = 0; w < lu_cnt[j]; w++) begin
        dword_t word;
        word = u_hl.mem[j % NUM_PEG][lu_off[j] + w];
        for (int l = 0; l < 8; l++) begin
          elem_t e;
          e = lane_of(word, l);
          if (e.row != DUMMY_ROW) begin
            int r;
            real hv, rv;
            r = int'(e.row);
            checks++;
            if (r >= int'(N) || int'(e.col) != j || !lp[r][j] || seen[r]) begin
              failures++;
              if (failures < 10) $display("bench: column %0d has unexpected entry row %0d col %0d", j, r, e.col);
            end else begin
              seen[r] = 1'b1;
              found++;
              hv = f2r(e.val);
              rv = ref_lu[r][j];
              if (absr(hv - rv) > 1.0e-3 * (absr(rv) > 1.0 ? absr(rv) : 1.0)) begin
                failures++;
                if (failures < 10) $display("bench: (%0d,%0d) got %f expected %f", r, j, hv, rv);
              end
            end
          end
        end
      end
      checks++;
      if (found != lu_nnz[j]) begin
        failures++;
        if (failures < 10) $display("bench: column %0d has %0d entries, expected %0d", j, found, lu_nnz[j]);
      end
    end
  endtask

  task automatic mech(string name, int unsigned n, bit required);
    $display("bench: %-28s %0d", name, n);
    if (required) begin
      checks++;
      if (n == 0) begin
        failures++;
        $display("bench: mechanism never occurred: %s", name);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    prepare();
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (!ready) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    $display("bench: factorisation finished after %0d cycles", cyc);
    check_result();
    mech("LM hits",                  lm_hits,         1'b1);
    mech("LM misses (SM requests)",  lm_misses,       1'b1);
    mech("SM hits",                  sm_hits,         1'b1);
    mech("SM misses (HBM fetches)",  sm_misses,       REQUIRE_ALL);
    mech("pivot guards",             piv_fixes,       1'b1);
    mech("prefetch stall cycles",    pf_stall_cycles, REQUIRE_ALL);
    mech("level barrier wait cycles", barrier_cycles, 1'b1);
    mech("dummy lanes skipped",      32'(dummy_lanes), 1'b1);
    mech("row-mod-8 dataword breaks", 32'(mod_breaks), 1'b1);
    mech("metadata HBM reads",       meta_reads,      1'b1);
    checks++;
    if (levels_done != 32'(nlev) || lu_overflows != 0 || busy) begin
      failures++;
      $display("bench: levels %0d (expected %0d), overflows %0d", levels_done, nlev, lu_overflows);
    end
    $display("bench: %0d L/U datawords written", lu_words_written);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'(MAX_CYCLES) * 10);
    failures++;
    $display("bench: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
