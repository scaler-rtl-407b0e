// tb_peg: checks one processing element group factorising a whole random
// 40 x 40 sparse matrix column by column, against a bit-exact reference.
// The reference uses the same single-precision operations in the same order
// (x(r) <- x(r) - L(r,k) * x(k) for dependencies k in ascending order, one
// rounding after the multiply and one after the subtract, then division by
// the guarded pivot), so every output element must match exactly.
// Models around the PEG, all with random stalls or gaps:
//  * task source: a header word per column and one word per dependency k;
//  * prefetcher: the column's matrix-A datawords, packed eight elements per
//    dataword with no two rows of a dataword equal mod 8, col_last at the end;
//  * shared memory: serves any requested finished column (from the
//    reference) with random gaps, rd_done with or after the last element;
//  * result sink: random sm_wr_ready.
// Column 20 is only a zero diagonal, so its pivot must be guarded once.
// The Local Memory has two slots, so both LM hits and misses must occur,
// and every miss must be one shared-memory request.
module tb_peg;
  import scaler_pkg::*;
  import fp32_pkg::*;

  localparam int N = 40, ZCOL = 20;
  logic   clk = 1'b0, rst_n = 1'b0;
  logic   task_valid = 1'b0, task_ready;
  task_t  task_word = '0;
  logic   col_valid = 1'b0, col_ready, col_last = 1'b0;
  dword_t col_data = '0;
  logic   sm_rd_req_valid, sm_rd_req_ready = 1'b0, sm_rd_valid = 1'b0, sm_rd_done = 1'b0;
  idx_t   sm_rd_req_col, sm_rd_req_lu_cnt;
  haddr_t sm_rd_req_lu_off;
  elem_t  sm_rd_elem = '0;
  logic   sm_wr_valid, sm_wr_ready = 1'b0, sm_wr_last;
  elem_t  sm_wr_elem;
  idx_t   sm_wr_col, sm_wr_lu_cnt;
  haddr_t sm_wr_lu_off;
  logic   col_done, init_done, idle;
  logic [31:0] lm_hits, lm_misses, piv_fixes;
  int     checks = 0, failures = 0;

  fp32_t  a   [N][N];
  bit     ap  [N][N];
  fp32_t  res [N][N];             // finished columns: U above / on, L below the diagonal
  bit     rp  [N][N];
  int     deps [N][$];
  dword_t words [N][$];
  int     ref_fixes = 0;
  int     ndeps_total = 0, sm_requests = 0, cols_done = 0, out_col = 0, out_seen = 0;
  bit     seen [N];

  peg #(.MAX_N(64), .LM_SLOTS(2), .MAX_NNZ(32), .TASK_DEPTH(8), .OUT_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference factorisation in the PEG's operation order
  task automatic reference();
    for (int j = 0; j < N; j++) begin
      fp32_t x [N];
      bit    t [N];
      fp32_t piv;
      for (int r = 0; r < N; r++) begin x[r] = ap[r][j] ? a[r][j] : 32'h0; t[r] = ap[r][j]; end
      for (int kk = 0; kk < j; kk++)
        if (t[kk]) begin
          deps[j].push_back(kk);
          for (int r = kk + 1; r < N; r++)
            if (rp[r][kk]) begin
              x[r] = fsub(t[r] ? x[r] : 32'h0, fmul(res[r][kk], x[kk]));
              t[r] = 1'b1;
            end
        end
      piv = t[j] ? x[j] : 32'h0;
      if (is_tiny(piv, 8'd100)) ref_fixes++;
      if (is_tiny(piv, 8'd100)) piv = {piv[31] & (piv[30:23] != 8'h00), 8'd100, 23'h0};
      t[j] = 1'b1;
      x[j] = piv;
      for (int r = 0; r < N; r++) begin
        rp[r][j]  = t[r];
        res[r][j] = (r > j) ? fdiv(x[r], piv) : x[r];
      end
      ndeps_total += deps[j].size();
    end
  endtask

  // matrix-A packing: rows ascending, a new dataword when a row's bank repeats
  task automatic pack();
    for (int j = 0; j < N; j++) begin
      dword_t w;
      bit     used [8];
      int     lane;
      lane = 0;
      w = '1;
      for (int b = 0; b < 8; b++) used[b] = 1'b0;
      for (int r = 0; r < N; r++)
        if (ap[r][j]) begin
          if (used[r % 8] || lane == 8) begin
            words[j].push_back(w);
            w = '1;
            lane = 0;
            for (int b = 0; b < 8; b++) used[b] = 1'b0;
          end
          w[lane*64 +: 64] = elem_t'{val: a[r][j], col: 16'(j), row: 16'(r)};
          used[r % 8] = 1'b1;
          lane++;
        end
      if (lane > 0) words[j].push_back(w);
    end
  endtask

  // task words
  initial begin
    @(posedge rst_n);
    for (int j = 0; j < N; j++) begin
      int nw;
      nw = words[j].size();
      for (int i = -1; i < int'(deps[j].size()); i++) begin
        task_t t;
        if (i < 0)
          t = '{is_dep: 1'b0, last: (deps[j].size() == 0), col: 16'(j), a_off: 32'(j * 8),
                a_cnt: 16'(nw), lu_off: 32'(1000 + j * 8), lu_cnt: 16'(j % 5 + 1)};
        else
          t = '{is_dep: 1'b1, last: (i == deps[j].size() - 1), col: 16'(deps[j][i]),
                a_off: '0, a_cnt: '0, lu_off: 32'(1000 + deps[j][i] * 8),
                lu_cnt: 16'(deps[j][i] % 5 + 1)};
        repeat (int'($urandom % 3)) @(negedge clk);
        @(negedge clk);
        task_valid = 1'b1;
        task_word  = t;
        #1;
        while (!task_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1 task_valid = 1'b0;
      end
    end
  end

  // matrix-A datawords
  initial begin
    @(posedge rst_n);
    for (int j = 0; j < N; j++)
      foreach (words[j][i]) begin
        repeat (int'($urandom % 3)) @(negedge clk);
        @(negedge clk);
        col_valid = 1'b1;
        col_data  = words[j][i];
        col_last  = (i == words[j].size() - 1);
        #1;
        while (!col_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1 col_valid = 1'b0;
      end
  end

  // shared memory model
  initial begin
    @(posedge rst_n);
    forever begin
      int kk, n;
      @(negedge clk);
      sm_rd_req_ready = ($urandom % 2 == 0);
      #1;
      if (sm_rd_req_valid && sm_rd_req_ready) begin
        kk = int'(sm_rd_req_col);
        sm_requests++;
        check(sm_rd_req_lu_off == 32'(1000 + kk * 8) && sm_rd_req_lu_cnt == 16'(kk % 5 + 1),
              $sformatf("shared-memory request for column %0d carries the wrong L/U layout", kk));
        @(negedge clk);
        sm_rd_req_ready = 1'b0;
        n = 0;
        for (int r = 0; r < N; r++) if (rp[r][kk]) n++;
        for (int r = 0; r < N; r++)
          if (rp[r][kk]) begin
            n--;
            while ($urandom % 3 == 0) begin
              sm_rd_valid = 1'b0;
              @(negedge clk);
            end
            sm_rd_valid = 1'b1;
            sm_rd_elem  = '{val: res[r][kk], col: 16'(kk), row: 16'(r)};
            sm_rd_done  = (n == 0) && ($urandom % 2 == 0);
            @(negedge clk);
            if (sm_rd_done) break;
          end
        if (!sm_rd_done) begin
          sm_rd_valid = 1'b0;
          sm_rd_done  = 1'b1;
          @(negedge clk);
        end
        sm_rd_valid = 1'b0;
        sm_rd_done  = 1'b0;
      end
    end
  end

  // result sink
  always @(negedge clk) sm_wr_ready <= ($urandom % 4 != 0);
  always @(posedge clk) begin
    if (rst_n && col_done) cols_done++;
    if (sm_wr_valid && sm_wr_ready) begin
      elem_t e;
      int r;
      e = sm_wr_elem;
      r = int'(e.row);
      check(sm_wr_col == 16'(out_col) && e.col == 16'(out_col) &&
            sm_wr_lu_off == 32'(1000 + out_col * 8) && sm_wr_lu_cnt == 16'(out_col % 5 + 1),
            $sformatf("result element tagged column %0d/%0d, expected %0d", sm_wr_col, e.col, out_col));
      if (r >= N || !rp[r][out_col] || seen[r])
        check(1'b0, $sformatf("column %0d: unexpected or repeated row %0d", out_col, r));
      else begin
        seen[r] = 1'b1;
        out_seen++;
        check(e.val == res[r][out_col],
              $sformatf("column %0d row %0d: got %h expected %h", out_col, r, e.val, res[r][out_col]));
      end
      if (sm_wr_last) begin
        int n;
        n = 0;
        for (int i = 0; i < N; i++) begin if (rp[i][out_col]) n++; seen[i] = 1'b0; end
        check(out_seen == n, $sformatf("column %0d: %0d of %0d elements", out_col, out_seen, n));
        out_seen = 0;
        out_col++;
      end
    end
  end

  initial begin
    for (int c = 0; c < N; c++)
      for (int r = 0; r < N; r++) begin
        ap[r][c] = (r == c) || ($urandom % 100 < 9);
        a[r][c]  = (r == c) ? tb_fp_util::r2f(4.0 + real'($urandom % 100) / 50.0)
                            : tb_fp_util::r2f((real'($urandom % 2001) - 1000.0) / 1000.0);
        if (c == ZCOL) begin ap[r][c] = (r == c); a[r][c] = 32'h0; end
      end
    reference();
    pack();
    $display("matrix: %0d columns, %0d dependencies", N, ndeps_total);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    while (out_col < N || cols_done < N) @(negedge clk);
    repeat (3) @(negedge clk);
    check(cols_done == N, $sformatf("col_done pulsed %0d times", cols_done));
    check(idle, "idle at the end");
    check(lm_hits + lm_misses == 32'(ndeps_total),
          $sformatf("LM lookups %0d, dependencies %0d", lm_hits + lm_misses, ndeps_total));
    check(lm_hits > 0 && lm_misses > 0, $sformatf("LM hits %0d misses %0d", lm_hits, lm_misses));
    check(32'(sm_requests) == lm_misses, $sformatf("%0d SM requests for %0d LM misses", sm_requests, lm_misses));
    check(piv_fixes == 1, $sformatf("piv_fixes %0d, expected 1", piv_fixes));
    $display("LM hits %0d misses %0d, reference pivot fixes %0d", lm_hits, lm_misses, ref_fixes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired at column %0d", out_col);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
