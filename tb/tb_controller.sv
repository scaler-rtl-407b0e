// tb_controller: checks the controller against behavioural metadata
// channels, four PEG models and a data-request sink, all with random
// back-pressure.
// A random 14-column dependency graph is levelled and written out as the
// metadata arrays (LevelPtr, LevelColIdx, DepPtr, DepIdx, matrix-A and L/U
// DatawordOffset/Count) behind the two headers. The controller must then
// emit, level by level and in LevelColIdx order, a header task word to PEG
// col mod 4 with the column's layouts, one data request with the matrix-A
// layout, and a task word per dependency with that column's L/U layout, with
// 'last' on the final word of each column. No column of a level may be sent
// before every column of the previous level has reported col_done, and the
// controller must wait for sys_idle, end with done, and count the levels.
module tb_controller;
  import scaler_pkg::*;

  localparam int NP = 4, N = 14;
  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0, done, busy;
  logic   m_req_valid [2], m_req_ready [2], m_resp_valid [2];
  haddr_t m_req_base;
  logic [31:0] m_req_idx;
  meta_t  m_resp_data [2];
  logic   task_valid [NP], task_ready [NP];
  task_t  task_word;
  logic   dreq_valid, dreq_ready = 1'b0;
  idx_t   dreq_col, dreq_cnt;
  haddr_t dreq_off;
  logic   col_done [NP];
  logic   sys_idle = 1'b1;
  logic [31:0] levels_done, barrier_cycles;
  int     checks = 0, failures = 0;

  int     meta [2][int];          // [channel][dataword * 16 + entry]
  int     dep [N][$];
  int     level [N], nlev;
  int     aoff [N], acnt [N], luoff [N], lucnt [N];
  int     lev_of_pos [$];
  task_t  exp_task [$];
  int     exp_dst [$];
  int     exp_dreq [$];           // column indices in order
  int     done_count, cycle;
  int     done_before_level [64]; // columns in levels below l
  int     cur_level;
  int     pend [NP][$];
  int     sys_low;

  controller #(.NUM_PEG(NP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // metadata channels: accept with random stalls, answer after 1 to 4 cycles
  for (genvar ch = 0; ch < 2; ch++) begin : g_meta
    int wait_n = -1;
    int key;
    always @(negedge clk) m_req_ready[ch] <= ($urandom % 3 != 0) && wait_n < 0;
    always @(posedge clk) begin
      m_resp_valid[ch] <= 1'b0;
      if (wait_n > 0) wait_n <= wait_n - 1;
      else if (wait_n == 0) begin
        m_resp_valid[ch] <= 1'b1;
        m_resp_data[ch]  <= meta[ch].exists(key) ? 32'(meta[ch][key]) : 32'hDEAD_BEEF;
        if (!meta[ch].exists(key)) begin
          failures++;
          $display("FAIL: read of unwritten metadata channel %0d entry %0d", ch, key);
        end
        wait_n <= -1;
      end
      if (m_req_valid[ch] && m_req_ready[ch]) begin
        key    <= int'(m_req_base) * 16 + int'(m_req_idx);
        wait_n <= int'($urandom % 4);
      end
    end
  end

  // PEG models: random task_ready, col_done some cycles after a column's last task word
  always @(negedge clk) begin
    for (int g = 0; g < NP; g++) task_ready[g] <= ($urandom % 3 != 0);
    dreq_ready <= ($urandom % 2 != 0);
    if (sys_low > 0) begin sys_low--; sys_idle <= 1'b0; end
    else sys_idle <= 1'b1;
  end

  always @(posedge clk) begin
    cycle++;
    for (int g = 0; g < NP; g++) begin
      col_done[g] <= 1'b0;
      if (pend[g].size() > 0 && pend[g][0] <= cycle) begin
        void'(pend[g].pop_front());
        col_done[g] <= 1'b1;
        done_count++;
        if (pend[g].size() == 0 && ($urandom % 2 == 0)) sys_low = 1 + int'($urandom % 6);
      end
    end
    for (int g = 0; g < NP; g++)
      if (task_valid[g] && task_ready[g]) begin
        if (exp_task.size() == 0) check(1'b0, "task word beyond the schedule");
        else begin
          task_t t;
          int d;
          t = exp_task.pop_front();
          d = exp_dst.pop_front();
          check(task_word == t && g == d,
                $sformatf("task to PEG %0d: got %p expected %p to PEG %0d", g, task_word, t, d));
          if (!task_word.is_dep) begin
            while (cur_level < nlev && level[task_word.col] > cur_level) cur_level++;
            check(done_count >= done_before_level[level[task_word.col]],
                  $sformatf("column %0d of level %0d sent before the previous level finished",
                            task_word.col, level[task_word.col]));
          end
          if (task_word.last) pend[g].push_back(cycle + 1 + int'($urandom % 12));
        end
      end
    if (dreq_valid && dreq_ready) begin
      if (exp_dreq.size() == 0) check(1'b0, "data request beyond the schedule");
      else begin
        int c;
        c = exp_dreq.pop_front();
        check(dreq_col == 16'(c) && dreq_off == 32'(aoff[c]) && dreq_cnt == 16'(acnt[c]),
              $sformatf("data request col %0d off %0d cnt %0d, expected column %0d", dreq_col, dreq_off, dreq_cnt, c));
      end
    end
  end

  initial begin
    int lp [$], lc [$], dp [$], di [$];
    int levptr_b, levcol_b, depptr_b, depidx_b, aoff_b, acnt_b, luoff_b, lucnt_b;
    cycle = 0; done_count = 0; cur_level = 0; sys_low = 0;
    for (int g = 0; g < NP; g++) col_done[g] = 1'b0;
    // random graph and levels
    nlev = 0;
    for (int j = 0; j < N; j++) begin
      level[j] = 0;
      for (int k = 0; k < j; k++)
        if ($urandom % 100 < 25) begin
          dep[j].push_back(k);
          if (level[k] + 1 > level[j]) level[j] = level[k] + 1;
        end
      if (level[j] + 1 > nlev) nlev = level[j] + 1;
      aoff[j] = 100 + j * 7; acnt[j] = 1 + j % 4; luoff[j] = 500 + j * 11; lucnt[j] = 1 + j % 3;
    end
    // arrays in level order; DepPtr indexed by level position
    dp.push_back(0);
    for (int l = 0; l < nlev; l++) begin
      lp.push_back(lc.size());
      done_before_level[l] = lc.size();
      for (int j = 0; j < N; j++)
        if (level[j] == l) begin
          lc.push_back(j);
          foreach (dep[j][i]) di.push_back(dep[j][i]);
          dp.push_back(di.size());
          exp_task.push_back('{is_dep: 1'b0, last: (dep[j].size() == 0), col: 16'(j),
                               a_off: 32'(aoff[j]), a_cnt: 16'(acnt[j]),
                               lu_off: 32'(luoff[j]), lu_cnt: 16'(lucnt[j])});
          exp_dst.push_back(j % NP);
          exp_dreq.push_back(j);
          foreach (dep[j][i]) begin
            int k;
            k = dep[j][i];
            exp_task.push_back('{is_dep: 1'b1, last: (i == dep[j].size() - 1), col: 16'(k),
                                 a_off: '0, a_cnt: '0,
                                 lu_off: 32'(luoff[k]), lu_cnt: 16'(lucnt[k])});
            exp_dst.push_back(j % NP);
          end
        end
    end
    lp.push_back(lc.size());
    if (di.size() == 0) di.push_back(0);
    levptr_b = 1; levcol_b = 3; depptr_b = 5; depidx_b = 7; aoff_b = 13; acnt_b = 15;
    luoff_b = 2; lucnt_b = 4;
    meta[0][HDR_N] = N;           meta[0][HDR_NLEV] = nlev;
    meta[0][HDR_LEVPTR] = levptr_b; meta[0][HDR_LEVCOL] = levcol_b;
    meta[0][HDR_DEPPTR] = depptr_b; meta[0][HDR_DEPIDX] = depidx_b;
    meta[0][HDR_AOFF] = aoff_b;   meta[0][HDR_ACNT] = acnt_b;
    meta[1][HDR_LUOFF] = luoff_b; meta[1][HDR_LUCNT] = lucnt_b;
    foreach (lp[i]) meta[0][levptr_b * 16 + i] = lp[i];
    foreach (lc[i]) meta[0][levcol_b * 16 + i] = lc[i];
    foreach (dp[i]) meta[0][depptr_b * 16 + i] = dp[i];
    foreach (di[i]) meta[0][depidx_b * 16 + i] = di[i];
    for (int j = 0; j < N; j++) begin
      meta[0][aoff_b * 16 + j] = aoff[j];  meta[0][acnt_b * 16 + j] = acnt[j];
      meta[1][luoff_b * 16 + j] = luoff[j]; meta[1][lucnt_b * 16 + j] = lucnt[j];
    end
    $display("graph: %0d columns, %0d levels, %0d dependencies", N, nlev, di.size());

    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    check(exp_task.size() == 0, $sformatf("%0d task words never sent", exp_task.size()));
    check(exp_dreq.size() == 0, $sformatf("%0d data requests never sent", exp_dreq.size()));
    check(levels_done == 32'(nlev), $sformatf("levels_done %0d, expected %0d", levels_done, nlev));
    check(done_count == N, $sformatf("done reported with %0d of %0d columns finished", done_count, N));
    check(barrier_cycles > 0, "no barrier wait recorded");
    repeat (5) @(negedge clk);
    check(done && !busy, "done must hold until the next start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
