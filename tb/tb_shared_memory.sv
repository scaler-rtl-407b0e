// tb_shared_memory: checks the shared memory with four requesting PEGs, a
// random-stall L/U writer port and 12 behavioural L/U channels.
//  * a column written by a PEG is passed to the writer port unchanged and in
//    order, and can then be read back from the store (hit);
//  * a column not held is fetched from its reserved L/U datawords on channel
//    col mod 12, dummy lanes are skipped, and a second read hits;
//  * an all-dummy column ends with rd_done and no elements, also on a hit;
//  * a column longer than the store's capacity is streamed in full but not
//    kept, so reading it again fetches it again;
//  * four PEGs asking at once are all served, one at a time.
module tb_shared_memory;
  import scaler_pkg::*;

  localparam int NP = 4, NCH = 12, MAXN = 16;
  logic   clk = 1'b0, rst_n = 1'b0;
  logic   rd_req_valid [NP], rd_req_ready [NP], rd_valid [NP], rd_done [NP];
  idx_t   rd_req_col [NP], rd_req_lu_cnt [NP];
  haddr_t rd_req_lu_off [NP];
  elem_t  rd_elem;
  logic   wr_valid [NP], wr_ready [NP], wr_last [NP];
  elem_t  wr_elem [NP];
  idx_t   wr_col [NP], wr_lu_cnt [NP];
  haddr_t wr_lu_off [NP];
  logic   out_valid, out_ready = 1'b0, out_last;
  elem_t  out_elem;
  idx_t   out_col, out_lu_cnt;
  haddr_t out_lu_off;
  logic   ar_valid [NCH], ar_ready [NCH], r_valid [NCH];
  haddr_t ar_addr, ar_a [NCH];
  dword_t r_data [NCH];
  logic   aw_valid [NCH], aw_ready [NCH];
  haddr_t aw_addr [NCH];
  dword_t w_data [NCH];
  logic   idle;
  logic [31:0] sm_hits, sm_misses;
  int     checks = 0, failures = 0;
  elem_t  outq [$];

  always_comb for (int c = 0; c < NCH; c++) begin
    ar_a[c] = ar_addr; aw_valid[c] = 1'b0; aw_addr[c] = '0; w_data[c] = '0;
  end

  hbm_model #(.NCH(NCH), .WORDS(64), .LAT(5)) u_m (
    .clk, .ar_valid, .ar_ready, .ar_addr (ar_a), .r_valid, .r_data,
    .aw_valid, .aw_ready, .aw_addr, .w_data
  );
  shared_memory #(.NUM_PEG(NP), .NUM_CH(NCH), .SLOTS(4), .MAX_NNZ(MAXN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) out_ready <= ($urandom % 4 != 0);
  always @(posedge clk)
    if (out_valid && out_ready) outq.push_back(out_elem);

  function automatic elem_t mk(int col, int i);
    return '{val: 32'(col * 1000 + i), col: 16'(col), row: 16'(i * 2 + 1)};
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write_col(int g, int col, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_valid[g] = 1'b1; wr_elem[g] = mk(col, i); wr_last[g] = (i == n - 1);
      wr_col[g] = 16'(col); wr_lu_off[g] = 32'(col); wr_lu_cnt[g] = 16'((n + 7) / 8);
      #1;
      while (!wr_ready[g]) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 wr_valid[g] = 1'b0;
    end
  endtask

  // place column col with n elements at L/U words off.. on channel col % NCH
  task automatic put_col(int col, int off, int n, int cnt);
    for (int w = 0; w < cnt; w++)
      for (int l = 0; l < 8; l++)
        u_m.mem[col % NCH][off + w][l*64 +: 64] = (w * 8 + l < n) ? mk(col, w * 8 + l) : DUMMY_ELEM;
  endtask

  task automatic read_col(int g, int col, int off, int cnt, int n, string what);
    int got;
    bit bad, fin;
    got = 0;
    bad = 1'b0;
    @(negedge clk);
    rd_req_valid[g] = 1'b1; rd_req_col[g] = 16'(col);
    rd_req_lu_off[g] = 32'(off); rd_req_lu_cnt[g] = 16'(cnt);
    #1;
    while (!rd_req_ready[g]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 rd_req_valid[g] = 1'b0;
    fin = 1'b0;
    while (!fin) begin
      @(negedge clk);
      if (rd_valid[g]) begin
        if (rd_elem != mk(col, got)) bad = 1'b1;
        got++;
      end
      fin = rd_done[g];
    end
    check(!bad && got == n, $sformatf("%s: PEG %0d column %0d got %0d elements (%0s), expected %0d",
                                      what, g, col, got, bad ? "wrong data" : "data ok", n));
  endtask

  initial begin
    int h, m;
    for (int g = 0; g < NP; g++) begin
      rd_req_valid[g] = 1'b0; wr_valid[g] = 1'b0; wr_last[g] = 1'b0; wr_elem[g] = '0;
      rd_req_col[g] = '0; rd_req_lu_off[g] = '0; rd_req_lu_cnt[g] = '0;
      wr_col[g] = '0; wr_lu_off[g] = '0; wr_lu_cnt[g] = '0;
    end
    for (int c = 0; c < NCH; c++) for (int a = 0; a < 64; a++) u_m.mem[c][a] = '1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;

    // write then read back
    write_col(0, 5, 11);
    write_col(3, 6, 1);
    repeat (4) @(negedge clk);
    check(outq.size() == 12, $sformatf("writer port saw %0d elements, expected 12", outq.size()));
    for (int i = 0; i < 11 && outq.size() > 0; i++)
      check(outq.pop_front() == mk(5, i), $sformatf("writer port element %0d of column 5", i));
    if (outq.size() > 0) check(outq.pop_front() == mk(6, 0), "writer port element of column 6");
    read_col(1, 5, 0, 0, 11, "hit");
    read_col(2, 6, 0, 0, 1, "one-element hit");
    check(sm_hits == 2 && sm_misses == 0, $sformatf("hits %0d misses %0d after write-back reads", sm_hits, sm_misses));

    // miss, fetched from HBM, then hit
    put_col(17, 10, 13, 3);
    read_col(2, 17, 10, 3, 13, "miss");
    read_col(0, 17, 10, 3, 13, "hit after fetch");
    check(sm_hits == 3 && sm_misses == 1, $sformatf("hits %0d misses %0d after fetch", sm_hits, sm_misses));

    // empty column
    put_col(30, 20, 0, 1);
    read_col(1, 30, 20, 1, 0, "empty miss");
    read_col(1, 30, 20, 1, 0, "empty hit");

    // too long to keep
    put_col(31, 30, 20, 3);
    read_col(3, 31, 30, 3, 20, "long miss");
    m = sm_misses;
    read_col(3, 31, 30, 3, 20, "long again");
    check(sm_misses == m + 1, "a column over capacity must not be kept");

    // concurrent readers; columns 5 and 17 share a slot, so they evict each other
    put_col(5, 40, 11, 2);
    h = sm_hits + sm_misses;
    fork
      begin read_col(0, 5, 40, 2, 11, "concurrent"); end
      begin read_col(1, 17, 10, 3, 13, "concurrent"); end
      begin read_col(2, 5, 40, 2, 11, "concurrent"); end
      begin read_col(3, 17, 10, 3, 13, "concurrent"); end
    join
    check(sm_hits + sm_misses == h + 4, "four concurrent reads served");
    @(negedge clk);
    check(idle, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
