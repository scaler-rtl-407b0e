// tb_scaler_full: the accelerator with every parameter at its default
// (65536-row dense buffers, 64-slot LMs, 1024-slot SM, 64-dataword prefetch
// buffers) factorising a 160 x 160 sparse matrix end to end (about 140 levels,
// 10,000 dependency updates, 20,000 checked L/U entries). With caches this
// large nothing is evicted, so the SM miss path and prefetch stalls are
// reported but not required here (tb_scaler_top exercises them).
module tb_scaler_full;
  logic clk, rst_n, start, ready, busy, done;
  logic a_ar_valid [12], a_ar_ready [12], a_r_valid [12];
  scaler_pkg::haddr_t a_ar_addr [12];
  scaler_pkg::dword_t a_r_data [12];
  logic m_ar_valid [2], m_ar_ready [2], m_r_valid [2];
  scaler_pkg::haddr_t m_ar_addr [2];
  scaler_pkg::dword_t m_r_data [2];
  logic lu_aw_valid [12], lu_aw_ready [12], lu_ar_valid [12], lu_ar_ready [12], lu_r_valid [12];
  scaler_pkg::haddr_t lu_aw_addr, lu_ar_addr;
  scaler_pkg::dword_t lu_w_data;
  scaler_pkg::dword_t lu_r_data [12];
  logic [31:0] lm_hits, lm_misses, sm_hits, sm_misses, piv_fixes, pf_stall_cycles;
  logic [31:0] barrier_cycles, levels_done, lu_overflows, lu_words_written, meta_reads;

  scaler_bench #(.N(160), .WORDS(4096), .REQUIRE_ALL(1'b0), .MAX_CYCLES(4000000)) u_bench (
    .clk,
    .rst_n,
    .start,
    .ready,
    .busy,
    .done,
    .a_ar_valid,
    .a_ar_ready,
    .a_ar_addr,
    .a_r_valid,
    .a_r_data,
    .m_ar_valid,
    .m_ar_ready,
    .m_ar_addr,
    .m_r_valid,
    .m_r_data,
    .lu_aw_valid,
    .lu_aw_ready,
    .lu_aw_addr,
    .lu_w_data,
    .lu_ar_valid,
    .lu_ar_ready,
    .lu_ar_addr,
    .lu_r_valid,
    .lu_r_data,
    .lm_hits,
    .lm_misses,
    .sm_hits,
    .sm_misses,
    .piv_fixes,
    .pf_stall_cycles,
    .barrier_cycles,
    .levels_done,
    .lu_overflows,
    .lu_words_written,
    .meta_reads
  );

  scaler_top dut (
    .clk,
    .rst_n,
    .start,
    .ready,
    .busy,
    .done,
    .a_ar_valid,
    .a_ar_ready,
    .a_ar_addr,
    .a_r_valid,
    .a_r_data,
    .m_ar_valid,
    .m_ar_ready,
    .m_ar_addr,
    .m_r_valid,
    .m_r_data,
    .lu_aw_valid,
    .lu_aw_ready,
    .lu_aw_addr,
    .lu_w_data,
    .lu_ar_valid,
    .lu_ar_ready,
    .lu_ar_addr,
    .lu_r_valid,
    .lu_r_data,
    .lm_hits,
    .lm_misses,
    .sm_hits,
    .sm_misses,
    .piv_fixes,
    .pf_stall_cycles,
    .barrier_cycles,
    .levels_done,
    .lu_overflows,
    .lu_words_written,
    .meta_reads
  );

endmodule
