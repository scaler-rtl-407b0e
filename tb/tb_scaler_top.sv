// tb_scaler_top: end-to-end test of the accelerator at reduced buffer sizes.
//
// A 48 x 48 sparse matrix is factorised with tiny Local and Shared Memories
// (2 and 4 column slots of 32 entries) and a 2-dataword prefetch buffer, so
// that every mechanism occurs: LM hits and misses, SM hits, SM misses with
// fetches from the L/U channels, prefetch stalls, level barriers and the
// pivot guard. scaler_bench prepares the data and checks every L/U entry.
module tb_scaler_top;
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

  scaler_bench #(.N(48), .REQUIRE_ALL(1'b1)) u_bench (
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

  scaler_top #(.MAX_N(64), .LM_SLOTS(2), .SM_SLOTS(4), .MAX_NNZ(32), .PF_DEPTH(2)) dut (
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
