// scaler_top: stream-aware sparse LU factorization accelerator for an
// FPGA with High Bandwidth Memory (HBM).
//
// The host stores matrix A column by column in a packed coordinate format
// on 12 HBM channels and the dependency/layout metadata on 2 more. The
// controller walks the column dependency levels; for each column it sends a
// PE task to PEG (col mod 12) and asks the data prefetcher to stream the
// column's matrix-A datawords from the Matrix A loader. Each PEG factorises
// its column (left-looking MAC updates, then division by the pivot), taking
// the dependency columns from its Local Memory or from the Shared Memory,
// which fetches from the L/U HBM channels when it misses. Finished columns go
// to the Shared Memory and, through the L/U writer, to 12 L/U HBM channels.
// A level starts only when the previous one has been completely written.
//
// HBM ports (all addresses count 512-bit datawords; reads return data in
// order, any number of cycles after ar_valid && ar_ready; r_valid is never
// back-pressured; a write is one dataword, done on aw_valid && aw_ready):
//   a_*   matrix-A channels 0..11             (read)
//   m_*   metadata channels: [0] dependency metadata and matrix-A layout,
//         [1] L/U layout                      (read)
//   lu_*  L/U channels 14..25 as index 0..11 (write, and read on SM miss)
// Control: pulse start once 'ready' is high (PEG buffers cleared after
// reset); 'done' rises when all levels are finished and written.
// Statistics outputs count the mechanisms of the design (LM hits and misses,
// SM hits and HBM fetches, pivot guards, prefetch stalls, barrier waits).
// Channel counts, PEG count and the 512-bit/64-bit/32-bit formats follow the
// design; buffer sizes and protocols are this implementation's choices.
module scaler_top #(
  parameter int unsigned NUM_PEG    = 12,
  parameter int unsigned MAX_N      = 65536,
  parameter int unsigned LM_SLOTS   = 64,
  parameter int unsigned SM_SLOTS   = 1024,
  parameter int unsigned MAX_NNZ    = 256,
  parameter int unsigned PF_DEPTH   = 64,
  parameter int unsigned MAX_OUT    = 32,
  parameter int unsigned TASK_DEPTH = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                ready,
  output logic                busy,
  output logic                done,
  // matrix-A channels
  output logic                a_ar_valid  [NUM_PEG],
  input  logic                a_ar_ready  [NUM_PEG],
  output scaler_pkg::haddr_t  a_ar_addr   [NUM_PEG],
  input  logic                a_r_valid   [NUM_PEG],
  input  scaler_pkg::dword_t  a_r_data    [NUM_PEG],
  // metadata channels
  output logic                m_ar_valid  [2],
  input  logic                m_ar_ready  [2],
  output scaler_pkg::haddr_t  m_ar_addr   [2],
  input  logic                m_r_valid   [2],
  input  scaler_pkg::dword_t  m_r_data    [2],
  // L/U channels
  output logic                lu_aw_valid [NUM_PEG],
  input  logic                lu_aw_ready [NUM_PEG],
  output scaler_pkg::haddr_t  lu_aw_addr,
  output scaler_pkg::dword_t  lu_w_data,
  output logic                lu_ar_valid [NUM_PEG],
  input  logic                lu_ar_ready [NUM_PEG],
  output scaler_pkg::haddr_t  lu_ar_addr,
  input  logic                lu_r_valid  [NUM_PEG],
  input  scaler_pkg::dword_t  lu_r_data   [NUM_PEG],
  // statistics
  output logic [31:0]         lm_hits,
  output logic [31:0]         lm_misses,
  output logic [31:0]         sm_hits,
  output logic [31:0]         sm_misses,
  output logic [31:0]         piv_fixes,
  output logic [31:0]         pf_stall_cycles,
  output logic [31:0]         barrier_cycles,
  output logic [31:0]         levels_done,
  output logic [31:0]         lu_overflows,
  output logic [31:0]         lu_words_written,
  output logic [31:0]         meta_reads
);
  import scaler_pkg::*;

  // ------------------------------------------------------------- metadata loaders
  logic        ml_req_valid [2], ml_req_ready [2], ml_resp_valid [2];
  haddr_t      ml_req_base;
  logic [31:0] ml_req_idx;
  meta_t       ml_resp_data [2];
  logic [31:0] ml_reads [2];

  for (genvar m = 0; m < 2; m++) begin : g_meta
    metadata_loader u_ml (
      .clk, .rst_n,
      .req_valid (ml_req_valid[m]), .req_ready (ml_req_ready[m]),
      .req_base (ml_req_base), .req_idx (ml_req_idx),
      .resp_valid (ml_resp_valid[m]), .resp_data (ml_resp_data[m]),
      .ar_valid (m_ar_valid[m]), .ar_ready (m_ar_ready[m]), .ar_addr (m_ar_addr[m]),
      .r_valid (m_r_valid[m]), .r_data (m_r_data[m]),
      .hbm_reads (ml_reads[m])
    );
  end
  assign meta_reads = ml_reads[0] + ml_reads[1];

  // ------------------------------------------------------------- controller
  logic   tk_valid [NUM_PEG], tk_ready [NUM_PEG];
  task_t  tk_word;
  logic   dreq_valid, dreq_ready;
  idx_t   dreq_col, dreq_cnt;
  haddr_t dreq_off;
  logic   col_done [NUM_PEG];
  logic   sys_idle, sm_idle, wr_idle;

  controller #(.NUM_PEG(NUM_PEG)) u_ctrl (
    .clk, .rst_n, .start, .done, .busy,
    .m_req_valid (ml_req_valid), .m_req_ready (ml_req_ready),
    .m_req_base (ml_req_base), .m_req_idx (ml_req_idx),
    .m_resp_valid (ml_resp_valid), .m_resp_data (ml_resp_data),
    .task_valid (tk_valid), .task_ready (tk_ready), .task_word (tk_word),
    .dreq_valid, .dreq_ready, .dreq_col, .dreq_off, .dreq_cnt,
    .col_done, .sys_idle, .levels_done, .barrier_cycles
  );

  // ------------------------------------------------------------- prefetcher + loader
  logic        ld_cmd_valid [NUM_PEG], ld_cmd_ready [NUM_PEG], ld_issue_ok [NUM_PEG];
  haddr_t      ld_cmd_addr  [NUM_PEG];
  idx_t        ld_cmd_cnt   [NUM_PEG];
  logic [15:0] ld_out       [NUM_PEG];
  logic        ld_valid     [NUM_PEG];
  dword_t      ld_data      [NUM_PEG];
  logic        ld_busy, pf_busy;
  logic        cd_valid [NUM_PEG], cd_ready [NUM_PEG], cd_last [NUM_PEG];
  dword_t      cd_data  [NUM_PEG];

  matrix_a_loader #(.NUM_CH(NUM_PEG), .MAX_OUT(MAX_OUT)) u_aload (
    .clk, .rst_n,
    .cmd_valid (ld_cmd_valid), .cmd_ready (ld_cmd_ready),
    .cmd_addr (ld_cmd_addr), .cmd_cnt (ld_cmd_cnt),
    .issue_ok (ld_issue_ok), .outstanding (ld_out), .busy (ld_busy),
    .ar_valid (a_ar_valid), .ar_ready (a_ar_ready), .ar_addr (a_ar_addr),
    .r_valid (a_r_valid), .r_data (a_r_data),
    .out_valid (ld_valid), .out_data (ld_data)
  );

  data_prefetcher #(.NUM_CH(NUM_PEG), .PF_DEPTH(PF_DEPTH)) u_pf (
    .clk, .rst_n,
    .dreq_valid, .dreq_ready, .dreq_col, .dreq_off, .dreq_cnt,
    .ld_cmd_valid, .ld_cmd_ready, .ld_cmd_addr, .ld_cmd_cnt,
    .ld_issue_ok, .ld_outstanding (ld_out), .ld_valid, .ld_data,
    .col_valid (cd_valid), .col_ready (cd_ready), .col_data (cd_data), .col_last (cd_last),
    .busy (pf_busy), .stall_cycles (pf_stall_cycles)
  );

  // ------------------------------------------------------------- PEGs
  logic        rq_valid [NUM_PEG], rq_ready [NUM_PEG];
  idx_t        rq_col   [NUM_PEG], rq_cnt [NUM_PEG];
  haddr_t      rq_off   [NUM_PEG];
  logic        rs_valid [NUM_PEG], rs_done [NUM_PEG];
  elem_t       rs_elem;
  logic        wv [NUM_PEG], wrdy [NUM_PEG], wl [NUM_PEG];
  elem_t       we [NUM_PEG];
  idx_t        wc [NUM_PEG], wcnt [NUM_PEG];
  haddr_t      woff [NUM_PEG];
  logic        pinit [NUM_PEG], pidle [NUM_PEG];
  logic [31:0] p_lmh [NUM_PEG], p_lmm [NUM_PEG], p_pf [NUM_PEG];

  for (genvar g = 0; g < NUM_PEG; g++) begin : g_peg
    peg #(.MAX_N(MAX_N), .LM_SLOTS(LM_SLOTS), .MAX_NNZ(MAX_NNZ), .TASK_DEPTH(TASK_DEPTH)) u_peg (
      .clk, .rst_n,
      .task_valid (tk_valid[g]), .task_ready (tk_ready[g]), .task_word (tk_word),
      .col_valid (cd_valid[g]), .col_ready (cd_ready[g]), .col_data (cd_data[g]), .col_last (cd_last[g]),
      .sm_rd_req_valid (rq_valid[g]), .sm_rd_req_ready (rq_ready[g]),
      .sm_rd_req_col (rq_col[g]), .sm_rd_req_lu_off (rq_off[g]), .sm_rd_req_lu_cnt (rq_cnt[g]),
      .sm_rd_valid (rs_valid[g]), .sm_rd_done (rs_done[g]), .sm_rd_elem (rs_elem),
      .sm_wr_valid (wv[g]), .sm_wr_ready (wrdy[g]), .sm_wr_elem (we[g]), .sm_wr_last (wl[g]),
      .sm_wr_col (wc[g]), .sm_wr_lu_off (woff[g]), .sm_wr_lu_cnt (wcnt[g]),
      .col_done (col_done[g]), .init_done (pinit[g]), .idle (pidle[g]),
      .lm_hits (p_lmh[g]), .lm_misses (p_lmm[g]), .piv_fixes (p_pf[g])
    );
  end

  always_comb begin
    ready     = 1'b1;
    lm_hits   = '0;
    lm_misses = '0;
    piv_fixes = '0;
    for (int g = 0; g < NUM_PEG; g++) begin
      ready     &= pinit[g];
      lm_hits   += p_lmh[g];
      lm_misses += p_lmm[g];
      piv_fixes += p_pf[g];
    end
  end

  // ------------------------------------------------------------- shared memory + writer
  logic   o_valid, o_ready, o_last;
  elem_t  o_elem;
  idx_t   o_col, o_cnt;
  haddr_t o_off;

  shared_memory #(.NUM_PEG(NUM_PEG), .NUM_CH(NUM_PEG), .SLOTS(SM_SLOTS), .MAX_NNZ(MAX_NNZ)) u_sm (
    .clk, .rst_n,
    .rd_req_valid (rq_valid), .rd_req_ready (rq_ready), .rd_req_col (rq_col),
    .rd_req_lu_off (rq_off), .rd_req_lu_cnt (rq_cnt),
    .rd_valid (rs_valid), .rd_done (rs_done), .rd_elem (rs_elem),
    .wr_valid (wv), .wr_ready (wrdy), .wr_elem (we), .wr_last (wl),
    .wr_col (wc), .wr_lu_off (woff), .wr_lu_cnt (wcnt),
    .out_valid (o_valid), .out_ready (o_ready), .out_elem (o_elem), .out_last (o_last),
    .out_col (o_col), .out_lu_off (o_off), .out_lu_cnt (o_cnt),
    .ar_valid (lu_ar_valid), .ar_ready (lu_ar_ready), .ar_addr (lu_ar_addr),
    .r_valid (lu_r_valid), .r_data (lu_r_data),
    .idle (sm_idle), .sm_hits, .sm_misses
  );

  lu_writer #(.NUM_CH(NUM_PEG)) u_wr (
    .clk, .rst_n,
    .in_valid (o_valid), .in_ready (o_ready), .in_elem (o_elem), .in_last (o_last),
    .in_col (o_col), .in_lu_off (o_off), .in_lu_cnt (o_cnt),
    .aw_valid (lu_aw_valid), .aw_ready (lu_aw_ready), .aw_addr (lu_aw_addr), .w_data (lu_w_data),
    .idle (wr_idle), .overflows (lu_overflows), .words_written (lu_words_written)
  );

  assign sys_idle = sm_idle && wr_idle;

endmodule
