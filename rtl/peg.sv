// peg: a Processing Element Group, which factorises one column at a time
// with the left-looking method.
//
// For column j it (1) takes the PE task header from the controller and the
// column's matrix-A datawords from the prefetcher and scatters them into a
// dense copy x of the column; (2) for every dependency column k listed in the
// task (ascending k, i.e. every k < j with U(k,j) != 0) it fetches column k of
// L from its Local Memory (LM) or, on a miss, from the Shared Memory (SM),
// and applies x(r) <- x(r) - L(r,k) * x(k) for all r > k in the MAC unit;
// (3) takes x(j) as the pivot U(j,j) (guarded against near-zero values) and
// divides every entry below the diagonal by it in the DIV unit; (4) streams
// the finished column (U entries unchanged, L entries divided) to the SM,
// keeps a copy in its LM, and pulses col_done once the SM has taken all of
// it.
//
// Dense buffer: x is split into 8 banks by row mod 8 with a touched flag and
// a per-bank list of touched rows. Matrix-A datawords are packed so that the
// eight rows in one dataword differ mod 8, so a whole dataword is scattered in
// one cycle without bank conflicts. Fill-ins created by the MAC updates are
// appended to the lists; the lists are the sparsity pattern of the result
// column, and their flags are cleared while the column is streamed out, so
// the buffer is clean for the next column. After reset the flags are cleared
// in MAX_N/8 cycles (init_done rises when that is over).
//
// Interfaces: task_* (task words, buffered in a TASK_DEPTH queue), col_* (A
// datawords, col_last on the last of a column), sm_rd_* (request a column,
// then elements with sm_rd_valid until sm_rd_done; never back-pressured),
// sm_wr_* (result elements, valid/ready, sm_wr_last on the final one).
// The dataflow (parser, MAC, DIV, LM, dependency check in LM then SM)
// follows the design; the banked dense buffer, the single-element MAC/DIV
// datapath (the design uses several lanes per PEG) and all port protocols are
// this implementation's choices.
module peg #(
  parameter int unsigned MAX_N      = 65536,
  parameter int unsigned LM_SLOTS   = 64,
  parameter int unsigned MAX_NNZ    = 256,
  parameter int unsigned TASK_DEPTH = 32,
  parameter int unsigned OUT_DEPTH  = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 task_valid,
  output logic                 task_ready,
  input  scaler_pkg::task_t    task_word,
  input  logic                 col_valid,
  output logic                 col_ready,
  input  scaler_pkg::dword_t   col_data,
  input  logic                 col_last,
  output logic                 sm_rd_req_valid,
  input  logic                 sm_rd_req_ready,
  output scaler_pkg::idx_t     sm_rd_req_col,
  output scaler_pkg::haddr_t   sm_rd_req_lu_off,
  output scaler_pkg::idx_t     sm_rd_req_lu_cnt,
  input  logic                 sm_rd_valid,
  input  logic                 sm_rd_done,
  input  scaler_pkg::elem_t    sm_rd_elem,
  output logic                 sm_wr_valid,
  input  logic                 sm_wr_ready,
  output scaler_pkg::elem_t    sm_wr_elem,
  output logic                 sm_wr_last,
  output scaler_pkg::idx_t     sm_wr_col,
  output scaler_pkg::haddr_t   sm_wr_lu_off,
  output scaler_pkg::idx_t     sm_wr_lu_cnt,
  output logic                 col_done,
  output logic                 init_done,
  output logic                 idle,
  output logic [31:0]          lm_hits,
  output logic [31:0]          lm_misses,
  output logic [31:0]          piv_fixes
);
  import scaler_pkg::*;

  localparam int unsigned NB     = 8;
  localparam int unsigned BANK_N = MAX_N / NB;
  localparam int unsigned BW     = $clog2(BANK_N);

  typedef enum logic [3:0] {
    P_INIT, P_IDLE, P_LOADA, P_DEP, P_DEPK, P_SMREQ, P_STREAM, P_DRAIN,
    P_PIV, P_PIV2, P_OUT, P_FLUSH
  } pstate_t;
  pstate_t st;

  // ---------------------------------------------------------------- dense buffer
  fp32_t       xv  [NB][BANK_N];
  logic        tf  [NB][BANK_N];
  idx_t        lst [NB][BANK_N];
  logic [15:0] lcnt[NB];

  function automatic logic [2:0]    bk(idx_t r); return r[2:0]; endfunction
  function automatic logic [BW-1:0] ba(idx_t r); return BW'(r >> 3); endfunction

  // per-bank write controls
  logic          x_we  [NB];
  logic [BW-1:0] x_wa  [NB];
  fp32_t         x_wd  [NB];
  logic          t_we  [NB];
  logic          t_wd  [NB];
  logic          l_app [NB];
  idx_t          l_row [NB];

  // ---------------------------------------------------------------- task queue
  task_t tq_head;
  logic  tq_valid, tq_pop;

  sync_fifo #(.WIDTH($bits(task_t)), .DEPTH(TASK_DEPTH)) u_tq (
    .clk, .rst_n,
    .in_valid (task_valid), .in_ready (task_ready), .in_data (task_word),
    .out_valid (tq_valid), .out_ready (tq_pop), .out_data (tq_head), .count ()
  );

  // ---------------------------------------------------------------- column state
  idx_t        j, k;
  haddr_t      j_lu_off, k_lu_off;
  idx_t        j_lu_cnt, k_lu_cnt;
  logic        no_more_deps, dep_last;
  fp32_t       xk, pivot;
  logic        src_lm;
  logic [15:0] mi, mnnz, lmw, own_idx;
  logic [BW:0] init_i;
  logic [3:0]  ob;
  logic [15:0] oi;
  logic [31:0] tot, issued;
  logic [15:0] inflight_mac, inflight_div;
  logic        last_sent;

  // ---------------------------------------------------------------- local memory
  logic        lm_hit;
  logic [15:0] lm_nnz;
  elem_t       lm_elem;
  logic        lm_we, lm_ce;
  idx_t        lm_wcol, lm_ccol;
  logic [15:0] lm_widx, lm_cnnz;
  elem_t       lm_wd;

  column_store #(.SLOTS(LM_SLOTS), .MAX_NNZ(MAX_NNZ)) u_lm (
    .clk, .rst_n,
    .lk_col (k), .lk_hit (lm_hit), .lk_nnz (lm_nnz),
    .rd_col (k), .rd_idx (mi), .rd_elem (lm_elem),
    .wr_en (lm_we), .wr_col (lm_wcol), .wr_idx (lm_widx), .wr_elem (lm_wd),
    .commit_en (lm_ce), .commit_col (lm_ccol), .commit_nnz (lm_cnnz)
  );

  // ---------------------------------------------------------------- MAC
  logic        src_valid;
  elem_t       src_elem;
  logic        mac_in_valid, mac_out_valid;
  fp32_t       mac_acc, mac_out;
  logic [16:0] mac_out_tag;
  idx_t        src_row;

  always_comb begin
    src_valid = 1'b0;
    src_elem  = sm_rd_elem;
    if (st == P_STREAM) begin
      if (src_lm) begin
        src_valid = (mi < mnnz);
        src_elem  = lm_elem;
      end else begin
        src_valid = sm_rd_valid;
      end
    end
  end

  assign src_row      = src_elem.row;
  assign mac_in_valid = src_valid && src_row != DUMMY_ROW && src_row > k;
  assign mac_acc      = tf[bk(src_row)][ba(src_row)] ? xv[bk(src_row)][ba(src_row)] : 32'h0;

  pe_mac #(.TAG_W(17)) u_mac (
    .clk, .rst_n,
    .in_valid (mac_in_valid), .in_acc (mac_acc), .in_l (src_elem.val), .in_u (xk),
    .in_tag ({!tf[bk(src_row)][ba(src_row)], src_row}),
    .out_valid (mac_out_valid), .out_val (mac_out), .out_tag (mac_out_tag)
  );

  // ---------------------------------------------------------------- DIV
  fp32_t       piv_used;
  logic        piv_fixed;
  logic        div_in_valid, div_out_valid;
  fp32_t       div_in_num, div_out;
  logic [16:0] div_out_tag;
  idx_t        out_row;
  logic [15:0] of_count;
  logic        of_in_ready, of_valid, of_pop;
  logic        of_last;
  elem_t       of_elem;

  assign out_row      = lst[ob[2:0]][oi[BW-1:0]];
  assign div_in_valid = (st == P_OUT) && (ob < 4'(NB)) && (oi < lcnt[ob[2:0]]) &&
                        (32'(of_count) + 32'(inflight_div) < OUT_DEPTH);
  assign div_in_num   = (out_row == j) ? piv_used : xv[bk(out_row)][ba(out_row)];

  pe_div #(.TAG_W(17)) u_div (
    .clk, .rst_n,
    .pivot (pivot), .piv_used, .piv_fixed,
    .in_valid (div_in_valid), .in_div (out_row > j), .in_num (div_in_num),
    .in_tag ({issued + 32'd1 == tot, out_row}),
    .out_valid (div_out_valid), .out_val (div_out), .out_tag (div_out_tag)
  );

  sync_fifo #(.WIDTH($bits(elem_t) + 1), .DEPTH(OUT_DEPTH)) u_of (
    .clk, .rst_n,
    .in_valid (div_out_valid), .in_ready (of_in_ready),
    .in_data ({div_out_tag[16], div_out, j, div_out_tag[15:0]}),
    .out_valid (of_valid), .out_ready (sm_wr_ready), .out_data ({of_last, of_elem}),
    .count (of_count)
  );

  assign of_pop       = of_valid && sm_wr_ready;
  assign sm_wr_valid  = of_valid;
  assign sm_wr_elem   = of_elem;
  assign sm_wr_last   = of_last;
  assign sm_wr_col    = j;
  assign sm_wr_lu_off = j_lu_off;
  assign sm_wr_lu_cnt = j_lu_cnt;

  assign sm_rd_req_valid  = (st == P_SMREQ);
  assign sm_rd_req_col    = k;
  assign sm_rd_req_lu_off = k_lu_off;
  assign sm_rd_req_lu_cnt = k_lu_cnt;

  assign col_ready = (st == P_LOADA);
  assign init_done = (st != P_INIT);
  assign idle      = (st == P_IDLE) && !tq_valid;

  always_comb begin
    tq_pop = 1'b0;
    if (st == P_IDLE && tq_valid) tq_pop = 1'b1;
    if (st == P_DEP && !no_more_deps && tq_valid) tq_pop = 1'b1;
  end

  // LM write port: filled from the SM stream of a missed column, or with
  // the PEG's own result column
  always_comb begin
    lm_we   = 1'b0;
    lm_wcol = k;
    lm_widx = lmw;
    lm_wd   = sm_rd_elem;
    lm_ce   = 1'b0;
    lm_ccol = k;
    lm_cnnz = lmw + 16'(sm_rd_valid);
    if (st == P_STREAM && !src_lm) begin
      lm_we = sm_rd_valid;
      lm_ce = sm_rd_done;
    end else if (st == P_OUT || st == P_FLUSH) begin
      lm_we   = of_pop;
      lm_wcol = j;
      lm_widx = own_idx;
      lm_wd   = of_elem;
      lm_ce   = of_pop && of_last;
      lm_ccol = j;
      lm_cnnz = own_idx + 16'd1;
    end
  end

  // dense-buffer write controls
  always_comb begin
    elem_t e;
    idx_t  r;
    e = '0;
    r = '0;
    for (int b = 0; b < NB; b++) begin
      x_we[b]  = 1'b0;
      x_wa[b]  = '0;
      x_wd[b]  = '0;
      t_we[b]  = 1'b0;
      t_wd[b]  = 1'b0;
      l_app[b] = 1'b0;
      l_row[b] = '0;
    end
    case (st)
      P_INIT: for (int b = 0; b < NB; b++) begin
        t_we[b] = 1'b1;
        x_wa[b] = init_i[BW-1:0];
      end
      P_LOADA: if (col_valid) begin
        for (int i = 0; i < ELEMS_PER_WORD; i++) begin
          e = lane_of(col_data, i);
          if (e.row != DUMMY_ROW) begin
            x_we[bk(e.row)]  = 1'b1;
            x_wa[bk(e.row)]  = ba(e.row);
            x_wd[bk(e.row)]  = e.val;
            t_we[bk(e.row)]  = 1'b1;
            t_wd[bk(e.row)]  = 1'b1;
            l_app[bk(e.row)] = 1'b1;
            l_row[bk(e.row)] = e.row;
          end
        end
      end
      P_PIV: if (!tf[bk(j)][ba(j)]) begin
        x_we[bk(j)]  = 1'b1;
        x_wa[bk(j)]  = ba(j);
        t_we[bk(j)]  = 1'b1;
        t_wd[bk(j)]  = 1'b1;
        l_app[bk(j)] = 1'b1;
        l_row[bk(j)] = j;
      end
      P_OUT: if (div_in_valid) begin
        t_we[bk(out_row)] = 1'b1;
        x_wa[bk(out_row)] = ba(out_row);
      end
      default: ;
    endcase
    // MAC write-back (only while dependency updates are in flight)
    if (mac_out_valid) begin
      r = mac_out_tag[15:0];
      x_we[bk(r)] = 1'b1;
      x_wa[bk(r)] = ba(r);
      x_wd[bk(r)] = mac_out;
      if (mac_out_tag[16]) begin
        t_we[bk(r)]  = 1'b1;
        t_wd[bk(r)]  = 1'b1;
        l_app[bk(r)] = 1'b1;
        l_row[bk(r)] = r;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (x_we[b])  xv[b][x_wa[b]] <= x_wd[b];
      if (t_we[b])  tf[b][x_wa[b]] <= t_wd[b];
      if (l_app[b]) lst[b][lcnt[b][BW-1:0]] <= l_row[b];
    end
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= P_INIT;
      init_i       <= '0;
      for (int b = 0; b < NB; b++) lcnt[b] <= '0;
      j            <= '0;
      k            <= '0;
      j_lu_off     <= '0;
      j_lu_cnt     <= '0;
      k_lu_off     <= '0;
      k_lu_cnt     <= '0;
      no_more_deps <= 1'b1;
      dep_last     <= 1'b1;
      xk           <= '0;
      pivot        <= '0;
      src_lm       <= 1'b0;
      mi           <= '0;
      mnnz         <= '0;
      lmw          <= '0;
      own_idx      <= '0;
      ob           <= '0;
      oi           <= '0;
      tot          <= '0;
      issued       <= '0;
      inflight_mac <= '0;
      inflight_div <= '0;
      last_sent    <= 1'b0;
      col_done     <= 1'b0;
      lm_hits      <= '0;
      lm_misses    <= '0;
      piv_fixes    <= '0;
    end else begin
      col_done     <= 1'b0;
      inflight_mac <= inflight_mac + 16'(mac_in_valid) - 16'(mac_out_valid);
      inflight_div <= inflight_div + 16'(div_in_valid) - 16'(div_out_valid);
      for (int b = 0; b < NB; b++) if (l_app[b]) lcnt[b] <= lcnt[b] + 16'd1;

      case (st)
        P_INIT: begin
          init_i <= init_i + 1'b1;
          if (32'(init_i) == BANK_N - 1) st <= P_IDLE;
        end
        P_IDLE: if (tq_valid && !tq_head.is_dep) begin
          j            <= tq_head.col;
          j_lu_off     <= tq_head.lu_off;
          j_lu_cnt     <= tq_head.lu_cnt;
          no_more_deps <= tq_head.last;
          st           <= (tq_head.a_cnt == '0) ? P_DEP : P_LOADA;
        end
        P_LOADA: if (col_valid && col_last) st <= P_DEP;
        P_DEP: begin
          if (no_more_deps) st <= P_PIV;
          else if (tq_valid) begin
            k        <= tq_head.col;
            k_lu_off <= tq_head.lu_off;
            k_lu_cnt <= tq_head.lu_cnt;
            dep_last <= tq_head.last;
            st       <= P_DEPK;
          end
        end
        P_DEPK: begin
          xk  <= tf[bk(k)][ba(k)] ? xv[bk(k)][ba(k)] : 32'h0;
          mi  <= '0;
          lmw <= '0;
          if (lm_hit) begin
            lm_hits <= lm_hits + 32'd1;
            src_lm  <= 1'b1;
            mnnz    <= lm_nnz;
            st      <= P_STREAM;
          end else begin
            lm_misses <= lm_misses + 32'd1;
            src_lm    <= 1'b0;
            st        <= P_SMREQ;
          end
        end
        P_SMREQ: if (sm_rd_req_ready) st <= P_STREAM;
        P_STREAM: begin
          if (src_lm) begin
            if (mi < mnnz) mi <= mi + 16'd1;
            else st <= P_DRAIN;
          end else begin
            if (sm_rd_valid) lmw <= lmw + 16'd1;
            if (sm_rd_done)  st  <= P_DRAIN;
          end
        end
        P_DRAIN: if (inflight_mac == '0 && !mac_in_valid) begin
          no_more_deps <= dep_last;
          st           <= P_DEP;
        end
        P_PIV: begin
          pivot <= tf[bk(j)][ba(j)] ? xv[bk(j)][ba(j)] : 32'h0;
          st    <= P_PIV2;
        end
        P_PIV2: begin
          tot       <= 32'(lcnt[0]) + 32'(lcnt[1]) + 32'(lcnt[2]) + 32'(lcnt[3]) +
                       32'(lcnt[4]) + 32'(lcnt[5]) + 32'(lcnt[6]) + 32'(lcnt[7]);
          issued    <= '0;
          ob        <= '0;
          oi        <= '0;
          own_idx   <= '0;
          last_sent <= 1'b0;
          if (piv_fixed) piv_fixes <= piv_fixes + 32'd1;
          st        <= P_OUT;
        end
        P_OUT: begin
          if (ob >= 4'(NB)) st <= P_FLUSH;
          else if (oi >= lcnt[ob[2:0]]) begin
            ob <= ob + 4'd1;
            oi <= '0;
          end else if (div_in_valid) begin
            oi     <= oi + 16'd1;
            issued <= issued + 32'd1;
          end
        end
        P_FLUSH: if (last_sent || (of_pop && of_last)) begin
          for (int b = 0; b < NB; b++) lcnt[b] <= '0;
          col_done <= 1'b1;
          st       <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase

      if (of_pop) begin
        own_idx <= own_idx + 16'd1;
        if (of_last) last_sent <= 1'b1;
      end
    end
  end

  // A full output buffer is never written: issue is limited by reserved space.
  assert property (@(posedge clk) disable iff (!rst_n) div_out_valid |-> of_in_ready);

endmodule
