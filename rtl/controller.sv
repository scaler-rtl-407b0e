// controller: the Controller of the dispatcher. It turns the metadata
// arrays into PE task packets and enforces the level-by-level schedule.
//
// After 'start' it reads the two metadata headers (see scaler_pkg) and then,
// level by level: LevelPtr[l], LevelPtr[l+1] give the level's positions
// p; for each p it reads the column c = LevelColIdx[p], its matrix-A layout
// (DatawordOffset, DatawordCount), its L/U layout and its dependency range
// DepPtr[p] .. DepPtr[p+1]. It sends PEG c mod NUM_PEG a header task word,
// sends the prefetcher a data request for the column, and then one task word
// per dependency k = DepIdx[d] carrying the L/U layout of k (so a PEG can
// fetch k from HBM through the shared memory if it is not on chip).
// Only when every column of the level has reported col_done and the shared
// memory and L/U writer are idle does it move on to the next level, so every
// dependency of a column is finished before the column is started.
// Metadata entries are read one at a time through the two metadata loaders
// (m_*: index 0 = dependency metadata and matrix-A layout, 1 = L/U layout).
// done rises when the last level has finished and stays high until the next
// start. barrier_cycles counts cycles spent waiting at level barriers.
// The schedule (column index modulo assignment, level order, barrier)
// follows the design; the header layout, the DepPtr indexing by level
// position and the port protocols are this implementation's choices.
module controller #(
  parameter int unsigned NUM_PEG = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 done,
  output logic                 busy,
  // metadata loaders
  output logic                 m_req_valid [2],
  input  logic                 m_req_ready [2],
  output scaler_pkg::haddr_t   m_req_base,
  output logic [31:0]          m_req_idx,
  input  logic                 m_resp_valid [2],
  input  scaler_pkg::meta_t    m_resp_data  [2],
  // PE tasks
  output logic                 task_valid [NUM_PEG],
  input  logic                 task_ready [NUM_PEG],
  output scaler_pkg::task_t    task_word,
  // data requests to the prefetcher
  output logic                 dreq_valid,
  input  logic                 dreq_ready,
  output scaler_pkg::idx_t     dreq_col,
  output scaler_pkg::haddr_t   dreq_off,
  output scaler_pkg::idx_t     dreq_cnt,
  // completion
  input  logic                 col_done [NUM_PEG],
  input  logic                 sys_idle,
  output logic [31:0]          levels_done,
  output logic [31:0]          barrier_cycles
);
  import scaler_pkg::*;

  localparam int unsigned GW = (NUM_PEG > 1) ? $clog2(NUM_PEG) : 1;

  typedef enum logic [4:0] {
    C_IDLE, C_RD, C_RW, C_HDR, C_HDR1, C_LEV, C_LO, C_HI, C_COL, C_GOTCOL,
    C_GOTAOFF, C_GOTACNT, C_GOTLUOFF, C_GOTLUCNT, C_GOTDP0, C_GOTDP1,
    C_EMIT_HDR, C_DREQ, C_DEPS, C_GOTK, C_GOTKOFF, C_GOTKCNT, C_EMIT_DEP,
    C_BARRIER, C_DONE
  } cstate_t;

  cstate_t     st, ret;
  logic        rq_ch;
  haddr_t      rq_base;
  logic [31:0] rq_idx, mval;
  meta_t       hdr0 [8];
  meta_t       hdr1 [2];
  logic [3:0]  hi_i;
  logic [31:0] lev, lo, hi, p, d, dend, ndone;
  idx_t        col, acnt, lucnt, kcol, kcnt;
  haddr_t      aoff, luoff, koff;
  logic [GW-1:0] dst;
  logic [31:0] ndone_inc;

  assign busy       = (st != C_IDLE) && (st != C_DONE);
  assign done       = (st == C_DONE);
  assign m_req_base = rq_base;
  assign m_req_idx  = rq_idx;
  assign dst        = GW'(col % 16'(NUM_PEG));

  always_comb begin
    m_req_valid[0] = (st == C_RD) && !rq_ch;
    m_req_valid[1] = (st == C_RD) &&  rq_ch;
    for (int g = 0; g < NUM_PEG; g++)
      task_valid[g] = ((st == C_EMIT_HDR) || (st == C_EMIT_DEP)) && (dst == GW'(g));
    task_word = '0;
    if (st == C_EMIT_HDR) begin
      task_word.is_dep = 1'b0;
      task_word.last   = (d == dend);
      task_word.col    = col;
      task_word.a_off  = aoff;
      task_word.a_cnt  = acnt;
      task_word.lu_off = luoff;
      task_word.lu_cnt = lucnt;
    end else begin
      task_word.is_dep = 1'b1;
      task_word.last   = (d + 32'd1 == dend);
      task_word.col    = kcol;
      task_word.lu_off = koff;
      task_word.lu_cnt = kcnt;
    end
    dreq_valid = (st == C_DREQ);
    dreq_col   = col;
    dreq_off   = aoff;
    dreq_cnt   = acnt;
    ndone_inc  = '0;
    for (int g = 0; g < NUM_PEG; g++) ndone_inc += 32'(col_done[g]);
  end

  task automatic rd(input logic ch, input meta_t base, input logic [31:0] idx, input cstate_t r);
    rq_ch   <= ch;
    rq_base <= base;
    rq_idx  <= idx;
    ret     <= r;
    st      <= C_RD;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= C_IDLE;
      ret            <= C_IDLE;
      rq_ch          <= 1'b0;
      rq_base        <= '0;
      rq_idx         <= '0;
      mval           <= '0;
      hi_i           <= '0;
      lev            <= '0;
      lo             <= '0;
      hi             <= '0;
      p              <= '0;
      d              <= '0;
      dend           <= '0;
      ndone          <= '0;
      col            <= '0;
      acnt           <= '0;
      lucnt          <= '0;
      aoff           <= '0;
      luoff          <= '0;
      kcol           <= '0;
      koff           <= '0;
      kcnt           <= '0;
      levels_done    <= '0;
      barrier_cycles <= '0;
      for (int i = 0; i < 8; i++) hdr0[i] <= '0;
      for (int i = 0; i < 2; i++) hdr1[i] <= '0;
    end else begin
      ndone <= ndone + ndone_inc;
      case (st)
        C_IDLE, C_DONE: if (start) begin
          hi_i        <= '0;
          levels_done <= '0;
          rd(1'b0, '0, 32'd0, C_HDR);
        end
        C_RD: if (m_req_ready[rq_ch]) st <= C_RW;
        C_RW: if (m_resp_valid[rq_ch]) begin
          mval <= m_resp_data[rq_ch];
          st   <= ret;
        end
        C_HDR: begin
          hdr0[hi_i[2:0]] <= mval;
          if (hi_i < 4'd7) begin
            hi_i <= hi_i + 4'd1;
            rd(1'b0, '0, 32'(hi_i) + 32'd1, C_HDR);
          end else begin
            hi_i <= '0;
            rd(1'b1, '0, 32'd0, C_HDR1);
          end
        end
        C_HDR1: begin
          hdr1[hi_i[0]] <= mval;
          if (hi_i == 4'd0) begin
            hi_i <= 4'd1;
            rd(1'b1, '0, 32'd1, C_HDR1);
          end else begin
            lev <= '0;
            st  <= C_LEV;
          end
        end
        C_LEV: begin
          if (lev >= hdr0[HDR_NLEV]) st <= C_DONE;
          else rd(1'b0, hdr0[HDR_LEVPTR], lev, C_LO);
        end
        C_LO: begin
          lo <= mval;
          rd(1'b0, hdr0[HDR_LEVPTR], lev + 32'd1, C_HI);
        end
        C_HI: begin
          hi    <= mval;
          p     <= lo;
          ndone <= ndone_inc;
          st    <= C_COL;
        end
        C_COL: begin
          if (p >= hi) st <= C_BARRIER;
          else rd(1'b0, hdr0[HDR_LEVCOL], p, C_GOTCOL);
        end
        C_GOTCOL: begin
          col <= idx_t'(mval);
          rd(1'b0, hdr0[HDR_AOFF], mval, C_GOTAOFF);
        end
        C_GOTAOFF: begin
          aoff <= mval;
          rd(1'b0, hdr0[HDR_ACNT], 32'(col), C_GOTACNT);
        end
        C_GOTACNT: begin
          acnt <= idx_t'(mval);
          rd(1'b1, hdr1[HDR_LUOFF], 32'(col), C_GOTLUOFF);
        end
        C_GOTLUOFF: begin
          luoff <= mval;
          rd(1'b1, hdr1[HDR_LUCNT], 32'(col), C_GOTLUCNT);
        end
        C_GOTLUCNT: begin
          lucnt <= idx_t'(mval);
          rd(1'b0, hdr0[HDR_DEPPTR], p, C_GOTDP0);
        end
        C_GOTDP0: begin
          d <= mval;
          rd(1'b0, hdr0[HDR_DEPPTR], p + 32'd1, C_GOTDP1);
        end
        C_GOTDP1: begin
          dend <= mval;
          st   <= C_EMIT_HDR;
        end
        C_EMIT_HDR: if (task_ready[dst]) st <= C_DREQ;
        C_DREQ: if (dreq_ready) st <= C_DEPS;
        C_DEPS: begin
          if (d >= dend) begin
            p  <= p + 32'd1;
            st <= C_COL;
          end else rd(1'b0, hdr0[HDR_DEPIDX], d, C_GOTK);
        end
        C_GOTK: begin
          kcol <= idx_t'(mval);
          rd(1'b1, hdr1[HDR_LUOFF], mval, C_GOTKOFF);
        end
        C_GOTKOFF: begin
          koff <= mval;
          rd(1'b1, hdr1[HDR_LUCNT], 32'(kcol), C_GOTKCNT);
        end
        C_GOTKCNT: begin
          kcnt <= idx_t'(mval);
          st   <= C_EMIT_DEP;
        end
        C_EMIT_DEP: if (task_ready[dst]) begin
          d  <= d + 32'd1;
          st <= C_DEPS;
        end
        C_BARRIER: begin
          if (ndone >= hi - lo && sys_idle) begin
            lev         <= lev + 32'd1;
            levels_done <= levels_done + 32'd1;
            st          <= C_LEV;
          end else begin
            barrier_cycles <= barrier_cycles + 32'd1;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
