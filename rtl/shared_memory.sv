// shared_memory: the Shared Memory (SM), second tier of the L/U memory
// hierarchy, shared by all PEGs.
//
// Two kinds of transaction, one at a time, granted round-robin among the
// NUM_PEG processing element groups:
//  * Write: a PEG streams a column it has just finished (wr_*). Every element
//    is stored in the SM's column store and passed on, in the same cycle, to
//    the L/U writer (out_*), so the column is kept on chip and written back to
//    HBM at once. The PEG holds the grant until wr_last.
//  * Read: a PEG whose Local Memory missed asks for column rd_req_col. On a
//    hit the SM streams the stored elements, one per cycle, on rd_elem with
//    rd_valid for that PEG. On a miss it reads the column's reserved L/U
//    datawords (rd_req_lu_off, rd_req_lu_cnt) from L/U channel col mod
//    NUM_CH, one dataword at a time, streams the non-dummy elements and keeps
//    the column. rd_done marks the end of the stream (alone or with the last
//    element). The requesting PEG accepts every element without stalling.
// sm_hits / sm_misses count read hits and HBM fetches.
// The role of the SM (shared second tier, gathering PEG results, copying
// them to the L/U writer, serving LM misses) follows the design; the
// serialisation into one transaction at a time, round-robin arbitration and
// one-dataword-at-a-time HBM fetch are this implementation's simplifications.
module shared_memory #(
  parameter int unsigned NUM_PEG = 12,
  parameter int unsigned NUM_CH  = 12,
  parameter int unsigned SLOTS   = 1024,
  parameter int unsigned MAX_NNZ = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // read requests and responses, per PEG
  input  logic                 rd_req_valid  [NUM_PEG],
  output logic                 rd_req_ready  [NUM_PEG],
  input  scaler_pkg::idx_t     rd_req_col    [NUM_PEG],
  input  scaler_pkg::haddr_t   rd_req_lu_off [NUM_PEG],
  input  scaler_pkg::idx_t     rd_req_lu_cnt [NUM_PEG],
  output logic                 rd_valid      [NUM_PEG],
  output logic                 rd_done       [NUM_PEG],
  output scaler_pkg::elem_t    rd_elem,
  // column writes, per PEG
  input  logic                 wr_valid  [NUM_PEG],
  output logic                 wr_ready  [NUM_PEG],
  input  scaler_pkg::elem_t    wr_elem   [NUM_PEG],
  input  logic                 wr_last   [NUM_PEG],
  input  scaler_pkg::idx_t     wr_col    [NUM_PEG],
  input  scaler_pkg::haddr_t   wr_lu_off [NUM_PEG],
  input  scaler_pkg::idx_t     wr_lu_cnt [NUM_PEG],
  // to the L/U writer
  output logic                 out_valid,
  input  logic                 out_ready,
  output scaler_pkg::elem_t    out_elem,
  output logic                 out_last,
  output scaler_pkg::idx_t     out_col,
  output scaler_pkg::haddr_t   out_lu_off,
  output scaler_pkg::idx_t     out_lu_cnt,
  // L/U channel reads on a miss
  output logic                 ar_valid [NUM_CH],
  input  logic                 ar_ready [NUM_CH],
  output scaler_pkg::haddr_t   ar_addr,
  input  logic                 r_valid  [NUM_CH],
  input  scaler_pkg::dword_t   r_data   [NUM_CH],
  output logic                 idle,
  output logic [31:0]          sm_hits,
  output logic [31:0]          sm_misses
);
  import scaler_pkg::*;

  localparam int unsigned GW  = (NUM_PEG > 1) ? $clog2(NUM_PEG) : 1;
  localparam int unsigned CHW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  typedef enum logic [2:0] {S_IDLE, S_WR, S_LOOK, S_HIT, S_FADDR, S_FDATA, S_FEMIT} sstate_t;
  sstate_t        st;
  logic [GW-1:0]  cur, rr, pick;
  logic           any;
  idx_t           col, cnt, idx, nnz;
  haddr_t         off;
  logic [CHW-1:0] ch;
  dword_t         word;
  logic [7:0]     mask;
  logic [2:0]     lane;
  logic           lk_hit;
  logic [15:0]    lk_nnz;
  elem_t          st_elem;

  // store write port
  logic           s_wr_en, s_cm_en;
  idx_t           s_wr_col, s_cm_col;
  logic [15:0]    s_wr_idx, s_cm_nnz;
  elem_t          s_wr_elem;

  column_store #(.SLOTS(SLOTS), .MAX_NNZ(MAX_NNZ)) u_store (
    .clk, .rst_n,
    .lk_col (col), .lk_hit, .lk_nnz,
    .rd_col (col), .rd_idx (idx), .rd_elem (st_elem),
    .wr_en (s_wr_en), .wr_col (s_wr_col), .wr_idx (s_wr_idx), .wr_elem (s_wr_elem),
    .commit_en (s_cm_en), .commit_col (s_cm_col), .commit_nnz (s_cm_nnz)
  );

  // round-robin choice among PEGs with a pending request
  always_comb begin
    any  = 1'b0;
    pick = rr;
    for (int i = NUM_PEG - 1; i >= 0; i--) begin
      int g;
      g = (int'(rr) + i) % NUM_PEG;
      if (rd_req_valid[g] || wr_valid[g]) begin
        any  = 1'b1;
        pick = GW'(g);
      end
    end
  end

  always_comb begin
    lane = '0;
    for (int i = 7; i >= 0; i--) if (mask[i]) lane = 3'(i);
  end

  always_comb begin
    for (int g = 0; g < NUM_PEG; g++) begin
      rd_req_ready[g] = (st == S_IDLE) && any && (pick == GW'(g)) && !wr_valid[g];
      wr_ready[g]     = (st == S_WR) && (cur == GW'(g)) && out_ready;
      rd_valid[g]     = (cur == GW'(g)) && ((st == S_HIT) || (st == S_FEMIT && mask != '0));
      rd_done[g]      = (cur == GW'(g)) &&
                        ((st == S_HIT && idx + 16'd1 >= nnz) ||
                         (st == S_LOOK && lk_hit && lk_nnz == '0) ||
                         (st == S_FADDR && idx >= cnt));
    end
    for (int c = 0; c < NUM_CH; c++) ar_valid[c] = (st == S_FADDR) && (idx < cnt) && (ch == CHW'(c));
    ar_addr = off + 32'(idx);
    rd_elem = (st == S_HIT) ? st_elem : lane_of(word, 32'(lane));

    out_valid  = (st == S_WR) && wr_valid[cur];
    out_elem   = wr_elem[cur];
    out_last   = wr_last[cur];
    out_col    = wr_col[cur];
    out_lu_off = wr_lu_off[cur];
    out_lu_cnt = wr_lu_cnt[cur];

    s_wr_en   = 1'b0;
    s_wr_col  = col;
    s_wr_idx  = idx;
    s_wr_elem = out_elem;
    s_cm_en   = 1'b0;
    s_cm_col  = col;
    s_cm_nnz  = idx;
    if (st == S_WR) begin
      s_wr_en  = out_valid && out_ready;
      s_wr_col = wr_col[cur];
      s_cm_en  = out_valid && out_ready && wr_last[cur];
      s_cm_col = wr_col[cur];
      s_cm_nnz = idx + 16'd1;
    end else if (st == S_FEMIT && mask != '0) begin
      s_wr_en   = 1'b1;
      s_wr_idx  = nnz;
      s_wr_elem = lane_of(word, 32'(lane));
    end else if (st == S_FADDR && idx >= cnt) begin
      s_cm_en  = 1'b1;
      s_cm_nnz = nnz;
    end
  end

  assign idle = (st == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      cur       <= '0;
      rr        <= '0;
      idx       <= '0;
      nnz       <= '0;
      cnt       <= '0;
      col       <= '0;
      off       <= '0;
      ch        <= '0;
      mask      <= '0;
      word      <= '0;
      sm_hits   <= '0;
      sm_misses <= '0;
    end else begin
      case (st)
        S_IDLE: if (any) begin
          cur <= pick;
          rr  <= GW'((int'(pick) + 1) % NUM_PEG);
          idx <= '0;
          nnz <= '0;
          if (wr_valid[pick]) st <= S_WR;
          else begin
            col <= rd_req_col[pick];
            off <= rd_req_lu_off[pick];
            cnt <= rd_req_lu_cnt[pick];
            ch  <= CHW'(rd_req_col[pick] % 16'(NUM_CH));
            st  <= S_LOOK;
          end
        end
        S_WR: if (out_valid && out_ready) begin
          idx <= idx + 16'd1;
          if (wr_last[cur]) st <= S_IDLE;
        end
        S_LOOK: begin
          idx <= '0;
          if (lk_hit) begin
            sm_hits <= sm_hits + 32'd1;
            nnz     <= lk_nnz;
            st      <= (lk_nnz == '0) ? S_IDLE : S_HIT;
          end else begin
            sm_misses <= sm_misses + 32'd1;
            st        <= S_FADDR;
          end
        end
        S_HIT: begin
          idx <= idx + 16'd1;
          if (idx + 16'd1 >= nnz) st <= S_IDLE;
        end
        S_FADDR: begin
          if (idx >= cnt) st <= S_IDLE;
          else if (ar_ready[ch]) st <= S_FDATA;
        end
        S_FDATA: if (r_valid[ch]) begin
          word <= r_data[ch];
          for (int i = 0; i < 8; i++) mask[i] <= (lane_of(r_data[ch], i).row != DUMMY_ROW);
          st <= S_FEMIT;
        end
        S_FEMIT: begin
          if (mask == '0) begin
            idx <= idx + 16'd1;
            st  <= S_FADDR;
          end else begin
            mask[lane] <= 1'b0;
            nnz        <= nnz + 16'd1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // At most one PEG sees read data at a time.
  always_comb begin
    int n;
    n = 0;
    for (int g = 0; g < NUM_PEG; g++) n += int'(rd_valid[g]);
    assert (!rst_n || n <= 1);
  end

endmodule
