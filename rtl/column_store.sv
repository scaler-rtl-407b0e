// column_store: a slot-organised store of sparse L/U columns. It is the
// storage of a PEG's Local Memory and of the Shared Memory.
//
// Each of SLOTS slots holds up to MAX_NNZ elements of one column (row index
// and value), the column index the slot currently holds (mapping table) and a
// validity flag. Column c maps to slot c mod SLOTS, so a newer column evicts
// the older one that shares its slot.
//
// Lookup (combinational): lk_col -> lk_hit, lk_nnz.
// Read   (combinational): rd_col, rd_idx -> rd_elem.
// Write: a column is written as a sequence wr_en with wr_idx = 0,1,2,...;
//   the write with wr_idx == 0 invalidates the slot and records wr_col as its
//   tag. Elements with wr_idx >= MAX_NNZ are dropped. commit_en with
//   commit_nnz then sets the slot valid, provided commit_nnz <= MAX_NNZ; a
//   column that does not fit is therefore never reported as a hit.
// The slot array, mapping table and validity flags follow the described
// memory organisation; direct mapping and the per-slot capacity are this
// implementation's choices.
module column_store #(
  parameter int unsigned SLOTS   = 64,
  parameter int unsigned MAX_NNZ = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  scaler_pkg::idx_t         lk_col,
  output logic                     lk_hit,
  output logic [15:0]              lk_nnz,
  input  scaler_pkg::idx_t         rd_col,
  input  logic [15:0]              rd_idx,
  output scaler_pkg::elem_t        rd_elem,
  input  logic                     wr_en,
  input  scaler_pkg::idx_t         wr_col,
  input  logic [15:0]              wr_idx,
  input  scaler_pkg::elem_t        wr_elem,
  input  logic                     commit_en,
  input  scaler_pkg::idx_t         commit_col,
  input  logic [15:0]              commit_nnz
);
  import scaler_pkg::*;

  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned NW = $clog2(MAX_NNZ);

  typedef struct packed {
    idx_t  row;
    fp32_t val;
  } entry_t;

  entry_t      data  [SLOTS * MAX_NNZ];
  idx_t        tag   [SLOTS];
  logic [15:0] nnz   [SLOTS];
  logic        valid [SLOTS];

  function automatic logic [SW-1:0] slot_of(idx_t c);
    return SW'(c % 16'(SLOTS));
  endfunction

  logic [SW-1:0] lk_s, rd_s, wr_s, cm_s;
  entry_t        rd_e;
  assign lk_s = slot_of(lk_col);
  assign rd_s = slot_of(rd_col);
  assign wr_s = slot_of(wr_col);
  assign cm_s = slot_of(commit_col);

  assign lk_hit = valid[lk_s] && (tag[lk_s] == lk_col);
  assign lk_nnz = nnz[lk_s];
  assign rd_e   = data[int'(rd_s) * int'(MAX_NNZ) + int'(NW'(rd_idx))];
  assign rd_elem = '{val: rd_e.val, col: rd_col, row: rd_e.row};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) valid[s] <= 1'b0;
    end else begin
      if (wr_en && wr_idx == 16'd0) valid[wr_s] <= 1'b0;
      // a one-element column writes its tag and commits in the same cycle
      if (commit_en && commit_nnz <= 16'(MAX_NNZ) &&
          (tag[cm_s] == commit_col || (wr_en && wr_idx == 16'd0 && wr_col == commit_col)))
        valid[cm_s] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_idx == 16'd0) tag[wr_s] <= wr_col;
    if (wr_en && wr_idx < 16'(MAX_NNZ))
      data[int'(wr_s) * int'(MAX_NNZ) + int'(NW'(wr_idx))] <= '{row: wr_elem.row, val: wr_elem.val};
    if (commit_en) nnz[cm_s] <= commit_nnz;
  end

endmodule
