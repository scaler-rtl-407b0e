// data_prefetcher: the Data Prefetcher of the dispatcher.
//
// The controller sends one data request per column of the level being
// processed (dreq_*: column index, first matrix-A dataword, dataword count);
// nothing outside the current level is fetched. The request is queued for
// channel col mod NUM_CH and handed to that channel of the Matrix A loader,
// which streams the datawords in. They are kept in a per-channel prefetch
// buffer of PF_DEPTH datawords and delivered in order to the PEG of the same
// index (col_*), with col_last marking the final dataword of each column.
// The buffer space of every read in flight is reserved before the read is
// sent, so returning data can never overflow the buffer; stall_cycles counts
// channel-cycles in which a read was held back for lack of space.
// The behaviour follows the described prefetcher (level-restricted fetch,
// request/response tracking); queue depths and ports are this
// implementation's choices.
module data_prefetcher #(
  parameter int unsigned NUM_CH   = 12,
  parameter int unsigned PF_DEPTH = 64,
  parameter int unsigned CQ_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // requests from the controller
  input  logic                 dreq_valid,
  output logic                 dreq_ready,
  input  scaler_pkg::idx_t     dreq_col,
  input  scaler_pkg::haddr_t   dreq_off,
  input  scaler_pkg::idx_t     dreq_cnt,
  // Matrix A loader, per channel
  output logic                 ld_cmd_valid   [NUM_CH],
  input  logic                 ld_cmd_ready   [NUM_CH],
  output scaler_pkg::haddr_t   ld_cmd_addr    [NUM_CH],
  output scaler_pkg::idx_t     ld_cmd_cnt     [NUM_CH],
  output logic                 ld_issue_ok    [NUM_CH],
  input  logic [15:0]          ld_outstanding [NUM_CH],
  input  logic                 ld_valid       [NUM_CH],
  input  scaler_pkg::dword_t   ld_data        [NUM_CH],
  // column data to the PEGs
  output logic                 col_valid      [NUM_CH],
  input  logic                 col_ready      [NUM_CH],
  output scaler_pkg::dword_t   col_data       [NUM_CH],
  output logic                 col_last       [NUM_CH],
  output logic                 busy,
  output logic [31:0]          stall_cycles
);
  import scaler_pkg::*;

  localparam int unsigned CHW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  typedef struct packed {
    haddr_t off;
    idx_t   cnt;
  } creq_t;

  logic [CHW-1:0] dch;
  logic           q_in_ready [NUM_CH];
  logic           ch_busy    [NUM_CH];
  logic           ch_stall   [NUM_CH];

  assign dch        = CHW'(dreq_col % 16'(NUM_CH));
  assign dreq_ready = q_in_ready[dch];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    creq_t       q_out;
    logic        q_valid;
    logic [15:0] buf_count, cnt_count;
    logic        cnt_valid;
    idx_t        cnt_head;
    idx_t        left;
    logic        first, is_last;
    logic        cmd_fire;

    // request queue
    sync_fifo #(.WIDTH($bits(creq_t)), .DEPTH(CQ_DEPTH)) u_req (
      .clk, .rst_n,
      .in_valid  (dreq_valid && dch == CHW'(c) && dreq_cnt != '0),
      .in_ready  (q_in_ready[c]),
      .in_data   ({dreq_off, dreq_cnt}),
      .out_valid (q_valid),
      .out_ready (ld_cmd_ready[c]),
      .out_data  (q_out),
      .count     ()
    );
    assign ld_cmd_valid[c] = q_valid;
    assign ld_cmd_addr[c]  = q_out.off;
    assign ld_cmd_cnt[c]   = q_out.cnt;
    assign cmd_fire        = q_valid && ld_cmd_ready[c];

    // dataword counts of the columns sent to the loader, in order
    sync_fifo #(.WIDTH(16), .DEPTH(CQ_DEPTH)) u_cnt (
      .clk, .rst_n,
      .in_valid  (cmd_fire),
      .in_ready  (),
      .in_data   (q_out.cnt),
      .out_valid (cnt_valid),
      .out_ready (ld_valid[c] && first),
      .out_data  (cnt_head),
      .count     (cnt_count)
    );

    // column boundary tracking of the returning datawords
    assign first   = (left == '0);
    assign is_last = first ? (cnt_head == 16'd1) : (left == 16'd1);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) left <= '0;
      else if (ld_valid[c]) left <= (first ? cnt_head : left) - 16'd1;
    end

    // prefetch buffer
    sync_fifo #(.WIDTH(DWORD_BITS + 1), .DEPTH(PF_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid  (ld_valid[c]),
      .in_ready  (),
      .in_data   ({is_last, ld_data[c]}),
      .out_valid (col_valid[c]),
      .out_ready (col_ready[c]),
      .out_data  ({col_last[c], col_data[c]}),
      .count     (buf_count)
    );

    assign ld_issue_ok[c] = (32'(buf_count) + 32'(ld_outstanding[c]) + 32'(ld_valid[c])) < PF_DEPTH;
    assign ch_busy[c]     = q_valid || cnt_valid || col_valid[c] || (left != '0);
    assign ch_stall[c]    = !ld_issue_ok[c];

    // Data never returns for a column that was not requested.
    assert property (@(posedge clk) disable iff (!rst_n) ld_valid[c] && first |-> cnt_valid);
  end

  always_comb begin
    busy = 1'b0;
    for (int c = 0; c < NUM_CH; c++) busy |= ch_busy[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stall_cycles <= '0;
    else begin
      for (int c = 0; c < NUM_CH; c++)
        if (ch_stall[c] && ld_outstanding[c] != '0) stall_cycles <= stall_cycles + 32'd1;
    end
  end

endmodule
