// matrix_a_loader: the Matrix A loader, one burst reader per HBM channel
// that holds non-zeros of matrix A (NUM_CH = 12 channels).
//
// Channel c serves the columns c, c + NUM_CH, c + 2*NUM_CH, ... (column index
// modulo NUM_CH), which are also the columns processed by PEG c. Each channel
// takes (address, dataword count) commands from the data prefetcher and
// returns the datawords in order; all channels run independently and in
// parallel. The per-channel command/credit protocol is described in
// hbm_stream_reader. The channel count follows the design; the mapping of
// columns to channels by column index modulo is this implementation's choice.
module matrix_a_loader #(
  parameter int unsigned NUM_CH  = 12,
  parameter int unsigned MAX_OUT = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid   [NUM_CH],
  output logic                 cmd_ready   [NUM_CH],
  input  scaler_pkg::haddr_t   cmd_addr    [NUM_CH],
  input  scaler_pkg::idx_t     cmd_cnt     [NUM_CH],
  input  logic                 issue_ok    [NUM_CH],
  output logic [15:0]          outstanding [NUM_CH],
  output logic                 busy,
  output logic                 ar_valid    [NUM_CH],
  input  logic                 ar_ready    [NUM_CH],
  output scaler_pkg::haddr_t   ar_addr     [NUM_CH],
  input  logic                 r_valid     [NUM_CH],
  input  scaler_pkg::dword_t   r_data      [NUM_CH],
  output logic                 out_valid   [NUM_CH],
  output scaler_pkg::dword_t   out_data    [NUM_CH]
);
  logic ch_busy [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    hbm_stream_reader #(.MAX_OUT(MAX_OUT)) u_rd (
      .clk, .rst_n,
      .cmd_valid (cmd_valid[c]),   .cmd_ready (cmd_ready[c]),
      .cmd_addr  (cmd_addr[c]),    .cmd_cnt   (cmd_cnt[c]),
      .issue_ok  (issue_ok[c]),    .outstanding (outstanding[c]),
      .busy      (ch_busy[c]),
      .ar_valid  (ar_valid[c]),    .ar_ready  (ar_ready[c]),   .ar_addr (ar_addr[c]),
      .r_valid   (r_valid[c]),     .r_data    (r_data[c]),
      .out_valid (out_valid[c]),   .out_data  (out_data[c])
    );
  end

  always_comb begin
    busy = 1'b0;
    for (int c = 0; c < NUM_CH; c++) busy |= ch_busy[c];
  end

endmodule
