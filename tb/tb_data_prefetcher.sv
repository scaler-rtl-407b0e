// tb_data_prefetcher: checks the data prefetcher together with the Matrix A
// loader against 12 behavioural HBM channels with random latency hiccups.
// Every dataword in memory carries its own channel and address, so the
// receiving side can tell exactly which word arrived. A random list of column
// requests (some empty) is issued; each channel's output, consumed with random
// back-pressure, must be exactly the requested datawords of the columns mapped
// to it, in request order, with col_last on the final word of each column.
// A small prefetch buffer (PF_DEPTH = 4) must cause recorded stalls.
module tb_data_prefetcher;
  import scaler_pkg::*;

  localparam int NCH = 12, NREQ = 120, WORDS = 512;
  logic   clk = 1'b0, rst_n = 1'b0;
  logic   dreq_valid = 1'b0, dreq_ready, busy, ld_busy;
  idx_t   dreq_col = '0, dreq_cnt = '0;
  haddr_t dreq_off = '0;
  logic   ld_cmd_valid [NCH], ld_cmd_ready [NCH], ld_issue_ok [NCH];
  haddr_t ld_cmd_addr [NCH];
  idx_t   ld_cmd_cnt [NCH];
  logic [15:0] ld_outstanding [NCH];
  logic   ld_valid [NCH];
  dword_t ld_data [NCH];
  logic   col_valid [NCH], col_ready [NCH], col_last [NCH];
  dword_t col_data [NCH];
  logic [31:0] stall_cycles;
  logic   ar_valid [NCH], ar_ready [NCH], r_valid [NCH];
  haddr_t ar_addr [NCH];
  dword_t r_data [NCH];
  logic   aw_valid [NCH], aw_ready [NCH];
  haddr_t aw_addr [NCH];
  dword_t w_data [NCH];
  int     checks = 0, failures = 0;
  // expected words per channel: {addr, last}
  int     exp_addr [NCH][$];
  bit     exp_last [NCH][$];

  always_comb for (int c = 0; c < NCH; c++) begin
    aw_valid[c] = 1'b0; aw_addr[c] = '0; w_data[c] = '0;
  end

  hbm_model #(.NCH(NCH), .WORDS(WORDS), .LAT(6)) u_m (.*);
  matrix_a_loader #(.NUM_CH(NCH), .MAX_OUT(8)) u_ld (
    .clk, .rst_n,
    .cmd_valid (ld_cmd_valid), .cmd_ready (ld_cmd_ready), .cmd_addr (ld_cmd_addr),
    .cmd_cnt (ld_cmd_cnt), .issue_ok (ld_issue_ok), .outstanding (ld_outstanding),
    .busy (ld_busy), .ar_valid, .ar_ready, .ar_addr, .r_valid, .r_data,
    .out_valid (ld_valid), .out_data (ld_data)
  );
  data_prefetcher #(.NUM_CH(NCH), .PF_DEPTH(4), .CQ_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  // consumer with random back-pressure
  always @(negedge clk)
    for (int c = 0; c < NCH; c++) col_ready[c] <= rst_n && ($urandom % 3 != 0);

  always @(posedge clk)
    if (rst_n)
      for (int c = 0; c < NCH; c++)
        if (col_valid[c] && col_ready[c]) begin
          checks++;
          if (exp_addr[c].size() == 0) begin
            failures++;
            $display("channel %0d: unexpected dataword", c);
          end else begin
            int a;
            bit l;
            a = exp_addr[c].pop_front();
            l = exp_last[c].pop_front();
            if (col_data[c] != tagword(c, a) || col_last[c] != l) begin
              failures++;
              $display("channel %0d: got %h last %0b, expected word %0d last %0b",
                       c, col_data[c][63:0], col_last[c], a, l);
            end
          end
        end

  function automatic dword_t tagword(int c, int a);
    dword_t w;
    for (int i = 0; i < 8; i++) w[i*64 +: 64] = {32'(c), 32'(a)};
    return w;
  endfunction

  initial begin
    int nxt [NCH];
    for (int c = 0; c < NCH; c++) begin
      col_ready[c] = 1'b0;
      nxt[c] = 0;
      for (int a = 0; a < WORDS; a++) u_m.mem[c][a] = tagword(c, a);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < NREQ; r++) begin
      int col, cnt, c;
      col = int'($urandom % 200);
      c   = col % NCH;
      cnt = (r % 9 == 4) ? 0 : 1 + int'($urandom % 5);
      for (int i = 0; i < cnt; i++) begin
        exp_addr[c].push_back(nxt[c] + i);
        exp_last[c].push_back(i == cnt - 1);
      end
      @(negedge clk);
      dreq_valid = 1'b1; dreq_col = 16'(col); dreq_off = 32'(nxt[c]); dreq_cnt = 16'(cnt);
      nxt[c] += cnt;
      while (!dreq_ready) @(negedge clk);
      @(posedge clk);
      #1 dreq_valid = 1'b0;
    end
    repeat (5) @(negedge clk);
    while (busy) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (exp_addr[c].size() != 0) begin
        failures++;
        $display("channel %0d: %0d datawords never delivered", c, exp_addr[c].size());
      end
    end
    checks++;
    if (stall_cycles == 0) begin failures++; $display("no prefetch-buffer stall recorded"); end
    $display("stall cycles %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
