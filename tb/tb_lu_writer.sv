// tb_lu_writer: checks the L/U writer against 12 behavioural L/U channels
// with random write back-pressure. Columns of 1 to 30 elements are streamed
// in with random gaps; every column must land in channel col mod 12 at its
// reserved datawords, eight elements per dataword in arrival order, with
// dummy lanes after the last element and all-dummy datawords for reserved
// space it did not use. A column longer than its reservation must raise the
// overflow count and leave the following region untouched.
module tb_lu_writer;
  import scaler_pkg::*;

  localparam int NCH = 12;
  logic   clk = 1'b0, rst_n = 1'b0;
  logic   in_valid = 1'b0, in_ready, in_last = 1'b0, idle;
  elem_t  in_elem = '0;
  idx_t   in_col = '0, in_lu_cnt = '0;
  haddr_t in_lu_off = '0, aw_addr;
  dword_t w_data;
  logic   aw_valid [NCH], aw_ready [NCH];
  logic [31:0] overflows, words_written;
  logic   ar_valid [NCH], ar_ready [NCH], r_valid [NCH];
  haddr_t ar_addr [NCH], aw_a [NCH];
  dword_t r_data [NCH], w_d [NCH];
  int     checks = 0, failures = 0;
  elem_t  sent [64];

  always_comb for (int c = 0; c < NCH; c++) begin
    ar_valid[c] = 1'b0; ar_addr[c] = '0; aw_a[c] = aw_addr; w_d[c] = w_data;
  end

  hbm_model #(.NCH(NCH), .WORDS(256), .LAT(4)) u_m (
    .clk, .ar_valid, .ar_ready, .ar_addr, .r_valid, .r_data,
    .aw_valid, .aw_ready, .aw_addr (aw_a), .w_data (w_d)
  );
  lu_writer #(.NUM_CH(NCH)) dut (.*);

  always #5 clk = ~clk;

  task automatic column(int col, int off, int cnt, int n);
    for (int i = 0; i < n; i++) begin
      sent[i] = '{val: $urandom, col: 16'(col), row: 16'(i * 3 + 1)};
      @(negedge clk);
      in_valid  = 1'b1;
      in_elem   = sent[i];
      in_last   = (i == n - 1);
      in_col    = 16'(col);
      in_lu_off = 32'(off);
      in_lu_cnt = 16'(cnt);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      #1 in_valid = 1'b0;
      repeat (int'($urandom % 2)) @(negedge clk);
    end
    while (!idle) @(negedge clk);
    // check the reserved region
    for (int w = 0; w < cnt; w++)
      for (int l = 0; l < 8; l++) begin
        elem_t got, want;
        int i;
        i = w * 8 + l;
        got  = lane_of(u_m.mem[col % NCH][off + w], l);
        want = (i < n) ? sent[i] : DUMMY_ELEM;
        checks++;
        if (got != want) begin
          failures++;
          $display("column %0d word %0d lane %0d: got %h expected %h", col, w, l, got, want);
        end
      end
  endtask

  initial begin
    int off;
    for (int c = 0; c < NCH; c++) for (int a = 0; a < 256; a++) u_m.mem[c][a] = '1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    off = 0;
    for (int col = 0; col < 30; col++) begin
      int n, cnt;
      n   = 1 + int'($urandom % 30);
      cnt = (n + 7) / 8 + ((col % 5 == 0) ? 1 : 0);   // some columns reserve an extra dataword
      column(col, off, cnt, n);
      off += cnt;
    end
    // overflow: 20 elements into a 2-dataword reservation
    column(40, off, 2, 16);
    checks++;
    if (overflows != 0) begin failures++; $display("overflow counted too early"); end
    begin
      int o2;
      o2 = off + 2;
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        in_valid = 1'b1; in_elem = '{val: 32'(i), col: 16'd52, row: 16'(i)}; in_last = (i == 19);
        in_col = 16'd52; in_lu_off = 32'(o2); in_lu_cnt = 16'd2;
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        #1 in_valid = 1'b0;
      end
      while (!idle) @(negedge clk);
      checks += 2;
      if (overflows != 1) begin failures++; $display("overflows %0d, expected 1", overflows); end
      if (u_m.mem[52 % NCH][o2 + 2] != '1) begin failures++; $display("overflow written past the reservation"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
