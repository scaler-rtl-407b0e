// tb_matrix_a_loader: checks the 12-channel Matrix A loader against 12
// behavioural HBM channels. Every channel gets three bursts of random length
// at random addresses; each channel's output must be exactly its stored
// datawords in order, and all 12 channels must have reads in flight at the
// same time at least once (channels work in parallel).
module tb_matrix_a_loader;
  import scaler_pkg::*;

  localparam int NCH = 12;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cmd_valid [NCH], cmd_ready [NCH], issue_ok [NCH], busy;
  haddr_t      cmd_addr [NCH];
  idx_t        cmd_cnt [NCH];
  logic [15:0] outstanding [NCH];
  logic        ar_valid [NCH], ar_ready [NCH], r_valid [NCH], out_valid [NCH];
  haddr_t      ar_addr [NCH];
  dword_t      r_data [NCH], out_data [NCH];
  logic        aw_valid [NCH], aw_ready [NCH];
  haddr_t      aw_addr [NCH];
  dword_t      w_data [NCH];
  int          checks = 0, failures = 0, all_busy = 0;
  dword_t      expq [NCH][$];

  hbm_model #(.NCH(NCH), .WORDS(128), .LAT(8)) u_m (
    .clk, .ar_valid, .ar_ready, .ar_addr, .r_valid, .r_data, .aw_valid, .aw_ready, .aw_addr, .w_data
  );
  matrix_a_loader #(.NUM_CH(NCH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    int n;
    n = 0;
    for (int c = 0; c < NCH; c++) begin
      if (outstanding[c] != 0) n++;
      if (out_valid[c]) begin
        checks++;
        if (expq[c].size() == 0 || out_data[c] != expq[c][0]) begin
          failures++;
          $display("channel %0d: unexpected dataword", c);
        end
        if (expq[c].size() != 0) void'(expq[c].pop_front());
      end
    end
    if (n == NCH) all_busy++;
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin
      cmd_valid[c] = 1'b0; cmd_addr[c] = '0; cmd_cnt[c] = '0; issue_ok[c] = 1'b1;
      aw_valid[c] = 1'b0; aw_addr[c] = '0; w_data[c] = '0;
      for (int i = 0; i < 128; i++) u_m.mem[c][i] = {16{$urandom}};
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < 3; b++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        int a, n;
        a = int'($urandom % 100);
        n = 4 + int'($urandom % 24);
        for (int i = 0; i < n; i++) expq[c].push_back(u_m.mem[c][a + i]);
        cmd_valid[c] = 1'b1; cmd_addr[c] = 32'(a); cmd_cnt[c] = 16'(n);
      end
      for (int c = 0; c < NCH; c++) begin
        while (!cmd_ready[c]) @(negedge clk);
      end
      // every channel was idle here, so all commands were taken at one edge
      @(negedge clk);
      for (int c = 0; c < NCH; c++) cmd_valid[c] = 1'b0;
      while (busy) @(negedge clk);
    end
    repeat (3) @(posedge clk);
    checks += 2;
    if (all_busy == 0) begin failures++; $display("channels never all busy together"); end
    for (int c = 0; c < NCH; c++) if (expq[c].size() != 0) begin
      failures++;
      $display("channel %0d: %0d datawords missing", c, expq[c].size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
