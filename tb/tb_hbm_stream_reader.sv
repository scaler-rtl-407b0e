// tb_hbm_stream_reader: checks the multi-outstanding burst reader against a
// behavioural HBM channel (8-cycle latency, ready 3 cycles in 4). Bursts of
// random length and address must return exactly the stored datawords in
// order. A 32-dataword burst must finish within 128 cycles (one read at a
// time would need over 280), which requires reads to overlap, and at least 4
// reads must have been in flight at once. A second phase also throttles
// issue_ok at random and checks the data again.
module tb_hbm_stream_reader;
  import scaler_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   cmd_valid = 1'b0, cmd_ready, issue_ok = 1'b1, busy;
  haddr_t cmd_addr = '0;
  idx_t   cmd_cnt = '0;
  logic [15:0] outstanding;
  logic   ar_valid [1], ar_ready_m [1], r_valid [1];
  haddr_t ar_addr [1];
  dword_t r_data [1];
  logic   aw_valid [1], aw_ready [1];
  haddr_t aw_addr [1];
  dword_t w_data [1];
  logic   out_valid;
  dword_t out_data;
  logic   ar_ready;
  int     checks = 0, failures = 0, cyc = 0, peak = 0;
  dword_t expq [$];

  assign aw_valid[0] = 1'b0;
  assign aw_addr[0]  = '0;
  assign w_data[0]   = '0;
  assign ar_ready    = ar_ready_m[0];

  hbm_model #(.NCH(1), .WORDS(256), .LAT(8), .RAND_READY(1'b1)) u_m (
    .clk, .ar_valid, .ar_ready (ar_ready_m), .ar_addr, .r_valid, .r_data,
    .aw_valid, .aw_ready, .aw_addr, .w_data
  );

  logic   ar_v_dut;
  haddr_t ar_a_dut;
  assign ar_valid[0] = ar_v_dut;
  assign ar_addr[0]  = ar_a_dut;

  hbm_stream_reader #(.MAX_OUT(32)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_addr, .cmd_cnt, .issue_ok,
    .outstanding, .busy, .ar_valid (ar_v_dut), .ar_ready, .ar_addr (ar_a_dut),
    .r_valid (r_valid[0]), .r_data (r_data[0]), .out_valid, .out_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (int'(outstanding) > peak) peak = int'(outstanding);
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0 || out_data != expq[0]) begin
        failures++;
        $display("unexpected dataword at cycle %0d", cyc);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  task automatic burst(int a, int n);
    for (int i = 0; i < n; i++) expq.push_back(u_m.mem[0][a + i]);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd_addr  = 32'(a);
    cmd_cnt   = 16'(n);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  initial begin
    int t0;
    for (int i = 0; i < 256; i++) u_m.mem[0][i] = {16{$urandom}};
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    t0 = cyc;
    burst(10, 32);
    while (busy || expq.size() != 0) @(posedge clk);
    checks += 2;
    if (cyc - t0 > 128) begin failures++; $display("32-word burst took %0d cycles", cyc - t0); end
    if (peak < 4) begin failures++; $display("peak reads in flight %0d", peak); end
    for (int b = 0; b < 20; b++) begin
      burst(int'($urandom % 200), int'($urandom % 40));
      repeat (int'($urandom % 3)) @(posedge clk);
    end
    fork
      forever begin
        issue_ok <= ($urandom % 3) != 0;
        @(posedge clk);
      end
    join_none
    while (busy || expq.size() != 0) @(posedge clk);
    $display("peak reads in flight %0d", peak);
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
