// tb_metadata_loader: checks MetaVal reads from a behavioural metadata
// channel. Three arrays are placed at different dataword bases; 200 random
// (array, index) reads and one sequential sweep must return the stored
// 32-bit entries. The sweep of 64 consecutive entries must cost exactly 4
// HBM reads (sixteen MetaVals per dataword are reused from the kept line).
module tb_metadata_loader;
  import scaler_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        req_valid = 1'b0, req_ready, resp_valid;
  haddr_t      req_base = '0;
  logic [31:0] req_idx = '0, hbm_reads;
  meta_t       resp_data;
  logic        ar_valid [1], ar_ready [1], r_valid [1];
  haddr_t      ar_addr [1];
  dword_t      r_data [1];
  logic        aw_valid [1], aw_ready [1];
  haddr_t      aw_addr [1];
  dword_t      w_data [1];
  logic        dv;
  haddr_t      da;
  int          checks = 0, failures = 0;

  assign aw_valid[0] = 1'b0;
  assign aw_addr[0]  = '0;
  assign w_data[0]   = '0;
  assign ar_valid[0] = dv;
  assign ar_addr[0]  = da;

  hbm_model #(.NCH(1), .WORDS(64), .LAT(6)) u_m (
    .clk, .ar_valid, .ar_ready, .ar_addr, .r_valid, .r_data, .aw_valid, .aw_ready, .aw_addr, .w_data
  );
  metadata_loader dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_base, .req_idx, .resp_valid, .resp_data,
    .ar_valid (dv), .ar_ready (ar_ready[0]), .ar_addr (da), .r_valid (r_valid[0]), .r_data (r_data[0]),
    .hbm_reads
  );

  always #5 clk = ~clk;

  task automatic rd(int base, int idx);
    meta_t want;
    want = u_m.mem[0][base + idx / 16][32 * (idx % 16) +: 32];
    @(negedge clk);
    req_valid = 1'b1;
    req_base  = 32'(base);
    req_idx   = 32'(idx);
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    checks++;
    if (resp_data != want) begin
      failures++;
      $display("base %0d index %0d: got %h expected %h", base, idx, resp_data, want);
    end
  endtask

  initial begin
    int bases [3];
    int r0;
    bases = '{2, 10, 30};
    for (int i = 0; i < 64; i++) u_m.mem[0][i] = {16{$urandom}};
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 200; t++) rd(bases[$urandom % 3], int'($urandom % 120));
    // a sweep starting on a dataword boundary, after a read elsewhere
    rd(2, 0);
    r0 = int'(hbm_reads);
    for (int i = 0; i < 64; i++) rd(40, i);
    checks++;
    if (int'(hbm_reads) - r0 != 4) begin
      failures++;
      $display("sweep of 64 entries used %0d HBM reads", int'(hbm_reads) - r0);
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
