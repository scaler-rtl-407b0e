// hbm_model: behavioural model of NCH HBM pseudo-channels, for simulation
// only (not synthesizable; the real part is the FPGA's HBM stack and its
// memory controllers).
//
// Each channel holds WORDS 512-bit datawords in mem[channel][address]. A read
// address accepted on ar_valid && ar_ready returns its dataword LAT cycles
// later on r_valid/r_data, in order. A write is accepted on
// aw_valid && aw_ready. With RAND_READY set, ar_ready and aw_ready are low on
// a random quarter of the cycles, to exercise the stall paths of the design.
// Both are low for the first two cycles, so that nothing the design drives
// before its reset has taken effect is accepted.
// Test benches load and inspect mem[][] directly.
module hbm_model #(
  parameter int unsigned NCH        = 12,
  parameter int unsigned WORDS      = 1024,
  parameter int unsigned LAT        = 8,
  parameter bit          RAND_READY = 1'b1
) (
  input  logic                clk,
  input  logic                ar_valid [NCH],
  output logic                ar_ready [NCH],
  input  scaler_pkg::haddr_t  ar_addr  [NCH],
  output logic                r_valid  [NCH],
  output scaler_pkg::dword_t  r_data   [NCH],
  input  logic                aw_valid [NCH],
  output logic                aw_ready [NCH],
  input  scaler_pkg::haddr_t  aw_addr  [NCH],
  input  scaler_pkg::dword_t  w_data   [NCH]
);
  import scaler_pkg::*;

  dword_t mem   [NCH][WORDS];
  logic   pv    [NCH][LAT];
  dword_t pd    [NCH][LAT];
  int     reads [NCH];
  int     writes[NCH];
  int     cycle = 0;

  initial begin
    for (int c = 0; c < NCH; c++) begin
      ar_ready[c] = 1'b0;
      aw_ready[c] = 1'b0;
      reads[c]    = 0;
      writes[c]   = 0;
      for (int s = 0; s < LAT; s++) pv[c][s] = 1'b0;
      for (int a = 0; a < WORDS; a++) mem[c][a] = '0;
    end
  end

  always_comb
    for (int c = 0; c < NCH; c++) begin
      r_valid[c] = pv[c][LAT-1];
      r_data[c]  = pd[c][LAT-1];
    end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int c = 0; c < NCH; c++) begin
      for (int s = LAT - 1; s > 0; s--) begin
        pv[c][s] <= pv[c][s-1];
        pd[c][s] <= pd[c][s-1];
      end
      pv[c][0] <= ar_valid[c] && ar_ready[c];
      if (ar_valid[c] && ar_ready[c]) begin
        if (ar_addr[c] >= WORDS) $display("hbm_model: read beyond memory, channel %0d address %0d", c, ar_addr[c]);
        pd[c][0] <= mem[c][ar_addr[c] % WORDS];
        reads[c] <= reads[c] + 1;
      end
      if (aw_valid[c] && aw_ready[c]) begin
        mem[c][aw_addr[c] % WORDS] <= w_data[c];
        writes[c] <= writes[c] + 1;
      end
      // not ready in the first cycles, while the design is still in reset
      ar_ready[c] <= (cycle >= 2) && (!RAND_READY || ($urandom % 4) != 0);
      aw_ready[c] <= (cycle >= 2) && (!RAND_READY || ($urandom % 4) != 0);
    end
  end

endmodule
