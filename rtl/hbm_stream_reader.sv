// hbm_stream_reader: multi-outstanding burst reader for one HBM channel.
//
// A command (cmd_addr, cmd_cnt) asks for cmd_cnt consecutive datawords
// starting at dataword address cmd_addr. The reader sends one address per
// cycle on the channel's read-address port (ar_*) while the consumer grants
// room (issue_ok) and fewer than MAX_OUT reads are in flight; it does not wait
// for data before sending the next address, so address sending, the memory's
// own latency and data return of successive reads overlap. Data returns in
// order on r_valid/r_data and is passed straight to out_valid/out_data (one
// cycle later); the consumer must accept it, which it guarantees through
// issue_ok. 'outstanding' counts reads sent whose data has not yet returned,
// so the consumer can reserve buffer space for them. A command with
// cmd_cnt == 0 is accepted and does nothing.
// The design describes a pipelined prefetch that overlaps these access stages
// and tracks requests and responses; the port protocol (in-order responses,
// no back-pressure on data) and MAX_OUT are this implementation's choices.
module hbm_stream_reader #(
  parameter int unsigned MAX_OUT = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  scaler_pkg::haddr_t   cmd_addr,
  input  scaler_pkg::idx_t     cmd_cnt,
  input  logic                 issue_ok,
  output logic [15:0]          outstanding,
  output logic                 busy,
  output logic                 ar_valid,
  input  logic                 ar_ready,
  output scaler_pkg::haddr_t   ar_addr,
  input  logic                 r_valid,
  input  scaler_pkg::dword_t   r_data,
  output logic                 out_valid,
  output scaler_pkg::dword_t   out_data
);
  import scaler_pkg::*;

  haddr_t      next_addr;
  idx_t        remaining;
  logic        sent, got;

  assign cmd_ready = (remaining == '0);
  assign ar_valid  = (remaining != '0) && issue_ok && (outstanding < 16'(MAX_OUT));
  assign ar_addr   = next_addr;
  assign sent      = ar_valid && ar_ready;
  assign got       = r_valid;
  assign busy      = (remaining != '0) || (outstanding != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining   <= '0;
      next_addr   <= '0;
      outstanding <= '0;
      out_valid   <= 1'b0;
    end else begin
      if (cmd_valid && cmd_ready) begin
        remaining <= cmd_cnt;
        next_addr <= cmd_addr;
      end else if (sent) begin
        remaining <= remaining - 16'd1;
        next_addr <= next_addr + 32'd1;
      end
      outstanding <= outstanding + 16'(sent) - 16'(got);
      out_valid   <= got;
    end
  end

  always_ff @(posedge clk) if (got) out_data <= r_data;

endmodule
