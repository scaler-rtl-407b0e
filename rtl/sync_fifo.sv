// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH entries of WIDTH bits. Push when in_valid && in_ready, pop when
// out_valid && out_ready; both may happen in the same cycle. out_data shows
// the oldest entry combinationally. 'count' is the current occupancy.
// A helper shared by several blocks; its protocol is this implementation's.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [15:0]      count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rp, wp;
  logic             push, pop;

  assign in_ready  = (count < 16'(DEPTH));
  assign out_valid = (count != 16'd0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + 16'(push) - 16'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  // The occupancy never exceeds the capacity.
  assert property (@(posedge clk) disable iff (!rst_n) count <= 16'(DEPTH));

endmodule
