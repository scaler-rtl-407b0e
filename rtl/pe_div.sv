// pe_div: the divider unit of a processing element.
//
// After all multiply-accumulate updates of column j are done, the entry on
// the diagonal is the pivot U(j,j) and every entry below it is divided by the
// pivot to give L(r,j). This unit takes one entry per clock: when in_div is
// set it outputs in_num / pivot, otherwise it passes in_num unchanged (entries
// of U). Results appear LAT = 2 cycles later with the caller's tag.
//
// Near-zero pivot guard: a pivot whose magnitude is below 2^(PIV_MIN_EXP-127)
// is replaced by that bound with the pivot's sign (positive for zero). The
// guarded pivot is available combinationally on piv_used, and piv_fixed says
// the guard acted. The design states that near-zero diagonals are handled for
// numerical stability but not how; this replacement rule, the threshold and
// the two-stage pipeline are this implementation's choices.
module pe_div #(
  parameter int unsigned TAG_W       = 17,
  parameter logic [7:0]  PIV_MIN_EXP = 8'd100   // 2^-27, about 7.5e-9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      pivot,
  output logic [31:0]      piv_used,
  output logic             piv_fixed,
  input  logic             in_valid,
  input  logic             in_div,
  input  logic [31:0]      in_num,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      out_val,
  output logic [TAG_W-1:0] out_tag
);
  import fp32_pkg::*;

  logic             s1_valid;
  logic [31:0]      s1_val;
  logic [TAG_W-1:0] s1_tag;

  always_comb begin
    piv_fixed = is_tiny(pivot, PIV_MIN_EXP);
    piv_used  = piv_fixed ? {pivot[31] & (pivot[30:23] != 8'h00), PIV_MIN_EXP, 23'h0} : pivot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      out_valid <= s1_valid;
    end
  end

  always_ff @(posedge clk) begin
    s1_val  <= in_div ? fdiv(in_num, piv_used) : in_num;
    s1_tag  <= in_tag;
    out_val <= s1_val;
    out_tag <= s1_tag;
  end

endmodule
