// pe_mac: the multiply-accumulate unit of a processing element.
//
// Computes acc - l * u in single precision for one element per clock
// (initiation interval 1), which is the left-looking update
// x(r) <- x(r) - L(r,k) * x(k) applied to the dense copy of the column being
// factorised. The multiplication is registered in stage 1 and the subtraction
// in stage 2, so a result appears LAT = 2 cycles after its operands, together
// with the caller's tag (typically the row index). The unit never stalls.
// The design describes a deeply pipelined, II = 1 multiply-subtract; the
// two-stage split and the tag side channel are this implementation's choice.
module pe_mac #(
  parameter int unsigned TAG_W = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      in_acc,
  input  logic [31:0]      in_l,
  input  logic [31:0]      in_u,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      out_val,
  output logic [TAG_W-1:0] out_tag
);
  import fp32_pkg::*;

  logic             s1_valid;
  logic [31:0]      s1_acc, s1_prod;
  logic [TAG_W-1:0] s1_tag;

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
    s1_acc  <= in_acc;
    s1_prod <= fmul(in_l, in_u);
    s1_tag  <= in_tag;
    out_val <= fsub(s1_acc, s1_prod);
    out_tag <= s1_tag;
  end

endmodule
