// tb_pe_mac: checks the multiply-subtract unit against real arithmetic.
// A stream of 300 random operand sets is applied on consecutive cycles
// (initiation interval 1); each result must be registered exactly 2 clock
// edges after the edge that samples its operands (3 counts of the cycle
// counter here), with the matching tag, and be within one unit in the last place of
// acc - round(l*u) correctly rounded: the product is rounded to single
// precision before the subtraction (products alone must match exactly).
module tb_pe_mac;
  import tb_fp_util::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, out_valid;
  logic [31:0] in_acc = '0, in_l = '0, in_u = '0, out_val;
  logic [16:0] in_tag = '0, out_tag;
  int          checks = 0, failures = 0;
  logic [31:0] exp_val [300];
  int          issue_cyc [300];
  int          cyc = 0, nout = 0;

  pe_mac #(.TAG_W(17)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int i;
    i = int'(out_tag);
    checks += 2;
    if (cyc - issue_cyc[i] != 3) begin
      failures++;
      $display("latency %0d for item %0d", cyc - issue_cyc[i], i);
    end
    if (ulp_diff(out_val, exp_val[i]) > ((i % 3 == 0) ? 0 : 1)) begin
      failures++;
      if (failures < 10) $display("item %0d: got %h expected %h", i, out_val, exp_val[i]);
    end
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] a, l, u;
      a = (i % 3 == 0) ? 32'h0 : rnd(120, 134);
      l = rnd(110, 140);
      u = rnd(110, 140);
      exp_val[i]   = r2f(f2r(a) - f2r(r2f(f2r(l) * f2r(u))));
      issue_cyc[i] = cyc;
      in_valid <= 1'b1;
      in_acc   <= a;
      in_l     <= l;
      in_u     <= u;
      in_tag   <= 17'(i);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != 300) begin
      failures++;
      $display("%0d results for 300 inputs", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
