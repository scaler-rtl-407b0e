// tb_pe_div: checks the divider unit. Random numerators are divided by
// random pivots (one per cycle, result 2 cycles later, within one unit in
// the last place of the correctly rounded quotient); entries with in_div low
// must pass unchanged; pivots below 2^-27 in magnitude (including zero) must
// be replaced by +-2^-27 and flagged.
module tb_pe_div;
  import tb_fp_util::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] pivot = 32'h3f800000, piv_used;
  logic        piv_fixed;
  logic        in_valid = 1'b0, in_div = 1'b0, out_valid;
  logic [31:0] in_num = '0, out_val;
  logic [16:0] in_tag = '0, out_tag;
  int          checks = 0, failures = 0, cyc = 0;
  logic [31:0] exp_val [200];
  int          issue_cyc [200];
  int          nout = 0;

  pe_div #(.TAG_W(17)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int i;
    i = int'(out_tag);
    checks += 2;
    if (cyc - issue_cyc[i] != 3) begin failures++; $display("latency %0d", cyc - issue_cyc[i]); end
    if (ulp_diff(out_val, exp_val[i]) > 1) begin
      failures++;
      if (failures < 10) $display("item %0d: got %h expected %h", i, out_val, exp_val[i]);
    end
    nout++;
  end

  task automatic guard(logic [31:0] p, logic [31:0] want, logic fixed);
    pivot = p;
    #1;
    checks++;
    if (piv_used !== want || piv_fixed !== fixed) begin
      failures++;
      $display("pivot %h: used %h fixed %b, expected %h %b", p, piv_used, piv_fixed, want, fixed);
    end
  endtask

  initial begin
    guard(32'h00000000, 32'h32000000, 1'b1);  // 0 -> +2^-27
    guard(32'hb0000000, 32'hb2000000, 1'b1);  // -2^-31 -> -2^-27
    guard(32'h32000000, 32'h32000000, 1'b0);  // 2^-27 is kept
    guard(32'hc0400000, 32'hc0400000, 1'b0);  // -3.0 is kept
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      logic [31:0] n, p;
      logic d;
      n = rnd(100, 150);
      p = rnd(110, 140);
      d = (i % 4) != 0;
      exp_val[i]   = d ? r2f(f2r(n) / f2r(p)) : n;
      issue_cyc[i] = cyc;
      pivot    <= p;
      in_valid <= 1'b1;
      in_div   <= d;
      in_num   <= n;
      in_tag   <= 17'(i);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != 200) begin failures++; $display("%0d results", nout); end
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
