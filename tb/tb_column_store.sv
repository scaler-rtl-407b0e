// tb_column_store: checks the slot-organised column store (as used for the
// Local and Shared Memories) against a reference model. Random columns of
// 1 to 10 elements are written into a 4-slot store of 8 entries per slot;
// after each write every column index 0..15 is looked up and, on a hit, all
// entries are read back. A column maps to slot col mod 4, evicts the previous
// occupant, and a column longer than 8 entries must never hit.
module tb_column_store;
  import scaler_pkg::*;

  localparam int SLOTS = 4, MAXN = 8;
  logic        clk = 1'b0, rst_n = 1'b0;
  idx_t        lk_col = '0, rd_col = '0, wr_col = '0, commit_col = '0;
  logic        lk_hit;
  logic [15:0] lk_nnz, rd_idx = '0, wr_idx = '0, commit_nnz = '0;
  elem_t       rd_elem, wr_elem = '0;
  logic        wr_en = 1'b0, commit_en = 1'b0;
  int          checks = 0, failures = 0;

  // reference
  int   r_col [SLOTS];
  int   r_n   [SLOTS];
  bit   r_ok  [SLOTS];
  int   r_row [SLOTS][MAXN];
  int   r_val [SLOTS][MAXN];

  column_store #(.SLOTS(SLOTS), .MAX_NNZ(MAXN)) dut (.*);

  always #5 clk = ~clk;

  task automatic write_col(int c, int n);
    int s;
    s = c % SLOTS;
    for (int i = 0; i < n; i++) begin
      int row, val;
      row = int'($urandom % 1000);
      val = int'($urandom);
      if (i < MAXN) begin r_row[s][i] = row; r_val[s][i] = val; end
      wr_en      <= 1'b1;
      wr_col     <= 16'(c);
      wr_idx     <= 16'(i);
      wr_elem    <= '{val: 32'(val), col: 16'(c), row: 16'(row)};
      commit_en  <= (i == n - 1);
      commit_col <= 16'(c);
      commit_nnz <= 16'(n);
      @(posedge clk);
    end
    wr_en     <= 1'b0;
    commit_en <= 1'b0;
    r_col[s] = c;
    r_n[s]   = n;
    r_ok[s]  = (n <= MAXN);
    @(posedge clk);
  endtask

  task automatic check_all();
    for (int c = 0; c < 16; c++) begin
      int s;
      bit exp_hit;
      s = c % SLOTS;
      exp_hit = r_ok[s] && r_col[s] == c;
      lk_col = 16'(c);
      rd_col = 16'(c);
      #1;
      checks++;
      if (lk_hit !== exp_hit) begin
        failures++;
        $display("column %0d: hit %b expected %b", c, lk_hit, exp_hit);
      end else if (exp_hit) begin
        checks++;
        if (lk_nnz != 16'(r_n[s])) begin failures++; $display("column %0d nnz %0d", c, lk_nnz); end
        for (int i = 0; i < r_n[s]; i++) begin
          rd_idx = 16'(i);
          #1;
          checks++;
          if (rd_elem.row != 16'(r_row[s][i]) || rd_elem.val != 32'(r_val[s][i]) || rd_elem.col != 16'(c)) begin
            failures++;
            $display("column %0d entry %0d wrong", c, i);
          end
        end
      end
    end
  endtask

  initial begin
    for (int s = 0; s < SLOTS; s++) begin r_ok[s] = 0; r_col[s] = -1; r_n[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check_all();
    write_col(5, 1);     // one-element column: tag and commit in one cycle
    check_all();
    write_col(9, 3);     // evicts 5
    check_all();
    write_col(2, 10);    // too long to keep
    check_all();
    for (int t = 0; t < 40; t++) begin
      write_col(int'($urandom % 16), 1 + int'($urandom % 10));
      check_all();
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
