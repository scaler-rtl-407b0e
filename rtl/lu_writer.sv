// lu_writer: the L/U writer, which streams finished L/U columns to HBM.
//
// Columns arrive one at a time from the shared memory as a stream of
// elements (in_*), with the column index and its L/U layout (first dataword
// lu_off and reserved dataword count lu_cnt) held steady while the column
// lasts and in_last on its final element. Elements are packed eight to a
// 512-bit dataword in arrival order; a dataword is written when it is full or
// the column ends, unused lanes holding dummy elements (row 16'hFFFF). Column
// c goes to L/U channel c mod NUM_CH at addresses lu_off, lu_off+1, ...
// If a column produces fewer datawords than reserved, the rest are written as
// all-dummy datawords so the reserved region is always fully defined; if it
// produces more, the excess is dropped and counted in 'overflows'.
// One dataword write is outstanding at a time (aw_valid until aw_ready);
// in_ready is low while a write waits. 'idle' is high when nothing is held.
// Writing L/U factors back to dedicated HBM channels while the PEGs go on
// computing follows the design; the packing order, the padding and the
// overflow rule are this implementation's choices.
module lu_writer #(
  parameter int unsigned NUM_CH = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  scaler_pkg::elem_t    in_elem,
  input  logic                 in_last,
  input  scaler_pkg::idx_t     in_col,
  input  scaler_pkg::haddr_t   in_lu_off,
  input  scaler_pkg::idx_t     in_lu_cnt,
  output logic                 aw_valid [NUM_CH],
  input  logic                 aw_ready [NUM_CH],
  output scaler_pkg::haddr_t   aw_addr,
  output scaler_pkg::dword_t   w_data,
  output logic                 idle,
  output logic [31:0]          overflows,
  output logic [31:0]          words_written
);
  import scaler_pkg::*;

  localparam int unsigned CHW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  typedef enum logic [1:0] {W_ACC, W_WRITE, W_PAD} wstate_t;
  wstate_t        st;
  dword_t         acc;
  logic [3:0]     fill;
  logic           col_end;
  idx_t           widx, cnt;
  haddr_t         base;
  logic [CHW-1:0] ch;
  logic           wr_fire;

  function automatic dword_t dummy_word();
    dword_t w;
    for (int i = 0; i < ELEMS_PER_WORD; i++) w[64*i +: 64] = DUMMY_ELEM;
    return w;
  endfunction

  assign in_ready = (st == W_ACC);
  assign aw_addr  = base + 32'(widx);
  assign w_data   = acc;
  assign idle     = (st == W_ACC) && (fill == '0);
  assign wr_fire  = (st != W_ACC) && aw_ready[ch];

  always_comb
    for (int c = 0; c < NUM_CH; c++) aw_valid[c] = (st != W_ACC) && (ch == CHW'(c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= W_ACC;
      fill          <= '0;
      widx          <= '0;
      cnt           <= '0;
      base          <= '0;
      ch            <= '0;
      col_end       <= 1'b0;
      acc           <= '0;
      overflows     <= '0;
      words_written <= '0;
    end else begin
      case (st)
        W_ACC: if (in_valid) begin
          if (fill == '0) acc <= dummy_word();
          acc[64*fill +: 64] <= in_elem;
          base    <= in_lu_off;
          cnt     <= in_lu_cnt;
          ch      <= CHW'(in_col % 16'(NUM_CH));
          col_end <= in_last;
          if (fill == 4'd7 || in_last) begin
            fill <= '0;
            if (widx < in_lu_cnt) st <= W_WRITE;
            else begin
              overflows <= overflows + 32'd1;
              if (in_last) widx <= '0;
            end
          end else begin
            fill <= fill + 4'd1;
          end
        end
        W_WRITE: if (wr_fire) begin
          words_written <= words_written + 32'd1;
          if (!col_end) begin
            widx <= widx + 16'd1;
            st   <= W_ACC;
          end else if (widx + 16'd1 < cnt) begin
            widx <= widx + 16'd1;
            acc  <= dummy_word();
            st   <= W_PAD;
          end else begin
            widx <= '0;
            st   <= W_ACC;
          end
        end
        W_PAD: if (wr_fire) begin
          words_written <= words_written + 32'd1;
          if (widx + 16'd1 < cnt) widx <= widx + 16'd1;
          else begin
            widx <= '0;
            st   <= W_ACC;
          end
        end
        default: st <= W_ACC;
      endcase
    end
  end

endmodule
