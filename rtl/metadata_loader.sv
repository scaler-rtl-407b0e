// metadata_loader: reads 32-bit MetaVal entries from a metadata HBM channel.
//
// Metadata arrays are stored as consecutive 512-bit datawords of sixteen
// MetaVals each. A request names the array's first dataword (req_base) and the
// entry index (req_idx); the loader reads dataword req_base + req_idx/16 and
// returns MetaVal req_idx mod 16 on resp_valid/resp_data. The most recently
// read dataword is kept, so consecutive entries of one dataword cost one HBM
// read. One request is served at a time; req_ready is high when idle.
// The two instances are the metadata loader for dependency metadata with the
// matrix-A layout and the loader for the L/U layout. The packing of sixteen
// 32-bit MetaVals per dataword follows the design; the request interface and
// the one-dataword cache are this implementation's choices.
module metadata_loader (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  output logic                 req_ready,
  input  scaler_pkg::haddr_t   req_base,
  input  logic [31:0]          req_idx,
  output logic                 resp_valid,
  output scaler_pkg::meta_t    resp_data,
  output logic                 ar_valid,
  input  logic                 ar_ready,
  output scaler_pkg::haddr_t   ar_addr,
  input  logic                 r_valid,
  input  scaler_pkg::dword_t   r_data,
  output logic [31:0]          hbm_reads
);
  import scaler_pkg::*;

  typedef enum logic [1:0] {M_IDLE, M_ADDR, M_DATA} mstate_t;
  mstate_t  st;
  dword_t   line;
  haddr_t   line_addr, want;
  logic     line_ok;
  logic [3:0] lane;

  assign req_ready = (st == M_IDLE);
  assign ar_valid  = (st == M_ADDR);
  assign ar_addr   = want;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= M_IDLE;
      line_ok    <= 1'b0;
      resp_valid <= 1'b0;
      hbm_reads  <= '0;
      line_addr  <= '0;
      want       <= '0;
      lane       <= '0;
      line       <= '0;
      resp_data  <= '0;
    end else begin
      resp_valid <= 1'b0;
      case (st)
        M_IDLE: if (req_valid) begin
          lane <= req_idx[3:0];
          want <= req_base + (req_idx >> 4);
          if (line_ok && line_addr == req_base + (req_idx >> 4)) begin
            resp_valid <= 1'b1;
            resp_data  <= line[32*req_idx[3:0] +: 32];
          end else begin
            st <= M_ADDR;
          end
        end
        M_ADDR: if (ar_ready) begin
          st        <= M_DATA;
          hbm_reads <= hbm_reads + 32'd1;
        end
        M_DATA: if (r_valid) begin
          line       <= r_data;
          line_addr  <= want;
          line_ok    <= 1'b1;
          resp_valid <= 1'b1;
          resp_data  <= r_data[32*lane +: 32];
          st         <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
