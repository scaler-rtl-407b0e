// scaler_pkg: types and constants shared by the sparse LU accelerator.
//
// Data in HBM is organised in 512-bit datawords. A matrix dataword carries
// eight 64-bit elements; a metadata dataword carries sixteen 32-bit MetaVal
// entries. The element layout {value, column, row} with 16-bit indices and a
// single-precision value follows the storage format the design is built for;
// the bit order inside the element (row in the low 16 bits) and the dummy
// marker (row index 16'hFFFF) are this implementation's own choices.
//
// Also defined here: the PE task word the controller sends to a processing
// element group, and the fixed positions of the metadata headers.
package scaler_pkg;

  localparam int unsigned DWORD_BITS     = 512;
  localparam int unsigned ELEMS_PER_WORD = 8;   // 512 / 64
  localparam int unsigned META_PER_WORD  = 16;  // 512 / 32

  typedef logic [DWORD_BITS-1:0] dword_t;
  typedef logic [31:0]           haddr_t;   // HBM dataword address
  typedef logic [15:0]           idx_t;     // row / column index
  typedef logic [31:0]           fp32_t;    // IEEE-754 single precision
  typedef logic [31:0]           meta_t;    // MetaVal

  localparam idx_t DUMMY_ROW = 16'hFFFF;

  // One non-zero: 64 bits, packed eight to a dataword (lane i at bits 64*i+63 : 64*i).
  typedef struct packed {
    fp32_t val;
    idx_t  col;
    idx_t  row;
  } elem_t;

  localparam elem_t DUMMY_ELEM = '{val: 32'h0, col: 16'hFFFF, row: DUMMY_ROW};

  // Task word, controller -> PEG. A column task is one header word followed by
  // one word per dependency column; 'last' marks the final word of the task.
  typedef struct packed {
    logic   is_dep;   // 0: header of column 'col', 1: dependency column 'col'
    logic   last;
    idx_t   col;
    haddr_t a_off;    // header only: first matrix-A dataword of the column
    idx_t   a_cnt;    // header only: number of matrix-A datawords
    haddr_t lu_off;   // first L/U dataword of 'col' in its L/U channel
    idx_t   lu_cnt;   // L/U datawords reserved for 'col'
  } task_t;

  // Header of metadata channel 0 (dependency metadata and matrix-A layout):
  // MetaVal index inside dataword 0.
  localparam int unsigned HDR_N        = 0;  // matrix size
  localparam int unsigned HDR_NLEV     = 1;  // number of levels
  localparam int unsigned HDR_LEVPTR   = 2;  // base dataword of LevelPtr
  localparam int unsigned HDR_LEVCOL   = 3;  // base dataword of LevelColIdx
  localparam int unsigned HDR_DEPPTR   = 4;  // base dataword of DepPtr
  localparam int unsigned HDR_DEPIDX   = 5;  // base dataword of DepIdx
  localparam int unsigned HDR_AOFF     = 6;  // base dataword of DatawordOffset (A)
  localparam int unsigned HDR_ACNT     = 7;  // base dataword of DatawordCount (A)
  // Header of metadata channel 1 (L/U layout).
  localparam int unsigned HDR_LUOFF    = 0;  // base dataword of DatawordOffset (L/U)
  localparam int unsigned HDR_LUCNT    = 1;  // base dataword of DatawordCount (L/U)

  function automatic elem_t lane_of(dword_t w, int unsigned i);
    return elem_t'(w[64*i +: 64]);
  endfunction

endpackage
