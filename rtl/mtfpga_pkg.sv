// mtfpga_pkg: types and constants shared by the multithreaded SpMV kernel.
//
// The kernel computes out = A * vec for a sparse matrix A stored in
// compressed sparse row (CSR) form: row_ptr (ROWS+1 entries), col and val
// (one entry per non-zero). Every memory channel moves one 8-byte word per
// request, as the platform's memory ports do. row_ptr and col hold 32-bit
// indices, two per word; val, vec and out hold IEEE-754 doubles. These
// element widths are this design's choice; the 8-byte port width and the
// in-order return of read data follow the platform description.
package mtfpga_pkg;

  localparam int unsigned ADDR_W = 48;   // byte address on a memory channel
  localparam int unsigned DATA_W = 64;   // one memory word, one double
  localparam int unsigned IDX_W  = 32;   // row and column indices

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] word_t;
  typedef logic [IDX_W-1:0]  idx_t;

  // Request on one memory channel. A read returns one word on the
  // channel's response port, in request order; a write returns nothing.
  typedef struct packed {
    logic  write;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

  // A thread is one matrix row: its index and the half-open range
  // [start, stop) of its non-zeros in col/val.
  typedef struct packed {
    idx_t row;
    idx_t start;
    idx_t stop;
  } thread_t;

  // A finished thread: the row index and its sum of products.
  typedef struct packed {
    idx_t  row;
    word_t sum;
  } result_t;

  // Per-element tag carried alongside the data FIFOs of a PE.
  typedef struct packed {
    idx_t row;    // thread id = row index
    logic last;   // last non-zero of the row
  } elem_tag_t;

  // Kernel job description held in the control registers.
  typedef struct packed {
    idx_t  length;     // number of rows (threads)
    addr_t row_base;   // row_ptr array
    addr_t col_base;   // col array
    addr_t val_base;   // val array
    addr_t vec_base;   // dense input vector
    addr_t out_base;   // dense output vector
  } job_t;

  // Byte address of 32-bit element i of an index array, and of 64-bit
  // element i of a double array.
  function automatic addr_t idx_addr(addr_t base, idx_t i);
    return base + (addr_t'(i) << 2);
  endfunction

  function automatic addr_t dbl_addr(addr_t base, idx_t i);
    return base + (addr_t'(i) << 3);
  endfunction

  // Pick the 32-bit index out of the 8-byte word read from address a.
  function automatic idx_t idx_select(word_t w, logic a2);
    return a2 ? w[63:32] : w[31:0];
  endfunction

endpackage
