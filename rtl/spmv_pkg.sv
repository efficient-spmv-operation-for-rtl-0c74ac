// spmv_pkg: types and constants shared by the SpMV accelerator.
//
// A record is the key/value pair that flows through both steps of the
// Two-Step SpMV scheme: the key is a row index, the value an IEEE-754 single
// precision number. Keys are 32 bits so that vectors of up to 4 billion
// elements can be indexed. The all-ones key marks the end of a sorted list
// inside the merge cores; it is never a valid row index. Record layout,
// widths and the end marker are choices of this design.
package spmv_pkg;

  localparam int unsigned KEY_W = 32;
  localparam int unsigned VAL_W = 32;

  typedef logic [KEY_W-1:0] key_t;
  typedef logic [VAL_W-1:0] val_t;

  typedef struct packed {
    key_t key;
    val_t val;
  } rec_t;

  localparam key_t KEY_END = '1;


  // One nonzero of a matrix stripe in row-major coordinate order, as fed to
  // a step-1 lane. 'empty' marks a placeholder item for a lane with no
  // nonzero in the stripe; 'last' marks the final item of the lane's stream.
  typedef struct packed {
    key_t        row;
    logic [31:0] col;
    val_t        val;
    logic        last;
    logic        empty;
  } nz_t;

endpackage
