// Shared constants and types of the hashed address translator.
//
// The default sizes are those of the MONADS-PC machine: 60-bit virtual
// addresses, 23-bit main memory addresses and 4 KiB pages, so a virtual page
// number has 48 bits and a main memory page frame number 11 bits. The
// translation table has 2^13 cells, four cells per page frame, which gives
// the loading factor of 0.25 used as the worked example for this scheme; the
// table size itself is this design's choice.
//
// The maintenance command and status encodings are this design's own.
package mpc_pkg;

  localparam int unsigned VA_W_DEFAULT    = 60;  // virtual address bits
  localparam int unsigned PA_W_DEFAULT    = 23;  // main memory address bits
  localparam int unsigned PAGE_W_DEFAULT  = 12;  // 4 KiB pages
  localparam int unsigned CELL_AW_DEFAULT = 13;  // 8192 table cells

  // Maintenance operations, issued when a page is loaded or discarded.
  typedef enum logic {
    OP_INSERT = 1'b0,
    OP_DELETE = 1'b1
  } maint_op_e;

  // Outcome of a maintenance operation.
  typedef enum logic [1:0] {
    ST_OK        = 2'd0,  // done
    ST_FULL      = 2'd1,  // insert: no free cell left in the table
    ST_NOT_FOUND = 2'd2,  // delete: page is not in the table
    ST_DUPLICATE = 2'd3   // insert: page is already in the table
  } maint_status_e;

endpackage
