// Layout of one translation table cell, most significant field first:
//   key   : virtual page number of the page held by this cell
//   link  : cell address of the next synonym in the chain
//   ro    : read-only page
//   valid : flag, the cell holds a page
//   eoc   : flag, end of chain (no further synonym)
//   frame : main memory page frame number
// Expands inside a module that has the parameters VPN_W, CELL_AW and FRAME_W.
`ifndef XLAT_CELL_SVH
`define XLAT_CELL_SVH
`define XLAT_CELL_T \
  typedef struct packed { \
    logic [VPN_W-1:0]   key; \
    logic [CELL_AW-1:0] link; \
    logic               ro; \
    logic               valid; \
    logic               eoc; \
    logic [FRAME_W-1:0] frame; \
  } cell_t;
`endif
