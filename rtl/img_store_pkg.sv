// img_store_pkg: types and constants shared by the image storage controller.
//
// The NAND command codes are the standard large-page NAND command set (page
// program 80h/10h, page read 00h/30h, block erase 60h/D0h). They are this
// design's choice for the K9WBG08U1M-class flash; the operation sequence that
// uses them (alternating page program across plane slots) follows the
// published system description.
package img_store_pkg;

  // NAND command bytes (placed on both 8-bit halves of the 16-bit flash bus).
  localparam logic [7:0] CMD_READ1    = 8'h00;
  localparam logic [7:0] CMD_READ2    = 8'h30;
  localparam logic [7:0] CMD_PROG1    = 8'h80;
  localparam logic [7:0] CMD_PROG2    = 8'h10;
  localparam logic [7:0] CMD_ERASE1   = 8'h60;
  localparam logic [7:0] CMD_ERASE2   = 8'hD0;

  // Operation requested of the flash controller by the host side.
  typedef enum logic [1:0] {
    OP_NONE  = 2'd0,
    OP_ERASE = 2'd1,
    OP_WRITE = 2'd2,
    OP_READ  = 2'd3
  } op_e;

endpackage
