// atm_buf_pkg: constants and types shared by the linked-list ATM output buffer.
//
// The buffer keeps its cells in a pool indexed by a cell address and organises
// the addresses in linked lists whose link fields live in an on-chip RAM. Each
// RAM word holds four link fields of one address:
//   FWD  forward thread of the class list (and the only thread of the free list)
//   BWD  backward thread of the class list
//   LPF  forward thread of the low-priority (CLP=1) sublist
//   LPB  backward thread of the low-priority sublist
// Address 0 terminates the free list, addresses 1..NUM_CLASSES are the initial
// start (head sentinel) addresses of the class lists, and the rest hold cells.
// The defaults are the main configuration: 3 classes and 2000 cells. One extra
// cell address is always held in reserve for the next incoming cell.
package atm_buf_pkg;

  localparam int unsigned DEF_NUM_CLASSES = 3;
  localparam int unsigned DEF_CAPACITY    = 2000;

  // Number of list RAM words / pool slots for a given configuration:
  // terminator + one start address per class + capacity + reserved next cell.
  function automatic int unsigned list_depth(int unsigned num_classes, int unsigned capacity);
    return 1 + num_classes + capacity + 1;
  endfunction

  // Link fields of a list RAM word, by position in the packed word.
  typedef enum logic [1:0] {
    FLD_FWD = 2'd0,
    FLD_BWD = 2'd1,
    FLD_LPF = 2'd2,
    FLD_LPB = 2'd3
  } link_field_e;

  localparam int unsigned NUM_FIELDS = 4;

  // Write masks, one bit per field.
  localparam logic [NUM_FIELDS-1:0] WM_FWD = 4'b0001;
  localparam logic [NUM_FIELDS-1:0] WM_BWD = 4'b0010;
  localparam logic [NUM_FIELDS-1:0] WM_LPF = 4'b0100;
  localparam logic [NUM_FIELDS-1:0] WM_LPB = 4'b1000;
  localparam logic [NUM_FIELDS-1:0] WM_ALL = 4'b1111;

  // An ATM cell is 53 bytes; the CLP bit is bit 0 of header octet 4 (index 3).
  localparam int unsigned ATM_CELL_BYTES = 53;
  localparam int unsigned CLP_OCTET      = 3;

  // Bytes of switch-internal tag in front of each cell on the crossbar link.
  // Octet 0 of the tag carries the service class; 3 tag bytes make the link
  // cell 56 bytes long.
  localparam int unsigned DEF_TAG_BYTES = 3;

endpackage
