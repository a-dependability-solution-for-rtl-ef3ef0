// dm_pkg: types and constants shared by the Dependability Manager (DM) and the
// dependability wrappers of the Xentium tiles.
//
// The DM is controlled by 32-bit command words written over the network and answers
// with a 32-bit report word. The scan-test geometry (32 scan chains per tile, so
// 32-bit test flits) and the tile count (nine tiles per device, three tested at a
// time) follow the source design. The bit layout of the command and report words and
// the wrapper instruction codes are this design's own; the command layout was chosen
// so that the command 32'h9600_0000 means "start embedded memory BIST on three tiles"
// (tiles 6, 7 and 9).
package dm_pkg;

  localparam int unsigned N_TILES    = 9;   // Xentium tiles per device
  localparam int unsigned N_PER_TEST = 3;   // tiles tested together (majority vote)
  localparam int unsigned FLIT_W     = 32;  // NoC data width = number of scan chains

  // DM operations
  typedef enum logic [1:0] {
    OP_MBIST = 2'b00,   // start the embedded memory BIST of the selected tiles
    OP_SCAN  = 2'b01,   // scan-based structural test of the selected group
    OP_FULL  = 2'b10,   // memory BIST, then scan test if the memories pass (Fig. 6 flow)
    OP_RSVD  = 2'b11
  } dm_op_e;

  // Command word: [31] start, [30:29] op, [28:20] tile mask (bit 20 = tile 1),
  // [19:0] reserved (ignored)
  typedef struct packed {
    logic               start;
    dm_op_e             op;
    logic [N_TILES-1:0] tiles;
    logic [19:0]        rsvd;
  } dm_cmd_t;

  typedef enum logic [1:0] {
    ERR_NONE        = 2'd0,
    ERR_NO_MAJORITY = 2'd1,   // more than one tile of the group disagreed
    ERR_BAD_SELECT  = 2'd2,   // wrong number of tiles for the operation
    ERR_BAD_OP      = 2'd3    // reserved operation code
  } dm_err_e;

  // Report word: [31] done, [30] is_error, [29:28] error type, [27] core fault,
  // [26] memory fault, [25:17] faulty tile mask, [16:14] faulty DUTs of the group
  // (bit 16 = first selected tile), [13:5] tested tile mask, [4:0] zero
  typedef struct packed {
    logic                  done;
    logic                  is_error;
    dm_err_e               err;
    logic                  core_fault;
    logic                  mem_fault;
    logic [N_TILES-1:0]    faulty_tiles;
    logic [N_PER_TEST-1:0] faulty_duts;
    logic [N_TILES-1:0]    tested_tiles;
    logic [4:0]            rsvd;
  } dm_report_t;

  // Wrapper modes and the 3-bit wrapper instruction register (WIR) codes
  typedef enum logic [2:0] {
    WIR_NORMAL = 3'b000,   // functional operation, core connected to the NoC
    WIR_MFG    = 3'b001,   // manufacturing test: scan chains on the test pins
    WIR_DEP    = 3'b010,   // dependability test: scan chains on the NoC (TAM)
    WIR_MBIST  = 3'b011    // dependability test: embedded memory BIST
  } wir_e;

  localparam int unsigned WIR_W = 3;

endpackage
