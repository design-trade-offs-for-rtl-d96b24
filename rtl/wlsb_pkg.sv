// wlsb_pkg: types and constants shared by the WideWord Load/Store Buffer.
//
// A WideWord is 256 bits, eight 32-bit words. A 32-bit byte address splits
// into a 27-bit WideWord address (bits 31:5), a 3-bit word index (bits 4:2)
// and two ignored bits (all accesses are 4-byte aligned). These sizes follow
// the document. The memory request/response structs and the encodings of
// the instruction type and replacement policy are this design's own choice.
package wlsb_pkg;

  localparam int unsigned ADDR_W     = 32;  // byte address
  localparam int unsigned WORD_W     = 32;  // scalar word
  localparam int unsigned LINE_WORDS = 8;   // words per WideWord
  localparam int unsigned LINE_W     = WORD_W * LINE_WORDS;  // 256
  localparam int unsigned WIDX_W     = 3;   // word index, address bits 4:2
  localparam int unsigned TAG_W      = ADDR_W - WIDX_W - 2;  // 27, bits 31:5

  typedef logic [TAG_W-1:0]      tag_t;
  typedef logic [WIDX_W-1:0]     widx_t;
  typedef logic [LINE_WORDS-1:0] mask_t;   // one bit per 32-bit slot
  typedef logic [WORD_W-1:0]     word_t;
  typedef logic [LINE_W-1:0]     line_t;

  // Instruction type from EX/MEM: scalar load/store, WideWord load/store.
  typedef enum logic [1:0] {
    OP_LD  = 2'd0,
    OP_ST  = 2'd1,
    OP_WLD = 2'd2,
    OP_WST = 2'd3
  } op_e;

  // Replacement algorithms of the buffer.
  typedef enum logic [1:0] {
    REPL_FIFO     = 2'd0,  // plain FIFO order
    REPL_DEDLOAD  = 2'd1,  // FIFO, at least one entry kept for load data
    REPL_HITPOINT = 2'd2   // FIFO, pointer moved right after a matched entry
  } repl_e;

  // Request to the data memory: one WideWord read, or a masked WideWord
  // write of the pending store slots of an entry.
  typedef struct packed {
    logic  we;
    tag_t  addr;
    line_t wdata;
    mask_t wmask;
  } mem_req_t;

  function automatic tag_t addr_tag(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  function automatic widx_t addr_widx(input logic [ADDR_W-1:0] a);
    return a[2 +: WIDX_W];
  endfunction

  function automatic logic op_is_store(input op_e op);
    return (op == OP_ST) || (op == OP_WST);
  endfunction

  function automatic logic op_is_wide(input op_e op);
    return (op == OP_WLD) || (op == OP_WST);
  endfunction

endpackage
