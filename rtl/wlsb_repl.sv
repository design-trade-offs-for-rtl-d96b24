// wlsb_repl: the replacement algorithm of the buffer.
//
// A replacement pointer walks the entries in FIFO order. The victim is the
// first entry, starting at the pointer and wrapping around, that holds no
// pending store: an entry with any store-valid bit set is never replaced,
// under every algorithm. After an entry is allocated the pointer moves to
// the entry after it. The POLICY parameter selects one of the three
// algorithms described for the buffer:
//   REPL_FIFO     - nothing more.
//   REPL_DEDLOAD  - "1 dedicated load": a store may not leave the buffer
//                   without an entry allocated by a load. When N-1 entries
//                   already belong to stores, a store may only replace a
//                   store entry (that has no pending store itself).
//   REPL_HITPOINT - "order revision next to the hit point": whenever an
//                   access matches an entry, the pointer moves to the entry
//                   right after it, so that a frequently hit entry is the
//                   last to be replaced. This is the default.
// The victim is combinational from the pointer and entry state; the pointer
// changes at the clock edge on upd_hit / upd_alloc. What the document leaves
// open and is chosen here: the pointer starts at entry 0, unused entries are
// treated like any other candidate, and the ld/st flag is set by the
// allocating instruction.
module wlsb_repl
  import wlsb_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter repl_e       POLICY  = REPL_HITPOINT,
  localparam int unsigned IDX_W = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ENTRIES-1:0] in_use,      // entry holds an address
  input  logic [ENTRIES-1:0] pending,     // entry holds a pending store
  input  logic [ENTRIES-1:0] is_ld,       // entry was allocated by a load
  input  logic               for_store,   // the victim is wanted by a store
  input  logic               upd_hit,     // an access matched entry hit_idx
  input  logic [IDX_W-1:0]   hit_idx,
  input  logic               upd_alloc,   // entry alloc_idx was allocated
  input  logic [IDX_W-1:0]   alloc_idx,
  output logic [IDX_W-1:0]   victim_idx,
  output logic               victim_valid,
  output logic [IDX_W-1:0]   rptr         // current replacement pointer
);

  function automatic logic [IDX_W-1:0] next_idx(input logic [IDX_W-1:0] i);
    return (int'(i) == ENTRIES - 1) ? '0 : i + 1'b1;
  endfunction

  logic [ENTRIES-1:0] cand;
  int unsigned        n_store;

  always_comb begin
    n_store = 0;
    for (int e = 0; e < ENTRIES; e++)
      if (in_use[e] && !is_ld[e]) n_store++;
    cand = ~pending;
    if (POLICY == REPL_DEDLOAD && for_store && n_store >= ENTRIES - 1)
      cand = in_use & ~is_ld & ~pending;
  end

  always_comb begin
    logic [IDX_W-1:0] i;
    victim_idx   = rptr;
    victim_valid = 1'b0;
    i            = rptr;
    for (int k = 0; k < ENTRIES; k++) begin
      if (!victim_valid && cand[i]) begin
        victim_idx   = i;
        victim_valid = 1'b1;
      end
      i = next_idx(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      rptr <= '0;
    else if (upd_alloc)
      rptr <= next_idx(alloc_idx);
    else if (upd_hit && POLICY == REPL_HITPOINT)
      rptr <= next_idx(hit_idx);
  end

endmodule
