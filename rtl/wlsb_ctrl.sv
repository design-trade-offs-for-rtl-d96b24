// wlsb_ctrl: the write/read control of the buffer.
//
// Decides, for the instruction in the memory stage, whether it completes in
// this cycle or stalls the pipeline, drives the three update ports of the
// entry array, and sequences the single memory port.
//
// Completing in the request cycle (req_ready high):
//   ld/wld  whose data is valid in a matched entry (cache or store valid:
//           caching and store-to-load forwarding);
//   st/wst  that matches an entry (data written, slot made store valid),
//           unless that entry is being committed right now;
//   st/wst  that matches nothing while the replacement unit offers a victim
//           (the entry is taken over for the store's address).
// Stalling:
//   a load whose data is not in the buffer. The controller reads the
//   256-bit line from memory into the matched entry, or into the victim if
//   nothing matched; the alias handler keeps the entry's pending store words.
//   The load completes in the cycle the memory data returns, with the merged
//   line as its result.
//   a store (or a load) that finds every entry holding pending stores: it
//   waits until a commit frees an entry.
// In the background, whenever no load needs the memory port, the entry at
// the head of the commit queue is written to memory with its sv bits as
// word mask; when memory acknowledges, its sv bits turn into cv bits.
//
// Memory port: one request at a time, valid/ready handshake, then exactly
// one mem_rsp_valid pulse (read data, or write acknowledge). States:
// IDLE -> RD_REQ -> RD_WAIT -> IDLE and IDLE -> CM_REQ -> CM_WAIT -> IDLE.
// A load miss therefore costs 2 cycles plus the memory's handshake and
// response latency. Blocking loads, per-entry commit and this handshake are
// this design's choices; the document does not give the timing.
module wlsb_ctrl
  import wlsb_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  localparam int unsigned IDX_W = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // request in the memory stage
  input  logic             req_valid,
  input  op_e              req_op,
  output logic             req_ready,   // low = stall the pipeline
  output logic             rsp_valid,   // load result this cycle
  output logic             rsp_hit,     // ... served without memory access
  output logic             rsp_fill,    // ... served by a memory fill
  output logic [IDX_W-1:0] rsp_entry,   // entry that served the access
  // search result
  input  logic             hit,         // address matched an entry
  input  logic             avail,       // requested data valid in it
  input  logic [IDX_W-1:0] match_idx,
  input  logic [IDX_W-1:0] victim_idx,
  input  logic             victim_valid,
  // replacement unit updates
  output logic             upd_hit,
  output logic [IDX_W-1:0] hit_idx,
  output logic             upd_alloc,
  output logic [IDX_W-1:0] alloc_idx,
  // entry array ports
  output logic             st_en,
  output logic [IDX_W-1:0] st_idx,
  output logic             st_alloc,
  output logic             fill_en,
  output logic [IDX_W-1:0] fill_idx,
  output logic             fill_alloc,
  output logic             cm_en,
  output logic [IDX_W-1:0] cm_idx,
  // commit queue
  input  logic [IDX_W-1:0] q_head,
  input  logic             q_empty,
  input  logic             entry_pending,  // matched entry already has sv bits
  output logic             q_push,
  output logic [IDX_W-1:0] q_push_idx,
  output logic             q_pop,
  // memory port
  output logic             mem_req_valid,
  output logic             mem_req_we,
  output logic [IDX_W-1:0] mem_idx,        // entry read into / written from
  input  logic             mem_req_ready,
  input  logic             mem_rsp_valid,
  // status
  output logic             commit_busy
);

  typedef enum logic [2:0] {S_IDLE, S_RD_REQ, S_RD_WAIT, S_CM_REQ, S_CM_WAIT} state_e;

  state_e           state_q, state_d;
  logic [IDX_W-1:0] rd_idx_q;
  logic             rd_alloc_q;

  wire is_store  = op_is_store(req_op);
  wire is_load   = !is_store;
  wire fill_done = (state_q == S_RD_WAIT) && mem_rsp_valid;

  assign commit_busy = (state_q == S_CM_REQ) || (state_q == S_CM_WAIT);

  // Accept rules.
  logic ld_hit_ok, st_hit_ok, st_alloc_ok;
  always_comb begin
    ld_hit_ok   = req_valid && is_load && avail;
    st_hit_ok   = req_valid && is_store && hit &&
                  !(commit_busy && match_idx == q_head);
    st_alloc_ok = req_valid && is_store && !hit && victim_valid;
    if (state_q == S_RD_REQ || state_q == S_RD_WAIT) begin
      ld_hit_ok   = 1'b0;
      st_hit_ok   = 1'b0;
      st_alloc_ok = 1'b0;
    end
  end

  always_comb begin
    req_ready = ld_hit_ok || st_hit_ok || st_alloc_ok || fill_done;
    rsp_valid = ld_hit_ok || fill_done;
    rsp_hit   = ld_hit_ok;
    rsp_fill  = fill_done;
    rsp_entry = fill_done ? rd_idx_q : (hit ? match_idx : victim_idx);

    st_en    = st_hit_ok || st_alloc_ok;
    st_idx   = hit ? match_idx : victim_idx;
    st_alloc = st_alloc_ok;

    fill_en    = fill_done;
    fill_idx   = rd_idx_q;
    fill_alloc = rd_alloc_q;

    cm_en  = (state_q == S_CM_WAIT) && mem_rsp_valid;
    cm_idx = q_head;
    q_pop  = cm_en;

    q_push     = st_alloc_ok || (st_hit_ok && !entry_pending);
    q_push_idx = st_idx;

    upd_hit   = ld_hit_ok || st_hit_ok || (fill_done && !rd_alloc_q);
    hit_idx   = fill_done ? rd_idx_q : match_idx;
    upd_alloc = st_alloc_ok || (fill_done && rd_alloc_q);
    alloc_idx = fill_done ? rd_idx_q : victim_idx;

    mem_req_valid = (state_q == S_RD_REQ) || (state_q == S_CM_REQ);
    mem_req_we    = (state_q == S_CM_REQ);
    mem_idx       = (state_q == S_RD_REQ || state_q == S_RD_WAIT) ? rd_idx_q : q_head;
  end

  // A load that must go to memory needs a target entry.
  wire load_miss   = req_valid && is_load && !avail;
  wire load_target = hit || victim_valid;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE: begin
        if (load_miss && load_target) state_d = S_RD_REQ;
        else if (!q_empty)            state_d = S_CM_REQ;
      end
      S_RD_REQ:  if (mem_req_ready) state_d = S_RD_WAIT;
      S_RD_WAIT: if (mem_rsp_valid) state_d = S_IDLE;
      S_CM_REQ:  if (mem_req_ready) state_d = S_CM_WAIT;
      S_CM_WAIT: if (mem_rsp_valid) state_d = S_IDLE;
      default:   state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      rd_idx_q   <= '0;
      rd_alloc_q <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE && state_d == S_RD_REQ) begin
        rd_idx_q   <= hit ? match_idx : victim_idx;
        rd_alloc_q <= !hit;
      end
    end
  end

  // The pipeline holds a stalled instruction until it completes.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           req_valid && !req_ready |=> req_valid && $stable(req_op));
  // No response without an outstanding request.
  a_rsp: assert property (@(posedge clk) disable iff (!rst_n)
                          mem_rsp_valid |-> (state_q == S_RD_WAIT || state_q == S_CM_WAIT));

endmodule
