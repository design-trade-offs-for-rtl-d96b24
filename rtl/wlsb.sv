// wlsb: WideWord Load/Store Buffer for the memory stage of a single-issue,
// in-order embedded processor.
//
// A small, fully associative buffer of ENTRIES lines, each one 256-bit
// WideWord with its 27-bit address, 8 store-valid and 8 cache-valid bits.
// It serves four instruction types: scalar load/store (ld, st; 32 bits)
// and WideWord load/store (wld, wst; 256 bits). One entry holds either one
// WideWord access or up to eight scalar accesses to consecutive words.
//   - Stores are written into the buffer and committed to memory later, in
//     FIFO order; repeated stores to a line are merged.
//   - Committed stores and loaded lines stay in the buffer (caching), so
//     later loads hit; loads of not yet committed data are forwarded.
//   - A load miss fetches the whole 256-bit line, so neighbouring scalar
//     loads hit afterwards.
//   - A load that must fetch a line from memory while the entry holds
//     in-flight scalar stores gets the fetched line merged with those
//     words (the RAW hazard between the two instruction sets).
//   - Replacement never evicts an entry with pending stores; the policy is
//     FIFO, "1 dedicated load" or Hitpoint (default, see wlsb_repl).
//   - A store that finds every entry holding pending stores stalls.
// Block structure, ENTRIES = 4 and the Hitpoint default follow the
// document; the port protocol is this design's own.
//
// Processor side (EX/MEM in, MEM/WB out): req_valid/req_op/req_addr/
// req_wdata are held by the pipeline until req_ready. A load completes in
// the cycle req_ready is high; rsp_rdata then holds the 256-bit line (wld)
// or the word zero-extended (ld). rsp_hit tells whether the load was served
// from the buffer without a memory access. Scalar store data is taken from
// req_wdata[31:0].
// Memory side: mem_req_valid/mem_req_ready handshake carrying mem_req
// (write enable, WideWord address, data, word mask), then one mem_rsp_valid
// per request (read data in mem_rsp_rdata, or write acknowledge).
module wlsb
  import wlsb_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter repl_e       POLICY  = REPL_HITPOINT,
  localparam int unsigned IDX_W = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // EX/MEM side
  input  logic              req_valid,
  input  op_e               req_op,
  input  logic [ADDR_W-1:0] req_addr,
  input  line_t             req_wdata,
  output logic              req_ready,
  // MEM/WB side
  output logic              rsp_valid,
  output line_t             rsp_rdata,
  output logic              rsp_hit,
  output logic [IDX_W-1:0]  rsp_entry,
  // data memory
  output logic              mem_req_valid,
  output mem_req_t          mem_req,
  input  logic              mem_req_ready,
  input  logic              mem_rsp_valid,
  input  line_t             mem_rsp_rdata
);

  tag_t  tag_q  [ENTRIES];
  mask_t sv_q   [ENTRIES];
  mask_t cv_q   [ENTRIES];
  line_t data_q [ENTRIES];
  logic  is_ld_q[ENTRIES];

  logic [ENTRIES-1:0] match, avail, in_use, pending, is_ld;
  logic               hit;
  logic [IDX_W-1:0]   match_idx, ptr_idx, victim_idx;
  logic               victim_valid;

  logic             upd_hit, upd_alloc;
  logic [IDX_W-1:0] hit_idx, alloc_idx;
  logic             st_en, st_alloc, fill_en, fill_alloc, cm_en;
  logic [IDX_W-1:0] st_idx, fill_idx, cm_idx;
  logic             q_push, q_pop, q_empty;
  logic [IDX_W-1:0] q_push_idx, q_head;
  logic             mem_we;
  logic [IDX_W-1:0] mem_idx;
  logic             rsp_fill;
  line_t            merged;

  wire tag_t  req_tag  = addr_tag(req_addr);
  wire widx_t req_widx = addr_widx(req_addr);
  wire        req_wide = op_is_wide(req_op);

  always_comb
    for (int e = 0; e < ENTRIES; e++) begin
      in_use[e]  = |(sv_q[e] | cv_q[e]);
      pending[e] = |sv_q[e];
      is_ld[e]   = is_ld_q[e];
    end

  wlsb_entries #(.ENTRIES(ENTRIES)) u_entries (
    .clk, .rst_n,
    .st_en, .st_idx, .st_alloc, .st_tag(req_tag), .st_wide(req_wide),
    .st_widx(req_widx), .st_wdata(req_wdata),
    .fill_en, .fill_idx, .fill_alloc, .fill_tag(req_tag), .fill_data(merged),
    .cm_en, .cm_idx,
    .tag_q, .sv_q, .cv_q, .data_q, .is_ld_q
  );

  wlsb_comp #(.ENTRIES(ENTRIES)) u_comp (
    .tag_q, .sv_q, .cv_q, .req_tag, .req_widx, .req_wide, .match, .avail
  );

  wlsb_repl #(.ENTRIES(ENTRIES), .POLICY(POLICY)) u_repl (
    .clk, .rst_n, .in_use, .pending, .is_ld,
    .for_store(op_is_store(req_op)),
    .upd_hit, .hit_idx, .upd_alloc, .alloc_idx,
    .victim_idx, .victim_valid, .rptr()
  );

  wlsb_ptr #(.ENTRIES(ENTRIES)) u_ptr (
    .match, .victim_idx, .victim_valid,
    .hit, .match_idx, .ptr_idx, .ptr_valid()
  );

  wlsb_commit_fifo #(.DEPTH(ENTRIES), .W(IDX_W)) u_cq (
    .clk, .rst_n, .push(q_push), .push_data(q_push_idx), .pop(q_pop),
    .head(q_head), .empty(q_empty), .full()
  );

  wlsb_alias u_alias (
    .mem_data(mem_rsp_rdata), .buf_data(data_q[fill_idx]), .sv(sv_q[fill_idx]),
    .merged
  );

  wlsb_ctrl #(.ENTRIES(ENTRIES)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_op, .req_ready, .rsp_valid, .rsp_hit, .rsp_fill, .rsp_entry,
    .hit, .avail(|avail), .match_idx, .victim_idx, .victim_valid,
    .upd_hit, .hit_idx, .upd_alloc, .alloc_idx,
    .st_en, .st_idx, .st_alloc, .fill_en, .fill_idx, .fill_alloc, .cm_en, .cm_idx,
    .q_head, .q_empty, .entry_pending(pending[match_idx]),
    .q_push, .q_push_idx, .q_pop,
    .mem_req_valid, .mem_req_we(mem_we), .mem_idx, .mem_req_ready, .mem_rsp_valid,
    .commit_busy()
  );

  // Memory request: a read of the request's line, or the commit of an entry.
  always_comb begin
    mem_req.we    = mem_we;
    mem_req.addr  = mem_we ? tag_q[mem_idx] : req_tag;
    mem_req.wdata = data_q[mem_idx];
    mem_req.wmask = mem_we ? sv_q[mem_idx] : '0;
  end

  // Load result: the merged fill line, or the data of the served entry.
  line_t line;
  always_comb begin
    line      = rsp_fill ? merged : data_q[ptr_idx];
    rsp_rdata = op_is_wide(req_op) ? line
                                   : line_t'(line[req_widx*WORD_W +: WORD_W]);
  end

  // The pipeline keeps a stalled instruction unchanged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           req_valid && !req_ready |=>
                           req_valid && $stable(req_addr) && $stable(req_wdata));
  // Never two entries for one WideWord address.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match));

endmodule
