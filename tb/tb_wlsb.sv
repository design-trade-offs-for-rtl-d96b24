// tb_wlsb: end-to-end test of the WideWord Load/Store Buffer at its default
// parameters (4 entries, Hitpoint replacement) against a behavioural data
// memory.
//
// Every load result is compared with an architectural reference memory kept
// by the testbench (initial contents plus every store accepted so far), and
// after the buffer has drained the data memory must hold every stored value.
// The run has four phases:
//   1. the eleven-instruction fragment of SPEC2K art used to explain the
//      Hitpoint algorithm: hit/miss and entry of each instruction are checked;
//   2. directed cases: load hit and miss latency, store-to-load forwarding,
//      neighbouring loads, the scalar-store / WideWord-load merge, the stall
//      on a buffer full of pending stores, the stall on a store to the entry
//      being committed, WideWord stores and loads;
//   3. random ld/st/wld/wst traffic over a few lines with a memory that
//      randomly refuses requests;
//   4. drain and memory compare.
// Each mechanism is counted and must have happened at least once.
module tb_wlsb;
  import wlsb_pkg::*;

  localparam int unsigned MEM_LAT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        req_valid = 1'b0;
  op_e         req_op = OP_LD;
  logic [31:0] req_addr = '0;
  line_t       req_wdata = '0;
  logic        req_ready, rsp_valid, rsp_hit;
  line_t       rsp_rdata;
  logic [1:0]  rsp_entry;
  logic        mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t    mem_req;
  line_t       mem_rsp_rdata;

  wlsb dut (.*);

  dmem_model #(.LATENCY(MEM_LAT)) u_mem (
    .clk, .rst_n, .mem_req_valid, .mem_req, .mem_req_ready, .mem_rsp_valid, .mem_rsp_rdata
  );

  int checks = 0, failures = 0;
  word_t gold [logic [29:0]];   // architectural memory, by word address

  function automatic word_t gold_word(input logic [31:0] a);
    if (gold.exists(a[31:2])) return gold[a[31:2]];
    return a ^ 32'h5A5A_C3C3;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---- mechanism counters ------------------------------------------------
  int n_ld_hit, n_ld_fill, n_fwd, n_merge, n_st_hit, n_st_alloc, n_st_repeat;
  int n_full_stall, n_cm_stall, n_commit, n_hp_move, n_evict, n_wst, n_wld;

  always @(posedge clk) if (rst_n) begin
    if (rsp_valid &&  rsp_hit) n_ld_hit++;
    if (rsp_valid && !rsp_hit) n_ld_fill++;
    if (rsp_valid && rsp_hit && req_op == OP_LD &&
        dut.sv_q[rsp_entry][req_addr[4:2]]) n_fwd++;
    if (dut.fill_en && |dut.sv_q[dut.fill_idx]) n_merge++;
    if (dut.st_en && !dut.st_alloc) n_st_hit++;
    if (dut.st_en &&  dut.st_alloc) n_st_alloc++;
    if (dut.st_en && !dut.st_alloc && req_op == OP_ST &&
        dut.sv_q[dut.st_idx][req_addr[4:2]]) n_st_repeat++;
    if (req_valid && !req_ready && op_is_store(req_op) && !dut.hit && !dut.victim_valid)
      n_full_stall++;
    if (req_valid && !req_ready && op_is_store(req_op) && dut.hit) n_cm_stall++;
    if (dut.cm_en) n_commit++;
    if (dut.upd_hit && dut.u_repl.rptr != ((dut.hit_idx + 1) % 4)) n_hp_move++;
    if ((dut.st_en && dut.st_alloc && dut.in_use[dut.st_idx]) ||
        (dut.fill_en && dut.fill_alloc && dut.in_use[dut.fill_idx])) n_evict++;
    if (req_valid && req_ready && req_op == OP_WST) n_wst++;
    if (req_valid && req_ready && req_op == OP_WLD) n_wld++;
  end

  // ---- driver ------------------------------------------------------------
  // Presents one instruction, holds it until accepted, checks a load's data.
  task automatic do_op(input op_e op, input logic [31:0] addr, input line_t wd,
                       output int stalls, output bit was_hit, output int entry);
    line_t exp;
    req_valid = 1'b1;
    req_op    = op;
    req_addr  = {addr[31:2], 2'b00};
    req_wdata = wd;
    stalls    = 0;
    forever begin
      @(negedge clk);
      if (req_ready) break;
      stalls++;
    end
    entry   = int'(rsp_entry);
    was_hit = op_is_store(op) ? dut.hit : rsp_hit;
    case (op)
      OP_LD: begin
        exp = line_t'(gold_word(req_addr));
        check(rsp_valid && rsp_rdata == exp, $sformatf("ld %h data %h exp %h", req_addr, rsp_rdata[31:0], exp[31:0]));
      end
      OP_WLD: begin
        for (int w = 0; w < 8; w++) exp[w*32 +: 32] = gold_word({req_addr[31:5], 3'(w), 2'b00});
        check(rsp_valid && rsp_rdata == exp, $sformatf("wld %h", req_addr));
      end
      OP_ST: gold[req_addr[31:2]] = wd[31:0];
      OP_WST: for (int w = 0; w < 8; w++) gold[{req_addr[31:5], 3'(w)}] = wd[w*32 +: 32];
    endcase
    @(posedge clk);
    #1 req_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Wait until no store is pending and the memory port is idle.
  task automatic drain();
    int guard = 0;
    while ((!dut.q_empty || dut.u_ctrl.state_q != dut.u_ctrl.S_IDLE) && guard < 1000) begin
      @(posedge clk);
      guard++;
    end
    #1;
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int w = 0; w < 8; w++) l[w*32 +: 32] = $urandom;
    return l;
  endfunction

  // ---- Fig. 3 fragment (SPEC2K art) -----------------------------------
  typedef struct { op_e op; logic [31:0] a; bit hit; int entry; } trace_t;
  trace_t art [11] = '{
    '{OP_ST, 32'h10190024, 1'b0, 0}, '{OP_LD, 32'h10199D4C, 1'b0, 1},
    '{OP_LD, 32'h101584EC, 1'b0, 2}, '{OP_LD, 32'h103DAD14, 1'b0, 3},
    '{OP_LD, 32'h10190024, 1'b1, 0}, '{OP_ST, 32'h10190024, 1'b1, 0},
    '{OP_LD, 32'h10199D50, 1'b1, 1}, '{OP_LD, 32'h1015852C, 1'b0, 2},
    '{OP_LD, 32'h103DAC14, 1'b0, 3}, '{OP_LD, 32'h10190024, 1'b1, 0},
    '{OP_ST, 32'h10190024, 1'b1, 0}
  };

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st, en;
    bit h;
    logic [31:0] a, b;
    line_t d;
    idle(3);
    rst_n = 1'b1;
    idle(2);

    // 1. Fig. 3 trace, Hitpoint replacement
    for (int i = 0; i < 11; i++) begin
      do_op(art[i].op, art[i].a, line_t'(32'hA000_0000 + i), st, h, en);
      check(h == art[i].hit, $sformatf("art instr %0d hit=%0b", i + 1, h));
      check(en == art[i].entry, $sformatf("art instr %0d entry %0d exp %0d", i + 1, en, art[i].entry));
      idle(3);
    end
    drain();

    // 2a. load miss latency into an empty memory port, then a hit in 0 cycles
    a = 32'h2000_0010;
    do_op(OP_LD, a, '0, st, h, en);
    check(!h && st == MEM_LAT + 2, $sformatf("load miss stall %0d exp %0d", st, MEM_LAT + 2));
    do_op(OP_LD, a + 32'd4, '0, st, h, en);   // neighbouring word, same line
    check(h && st == 0, $sformatf("neighbour load hit, stall %0d", st));

    // 2b. store-to-load forwarding before the store is committed
    b = 32'h3000_0000;
    do_op(OP_ST, b + 32'h8, line_t'(32'hCAFE_0001), st, h, en);
    do_op(OP_LD, b + 32'h8, '0, st, h, en);
    check(h && st == 0, "forwarded load hits without stall");
    // repeated store to the same word stays in the buffer
    do_op(OP_ST, b + 32'h8, line_t'(32'hCAFE_0002), st, h, en);
    drain();
    check(u_mem.peek_word(b + 32'h8) == 32'hCAFE_0002, "committed store value");

    // 2c. scalar store followed by WideWord load of the same line: merge
    a = 32'h4000_0040;
    do_op(OP_ST, a + 32'h14, line_t'(32'hBEEF_0005), st, h, en);
    do_op(OP_WLD, a, '0, st, h, en);
    check(!h, "wld on partial entry goes to memory");
    do_op(OP_LD, a + 32'h14, '0, st, h, en);
    check(h, "merged line hit");
    drain();

    // 2d. five stores to five new lines back to back: the fifth stalls
    for (int i = 0; i < 5; i++)
      do_op(OP_ST, 32'h5000_0000 + i * 32'h100, line_t'(32'h5500_0000 + i), st, h, en);
    check(n_full_stall > 0, "stall on a buffer full of pending stores");
    drain();

    // 2e. a store to the entry being committed waits for the commit
    a = 32'h6000_0000;
    do_op(OP_ST, a, line_t'(32'h6600_0000), st, h, en);
    idle(2);
    do_op(OP_ST, a + 32'h4, line_t'(32'h6600_0001), st, h, en);
    check(h && st > 0, $sformatf("store to committing entry stalled %0d", st));
    drain();

    // 2f. WideWord store then WideWord and scalar loads
    a = 32'h7000_0020;
    d = rnd_line();
    do_op(OP_WST, a, d, st, h, en);
    do_op(OP_WLD, a, '0, st, h, en);
    check(h && st == 0, "wld hits wst line");
    do_op(OP_LD, a + 32'h1C, '0, st, h, en);
    check(h, "ld hits wst line");
    drain();

    // 3. random traffic over 10 lines, memory refusing 30% of the cycles
    u_mem.stall_pct = 30;
    for (int i = 0; i < 3000; i++) begin
      op_e o;
      int r;
      r = $urandom % 100;
      o = (r < 40) ? OP_LD : (r < 70) ? OP_ST : (r < 85) ? OP_WLD : OP_WST;
      a = 32'h8000_0000 + ($urandom % 10) * 32'h20 + ($urandom % 8) * 4;
      do_op(o, a, rnd_line(), st, h, en);
      if ($urandom % 4 == 0) idle($urandom % 4);
    end
    drain();
    u_mem.stall_pct = 0;

    // 4. every stored word has reached memory
    foreach (gold[k]) check(u_mem.peek_word({k, 2'b00}) == gold[k], $sformatf("memory word %h", {k, 2'b00}));

    check(n_ld_hit > 0,     "mechanism: load hit");
    check(n_ld_fill > 0,    "mechanism: load fill from memory");
    check(n_fwd > 0,        "mechanism: store-to-load forwarding");
    check(n_merge > 0,      "mechanism: alias merge of fetched line");
    check(n_st_hit > 0,     "mechanism: store into matched entry");
    check(n_st_alloc > 0,   "mechanism: store allocates entry");
    check(n_st_repeat > 0,  "mechanism: repeated store absorbed");
    check(n_full_stall > 0, "mechanism: stall, all entries pending");
    check(n_cm_stall > 0,   "mechanism: stall, entry being committed");
    check(n_commit > 0,     "mechanism: FIFO commit");
    check(n_hp_move > 0,    "mechanism: Hitpoint pointer revision");
    check(n_evict > 0,      "mechanism: replacement of a used entry");
    check(n_wst > 0 && n_wld > 0, "mechanism: WideWord accesses");
    $display("loads hit %0d filled %0d fwd %0d merge %0d st_hit %0d st_alloc %0d st_repeat %0d",
             n_ld_hit, n_ld_fill, n_fwd, n_merge, n_st_hit, n_st_alloc, n_st_repeat);
    $display("full_stall %0d cm_stall %0d commits %0d hp_moves %0d evictions %0d wst %0d wld %0d",
             n_full_stall, n_cm_stall, n_commit, n_hp_move, n_evict, n_wst, n_wld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
