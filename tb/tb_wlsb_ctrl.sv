// tb_wlsb_ctrl: directed test of the write/read control with the search
// results, commit queue and memory driven by the testbench. Checked: which
// requests complete at once and which stall, the entry port commands and
// replacement updates each case produces, the memory read / commit
// sequences and the number of stall cycles of a load miss (2 + memory
// latency).
module tb_wlsb_ctrl;
  import wlsb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, rsp_valid, rsp_hit, rsp_fill;
  op_e  req_op;
  logic [1:0] rsp_entry, match_idx, victim_idx, hit_idx, alloc_idx;
  logic hit, avail, victim_valid, upd_hit, upd_alloc;
  logic st_en, st_alloc, fill_en, fill_alloc, cm_en;
  logic [1:0] st_idx, fill_idx, cm_idx, q_head, q_push_idx, mem_idx;
  logic q_empty, entry_pending, q_push, q_pop;
  logic mem_req_valid, mem_req_we, mem_req_ready, mem_rsp_valid, commit_busy;

  wlsb_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic clear();
    req_valid = 0; req_op = OP_LD; hit = 0; avail = 0; match_idx = 0;
    victim_idx = 0; victim_valid = 1; q_head = 0; q_empty = 1; entry_pending = 0;
    mem_req_ready = 1; mem_rsp_valid = 0;
  endtask

  // Run the memory side: accept the pending request, answer after lat cycles.
  // Returns the number of cycles until the response cycle.
  task automatic serve_mem(input int lat, input bit exp_we, input logic [1:0] exp_idx);
    int guard = 0;
    while (!mem_req_valid && guard < 20) begin @(posedge clk); #1; guard++; end
    check(mem_req_valid && mem_req_we == exp_we && mem_idx == exp_idx,
          $sformatf("memory request we=%0b idx=%0d", mem_req_we, mem_idx));
    @(posedge clk); #1;
    repeat (lat - 1) begin
      check(!mem_req_valid, "single outstanding request");
      @(posedge clk); #1;
    end
    mem_rsp_valid = 1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    clear();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // load hit: completes at once, moves the hit point
    req_valid = 1; req_op = OP_LD; hit = 1; avail = 1; match_idx = 2;
    #1;
    check(req_ready && rsp_valid && rsp_hit && rsp_entry == 2 && upd_hit && hit_idx == 2 &&
          !st_en && !upd_alloc, "load hit");
    @(posedge clk); #1;

    // load miss into victim 3, memory latency 4
    req_op = OP_WLD; hit = 0; avail = 0; victim_idx = 3; victim_valid = 1;
    t0 = 0;
    #1 check(!req_ready, "load miss stalls");
    fork
      serve_mem(4, 1'b0, 2'd3);
      forever begin @(posedge clk); t0++; end
    join_any
    #1;
    check(req_ready && rsp_valid && rsp_fill && !rsp_hit && fill_en && fill_idx == 3 && fill_alloc &&
          upd_alloc && alloc_idx == 3 && !upd_hit, "load fill into victim");
    check(t0 == 4 + 1, $sformatf("miss latency %0d", t0 + 1));
    disable fork;
    @(posedge clk); #1 mem_rsp_valid = 0;

    // partial hit: fill into matched entry 1, no allocation
    req_op = OP_LD; hit = 1; avail = 0; match_idx = 1; victim_idx = 0;
    serve_mem(2, 1'b0, 2'd1);
    #1 check(req_ready && fill_en && fill_idx == 1 && !fill_alloc && upd_hit && hit_idx == 1, "partial fill");
    @(posedge clk); #1 mem_rsp_valid = 0;

    // store hit on an entry without pending stores: queued
    req_op = OP_ST; hit = 1; avail = 1; match_idx = 2; entry_pending = 0;
    #1 check(req_ready && st_en && st_idx == 2 && !st_alloc && q_push && q_push_idx == 2 && !rsp_valid,
             "store hit, first pending");
    entry_pending = 1;
    #1 check(req_ready && st_en && !q_push, "store hit, already pending");
    @(posedge clk); #1;

    // store miss with a victim: allocate
    hit = 0; avail = 0; victim_idx = 1; victim_valid = 1; entry_pending = 0;
    #1 check(req_ready && st_en && st_alloc && st_idx == 1 && q_push && upd_alloc && alloc_idx == 1,
             "store allocates victim");
    @(posedge clk); #1;

    // store miss, every entry pending: stall, commit head entry 2, then go
    victim_valid = 0; q_empty = 0; q_head = 2;
    #1 check(!req_ready, "store stalls when all entries pending");
    serve_mem(3, 1'b1, 2'd2);
    #1 check(cm_en && cm_idx == 2 && q_pop && !req_ready, "commit completes");
    @(posedge clk); #1;
    mem_rsp_valid = 0; q_empty = 1; victim_valid = 1; victim_idx = 2;
    #1 check(req_ready && st_alloc && st_idx == 2, "store proceeds after commit");
    @(posedge clk); #1;

    // store to the entry under commit stalls; loads hitting it do not
    req_valid = 0; q_empty = 0; q_head = 0;
    @(posedge clk); #1;
    check(commit_busy && mem_req_valid && mem_req_we, "background commit starts");
    req_valid = 1; req_op = OP_ST; hit = 1; match_idx = 0; entry_pending = 1;
    #1 check(!req_ready, "store to committing entry stalls");
    req_op = OP_LD; avail = 1;
    #1 check(req_ready && rsp_hit, "load hit during commit");
    req_op = OP_ST; match_idx = 3;
    #1 check(req_ready && st_en, "store to other entry during commit");
    req_op = OP_ST; match_idx = 0;
    serve_mem(2, 1'b1, 2'd0);
    @(posedge clk); #1;
    mem_rsp_valid = 0; q_empty = 1;
    #1 check(req_ready && st_en && st_idx == 0, "store after commit");
    @(posedge clk); #1;
    clear();
    @(posedge clk); #1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
