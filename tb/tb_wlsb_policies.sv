// tb_wlsb_policies: the buffer in the configurations compared for it,
// side by side on the same kind of traffic:
//   0: 4 entries FIFO      1: 4 entries dedicated load   2: 4 entries Hitpoint
//   3: 8 entries FIFO      4: 8 entries Hitpoint
// Each runs
//   - a sequential sweep of scalar loads over 64 consecutive words: every
//     256-bit line is fetched once, so exactly 7 of every 8 loads must hit
//     (the spatial-locality benefit of the wide entries);
//   - bursts of stores to new lines, which under the dedicated-load
//     algorithm may never leave the buffer without a load entry;
//   - random ld/st/wld/wst traffic with locality, all load data checked
//     against a reference memory, then a drain and a memory compare.
// Load hit rates of the random phase are printed for comparison.
module tb_wlsb_policies;
  import wlsb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  for (genvar g = 0; g < 5; g++) begin : g_cfg
    localparam int unsigned N = (g >= 3) ? 8 : 4;
    localparam repl_e       P = (g == 0 || g == 3) ? REPL_FIFO :
                                (g == 1) ? REPL_DEDLOAD : REPL_HITPOINT;

    logic        req_valid = 1'b0;
    op_e         req_op = OP_LD;
    logic [31:0] req_addr = '0;
    line_t       req_wdata = '0;
    logic        req_ready, rsp_valid, rsp_hit;
    line_t       rsp_rdata;
    logic [$clog2(N)-1:0] rsp_entry;
    logic        mem_req_valid, mem_req_ready, mem_rsp_valid;
    mem_req_t    mem_req;
    line_t       mem_rsp_rdata;

    wlsb #(.ENTRIES(N), .POLICY(P)) dut (.*);
    dmem_model #(.LATENCY(5)) u_mem (.*);

    word_t gold [logic [29:0]];
    int    n_all_store = 0;

    function automatic word_t gold_word(input logic [31:0] a);
      if (gold.exists(a[31:2])) return gold[a[31:2]];
      return a ^ 32'h5A5A_C3C3;
    endfunction

    // entries allocated by stores, every cycle
    always @(posedge clk) if (rst_n) begin
      int ns;
      ns = 0;
      for (int e = 0; e < N; e++) if (dut.in_use[e] && !dut.is_ld[e]) ns++;
      if (ns == N) n_all_store++;
      if (P == REPL_DEDLOAD) check(ns < N, $sformatf("cfg %0d: buffer without a load entry", g));
    end

    task automatic op(input op_e o, input logic [31:0] a, input line_t wd, output bit was_hit);
      line_t exp;
      req_valid = 1'b1; req_op = o; req_addr = {a[31:2], 2'b00}; req_wdata = wd;
      forever begin
        @(negedge clk);
        if (req_ready) break;
      end
      was_hit = rsp_hit;
      if (o == OP_LD) begin
        exp = line_t'(gold_word(req_addr));
        check(rsp_rdata == exp, $sformatf("cfg %0d ld %h", g, req_addr));
      end else if (o == OP_WLD) begin
        for (int w = 0; w < 8; w++) exp[w*32 +: 32] = gold_word({req_addr[31:5], 3'(w), 2'b00});
        check(rsp_rdata == exp, $sformatf("cfg %0d wld %h", g, req_addr));
      end else if (o == OP_ST) gold[req_addr[31:2]] = wd[31:0];
      else for (int w = 0; w < 8; w++) gold[{req_addr[31:5], 3'(w)}] = wd[w*32 +: 32];
      @(posedge clk);
      #1 req_valid = 1'b0;
    endtask

    initial begin
      int sweep_hits, loads, hits, guard;
      bit h;
      logic [31:0] a;
      line_t d;
      wait (rst_n);
      @(posedge clk); #1;

      // sequential sweep
      sweep_hits = 0;
      for (int i = 0; i < 64; i++) begin
        op(OP_LD, 32'h0100_0000 + i * 4, '0, h);
        sweep_hits += h;
      end
      check(sweep_hits == 56, $sformatf("cfg %0d sweep hits %0d of 64", g, sweep_hits));

      // store bursts to new lines
      for (int b = 0; b < 4; b++)
        for (int i = 0; i < N + 2; i++)
          op(OP_ST, 32'h0200_0000 + (b * 16 + i) * 32'h20, line_t'($urandom), h);

      // random traffic: 6 hot lines, 1/4 of accesses to 64 cold lines
      loads = 0; hits = 0;
      for (int i = 0; i < 4000; i++) begin
        op_e o;
        int r;
        r = $urandom % 100;
        o = (r < 55) ? OP_LD : (r < 85) ? OP_ST : (r < 93) ? OP_WLD : OP_WST;
        a = ($urandom % 4 == 0) ? 32'h0400_0000 + ($urandom % 64) * 32'h20
                                : 32'h0300_0000 + ($urandom % 6) * 32'h20;
        a += ($urandom % 8) * 4;
        for (int w = 0; w < 8; w++) d[w*32 +: 32] = $urandom;
        op(o, a, d, h);
        if (o == OP_LD || o == OP_WLD) begin loads++; hits += h; end
        if ($urandom % 3 == 0) repeat ($urandom % 3) @(posedge clk);
        #1;
      end
      guard = 0;
      while ((!dut.q_empty || dut.u_ctrl.state_q != dut.u_ctrl.S_IDLE) && guard < 1000) begin
        @(posedge clk); guard++;
      end
      foreach (gold[k]) check(u_mem.peek_word({k, 2'b00}) == gold[k], $sformatf("cfg %0d memory %h", g, {k, 2'b00}));
      $display("cfg %0d (%0d entries, %s): load hit rate %0d of %0d, cycles with all entries store-allocated %0d",
               g, N, P.name(), hits, loads, n_all_store);
      if (P == REPL_FIFO && N == 4) check(n_all_store > 0, "FIFO buffer filled with stores");
      done++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
