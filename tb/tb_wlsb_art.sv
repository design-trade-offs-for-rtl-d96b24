// tb_wlsb_art: the SPEC2K art fragment used to compare FIFO with Hitpoint
// replacement, run on three buffers side by side:
//   0: 4 entries, Hitpoint   1: 4 entries, FIFO   2: 8 entries, Hitpoint
// The trace is eleven scalar loads and stores; instructions are spaced so
// that stores have committed before the next one arrives. For the two
// 4-entry buffers the hit/miss outcome and the entry of every instruction
// are checked against the expected columns (Hitpoint keeps the often-used
// entry 0 and hits the 10th instruction, FIFO evicts it and misses).
// Load data is checked against the stored values and memory contents.
module tb_wlsb_art;
  import wlsb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  typedef struct { op_e op; logic [31:0] a; } instr_t;
  instr_t art [11] = '{
    '{OP_ST, 32'h10190024}, '{OP_LD, 32'h10199D4C}, '{OP_LD, 32'h101584EC},
    '{OP_LD, 32'h103DAD14}, '{OP_LD, 32'h10190024}, '{OP_ST, 32'h10190024},
    '{OP_LD, 32'h10199D50}, '{OP_LD, 32'h1015852C}, '{OP_LD, 32'h103DAC14},
    '{OP_LD, 32'h10190024}, '{OP_ST, 32'h10190024}
  };
  // expected entry per instruction; hit flags as bit masks (bit i = instr i+1)
  int exp_entry [2][11] = '{'{0, 1, 2, 3, 0, 0, 1, 2, 3, 0, 0},
                            '{0, 1, 2, 3, 0, 0, 1, 0, 1, 2, 2}};
  int exp_hits  [3] = '{11'b11001110000, 11'b10001110000, 11'b11001110000};
  int exp_ldhit [3] = '{3, 2, 3};

  int checks = 0, failures = 0;
  int done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < 3; g++) begin : g_cfg
    localparam int unsigned N = (g == 2) ? 8 : 4;
    localparam repl_e       P = (g == 1) ? REPL_FIFO : REPL_HITPOINT;

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
    dmem_model #(.LATENCY(4)) u_mem (.*);

    initial begin
      int hits = 0, ldhits = 0, en;
      bit h;
      word_t last;
      last = 32'h10190024 ^ 32'h5A5A_C3C3;
      wait (rst_n);
      @(posedge clk); #1;
      for (int i = 0; i < 11; i++) begin
        req_valid = 1'b1;
        req_op    = art[i].op;
        req_addr  = art[i].a;
        req_wdata = line_t'(32'hA000_0000 + i);
        forever begin
          @(negedge clk);
          if (req_ready) break;
        end
        h  = op_is_store(art[i].op) ? dut.hit : rsp_hit;
        en = int'(rsp_entry);
        if (h) hits |= 1 << i;
        if (h && art[i].op == OP_LD) ldhits++;
        if (art[i].op == OP_LD && art[i].a == 32'h10190024)
          check(rsp_rdata[31:0] == last, $sformatf("cfg %0d instr %0d load data", g, i + 1));
        if (art[i].op == OP_ST) last = 32'hA000_0000 + i;
        if (g < 2) check(en == exp_entry[g][i], $sformatf("cfg %0d instr %0d entry %0d", g, i + 1, en));
        @(posedge clk); #1 req_valid = 1'b0;
        repeat (12) @(posedge clk);
        #1;
      end
      check(hits == exp_hits[g], $sformatf("cfg %0d hit pattern %b", g, hits));
      check(ldhits == exp_ldhit[g], $sformatf("cfg %0d load hits %0d", g, ldhits));
      check(u_mem.peek_word(32'h10190024) == 32'hA000_000A, $sformatf("cfg %0d committed store", g));
      $display("cfg %0d (%0d entries, %s): %0d of 8 loads hit", g, N, P.name(), ldhits);
      done++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
