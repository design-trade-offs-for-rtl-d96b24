// tb_wlsb_repl: the three replacement algorithms side by side, driven with
// the same random entry states and hit/allocation events. A reference
// pointer per algorithm is kept here; the victim each instance offers is
// compared with a search done here every cycle. Also counted: Hitpoint
// moving its pointer on a hit, and the dedicated-load rule changing a
// store's victim, both of which must happen.
module tb_wlsb_repl;
  import wlsb_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] in_use, pending, is_ld;
  logic         for_store, upd_hit, upd_alloc;
  logic [1:0]   hit_idx, alloc_idx;
  logic [1:0]   v_idx [3], rptr [3];
  logic         v_ok  [3];
  int checks = 0, failures = 0;

  wlsb_repl #(.ENTRIES(N), .POLICY(REPL_FIFO)) u_fifo (
    .clk, .rst_n, .in_use, .pending, .is_ld, .for_store, .upd_hit, .hit_idx,
    .upd_alloc, .alloc_idx, .victim_idx(v_idx[0]), .victim_valid(v_ok[0]), .rptr(rptr[0]));
  wlsb_repl #(.ENTRIES(N), .POLICY(REPL_DEDLOAD)) u_ded (
    .clk, .rst_n, .in_use, .pending, .is_ld, .for_store, .upd_hit, .hit_idx,
    .upd_alloc, .alloc_idx, .victim_idx(v_idx[1]), .victim_valid(v_ok[1]), .rptr(rptr[1]));
  wlsb_repl #(.ENTRIES(N), .POLICY(REPL_HITPOINT)) u_hp (
    .clk, .rst_n, .in_use, .pending, .is_ld, .for_store, .upd_hit, .hit_idx,
    .upd_alloc, .alloc_idx, .victim_idx(v_idx[2]), .victim_valid(v_ok[2]), .rptr(rptr[2]));

  int ref_ptr [3];

  // Reference victim search for policy p.
  function automatic int ref_victim(int p);
    int nst = 0;
    logic [N-1:0] cand;
    for (int e = 0; e < N; e++) if (in_use[e] && !is_ld[e]) nst++;
    cand = ~pending;
    if (p == 1 && for_store && nst >= N - 1) cand = in_use & ~is_ld & ~pending;
    ref_victim = -1;
    for (int k = N - 1; k >= 0; k--)
      if (cand[(ref_ptr[p] + k) % N]) ref_victim = (ref_ptr[p] + k) % N;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_hp_move = 0, n_ded_rule = 0, n_none = 0;
    logic [N-1:0] r0, r1, r2;
    in_use = '0; pending = '0; is_ld = '0; for_store = 0;
    upd_hit = 0; upd_alloc = 0; hit_idx = '0; alloc_idx = '0;
    ref_ptr = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      r0 = $urandom; r1 = $urandom; r2 = $urandom;
      in_use    = r0;
      pending   = in_use & r1 & r2;
      is_ld     = in_use & ~pending & (r1 ^ r2);
      if (i % 7 == 0) is_ld = in_use & (1 << ($urandom % N));
      for_store = $urandom % 2;
      #1;
      for (int p = 0; p < 3; p++) begin
        int v;
        v = ref_victim(p);
        checks++;
        if (v_ok[p] != (v >= 0) || (v >= 0 && v_idx[p] != 2'(v)) || rptr[p] != 2'(ref_ptr[p])) begin
          failures++;
          $display("FAIL cycle %0d policy %0d victim %0d/%0d ok %0b ptr %0d/%0d",
                   i, p, v_idx[p], v, v_ok[p], rptr[p], ref_ptr[p]);
        end
      end
      if (ref_victim(0) < 0) n_none++;
      if (for_store && ref_victim(1) != ref_victim(0)) n_ded_rule++;
      upd_hit   = ($urandom % 3 == 0);
      hit_idx   = 2'($urandom);
      upd_alloc = !upd_hit && ($urandom % 2);
      alloc_idx = 2'($urandom);
      @(posedge clk);
      for (int p = 0; p < 3; p++) begin
        if (upd_alloc) ref_ptr[p] = (alloc_idx + 1) % N;
        else if (upd_hit && p == 2) begin
          if (ref_ptr[p] != (hit_idx + 1) % N) n_hp_move++;
          ref_ptr[p] = (hit_idx + 1) % N;
        end
      end
    end
    checks++;
    if (n_hp_move == 0 || n_ded_rule == 0 || n_none == 0) begin
      failures++;
      $display("FAIL coverage hp_move %0d ded_rule %0d no_victim %0d", n_hp_move, n_ded_rule, n_none);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
