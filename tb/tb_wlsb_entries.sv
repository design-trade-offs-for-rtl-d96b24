// tb_wlsb_entries: random use of the entry array's store, fill and commit
// ports, following the rules the controller keeps (stores and fills only
// into entries in use unless allocating, allocation only of entries without
// pending stores, commit only of entries with pending stores, never two
// ports on one entry). A model of the entries is kept here; sv, cv, the
// ld/st flag, and the address and data of every valid slot are compared
// each cycle.
module tb_wlsb_entries;
  import wlsb_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic st_en, st_alloc, st_wide, fill_en, fill_alloc, cm_en;
  logic [1:0] st_idx, fill_idx, cm_idx;
  tag_t st_tag, fill_tag;
  widx_t st_widx;
  line_t st_wdata, fill_data;
  tag_t  tag_q  [N];
  mask_t sv_q   [N];
  mask_t cv_q   [N];
  line_t data_q [N];
  logic  is_ld_q[N];

  wlsb_entries dut (.*);

  tag_t  m_tag [N];
  mask_t m_sv  [N], m_cv [N];
  line_t m_data[N];
  bit    m_ld  [N];
  int checks = 0, failures = 0;

  function automatic line_t rnd_line();
    line_t l;
    for (int w = 0; w < 8; w++) l[w*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_st = 0, n_fill = 0, n_cm = 0, n_alloc = 0;
    {st_en, st_alloc, st_wide, fill_en, fill_alloc, cm_en} = '0;
    st_idx = 0; fill_idx = 0; cm_idx = 0; st_widx = 0;
    st_tag = 0; fill_tag = 0; st_wdata = 0; fill_data = 0;
    for (int e = 0; e < N; e++) begin m_sv[e] = 0; m_cv[e] = 0; m_ld[e] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int e = 0; e < N; e++) begin
        bit ok;
        ok = (sv_q[e] == m_sv[e]) && (cv_q[e] == m_cv[e]) && (is_ld_q[e] == m_ld[e]);
        if ((m_sv[e] | m_cv[e]) != 0) ok &= (tag_q[e] == m_tag[e]);
        for (int w = 0; w < 8; w++)
          if (m_sv[e][w] || m_cv[e][w]) ok &= (data_q[e][w*32 +: 32] == m_data[e][w*32 +: 32]);
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL cycle %0d entry %0d sv %b/%b cv %b/%b", i, e, sv_q[e], m_sv[e], cv_q[e], m_cv[e]);
        end
      end
      // pick distinct entries for the three ports
      st_idx = 2'($urandom); fill_idx = st_idx + 2'd1; cm_idx = st_idx + 2'd2;
      st_alloc   = (m_sv[st_idx] == 0) && ((m_sv[st_idx] | m_cv[st_idx]) == 0 || $urandom % 2);
      st_en      = ($urandom % 2) && (st_alloc || (m_sv[st_idx] | m_cv[st_idx]) != 0);
      fill_alloc = (m_sv[fill_idx] == 0) && ($urandom % 2);
      fill_en    = ($urandom % 3 == 0) && (fill_alloc || (m_sv[fill_idx] | m_cv[fill_idx]) != 0);
      cm_en      = ($urandom % 3 == 0) && (m_sv[cm_idx] != 0);
      st_wide    = ($urandom % 4 == 0);
      st_widx    = 3'($urandom);
      st_tag     = tag_t'($urandom);
      fill_tag   = tag_t'($urandom);
      st_wdata   = rnd_line();
      fill_data  = rnd_line();
      @(posedge clk);
      if (st_en) begin
        mask_t mk;
        mk = st_wide ? 8'hFF : 8'(1 << st_widx);
        n_st++;
        if (st_alloc) begin
          n_alloc++;
          m_tag[st_idx] = st_tag; m_sv[st_idx] = mk; m_cv[st_idx] = 0; m_ld[st_idx] = 0;
        end else begin
          m_sv[st_idx] |= mk; m_cv[st_idx] &= ~mk;
        end
        for (int w = 0; w < 8; w++)
          if (mk[w]) m_data[st_idx][w*32 +: 32] = st_wide ? st_wdata[w*32 +: 32] : st_wdata[31:0];
      end
      if (fill_en) begin
        n_fill++;
        m_data[fill_idx] = fill_data;
        m_cv[fill_idx]   = ~m_sv[fill_idx];
        if (fill_alloc) begin m_tag[fill_idx] = fill_tag; m_ld[fill_idx] = 1; end
      end
      if (cm_en) begin
        n_cm++;
        m_cv[cm_idx] |= m_sv[cm_idx];
        m_sv[cm_idx] = 0;
      end
    end
    checks++;
    if (n_st == 0 || n_fill == 0 || n_cm == 0 || n_alloc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
