// tb_wlsb_comp: random check of the associative comparators. Entries get
// tags from a small set (so that matches are frequent) and random valid
// bits; match and avail are compared with values computed here for scalar
// and WideWord requests.
module tb_wlsb_comp;
  import wlsb_pkg::*;
  localparam int N = 4;

  tag_t  tag_q [N];
  mask_t sv_q  [N];
  mask_t cv_q  [N];
  tag_t  req_tag;
  widx_t req_widx;
  logic  req_wide;
  logic [N-1:0] match, avail;
  int checks = 0, failures = 0;

  wlsb_comp dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_match = 0, n_avail = 0;
    for (int i = 0; i < 2000; i++) begin
      for (int e = 0; e < N; e++) begin
        tag_q[e] = tag_t'(27'h100 + $urandom % 6);
        sv_q[e]  = ($urandom % 3 == 0) ? '0 : mask_t'($urandom);
        cv_q[e]  = ($urandom % 3 == 0) ? '1 : ($urandom % 2) ? mask_t'($urandom) : '0;
      end
      req_tag  = tag_t'(27'h100 + $urandom % 6);
      req_widx = widx_t'($urandom);
      req_wide = $urandom % 2;
      #1;
      for (int e = 0; e < N; e++) begin
        bit m, a;
        m = (tag_q[e] == req_tag) && ((sv_q[e] | cv_q[e]) != 0);
        a = m && (req_wide ? ((sv_q[e] | cv_q[e]) == 8'hFF) : (sv_q[e][req_widx] || cv_q[e][req_widx]));
        n_match += m;
        n_avail += a;
        checks++;
        if (match[e] != m || avail[e] != a) begin
          failures++;
          $display("FAIL entry %0d match %0b/%0b avail %0b/%0b", e, match[e], m, avail[e], a);
        end
      end
    end
    checks++;
    if (n_match == 0 || n_avail == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
