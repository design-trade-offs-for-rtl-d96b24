// tb_wlsb_ptr: exhaustive check of the write or read pointer for 4
// entries: every one-hot or empty match vector against every victim index
// and victim-valid value.
module tb_wlsb_ptr;
  localparam int N = 4;
  logic [N-1:0] match;
  logic [1:0]   victim_idx, match_idx, ptr_idx;
  logic         victim_valid, hit, ptr_valid;
  int checks = 0, failures = 0;

  wlsb_ptr dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = -1; m < N; m++)
      for (int v = 0; v < N; v++)
        for (int vv = 0; vv < 2; vv++) begin
          match        = (m < 0) ? '0 : (N'(1) << m);
          victim_idx   = 2'(v);
          victim_valid = vv[0];
          #1;
          checks++;
          if (hit != (m >= 0) ||
              ptr_idx != ((m >= 0) ? 2'(m) : 2'(v)) ||
              ptr_valid != ((m >= 0) || vv[0]) ||
              (m >= 0 && match_idx != 2'(m))) begin
            failures++;
            $display("FAIL m=%0d v=%0d vv=%0d: hit %0b ptr %0d valid %0b", m, v, vv, hit, ptr_idx, ptr_valid);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
