// tb_wlsb_alias: random check of the alias handler's merge. For random
// memory lines, entry lines and store-valid masks the merged line must hold
// the entry's word wherever sv is set and the memory word elsewhere.
module tb_wlsb_alias;
  import wlsb_pkg::*;

  line_t mem_data, buf_data, merged;
  mask_t sv;
  int checks = 0, failures = 0;

  wlsb_alias dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int w = 0; w < 8; w++) begin
        mem_data[w*32 +: 32] = $urandom;
        buf_data[w*32 +: 32] = $urandom;
      end
      sv = (i < 256) ? mask_t'(i) : mask_t'($urandom);
      #1;
      for (int w = 0; w < 8; w++) begin
        word_t exp;
        exp = sv[w] ? buf_data[w*32 +: 32] : mem_data[w*32 +: 32];
        checks++;
        if (merged[w*32 +: 32] != exp) begin
          failures++;
          $display("FAIL sv=%b word %0d", sv, w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
