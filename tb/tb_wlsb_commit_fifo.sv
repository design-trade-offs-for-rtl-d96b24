// tb_wlsb_commit_fifo: random push/pop traffic against a queue kept by the
// testbench; head, empty and full are compared every cycle. Pushes into a
// full queue and pops from an empty one are never requested, as in the
// buffer.
module tb_wlsb_commit_fifo;
  localparam int D = 4, W = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full;
  logic [W-1:0] push_data = '0, head;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  wlsb_commit_fifo dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) ||
          (q.size() > 0 && head != q[0])) begin
        failures++;
        $display("FAIL cycle %0d size %0d empty %0b full %0b head %0d", i, q.size(), empty, full, head);
      end
      if (full) n_full++;
      push      = !full && ($urandom % 100 < ((i / 500) % 2 ? 70 : 35));
      pop       = !empty && ($urandom % 2);
      push_data = W'($urandom);
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(push_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
