// dmem_model: behavioural model of the processor's on-chip data memory
// (eDRAM bank), for simulation only.
//
// 256-bit WideWord memory behind a valid/ready request port with one
// response per request. A request is accepted when the model is idle and,
// if STALL_PCT > 0, a random draw allows it; LATENCY cycles later
// mem_rsp_valid pulses, carrying the read line, or acknowledging a write,
// which is applied with its word mask at that moment. Unwritten memory reads
// as init_word(), a fixed function of the address, so testbenches can
// predict it.
module dmem_model
  import wlsb_pkg::*;
#(
  parameter int unsigned LATENCY   = 6,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     mem_req_valid,
  input  mem_req_t mem_req,
  output logic     mem_req_ready,
  output logic     mem_rsp_valid,
  output line_t    mem_rsp_rdata
);

  line_t       store [tag_t];
  logic        busy;
  int unsigned cnt;
  mem_req_t    cur;
  logic        gate;
  int unsigned n_reads, n_writes;
  int unsigned stall_pct = STALL_PCT;  // testbenches may change it at run time

  function automatic word_t init_word(input logic [31:0] byte_addr);
    return byte_addr ^ 32'h5A5A_C3C3;
  endfunction

  function automatic line_t read_line(input tag_t t);
    line_t l;
    if (store.exists(t)) return store[t];
    for (int w = 0; w < LINE_WORDS; w++)
      l[w*WORD_W +: WORD_W] = init_word({t, widx_t'(w), 2'b00});
    return l;
  endfunction

  function automatic word_t peek_word(input logic [31:0] byte_addr);
    line_t l;
    l = read_line(byte_addr[31:5]);
    return l[byte_addr[4:2]*WORD_W +: WORD_W];
  endfunction

  assign mem_req_ready = !busy && gate;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      mem_rsp_valid <= 1'b0;
      gate          <= 1'b1;
      n_reads       <= 0;
      n_writes      <= 0;
      cnt           <= 0;
    end else begin
      mem_rsp_valid <= 1'b0;
      gate          <= (stall_pct == 0) || (($urandom % 100) >= stall_pct);
      if (busy) begin
        if (cnt == 0) begin
          busy          <= 1'b0;
          mem_rsp_valid <= 1'b1;
          if (cur.we) begin
            line_t l;
            l = read_line(cur.addr);
            for (int w = 0; w < LINE_WORDS; w++)
              if (cur.wmask[w]) l[w*WORD_W +: WORD_W] = cur.wdata[w*WORD_W +: WORD_W];
            store[cur.addr] = l;
            n_writes <= n_writes + 1;
          end else begin
            mem_rsp_rdata <= read_line(cur.addr);
            n_reads       <= n_reads + 1;
          end
        end else begin
          cnt <= cnt - 1;
        end
      end else if (mem_req_valid && mem_req_ready) begin
        busy <= 1'b1;
        cnt  <= LATENCY - 1;
        cur  <= mem_req;
      end
    end
  end

endmodule
