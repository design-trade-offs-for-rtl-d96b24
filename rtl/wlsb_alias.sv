// wlsb_alias: the alias handler, resolving the RAW hazard between scalar
// stores and a WideWord (or scalar) load that has to go to memory.
//
// When a load finds its entry only partly valid, the whole 256-bit line is
// fetched from memory. Slots whose store is still in flight (sv set) hold
// data newer than memory, so the merged line takes those slots from the
// entry and every other slot from memory. Combinational; the document gives
// the merge, the word-wise multiplexer is the obvious way to do it.
module wlsb_alias
  import wlsb_pkg::*;
(
  input  line_t mem_data,   // 256 bits fetched from memory
  input  line_t buf_data,   // the entry's data field
  input  mask_t sv,         // the entry's store-valid bits
  output line_t merged
);

  always_comb begin
    for (int w = 0; w < LINE_WORDS; w++)
      merged[w*WORD_W +: WORD_W] = sv[w] ? buf_data[w*WORD_W +: WORD_W]
                                         : mem_data[w*WORD_W +: WORD_W];
  end

endmodule
