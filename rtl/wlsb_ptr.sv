// wlsb_ptr: the write or read pointer.
//
// Turns the comparators' one-hot match vector into an entry index. On a
// match the pointer is the matched entry (read it, or write a store into
// it); on a mismatch it is the victim offered by the replacement unit, and
// ptr_valid is low when the replacement unit has no victim (every entry
// holds a pending store). Combinational. The encoder picks the lowest
// matching index; the buffer never holds two entries with one address, so
// at most one bit of match is set.
module wlsb_ptr #(
  parameter int unsigned ENTRIES = 4,
  localparam int unsigned IDX_W = $clog2(ENTRIES)
) (
  input  logic [ENTRIES-1:0] match,
  input  logic [IDX_W-1:0]   victim_idx,
  input  logic               victim_valid,
  output logic               hit,         // some entry matched
  output logic [IDX_W-1:0]   match_idx,
  output logic [IDX_W-1:0]   ptr_idx,     // matched entry, else victim
  output logic               ptr_valid
);

  always_comb begin
    match_idx = '0;
    for (int e = ENTRIES - 1; e >= 0; e--)
      if (match[e]) match_idx = IDX_W'(e);
    hit       = |match;
    ptr_idx   = hit ? match_idx : victim_idx;
    ptr_valid = hit || victim_valid;
  end

endmodule
