// wlsb_comp: the comparators of the fully associative search.
//
// One comparator per entry (4 or 8 in the document) compares the request's
// 27-bit WideWord address with the entry's address. An entry only matches
// while it is in use (any sv or cv bit set). Of a matched entry, the
// request's data is present when the addressed slot is valid (sv or cv)
// for a scalar access, or when all eight slots are valid for a WideWord
// access. Purely combinational: match and avail settle in the same cycle
// as the request. The split into "match" and "avail" is this design's way
// of using the address, cv and sv inputs the document shows.
module wlsb_comp
  import wlsb_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  tag_t  tag_q [ENTRIES],
  input  mask_t sv_q  [ENTRIES],
  input  mask_t cv_q  [ENTRIES],
  input  tag_t  req_tag,
  input  widx_t req_widx,
  input  logic  req_wide,
  output logic [ENTRIES-1:0] match,   // address equal, entry in use
  output logic [ENTRIES-1:0] avail    // matched and requested data valid
);

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      mask_t valid;
      valid    = sv_q[e] | cv_q[e];
      match[e] = (|valid) && (tag_q[e] == req_tag);
      avail[e] = match[e] && (req_wide ? (&valid) : valid[req_widx]);
    end
  end

endmodule
