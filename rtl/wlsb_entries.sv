// wlsb_entries: the entry array of the WideWord Load/Store Buffer.
//
// Each entry holds a 27-bit WideWord address, 8 store-valid bits (sv), 8
// cache-valid bits (cv) and a 256-bit data field, as the document lays the
// entry out. A slot with sv set holds store data not yet committed to
// memory; a slot with cv set holds data equal to memory. An entry is in use
// when any of its sv or cv bits is set. A one-bit ld/st flag records which
// kind of instruction allocated the entry; only the "1 dedicated load"
// replacement algorithm looks at it.
//
// Three update ports, all taking effect at the clock edge:
//   store  - a scalar store writes one slot (sets its sv, clears its cv), a
//            WideWord store writes all eight. With st_alloc the entry is
//            taken over for a new address first: all cv bits are cleared.
//   fill   - 256-bit line from memory, already merged with the entry's
//            pending store words by the alias handler, is written; every
//            slot without a pending store becomes cache valid. With
//            fill_alloc the entry is taken over for a new address.
//   commit - the entry's pending stores reached memory: cv |= sv, sv = 0.
// The controller never aims two ports at the same entry in one cycle; if
// it did, the store port would win over commit and fill over both. Reset
// clears sv, cv and the ld/st flags; address and data need no reset since
// they are read only while a valid bit is set.
module wlsb_entries
  import wlsb_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // store port
  input  logic                       st_en,
  input  logic [$clog2(ENTRIES)-1:0] st_idx,
  input  logic                       st_alloc,
  input  tag_t                       st_tag,
  input  logic                       st_wide,
  input  widx_t                      st_widx,
  input  line_t                      st_wdata,   // scalar data in bits 31:0
  // fill port
  input  logic                       fill_en,
  input  logic [$clog2(ENTRIES)-1:0] fill_idx,
  input  logic                       fill_alloc,
  input  tag_t                       fill_tag,
  input  line_t                      fill_data,
  // commit port
  input  logic                       cm_en,
  input  logic [$clog2(ENTRIES)-1:0] cm_idx,
  // entry contents
  output tag_t  tag_q  [ENTRIES],
  output mask_t sv_q   [ENTRIES],
  output mask_t cv_q   [ENTRIES],
  output line_t data_q [ENTRIES],
  output logic  is_ld_q[ENTRIES]
);

  // Slots and data written by the store port.
  mask_t st_mask;
  line_t st_line;
  always_comb begin
    st_mask = st_wide ? '1 : mask_t'(1) << st_widx;
    st_line = st_wide ? st_wdata
                      : {LINE_WORDS{st_wdata[WORD_W-1:0]}};
  end

  for (genvar e = 0; e < ENTRIES; e++) begin : g_entry
    wire st_hit   = st_en   && (st_idx   == e);
    wire fill_hit = fill_en && (fill_idx == e);
    wire cm_hit   = cm_en   && (cm_idx   == e);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sv_q[e]    <= '0;
        cv_q[e]    <= '0;
        is_ld_q[e] <= 1'b0;
      end else if (fill_hit) begin
        cv_q[e] <= ~sv_q[e];
        if (fill_alloc) begin
          is_ld_q[e] <= 1'b1;
          sv_q[e]    <= '0;
          cv_q[e]    <= '1;
        end
      end else if (st_hit) begin
        if (st_alloc) begin
          sv_q[e]    <= st_mask;
          cv_q[e]    <= '0;
          is_ld_q[e] <= 1'b0;
        end else begin
          sv_q[e] <= sv_q[e] | st_mask;
          cv_q[e] <= cv_q[e] & ~st_mask;
        end
      end else if (cm_hit) begin
        cv_q[e] <= cv_q[e] | sv_q[e];
        sv_q[e] <= '0;
      end
    end

    always_ff @(posedge clk) begin
      if (fill_hit) begin
        data_q[e] <= fill_data;
        if (fill_alloc) tag_q[e] <= fill_tag;
      end else if (st_hit) begin
        if (st_alloc) tag_q[e] <= st_tag;
        for (int w = 0; w < LINE_WORDS; w++)
          if (st_mask[w]) data_q[e][w*WORD_W +: WORD_W] <= st_line[w*WORD_W +: WORD_W];
      end
    end
  end

endmodule
