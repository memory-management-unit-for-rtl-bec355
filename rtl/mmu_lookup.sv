// mmu_lookup: parallel search of the TLB and entry selection.
//
// Every entry is tested at once by an mmu_entry_match instance (valid and
// AND(va, mask) == VPBA); the hit vector and the entries' O flags then go to
// mmu_entry_select, which applies the overlap rule. The chosen entry is
// driven out whole, so the caller can form the physical address and check
// permissions. Used by the translation path and by the TLB probe command.
// Purely combinational.
//
// Ports: entries (all P TLB entries), va; found, sel_idx, entry (the chosen
// entry, all zero when nothing is found), undefined (ambiguous overlap).
module mmu_lookup
  import mmu_pkg::*;
#(
  parameter int unsigned P  = 8,
  localparam int unsigned IW = (P > 1) ? $clog2(P) : 1
) (
  input  tlb_entry_t    entries [P],
  input  addr_t         va,
  output logic          found,
  output logic [IW-1:0] sel_idx,
  output tlb_entry_t    entry,
  output logic          undefined
);

  logic [P-1:0] hit;
  logic [P-1:0] ovl;
  logic [P-1:0] sel_oh;

  for (genvar i = 0; i < P; i++) begin : g_match
    mmu_entry_match u_match (
      .entry (entries[i]),
      .va    (va),
      .hit   (hit[i])
    );
    assign ovl[i] = entries[i].attr.o;
  end

  mmu_entry_select #(.P(P)) u_select (
    .hit       (hit),
    .ovl       (ovl),
    .found     (found),
    .sel_idx   (sel_idx),
    .sel_oh    (sel_oh),
    .undefined (undefined)
  );

  // one-hot multiplexer of the selected entry
  always_comb begin
    entry = '0;
    for (int i = 0; i < P; i++) begin
      if (sel_oh[i]) entry = entry | entries[i];
    end
  end

endmodule
