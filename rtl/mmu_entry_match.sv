// mmu_entry_match: page-membership test for one TLB entry.
//
// An entry's mask has ones over the page-number bits and zeros over the
// page-offset bits, and its VPBA holds the page number already shifted into
// place. An address therefore lies in the entry's page exactly when
// AND(va, mask) equals VPBA; the entry only takes part when its V bit is set.
// This test and the use of mask/VPBA follow the LEON3 implementation of the
// relocation MMU. Purely combinational, one instance per TLB entry.
//
// Ports: entry (the TLB entry), va (address to test), hit (entry is valid and
// maps va).
module mmu_entry_match
  import mmu_pkg::*;
(
  input  tlb_entry_t entry,
  input  addr_t      va,
  output logic       hit
);

  always_comb begin
    hit = entry.attr.v && ((va & entry.mask) == entry.vpba);
  end

endmodule
