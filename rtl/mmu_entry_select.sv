// mmu_entry_select: chooses the TLB entry that translates an address.
//
// Input is the vector of entries that hold the address (hit) and their
// overlapping flags (ovl). The rule follows the MMU's formal definition:
//   * no hit                       -> found = 0 (the caller raises a trap);
//   * exactly one hit              -> that entry;
//   * two or more hits             -> the one hit entry whose O flag is set;
//   * two or more hits, and zero or several of them overlapping
//                                  -> undefined = 1 and an entry is still
//                                     selected silently, without a trap.
// In the undefined case this design picks the lowest-numbered overlapping
// hit, or the lowest-numbered hit when none overlaps (the choice is not
// prescribed). The undefined flag is for observation only; it raises no
// fault. Purely combinational.
//
// Ports: hit, ovl (P bits each); found; sel_idx (index of the chosen entry,
// 0 when nothing is found); sel_oh (one-hot of the chosen entry); undefined.
module mmu_entry_select #(
  parameter int unsigned P  = 8,
  localparam int unsigned IW = (P > 1) ? $clog2(P) : 1
) (
  input  logic [P-1:0]  hit,
  input  logic [P-1:0]  ovl,
  output logic          found,
  output logic [IW-1:0] sel_idx,
  output logic [P-1:0]  sel_oh,
  output logic          undefined
);

  logic [P-1:0] ov_hit;
  logic [P-1:0] cand;
  logic         multi_hit;
  logic         single_ov;

  // true when v has two or more bits set
  function automatic logic two_or_more(logic [P-1:0] v);
    return (v & (v - 1'b1)) != '0;
  endfunction

  always_comb begin
    ov_hit    = hit & ovl;
    found     = hit != '0;
    multi_hit = two_or_more(hit);
    single_ov = (ov_hit != '0) && !two_or_more(ov_hit);
    undefined = multi_hit && !single_ov;

    // candidates for the final choice
    if (!multi_hit)          cand = hit;
    else if (ov_hit != '0)   cand = ov_hit;
    else                     cand = hit;

    // lowest-numbered candidate
    sel_idx = '0;
    sel_oh  = '0;
    for (int i = P - 1; i >= 0; i--) begin
      if (cand[i]) begin
        sel_idx = IW'(i);
        sel_oh  = '0;
        sel_oh[i] = 1'b1;
      end
    end
  end

  // the selection is never more than one entry, and exists iff a hit does
  always_comb begin
    assert final ($onehot0(sel_oh)) else $error("mmu_entry_select: selection not one-hot");
    assert final (found == (sel_oh != '0)) else $error("mmu_entry_select: found without selection");
  end

endmodule
