// tb_mmu_entry_match: checks the per-entry page test against the reference
// model (page number by division), for random page sizes 0..32, random
// addresses inside and outside the page, and invalid entries.
module tb_mmu_entry_match;
  import mmu_pkg::*;
  import mmu_ref_pkg::*;

  tlb_entry_t entry;
  addr_t      va;
  logic       hit;
  int checks = 0, failures = 0;

  mmu_entry_match dut (.entry(entry), .va(va), .hit(hit));

  task automatic check(string what);
    bit exp = in_page(entry, va);
    #1;
    checks++;
    if (hit !== exp) begin
      failures++;
      $display("FAIL %s: mask=%h vpba=%h v=%0b va=%h hit=%0b exp=%0b",
               what, entry.mask, entry.vpba, entry.attr.v, va, hit, exp);
    end
  endtask

  initial begin
    // the two worked examples: VP_0^30 holds 0x3FFFFFFF, VP_1^12 holds 0x1000..0x1FFF
    entry = mk_entry(30, 0, 0, 0, 0, 0, 1, 0);
    va = 32'h3FFF_FFFF; check("VP0^30 last");
    va = 32'h4000_0000; check("VP0^30 beyond");
    entry = mk_entry(12, 1, 0, 0, 0, 0, 1, 0);
    va = 32'h0000_1000; check("VP1^12 first");
    va = 32'h0000_1FFF; check("VP1^12 last");
    va = 32'h0000_0FFF; check("VP1^12 below");
    va = 32'h0000_2000; check("VP1^12 above");
    for (int n = 0; n < 4000; n++) begin
      int s;
      longint nu;
      s  = $urandom_range(32, 0);
      nu = (s == 32) ? 0 : longint'($urandom) >> s;
      entry = mk_entry(s, nu, longint'($urandom) >> s, 0, 0, 0, ($urandom_range(7, 0) != 0), 0);
      if ($urandom_range(1, 0) == 1) va = entry.vpba | ($urandom & ~entry.mask);
      else                           va = $urandom;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
