// tb_reloc_mmu: end-to-end test of the relocation MMU at its default size.
//
// The testbench plays the processor. Its boot-software task runs the
// relocation algorithm through ASI 0x1A exactly as a boot program would:
// clear the TLB, map the whole RAM 1-to-1 with entry 0, then for
// each damaged application block take a free TLB entry (from the free count
// in the control register) and the next undamaged block of the relocation
// area, and write an overlapping entry that maps the one onto the other;
// enable the MMU only if something was relocated. It ends in "safe mode"
// when entries or relocation blocks run out.
//
// Scenarios:
//   * 4 MiB of RAM at 0x40000000 in 16 blocks of 256 KiB, blocks 0..7 for
//     the application, 8..15 for relocation; relocation block 1 and
//     application blocks 0 and 2 damaged. The application image is then
//     "deployed" through the MMU into a RAM model and read back, and no
//     byte may land in a damaged block.
//   * no damage: the MMU stays off and is transparent;
//   * too many damaged blocks for the TLB, and too few good relocation
//     blocks: the algorithm must stop in safe mode;
//   * one 4 KiB block with a fault at 0x6C00 inside a 64 KiB region moved
//     with a single overlapping entry;
//   * the eight-entry example configuration: translation, write and execute
//     faults with the fault status and address registers, ambiguous overlaps,
//     probe hits and misses, load of an entry;
//   * a burst of back-to-back translations, one answer per cycle, each one
//     cycle after its request.
// Every mechanism is counted and a mechanism that never happened is a
// failure.
module tb_reloc_mmu;
  import mmu_pkg::*;
  import mmu_ref_pkg::*;

  localparam int P = 8;  // default TLB size of reloc_mmu

  logic        clk = 0, rst_n = 0;
  logic        req_valid = 0;
  addr_t       req_va = '0;
  access_t     req_acc = ACC_READ;
  logic        rsp_valid, rsp_cacheable, rsp_undefined;
  addr_t       rsp_pa;
  fault_t      rsp_fault;
  logic [2:0]  rsp_idx;
  logic        asi_valid = 0, asi_write = 0;
  logic [7:0]  asi = MMU_ASI;
  addr_t       asi_addr = '0;
  logic [31:0] asi_wdata = '0;
  logic        asi_ack, mmu_enable;
  logic [31:0] asi_rdata;

  int checks = 0, failures = 0, cycles = 0;

  // mechanism counters
  int n_reloc = 0, n_enable = 0, n_safe_entries = 0, n_safe_blocks = 0, n_skip_damaged_rel = 0;
  int n_bypass = 0, n_single = 0, n_overlap = 0, n_undef = 0;
  int n_trans_fault = 0, n_write_fault = 0, n_exec_fault = 0;
  int n_probe_hit = 0, n_probe_miss = 0, n_load = 0, n_update = 0, n_burst = 0;

  reloc_mmu dut (
    .clk(clk), .rst_n(rst_n),
    .req_valid(req_valid), .req_va(req_va), .req_acc(req_acc),
    .rsp_valid(rsp_valid), .rsp_pa(rsp_pa), .rsp_fault(rsp_fault),
    .rsp_cacheable(rsp_cacheable), .rsp_undefined(rsp_undefined), .rsp_idx(rsp_idx),
    .asi_valid(asi_valid), .asi_write(asi_write), .asi(asi), .asi_addr(asi_addr),
    .asi_wdata(asi_wdata), .asi_ack(asi_ack), .asi_rdata(asi_rdata), .mmu_enable(mmu_enable)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic expect32(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) fail($sformatf("%s: %h expected %h", what, got, exp));
  endtask

  // ---------------------------------------------------------------- ASI 0x1A
  task automatic asi_access(bit wr, logic [11:0] ra, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    asi_valid = 1; asi_write = wr; asi = MMU_ASI; asi_addr = {20'd0, ra}; asi_wdata = wd;
    @(negedge clk);
    asi_valid = 0;
    checks++;
    if (!asi_ack) fail("no acknowledge");
    rd = asi_rdata;
  endtask

  task automatic sta(logic [11:0] ra, logic [31:0] wd);
    logic [31:0] rd;
    asi_access(1, ra, wd, rd);
  endtask

  task automatic lda(logic [11:0] ra, output logic [31:0] rd);
    asi_access(0, ra, '0, rd);
  endtask

  task automatic write_entry(int idx, tlb_entry_t e);
    sta(12'h300, e.mask);
    sta(12'h400, e.vpba);
    sta(12'h500, e.pfba);
    sta(12'h600, attr_to_word(e.attr));
    sta(12'h000, 32'(idx));
    n_update++;
  endtask

  // --------------------------------------------------------- translations
  task automatic xlate(addr_t va, access_t acc, output addr_t pa, output fault_t f,
                       output logic undef, output logic [2:0] idx);
    int t0;
    @(negedge clk);
    req_valid = 1; req_va = va; req_acc = acc; t0 = cycles;
    @(negedge clk);
    req_valid = 0;
    checks++;
    if (!rsp_valid || cycles - t0 != 1) fail($sformatf("translation latency for %h", va));
    pa = rsp_pa; f = rsp_fault; undef = rsp_undefined; idx = rsp_idx;
    if (!mmu_enable) n_bypass++;
    case (f)
      FAULT_TRANS: n_trans_fault++;
      FAULT_WRITE: n_write_fault++;
      FAULT_EXEC:  n_exec_fault++;
      default: ;
    endcase
    if (undef) n_undef++;
  endtask

  // ------------------------------------------------- boot software (model)
  // Returns 1 when the application may be deployed, 0 for safe mode.
  function automatic tlb_entry_t block_entry(addr_t vbase, addr_t pbase, int s);
    return mk_entry(s, longint'(vbase) >> s, longint'(pbase) >> s, 1, 1, 1, 1, 1);
  endfunction

  task automatic relocate(input addr_t ram_base, input int ram_bits, input int blk_bits, input int n_asw,
                          input int n_rel, input bit damaged[], output bit ok,
                          output int relocated);
    logic [31:0] rd;
    int installed, next_rel, next_entry;
    bit rel_used[];
    ok = 1; relocated = 0;
    rel_used = new[n_rel];
    sta(12'h700, 32'h0);  // MMU off during the whole process
    lda(12'h700, rd);
    installed = int'(rd[15:8]);
    expect32("installed entries", 32'(installed), P);
    // clean the TLB and map everything 1-to-1 with entry 0
    for (int i = 0; i < installed; i++) write_entry(i, '0);
    write_entry(0, mk_entry(ram_bits, longint'(ram_base) >> ram_bits, longint'(ram_base) >> ram_bits,
                            1, 1, 1, 1, 0));
    next_rel = 0; next_entry = 1;
    for (int b = 0; b < n_asw && ok; b++) begin
      if (!damaged[b]) continue;
      // 1) a free TLB entry?
      lda(12'h700, rd);
      if (rd[23:16] == 0) begin
        ok = 0; n_safe_entries++;
        break;
      end
      // 2) a free, undamaged relocation block?
      while (next_rel < n_rel && (rel_used[next_rel] || damaged[n_asw + next_rel])) begin
        if (damaged[n_asw + next_rel]) n_skip_damaged_rel++;
        next_rel++;
      end
      if (next_rel >= n_rel) begin
        ok = 0; n_safe_blocks++;
        break;
      end
      // 3) overlapping entry: application block b -> relocation block next_rel
      write_entry(next_entry, block_entry(ram_base + addr_t'(b << blk_bits),
                                          ram_base + addr_t'((n_asw + next_rel) << blk_bits),
                                          blk_bits));
      rel_used[next_rel] = 1;
      next_entry++; relocated++; n_reloc++;
    end
    if (ok && relocated > 0) begin
      sta(12'h700, 32'h1);
      n_enable++;
    end
  endtask

  // ------------------------------------------------------------ RAM model
  logic [31:0] ram [addr_t];

  // ----------------------------------------------------------- scenarios
  task automatic scenario_example_relocation();
    localparam addr_t BASE = 32'h4000_0000;
    localparam int    BB   = 18;             // 256 KiB blocks
    bit dmg[] = new[16];
    bit ok;
    int rel;
    logic [31:0] rd;
    addr_t pa; fault_t f; logic u; logic [2:0] idx;
    foreach (dmg[i]) dmg[i] = 0;
    dmg[0] = 1; dmg[2] = 1; dmg[8 + 1] = 1;  // ASW_0, ASW_2, REL_1
    relocate(BASE, 22, BB, 8, 8, dmg, ok, rel);
    expect32("example: deploy allowed", 32'(ok), 1);
    expect32("example: relocations", 32'(rel), 2);
    expect32("example: MMU enabled", 32'(mmu_enable), 1);
    // entries 1 and 2 as the algorithm left them
    sta(12'h100, 32'd1); n_load++;
    lda(12'h400, rd); expect32("E1 vpba (ASW_0)", rd, BASE);
    lda(12'h500, rd); expect32("E1 pfba (REL_0)", rd, BASE + (8 << BB));
    sta(12'h100, 32'd2); n_load++;
    lda(12'h400, rd); expect32("E2 vpba (ASW_2)", rd, BASE + (2 << BB));
    lda(12'h500, rd); expect32("E2 pfba (REL_2)", rd, BASE + (10 << BB));
    lda(12'h700, rd); expect32("free entries left", 32'(rd[23:16]), 5);
    // deploy the application image through the MMU, then read it back
    ram.delete();
    for (int b = 0; b < 8; b++) begin
      for (int k = 0; k < 6; k++) begin
        addr_t va;
        int pb;
        va = BASE + addr_t'(b << BB) + ((k == 0) ? 0 : (k == 5) ? addr_t'((1 << BB) - 4)
                                                   : addr_t'($urandom_range((1 << BB) - 4, 0) & ~3));
        xlate(va, ACC_WRITE, pa, f, u, idx);
        checks++;
        if (f != FAULT_NONE) begin fail($sformatf("deploy write fault at %h", va)); continue; end
        if (idx != 0) n_overlap++; else n_single++;
        pb = int'((pa - BASE) >> BB);
        if (pb < 0 || pb >= 16 || dmg[pb]) fail($sformatf("va %h written to damaged/unknown pa %h", va, pa));
        // expected physical block: ASW_0 -> REL_0, ASW_2 -> REL_2, others in place
        expect32($sformatf("deploy pa of %h", va), pa,
                 (b == 0) ? va + (8 << BB) : (b == 2) ? va + (8 << BB) : va);
        ram[pa] = va ^ 32'hA5A5_0000;
      end
    end
    foreach (ram[a]) begin
      int pb;
      pb = int'((a - BASE) >> BB);
      checks++;
      if (dmg[pb]) fail($sformatf("damaged cell %h holds data", a));
    end
    // read back: the application sees its link-time addresses
    for (int b = 0; b < 8; b++) begin
      addr_t va = BASE + addr_t'(b << BB) + 32'h100;
      xlate(va, ACC_WRITE, pa, f, u, idx);
      ram[pa] = 32'hC0DE_0000 + b;
      xlate(va, ACC_READ, pa, f, u, idx);
      expect32($sformatf("read back block %0d", b), ram.exists(pa) ? ram[pa] : 32'hX, 32'hC0DE_0000 + b);
    end
    // only the RAM is mapped: anything else traps
    xlate(BASE - 4, ACC_READ, pa, f, u, idx);
    expect32("below RAM traps", 32'(f), 32'(FAULT_TRANS));
    xlate(BASE + (16 << BB), ACC_READ, pa, f, u, idx);
    expect32("above RAM traps", 32'(f), 32'(FAULT_TRANS));
    // the probe finds the relocating entry of ASW_2, and entry 0 elsewhere
    sta(12'h400, BASE + (2 << BB) + 32'h44);
    lda(12'h200, rd); expect32("probe ASW_2", rd, 2); n_probe_hit++;
    sta(12'h400, BASE + (3 << BB));
    lda(12'h200, rd); expect32("probe ASW_3", rd, 0); n_probe_hit++;
  endtask

  task automatic scenario_no_damage();
    bit dmg[] = new[16];
    bit ok; int rel;
    addr_t pa; fault_t f; logic u; logic [2:0] idx;
    foreach (dmg[i]) dmg[i] = 0;
    relocate(32'h4000_0000, 22, 18, 8, 8, dmg, ok, rel);
    expect32("no damage: ok", 32'(ok), 1);
    expect32("no damage: MMU stays off", 32'(mmu_enable), 0);
    xlate(32'h4000_0010, ACC_EXEC, pa, f, u, idx);
    expect32("no damage: identity", pa, 32'h4000_0010);
    xlate(32'hFFFF_FFF0, ACC_WRITE, pa, f, u, idx);
    expect32("disabled: transparent", pa, 32'hFFFF_FFF0);
    expect32("disabled: no fault", 32'(f), 32'(FAULT_NONE));
  endtask

  task automatic scenario_out_of_entries();
    bit dmg[] = new[16];
    bit ok; int rel;
    foreach (dmg[i]) dmg[i] = (i < 8);  // every application block damaged
    relocate(32'h4000_0000, 22, 18, 8, 8, dmg, ok, rel);
    expect32("out of entries: safe mode", 32'(ok), 0);
    expect32("out of entries: relocated before", 32'(rel), P - 1);
    expect32("out of entries: MMU off", 32'(mmu_enable), 0);
  endtask

  task automatic scenario_out_of_blocks();
    bit dmg[] = new[16];
    bit ok; int rel;
    foreach (dmg[i]) dmg[i] = (i >= 9);  // only REL_0 is good
    dmg[1] = 1; dmg[5] = 1;
    relocate(32'h4000_0000, 22, 18, 8, 8, dmg, ok, rel);
    expect32("out of blocks: safe mode", 32'(ok), 0);
    expect32("out of blocks: relocated before", 32'(rel), 1);
  endtask

  task automatic scenario_small_block();
    addr_t pa; fault_t f; logic u; logic [2:0] idx;
    // 64 KiB region mapped 1-to-1, faulty cell at 0x6C00; only the 4 KiB
    // block 0x6000..0x6FFF moves, to 0x10000, with one overlapping entry
    for (int i = 0; i < P; i++) write_entry(i, '0);
    write_entry(0, mk_entry(16, 0, 0, 1, 1, 1, 1, 0));
    write_entry(1, mk_entry(12, 6, 16, 1, 1, 1, 1, 1));
    sta(12'h700, 32'h1);
    xlate(32'h0000_6C00, ACC_READ, pa, f, u, idx);
    expect32("4 KiB block: faulty cell moved", pa, 32'h0001_0C00); n_overlap++;
    xlate(32'h0000_5FFC, ACC_READ, pa, f, u, idx);
    expect32("4 KiB block: below stays", pa, 32'h0000_5FFC); n_single++;
    xlate(32'h0000_7000, ACC_READ, pa, f, u, idx);
    expect32("4 KiB block: above stays", pa, 32'h0000_7000);
    xlate(32'h0001_0000, ACC_READ, pa, f, u, idx);
    expect32("4 KiB block: outside region traps", 32'(f), 32'(FAULT_TRANS));
  endtask

  task automatic scenario_example_config();
    tlb_entry_t cfg[];
    logic [31:0] rd;
    addr_t pa; fault_t f; logic u; logic [2:0] idx;
    example_config(cfg);
    for (int i = 0; i < P; i++) write_entry(i, cfg[i]);
    sta(12'h700, 32'h1);
    // random accesses against the reference model
    for (int n = 0; n < 400; n++) begin
      addr_t va = $urandom;
      access_t acc = access_t'($urandom_range(2, 0));
      ref_result_t r = translate(cfg, va, acc, 1);
      xlate(va, acc, pa, f, u, idx);
      checks++;
      if (pa !== addr_t'(r.pa) || f !== r.fault || u !== r.undefined)
        fail($sformatf("example config va=%h pa=%h f=%0d u=%0b exp %h %0d %0b", va, pa, f, u, r.pa, r.fault, r.undefined));
      if (r.found && !r.undefined) begin
        int nh = 0;
        for (int i = 0; i < P; i++) if (in_page(cfg[i], va)) nh++;
        if (nh == 1) n_single++; else n_overlap++;
      end
      if (f != FAULT_NONE) begin
        lda(12'h800, rd); expect32("fsr", rd, 32'(f));
        lda(12'h900, rd); expect32("far", rd, va);
      end
    end
    // one of each fault, pinned
    xlate(32'hC000_0000, ACC_READ, pa, f, u, idx);
    expect32("translation fault", 32'(f), 32'(FAULT_TRANS));
    xlate(32'h0000_0100, ACC_WRITE, pa, f, u, idx);
    expect32("write fault", 32'(f), 32'(FAULT_WRITE));
    lda(12'h900, rd); expect32("far after write fault", rd, 32'h100);
    xlate(32'h8000_0000, ACC_EXEC, pa, f, u, idx);
    expect32("exec fault", 32'(f), 32'(FAULT_EXEC));
    lda(12'h800, rd); expect32("fsr after exec fault", rd, 32'(FAULT_EXEC));
    // probe miss
    sta(12'h400, 32'hD000_0000);
    lda(12'h200, rd); expect32("probe miss", rd, 32'hFFFF_FFFF); n_probe_miss++;
  endtask

  task automatic scenario_burst();
    // back-to-back requests: one answer per clock, each one cycle later
    addr_t sent[$];
    int got = 0;
    fork
      begin
        for (int n = 0; n < 32; n++) begin
          @(negedge clk);
          req_valid = 1; req_va = 32'h0000_1000 + addr_t'(n * 4); req_acc = ACC_READ;
          sent.push_back(req_va);
        end
        @(negedge clk); req_valid = 0;
      end
      begin
        @(negedge clk);
        repeat (33) begin
          @(negedge clk);
          if (rsp_valid) begin
            checks++;
            if (sent.size() == 0 || rsp_pa !== sent[0]) fail("burst order");
            else void'(sent.pop_front());
            got++;
          end
        end
      end
    join
    expect32("burst answers", 32'(got), 32);
    n_burst += got;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    scenario_no_damage();
    scenario_example_relocation();
    scenario_out_of_entries();
    scenario_out_of_blocks();
    scenario_small_block();
    scenario_example_config();
    scenario_burst();
    $display("mechanisms: reloc=%0d enable=%0d safe(entries)=%0d safe(blocks)=%0d skip-damaged-rel=%0d",
             n_reloc, n_enable, n_safe_entries, n_safe_blocks, n_skip_damaged_rel);
    $display("            bypass=%0d single=%0d overlap=%0d undefined=%0d trans=%0d write=%0d exec=%0d",
             n_bypass, n_single, n_overlap, n_undef, n_trans_fault, n_write_fault, n_exec_fault);
    $display("            probe-hit=%0d probe-miss=%0d load=%0d update=%0d burst=%0d",
             n_probe_hit, n_probe_miss, n_load, n_update, n_burst);
    begin
      int m[17];
      m = '{n_reloc, n_enable, n_safe_entries, n_safe_blocks, n_skip_damaged_rel, n_bypass,
                    n_single, n_overlap, n_undef, n_trans_fault, n_write_fault, n_exec_fault,
                    n_probe_hit, n_probe_miss, n_load, n_update, n_burst};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) fail($sformatf("mechanism %0d never happened", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
