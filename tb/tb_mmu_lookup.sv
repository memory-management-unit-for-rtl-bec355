// tb_mmu_lookup: parallel search plus selection on the eight-entry example
// configuration (six valid entries, overlapping pages of 2^27..2^31 bytes).
// Checks the configuration words against the printed example (mask, VPBA,
// PFBA per entry), the worked lookups (0x1000 -> E0, 0x20000000 -> E2,
// 0xC0000000 -> none, 0x50000000 and 0x90000000 -> undefined), and random
// addresses and random configurations against the reference model.
module tb_mmu_lookup;
  import mmu_pkg::*;
  import mmu_ref_pkg::*;
  localparam int P = 8;

  tlb_entry_t entries [P];
  tlb_entry_t cfg[];
  addr_t      va;
  logic       found, undefined;
  logic [2:0] sel_idx;
  tlb_entry_t entry;
  int checks = 0, failures = 0;

  mmu_lookup dut (
    .entries(entries), .va(va), .found(found), .sel_idx(sel_idx),
    .entry(entry), .undefined(undefined)
  );

  task automatic load(tlb_entry_t c[]);
    for (int i = 0; i < P; i++) entries[i] = c[i];
  endtask

  task automatic expect_word(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic probe(addr_t a);
    ref_result_t r = translate(cfg, a, ACC_READ, 1);
    va = a; #1;
    checks++;
    if (found !== r.found || undefined !== r.undefined ||
        (r.found && (int'(sel_idx) !== r.idx || entry !== cfg[r.idx]))) begin
      failures++;
      $display("FAIL va=%h found=%0b idx=%0d undef=%0b exp %0b %0d %0b",
               a, found, sel_idx, undefined, r.found, r.idx, r.undefined);
    end
  endtask

  task automatic expect_sel(addr_t a, bit f, int idx, bit u);
    va = a; #1;
    checks++;
    if (found !== f || undefined !== u || (f && int'(sel_idx) !== idx)) begin
      failures++;
      $display("FAIL example va=%h found=%0b idx=%0d undef=%0b", a, found, sel_idx, undefined);
    end
  endtask

  initial begin
    example_config(cfg);
    // printed register values of the example configuration
    expect_word("E0 mask", cfg[0].mask, 32'h8000_0000);
    expect_word("E1 mask", cfg[1].mask, 32'hC000_0000);
    expect_word("E1 vpba", cfg[1].vpba, 32'h8000_0000);
    expect_word("E1 pfba", cfg[1].pfba, 32'hC000_0000);
    expect_word("E2 mask", cfg[2].mask, 32'hF000_0000);
    expect_word("E2 vpba", cfg[2].vpba, 32'h2000_0000);
    expect_word("E2 pfba", cfg[2].pfba, 32'h1000_0000);
    expect_word("E3 mask", cfg[3].mask, 32'hE000_0000);
    expect_word("E3 pfba", cfg[3].pfba, 32'h6000_0000);
    expect_word("E4 mask", cfg[4].mask, 32'hF800_0000);
    expect_word("E4 vpba", cfg[4].vpba, 32'h5000_0000);
    expect_word("E4 pfba", cfg[4].pfba, 32'h3000_0000);
    expect_word("E5 vpba", cfg[5].vpba, 32'h9000_0000);
    expect_word("E5 pfba", cfg[5].pfba, 32'hA000_0000);
    load(cfg);
    expect_sel(32'h0000_1000, 1, 0, 0);
    expect_sel(32'h2000_0000, 1, 2, 0);
    expect_sel(32'h2000_1234, 1, 2, 0);
    expect_sel(32'hC000_0000, 0, 0, 0);
    expect_sel(32'h5000_0000, 1, 3, 1);  // E3 and E4 both overlapping
    expect_sel(32'h9000_0000, 1, 1, 1);  // E1 and E5, neither overlapping
    expect_sel(32'h4000_0000, 1, 3, 0);  // E0 and E3
    expect_sel(32'h8000_0000, 1, 1, 0);  // E1 only
    for (int n = 0; n < 3000; n++) probe($urandom);
    // random configurations with small, nested pages
    for (int k = 0; k < 200; k++) begin
      cfg = new[P];
      for (int i = 0; i < P; i++) begin
        int s;
        logic [4:0] a;
        s = $urandom_range(20, 8);
        a = 5'($urandom);
        cfg[i] = mk_entry(s, longint'($urandom_range((1 << (24 - s)) - 1, 0)), longint'($urandom_range(255, 0)),
                          a[4], a[3], a[2], a[1] | a[0], 1'($urandom));
      end
      load(cfg);
      for (int n = 0; n < 40; n++) probe({8'd0, 24'($urandom)});
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
