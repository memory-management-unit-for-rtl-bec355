// tb_mmu_asi_regs: the register interface in ASI 0x1A, with a TLB held by
// the testbench. Checks the I/O registers (attribute reserved bits read as
// zero), the update command (entry written with the I/O register contents,
// out-of-range index ignored), the load command, the probe (matching index
// and I/O registers refreshed; 0xFFFFFFFF and registers untouched on a
// miss; overlap rule applied), the control register (enable bit, installed
// and free entry counts), fault status/address capture, the one-cycle
// acknowledge, and that other ASIs are ignored.
module tb_mmu_asi_regs;
  import mmu_pkg::*;
  import mmu_ref_pkg::*;
  localparam int P = 8;

  logic        clk = 0, rst_n = 0;
  logic        asi_valid = 0, asi_write = 0;
  logic [7:0]  asi = MMU_ASI;
  addr_t       asi_addr = '0;
  logic [31:0] asi_wdata = '0;
  logic        asi_ack;
  logic [31:0] asi_rdata;
  tlb_entry_t  entries [P];
  logic        tlb_we;
  logic [31:0] tlb_widx;
  tlb_entry_t  tlb_wentry;
  logic        fault_valid = 0;
  fault_t      fault_type = FAULT_NONE;
  addr_t       fault_va = '0;
  logic        mmu_enable;
  int checks = 0, failures = 0, cycles = 0;

  mmu_asi_regs dut (
    .clk(clk), .rst_n(rst_n), .asi_valid(asi_valid), .asi_write(asi_write), .asi(asi),
    .asi_addr(asi_addr), .asi_wdata(asi_wdata), .asi_ack(asi_ack), .asi_rdata(asi_rdata),
    .entries(entries), .tlb_we(tlb_we), .tlb_widx(tlb_widx), .tlb_wentry(tlb_wentry),
    .fault_valid(fault_valid), .fault_type(fault_type), .fault_va(fault_va),
    .mmu_enable(mmu_enable)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // the TLB the interface writes into
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < P; i++) entries[i] <= '0;
    else if (tlb_we && tlb_widx < P) entries[tlb_widx[2:0]] <= tlb_wentry;
  end

  task automatic expect32(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  // one access; returns the read data; checks the acknowledge timing
  task automatic access(input bit wr, input logic [7:0] a, input logic [11:0] reg_addr,
                        input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    asi_valid = 1; asi_write = wr; asi = a;
    asi_addr = {20'($urandom), reg_addr[11:8], 8'($urandom)};  // only bits 11..8 count
    asi_wdata = wd;
    @(negedge clk);
    asi_valid = 0;
    checks++;
    if (asi_ack !== (a == MMU_ASI)) begin
      failures++;
      $display("FAIL ack=%0b for asi %h", asi_ack, a);
    end
    rd = asi_rdata;
  endtask

  task automatic sta(logic [11:0] ra, logic [31:0] wd);
    logic [31:0] rd;
    access(1, MMU_ASI, ra, wd, rd);
  endtask

  task automatic lda(logic [11:0] ra, output logic [31:0] rd);
    access(0, MMU_ASI, ra, '0, rd);
  endtask

  task automatic write_entry(int idx, tlb_entry_t e);
    sta(12'h300, e.mask);
    sta(12'h400, e.vpba);
    sta(12'h500, e.pfba);
    sta(12'h600, attr_to_word(e.attr));
    sta(12'h000, 32'(idx));
  endtask

  task automatic expect_io(string what, tlb_entry_t e);
    logic [31:0] rd;
    lda(12'h300, rd); expect32({what, " mask"}, rd, e.mask);
    lda(12'h400, rd); expect32({what, " vpba"}, rd, e.vpba);
    lda(12'h500, rd); expect32({what, " pfba"}, rd, e.pfba);
    lda(12'h600, rd); expect32({what, " attr"}, rd, {27'd0, e.attr});
  endtask

  initial begin
    tlb_entry_t cfg[];
    logic [31:0] rd;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset state
    lda(12'h700, rd); expect32("ctrl after reset", rd, {8'd0, 8'd8, 8'd8, 8'd0});
    lda(12'h800, rd); expect32("fsr after reset", rd, 0);
    expect32("enable after reset", 32'(mmu_enable), 0);
    // attribute reserved bits
    sta(12'h600, 32'hFFFF_FFFF);
    lda(12'h600, rd); expect32("attr reserved", rd, 32'h1F);
    // write the example configuration through the interface
    example_config(cfg);
    for (int i = 0; i < 6; i++) write_entry(i, cfg[i]);
    for (int i = 0; i < P; i++) begin
      checks++;
      if (entries[i] !== cfg[i]) begin
        failures++; $display("FAIL update entry %0d: %h", i, entries[i]);
      end
    end
    // an out-of-range update changes nothing
    sta(12'h000, 32'd8);
    checks++;
    if (entries[7] !== '0 || entries[0] !== cfg[0]) begin failures++; $display("FAIL out-of-range update"); end
    lda(12'h700, rd); expect32("ctrl free entries", rd, {8'd0, 8'd2, 8'd8, 8'd0});
    // load command
    for (int i = 5; i >= 0; i--) begin
      sta(12'h100, 32'(i));
      expect_io($sformatf("load %0d", i), cfg[i]);
    end
    // probe: hit updates the I/O registers
    sta(12'h400, 32'h2000_1234);
    lda(12'h200, rd); expect32("probe 0x20001234", rd, 2);
    expect_io("probe 0x20001234", cfg[2]);
    sta(12'h400, 32'h0000_1000);
    lda(12'h200, rd); expect32("probe 0x1000", rd, 0);
    expect_io("probe 0x1000", cfg[0]);
    // probe miss: 0xFFFFFFFF, registers keep the address just written
    sta(12'h300, 32'h1234_5678);
    sta(12'h400, 32'hC000_0000);
    lda(12'h200, rd); expect32("probe miss", rd, 32'hFFFF_FFFF);
    lda(12'h300, rd); expect32("probe miss keeps mask", rd, 32'h1234_5678);
    lda(12'h400, rd); expect32("probe miss keeps vpba", rd, 32'hC000_0000);
    // probe ignores permissions: the read-only data page is found
    sta(12'h400, 32'h9000_0000);
    lda(12'h200, rd); expect32("probe ambiguous", rd, 1);
    // control register: enable
    sta(12'h700, 32'hFFFF_FFFF);
    expect32("enable set", 32'(mmu_enable), 1);
    lda(12'h700, rd); expect32("ctrl enabled", rd, {8'd0, 8'd2, 8'd8, 8'd1});
    // another ASI is not this unit's
    access(1, 8'h19, 12'h700, 32'h0, rd);
    expect32("other asi ignored", 32'(mmu_enable), 1);
    sta(12'h700, 32'h0);
    expect32("enable cleared", 32'(mmu_enable), 0);
    // fault capture
    @(negedge clk); fault_valid = 1; fault_type = FAULT_WRITE; fault_va = 32'hDEAD_BEE0;
    @(negedge clk); fault_type = FAULT_NONE; fault_va = 32'h1111_1111;
    @(negedge clk); fault_valid = 0;
    lda(12'h800, rd); expect32("fsr write fault", rd, 2);
    lda(12'h900, rd); expect32("far write fault", rd, 32'hDEAD_BEE0);
    @(negedge clk); fault_valid = 1; fault_type = FAULT_EXEC; fault_va = 32'h0000_0040;
    @(negedge clk); fault_valid = 0;
    lda(12'h800, rd); expect32("fsr exec fault", rd, 3);
    lda(12'h900, rd); expect32("far exec fault", rd, 32'h40);
    // FSR and FAR are read-only
    sta(12'h800, 32'h0); sta(12'h900, 32'h0);
    lda(12'h800, rd); expect32("fsr read-only", rd, 3);
    lda(12'h900, rd); expect32("far read-only", rd, 32'h40);
    // write-only addresses read as zero
    lda(12'h000, rd); expect32("update reads zero", rd, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
