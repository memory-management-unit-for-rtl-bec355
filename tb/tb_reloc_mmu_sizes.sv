// tb_reloc_mmu_sizes: the MMU built with 4 and with 16 TLB entries, the other
// two sizes besides the default 8 for which resource figures exist. For each
// size the control register must report the installed and free entry
// counts, every entry must be writable and usable (each maps its own 4 KiB
// page over a 1-to-1 entry 0), and once all entries are used the free count
// must read zero.
module tb_reloc_mmu_sizes;
  import mmu_pkg::*;
  import mmu_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // one MMU instance per size, each driven by its own copy of the tasks
  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int P = (g == 0) ? 4 : 16;
    localparam int IW = $clog2(P);
    logic        req_valid = 0;
    addr_t       req_va = '0;
    access_t     req_acc = ACC_READ;
    logic        rsp_valid, rsp_cacheable, rsp_undefined;
    addr_t       rsp_pa;
    fault_t      rsp_fault;
    logic [IW-1:0] rsp_idx;
    logic        asi_valid = 0, asi_write = 0;
    logic [7:0]  asi = MMU_ASI;
    addr_t       asi_addr = '0;
    logic [31:0] asi_wdata = '0;
    logic        asi_ack, mmu_enable;
    logic [31:0] asi_rdata;
    bit          done = 0;

    reloc_mmu #(.P(P)) dut (
      .clk(clk), .rst_n(rst_n),
      .req_valid(req_valid), .req_va(req_va), .req_acc(req_acc),
      .rsp_valid(rsp_valid), .rsp_pa(rsp_pa), .rsp_fault(rsp_fault),
      .rsp_cacheable(rsp_cacheable), .rsp_undefined(rsp_undefined), .rsp_idx(rsp_idx),
      .asi_valid(asi_valid), .asi_write(asi_write), .asi(asi), .asi_addr(asi_addr),
      .asi_wdata(asi_wdata), .asi_ack(asi_ack), .asi_rdata(asi_rdata), .mmu_enable(mmu_enable)
    );

    task automatic expect32(string what, logic [31:0] got, logic [31:0] exp);
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL P=%0d %s: %h expected %h", P, what, got, exp);
      end
    endtask

    task automatic acc(bit wr, logic [11:0] ra, logic [31:0] wd, output logic [31:0] rd);
      @(negedge clk);
      asi_valid = 1; asi_write = wr; asi_addr = {20'd0, ra}; asi_wdata = wd;
      @(negedge clk);
      asi_valid = 0;
      rd = asi_rdata;
    endtask

    task automatic write_entry(int idx, tlb_entry_t e);
      logic [31:0] rd;
      acc(1, 12'h300, e.mask, rd);
      acc(1, 12'h400, e.vpba, rd);
      acc(1, 12'h500, e.pfba, rd);
      acc(1, 12'h600, attr_to_word(e.attr), rd);
      acc(1, 12'h000, 32'(idx), rd);
    endtask

    initial begin
      logic [31:0] rd;
      wait (rst_n);
      acc(0, 12'h700, 0, rd);
      expect32("installed", 32'(rd[15:8]), P);
      expect32("free after reset", 32'(rd[23:16]), P);
      write_entry(0, mk_entry(31, 0, 0, 1, 1, 1, 1, 0));
      for (int i = 1; i < P; i++)
        write_entry(i, mk_entry(12, longint'(i), longint'(i) + longint'(256), 1, 1, 1, 1, 1));
      acc(0, 12'h700, 0, rd);
      expect32("free when full", 32'(rd[23:16]), 0);
      acc(1, 12'h700, 1, rd);
      for (int i = 0; i < P; i++) begin
        @(negedge clk);
        req_valid = 1; req_va = addr_t'(i << 12) + 32'h24; req_acc = ACC_READ;
        @(negedge clk);
        req_valid = 0;
        expect32($sformatf("entry %0d translation", i), rsp_pa,
                 (i == 0) ? 32'h24 : addr_t'((32'h100 + i) << 12) + 32'h24);
        expect32($sformatf("entry %0d index", i), 32'(rsp_idx), i);
      end
      done = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (g_size[0].done && g_size[1].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
