// tb_mmu_tlb: TLB storage. After reset every entry must read as zero
// (invalid); random writes must land in the indexed entry only and be
// visible the cycle after the write; writes with an index of P or above
// must change nothing.
module tb_mmu_tlb;
  import mmu_pkg::*;
  import mmu_ref_pkg::*;
  localparam int P = 8;

  logic        clk = 0, rst_n = 0;
  logic        we = 0;
  logic [31:0] widx = 0;
  tlb_entry_t  wentry = '0;
  tlb_entry_t  entries [P];
  tlb_entry_t  model [P];
  int checks = 0, failures = 0, cycles = 0;

  mmu_tlb dut (.clk(clk), .rst_n(rst_n), .we(we), .widx(widx),
                        .wentry(wentry), .entries(entries));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic compare(string what);
    for (int i = 0; i < P; i++) begin
      checks++;
      if (entries[i] !== model[i]) begin
        failures++;
        $display("FAIL %s entry %0d: %h expected %h", what, i, entries[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < P; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 compare("reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we     = $urandom_range(3, 0) != 0;
      widx   = ($urandom_range(7, 0) == 0) ? 32'(P + $urandom_range(100, 0)) : 32'($urandom_range(P - 1, 0));
      wentry = {$urandom, $urandom, $urandom, 5'($urandom)};
      @(posedge clk);
      if (we && widx < P) model[widx] = wentry;
      #1 compare("write");
    end
    // asynchronous reset clears everything again
    @(negedge clk); we = 0; rst_n = 0;
    for (int i = 0; i < P; i++) model[i] = '0;
    #1 compare("second reset");
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
