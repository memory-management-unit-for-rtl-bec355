// tb_mmu_translate: the translation unit with the eight-entry example
// configuration. Checks the worked translations (0x1000 -> 0x1000,
// 0x20001234 -> 0x10001234), permission faults (write to a read-only or
// code page, fetch from a non-executable page), translation faults, the
// silent choice on an ambiguous overlap, the transparent mode when the unit
// is disabled, and that each answer arrives exactly one clock after its
// request with back-to-back requests. Random addresses and modes are
// compared with the reference model.
module tb_mmu_translate;
  import mmu_pkg::*;
  import mmu_ref_pkg::*;
  localparam int P = 8;

  logic        clk = 0, rst_n = 0, enable = 0;
  tlb_entry_t  entries [P];
  tlb_entry_t  cfg[];
  logic        req_valid = 0;
  addr_t       req_va = '0;
  access_t     req_acc = ACC_READ;
  logic        rsp_valid, rsp_cacheable, rsp_undefined;
  addr_t       rsp_va, rsp_pa;
  fault_t      rsp_fault;
  logic [2:0]  rsp_idx;
  int checks = 0, failures = 0, cycles = 0;
  int n_trans = 0, n_write = 0, n_exec = 0, n_undef = 0, n_ok = 0;

  // expected responses, in request order
  typedef struct { addr_t va; ref_result_t r; int issued; } exp_t;
  exp_t q[$];

  mmu_translate dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .entries(entries),
    .req_valid(req_valid), .req_va(req_va), .req_acc(req_acc),
    .rsp_valid(rsp_valid), .rsp_va(rsp_va), .rsp_pa(rsp_pa), .rsp_fault(rsp_fault),
    .rsp_cacheable(rsp_cacheable), .rsp_undefined(rsp_undefined), .rsp_idx(rsp_idx)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // response checker
  always @(posedge clk) begin
    #1;
    if (rsp_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL response without request");
      end else begin
        e = q.pop_front();
        if (cycles - e.issued != 1 || rsp_va !== e.va || rsp_fault !== e.r.fault ||
            rsp_pa !== addr_t'(e.r.pa) || rsp_undefined !== e.r.undefined ||
            (e.r.fault == FAULT_NONE && rsp_cacheable !== e.r.c) ||
            (e.r.found && int'(rsp_idx) !== e.r.idx)) begin
          failures++;
          $display("FAIL va=%h lat=%0d pa=%h fault=%0d undef=%0b idx=%0d | exp pa=%h fault=%0d undef=%0b idx=%0d",
                   e.va, cycles - e.issued, rsp_pa, rsp_fault, rsp_undefined, rsp_idx,
                   e.r.pa, e.r.fault, e.r.undefined, e.r.idx);
        end
        case (rsp_fault)
          FAULT_TRANS: n_trans++;
          FAULT_WRITE: n_write++;
          FAULT_EXEC:  n_exec++;
          default:     n_ok++;
        endcase
        if (rsp_undefined) n_undef++;
      end
    end
  end

  task automatic issue(addr_t va, access_t acc);
    @(negedge clk);
    req_valid = 1; req_va = va; req_acc = acc;
    q.push_back('{va: va, r: translate(cfg, va, acc, enable), issued: cycles});
  endtask

  task automatic idle();
    @(negedge clk); req_valid = 0;
  endtask

  task automatic expect_pa(addr_t va, access_t acc, addr_t pa, fault_t f);
    ref_result_t r = translate(cfg, va, acc, enable);
    checks++;
    if (addr_t'(r.pa) !== pa || r.fault !== f) begin
      failures++;
      $display("FAIL worked example va=%h: model pa=%h fault=%0d", va, r.pa, r.fault);
    end
    issue(va, acc);
  endtask

  initial begin
    example_config(cfg);
    for (int i = 0; i < P; i++) entries[i] = cfg[i];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // disabled: transparent
    issue(32'hC000_0000, ACC_WRITE);
    issue(32'h1234_5678, ACC_EXEC);
    idle();
    @(negedge clk); enable = 1;
    // worked examples (values from the MMU description) as fixed checks
    expect_pa(32'h0000_1000, ACC_EXEC,  32'h0000_1000, FAULT_NONE);
    expect_pa(32'h2000_1234, ACC_EXEC,  32'h1000_1234, FAULT_NONE);
    expect_pa(32'h8000_0010, ACC_WRITE, 32'hC000_0010, FAULT_NONE);
    expect_pa(32'h4000_0004, ACC_READ,  32'h6000_0004, FAULT_NONE);
    expect_pa(32'hC000_0000, ACC_READ,  32'h0,         FAULT_TRANS);
    expect_pa(32'h0000_2000, ACC_WRITE, 32'h0,         FAULT_WRITE);  // code page
    expect_pa(32'h9000_0000, ACC_READ,  32'hD000_0000, FAULT_NONE);   // E1/E5 ambiguous: E1 picked
    expect_pa(32'hB000_0000, ACC_EXEC,  32'h0,         FAULT_EXEC);   // data page
    expect_pa(32'h5000_0100, ACC_READ,  32'h7000_0100, FAULT_NONE);   // E3/E4 ambiguous: E3 picked
    idle();
    // random traffic, with gaps
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(4, 0) == 0) idle();
      else issue($urandom, access_t'($urandom_range(2, 0)));
    end
    idle(); idle(); idle();
    checks++;
    if (q.size() != 0 || n_trans == 0 || n_write == 0 || n_exec == 0 || n_undef == 0 || n_ok == 0) begin
      failures++;
      $display("FAIL coverage: left=%0d trans=%0d write=%0d exec=%0d undef=%0d ok=%0d",
               q.size(), n_trans, n_write, n_exec, n_undef, n_ok);
    end
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
