// mmu_translate: one-cycle address translation with permission check.
//
// A request (va, access mode) is taken when req_valid is high and answered
// exactly one clock later with rsp_valid; the extra cycle is the latency the
// LEON3 implementation adds to each memory access. The steps follow the
// MMU's translation procedure:
//   1. search all valid entries in parallel and select one (mmu_lookup);
//      no entry -> translation fault;
//   2. write access to a page with W = 0 -> write fault; instruction fetch
//      from a page with X = 0 -> execute fault; reads are always allowed;
//   3. otherwise pa = OR(PFBA, AND(va, NOT mask)).
// An ambiguous overlap raises no fault: the silently chosen entry translates
// and rsp_undefined reports it. When enable is low the unit is transparent:
// pa = va, no fault, and rsp_cacheable = 1 (this design's choice; the
// processor's own address map then decides cacheability). On a fault rsp_pa
// is zero. Requests may be issued every cycle.
//
// Ports: clk, rst_n, enable, entries (TLB contents); req_valid, req_va,
// req_acc; rsp_valid, rsp_va (request address, for the fault address
// register), rsp_pa, rsp_fault (FAULT_NONE when the access may proceed),
// rsp_cacheable (C bit of the selected entry), rsp_undefined, rsp_idx.
module mmu_translate
  import mmu_pkg::*;
#(
  parameter int unsigned P  = 8,
  localparam int unsigned IW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  tlb_entry_t    entries [P],
  input  logic          req_valid,
  input  addr_t         req_va,
  input  access_t       req_acc,
  output logic          rsp_valid,
  output addr_t         rsp_va,
  output addr_t         rsp_pa,
  output fault_t        rsp_fault,
  output logic          rsp_cacheable,
  output logic          rsp_undefined,
  output logic [IW-1:0] rsp_idx
);

  logic          found;
  logic [IW-1:0] sel_idx;
  tlb_entry_t    sel;
  logic          undefined;

  fault_t        fault_d;
  addr_t         pa_d;
  logic          cacheable_d;

  mmu_lookup #(.P(P)) u_lookup (
    .entries   (entries),
    .va        (req_va),
    .found     (found),
    .sel_idx   (sel_idx),
    .entry     (sel),
    .undefined (undefined)
  );

  always_comb begin
    fault_d     = FAULT_NONE;
    pa_d        = req_va;
    cacheable_d = 1'b1;
    if (enable) begin
      cacheable_d = sel.attr.c;
      if (!found)                                  fault_d = FAULT_TRANS;
      else if (req_acc == ACC_WRITE && !sel.attr.w) fault_d = FAULT_WRITE;
      else if (req_acc == ACC_EXEC  && !sel.attr.x) fault_d = FAULT_EXEC;
      pa_d = (fault_d == FAULT_NONE) ? (sel.pfba | (req_va & ~sel.mask)) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid     <= 1'b0;
      rsp_va        <= '0;
      rsp_pa        <= '0;
      rsp_fault     <= FAULT_NONE;
      rsp_cacheable <= 1'b0;
      rsp_undefined <= 1'b0;
      rsp_idx       <= '0;
    end else begin
      rsp_valid <= req_valid;
      if (req_valid) begin
        rsp_va        <= req_va;
        rsp_pa        <= pa_d;
        rsp_fault     <= fault_d;
        rsp_cacheable <= cacheable_d;
        rsp_undefined <= enable && undefined;
        rsp_idx       <= sel_idx;
      end
    end
  end

endmodule
