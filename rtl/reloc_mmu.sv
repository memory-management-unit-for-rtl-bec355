// reloc_mmu: memory management unit for run-time relocation of damaged RAM.
//
// The unit sits between a SPARC v8 (LEON3) processor and memory. It maps
// virtual to physical addresses with P software-managed TLB entries whose
// pages may have any power-of-two size and may overlap: a small overlapping
// page laid over a large 1-to-1 page moves just a damaged block elsewhere,
// with one entry and no page tables in RAM. Boot software fills the TLB
// through ASI 0x1A and enables the unit; the application then runs at its
// link-time addresses while the MMU redirects accesses to damaged blocks.
//
// Structure: mmu_tlb holds the entries; mmu_translate searches them in
// parallel, applies the overlap rule and the W/X permission check and
// returns the physical address one clock after the request; mmu_asi_regs
// implements the register interface (TLB update, load and probe, control,
// fault status and fault address registers) and records every translation
// fault. Entry format, register map, selection rule and the one-cycle
// latency follow the LEON3 implementation of this MMU; port names,
// handshakes, reset values and encodings are this design's own.
//
// Translation port: req_valid/req_va/req_acc in, rsp_* one cycle later (see
// mmu_translate). A fault (rsp_fault != FAULT_NONE) is the trap the
// processor must take. Register port: asi_valid/asi_write/asi/asi_addr/
// asi_wdata in, asi_ack/asi_rdata one cycle later (see mmu_asi_regs).
// mmu_enable shows whether translation is on.
module reloc_mmu
  import mmu_pkg::*;
#(
  parameter int unsigned P  = 8,
  localparam int unsigned IW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // translation requests from the processor
  input  logic          req_valid,
  input  addr_t         req_va,
  input  access_t       req_acc,
  output logic          rsp_valid,
  output addr_t         rsp_pa,
  output fault_t        rsp_fault,
  output logic          rsp_cacheable,
  output logic          rsp_undefined,
  output logic [IW-1:0] rsp_idx,
  // LDA/STA accesses to the alternate address spaces
  input  logic          asi_valid,
  input  logic          asi_write,
  input  logic [7:0]    asi,
  input  addr_t         asi_addr,
  input  logic [31:0]   asi_wdata,
  output logic          asi_ack,
  output logic [31:0]   asi_rdata,
  output logic          mmu_enable
);

  tlb_entry_t  entries [P];
  logic        tlb_we;
  logic [31:0] tlb_widx;
  tlb_entry_t  tlb_wentry;
  addr_t       rsp_va;

  mmu_tlb #(.P(P)) u_tlb (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (tlb_we),
    .widx    (tlb_widx),
    .wentry  (tlb_wentry),
    .entries (entries)
  );

  mmu_translate #(.P(P)) u_translate (
    .clk           (clk),
    .rst_n         (rst_n),
    .enable        (mmu_enable),
    .entries       (entries),
    .req_valid     (req_valid),
    .req_va        (req_va),
    .req_acc       (req_acc),
    .rsp_valid     (rsp_valid),
    .rsp_va        (rsp_va),
    .rsp_pa        (rsp_pa),
    .rsp_fault     (rsp_fault),
    .rsp_cacheable (rsp_cacheable),
    .rsp_undefined (rsp_undefined),
    .rsp_idx       (rsp_idx)
  );

  mmu_asi_regs #(.P(P)) u_regs (
    .clk         (clk),
    .rst_n       (rst_n),
    .asi_valid   (asi_valid),
    .asi_write   (asi_write),
    .asi         (asi),
    .asi_addr    (asi_addr),
    .asi_wdata   (asi_wdata),
    .asi_ack     (asi_ack),
    .asi_rdata   (asi_rdata),
    .entries     (entries),
    .tlb_we      (tlb_we),
    .tlb_widx    (tlb_widx),
    .tlb_wentry  (tlb_wentry),
    .fault_valid (rsp_valid),
    .fault_type  (rsp_fault),
    .fault_va    (rsp_va),
    .mmu_enable  (mmu_enable)
  );

endmodule
