// mmu_asi_regs: the MMU's software interface in alternate address space 0x1A.
//
// The processor reaches the MMU with SPARC LDA/STA instructions on ASI 0x1A.
// The register is chosen by address bits 11..8; bits 7..0 are ignored:
//   0x0xx STA  update: store the four I/O registers into TLB entry wdata
//   0x1xx STA  load:   copy TLB entry wdata into the four I/O registers
//   0x2xx LDA  probe:  return the index of the entry that would translate
//                      the address held in the VPBA I/O register, and copy
//                      that entry into the I/O registers; return 0xFFFFFFFF
//                      and leave the registers alone if no entry maps it.
//                      Permissions are not checked and no fault is raised.
//   0x3xx..0x6xx  Mask, VPBA, PFBA, attribute I/O registers (read/write)
//   0x7xx  control register (read/write)
//   0x8xx  fault status register, 0x9xx fault address register (read-only)
// The map, the commands and their semantics follow the LEON3 implementation.
// This design's own choices: the control register holds the enable bit in
// bit 0, the number of installed entries (P) in bits 15..8 and the number
// of entries with V = 0 (free for relocation) in bits 23..16; only bit 0 is
// writable. The fault status register holds the fault type of the last
// translation fault in bits 1..0 (1 translation, 2 write, 3 execute; 0 none
// since reset); it and the fault address register keep their value until
// the next fault. Update/load with an index of P or above does nothing;
// writes to read-only and reads of write-only addresses are ignored and
// read as zero. Reset disables the MMU.
//
// Timing: an access is taken when asi_valid is high and asi equals 0x1A; it
// is acknowledged one clock later with asi_ack and, for a read, asi_rdata.
// Accesses to other ASIs are not acknowledged (they belong to other units).
// A TLB update is visible to translations from the cycle after asi_ack.
// The acknowledge assertion at the end samples rst_n synchronously (in its
// disable condition) while the registers reset asynchronously; that is a
// simulation-only use and adds no logic.
//
// Ports: clk, rst_n; asi_valid, asi_write, asi, asi_addr, asi_wdata,
// asi_ack, asi_rdata (processor side); entries, tlb_we, tlb_widx,
// tlb_wentry (TLB side); fault_valid, fault_type, fault_va (from the
// translation unit); mmu_enable (to the translation unit).
module mmu_asi_regs
  import mmu_pkg::*;
#(
  parameter int unsigned P  = 8,
  localparam int unsigned IW = (P > 1) ? $clog2(P) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic        asi_valid,
  input  logic        asi_write,
  input  logic [7:0]  asi,
  input  addr_t       asi_addr,
  input  logic [31:0] asi_wdata,
  output logic        asi_ack,
  output logic [31:0] asi_rdata,
  // TLB side
  input  tlb_entry_t  entries [P],
  output logic        tlb_we,
  output logic [31:0] tlb_widx,
  output tlb_entry_t  tlb_wentry,
  // translation unit side
  input  logic        fault_valid,
  input  fault_t      fault_type,
  input  addr_t       fault_va,
  output logic        mmu_enable
);

  tlb_entry_t    io;        // Mask/VPBA/PFBA/attribute I/O registers
  logic          enable_q;
  fault_t        fsr_q;
  addr_t         far_q;

  logic          sel;       // access addressed to this unit
  asi_reg_t      reg_id;
  logic          probe_found;
  logic [IW-1:0] probe_idx;
  tlb_entry_t    probe_entry;
  logic          probe_undef;
  logic [7:0]    free_cnt;
  logic [31:0]   rdata_d;

  // probe: same selection as a translation, on the VPBA I/O register
  mmu_lookup #(.P(P)) u_probe (
    .entries   (entries),
    .va        (io.vpba),
    .found     (probe_found),
    .sel_idx   (probe_idx),
    .entry     (probe_entry),
    .undefined (probe_undef)
  );

  always_comb begin
    sel    = asi_valid && (asi == MMU_ASI);
    reg_id = asi_reg_t'(asi_addr[11:8]);
  end

  always_comb begin
    free_cnt = '0;
    for (int i = 0; i < P; i++) free_cnt += {7'd0, !entries[i].attr.v};
  end

  // TLB update command
  always_comb begin
    tlb_we     = sel && asi_write && reg_id == REG_UPDATE;
    tlb_widx   = asi_wdata;
    tlb_wentry = io;
  end

  // read data
  always_comb begin
    rdata_d = '0;
    unique case (reg_id)
      REG_PROBE: rdata_d = probe_found ? 32'(probe_idx) : PROBE_MISS;
      REG_MASK:  rdata_d = io.mask;
      REG_VPBA:  rdata_d = io.vpba;
      REG_PFBA:  rdata_d = io.pfba;
      REG_ATTR:  rdata_d = attr_to_word(io.attr);
      REG_CTRL:  rdata_d = {8'd0, free_cnt, 8'(P), 7'd0, enable_q};
      REG_FSR:   rdata_d = {30'd0, fsr_q};
      REG_FAR:   rdata_d = far_q;
      default:   rdata_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      io        <= '0;
      enable_q  <= 1'b0;
      fsr_q     <= FAULT_NONE;
      far_q     <= '0;
      asi_ack   <= 1'b0;
      asi_rdata <= '0;
    end else begin
      asi_ack   <= sel;
      asi_rdata <= (sel && !asi_write) ? rdata_d : '0;
      if (sel && asi_write) begin
        unique case (reg_id)
          REG_LOAD: if (asi_wdata < P) io <= entries[asi_wdata[IW-1:0]];
          REG_MASK: io.mask <= asi_wdata;
          REG_VPBA: io.vpba <= asi_wdata;
          REG_PFBA: io.pfba <= asi_wdata;
          REG_ATTR: io.attr <= word_to_attr(asi_wdata);
          REG_CTRL: enable_q <= asi_wdata[0];
          default: ;
        endcase
      end
      if (sel && !asi_write && reg_id == REG_PROBE && probe_found) begin
        io <= probe_entry;
      end
      if (fault_valid && fault_type != FAULT_NONE) begin
        fsr_q <= fault_type;
        far_q <= fault_va;
      end
    end
  end

  assign mmu_enable = enable_q;

  // the acknowledge follows an access to this ASI by exactly one cycle
  property p_ack_follows_access;
    @(posedge clk) disable iff (!rst_n) asi_ack |-> $past(sel);
  endproperty
  a_ack_follows_access: assert property (p_ack_follows_access);

endmodule
