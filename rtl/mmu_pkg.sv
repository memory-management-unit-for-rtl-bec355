// mmu_pkg: types and constants shared by the relocation MMU.
//
// The MMU translates 32-bit virtual addresses with a software-managed TLB
// whose entries map pages of any power-of-two size and may overlap. An entry
// holds four 32-bit words: Mask (ones above the page offset, zeros in it),
// VPBA (virtual page base address), PFBA (physical frame base address) and an
// attribute word whose bits 4..0 are C (cacheable), W (writable),
// X (executable), V (valid) and O (overlapping). That layout, the 32-bit
// address width and the ASI number 0x1A with its register map come from the
// LEON3 implementation the design follows. The encodings of the access mode
// and of the fault status register are this design's own choice.
package mmu_pkg;

  localparam int unsigned ADDR_W = 32;
  typedef logic [ADDR_W-1:0] addr_t;

  // Attribute word, bits 4..0 (bits 31..5 are reserved and read as zero).
  typedef struct packed {
    logic c;  // bit 4: cacheable
    logic w;  // bit 3: writable
    logic x;  // bit 2: executable
    logic v;  // bit 1: valid
    logic o;  // bit 0: overlapping
  } tlb_attr_t;

  typedef struct packed {
    addr_t     mask;
    addr_t     vpba;
    addr_t     pfba;
    tlb_attr_t attr;
  } tlb_entry_t;

  // Access mode that comes with every translation request.
  typedef enum logic [1:0] {
    ACC_READ  = 2'd0,
    ACC_WRITE = 2'd1,
    ACC_EXEC  = 2'd2
  } access_t;

  // Fault types reported in the fault status register.
  typedef enum logic [1:0] {
    FAULT_NONE  = 2'd0,
    FAULT_TRANS = 2'd1,  // no valid entry holds the address
    FAULT_WRITE = 2'd2,  // write to a page with W = 0
    FAULT_EXEC  = 2'd3   // instruction fetch from a page with X = 0
  } fault_t;

  // Alternate address space of the MMU and its register map; the register
  // is chosen by address bits 11..8, bits 7..0 are ignored.
  localparam logic [7:0] MMU_ASI = 8'h1A;

  typedef enum logic [3:0] {
    REG_UPDATE  = 4'h0,  // write-only: store I/O registers into entry wdata
    REG_LOAD    = 4'h1,  // write-only: load entry wdata into I/O registers
    REG_PROBE   = 4'h2,  // read-only: index of the entry that maps VPBA reg
    REG_MASK    = 4'h3,
    REG_VPBA    = 4'h4,
    REG_PFBA    = 4'h5,
    REG_ATTR    = 4'h6,
    REG_CTRL    = 4'h7,
    REG_FSR     = 4'h8,
    REG_FAR     = 4'h9
  } asi_reg_t;

  localparam logic [31:0] PROBE_MISS = 32'hFFFF_FFFF;

  // Attribute word <-> struct.
  function automatic logic [31:0] attr_to_word(tlb_attr_t a);
    return {27'd0, a};
  endfunction

  function automatic tlb_attr_t word_to_attr(logic [31:0] w);
    return tlb_attr_t'(w[4:0]);
  endfunction

endpackage
