// mmu_tlb: storage of the P translation lookaside buffer entries.
//
// The TLB is software-managed: software writes whole entries through the
// MMU's register interface and the hardware never replaces entries by
// itself, so the mapping stays deterministic. All entries are held in
// flip-flops and presented in parallel, because the translation compares the
// address with every entry at once. One write port stores a complete entry
// at the clock edge; a write to an index of P or above is ignored. Reset
// clears every entry, which leaves all of them invalid (V = 0); the reset
// value is this design's choice.
//
// Ports: clk, rst_n (active-low asynchronous reset), we / widx / wentry
// (write port), entries (all entries, valid from the cycle after a write).
module mmu_tlb
  import mmu_pkg::*;
#(
  parameter int unsigned P  = 8,
  localparam int unsigned IW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [31:0]   widx,
  input  tlb_entry_t    wentry,
  output tlb_entry_t    entries [P]
);

  tlb_entry_t mem [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P; i++) mem[i] <= '0;
    end else if (we && widx < P) begin
      mem[widx[IW-1:0]] <= wentry;
    end
  end

  assign entries = mem;

endmodule
