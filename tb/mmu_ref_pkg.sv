// mmu_ref_pkg: reference model of the relocation MMU for the testbenches.
//
// It works from the MMU's formal definition rather than from the bit tricks
// of the RTL: an entry with s cleared mask bits maps virtual page number
// nu = VPBA / 2^s to frame mu = PFBA / 2^s; an address v lies in the page
// when v / 2^s == nu, and translates to mu * 2^s + (v mod 2^s). Selection:
// none -> translation fault; one -> it; several -> the only overlapping one,
// otherwise undefined (the RTL then picks the lowest overlapping entry, or
// the lowest entry when none overlaps). Arithmetic is done on 64 bits so
// that a page of 2^32 bytes needs no special case.
package mmu_ref_pkg;
  import mmu_pkg::*;

  typedef struct {
    bit      found;
    bit      undefined;
    int      idx;
    fault_t  fault;
    longint  pa;
    bit      c;
  } ref_result_t;

  function automatic int page_bits(logic [31:0] mask);
    int s = 0;
    for (int b = 0; b < 32; b++) if (!mask[b]) s++;
    return s;
  endfunction

  function automatic bit in_page(tlb_entry_t e, logic [31:0] va);
    int s = page_bits(e.mask);
    longint unsigned page = longint'(2) ** s;
    return e.attr.v && ((longint'(va) / page) == (longint'(e.vpba) / page));
  endfunction

  // entries are passed as a dynamic copy so any TLB size can be modelled
  function automatic ref_result_t translate(tlb_entry_t e[], logic [31:0] va,
                                            access_t acc, bit enable);
    ref_result_t r;
    int n_hit = 0, n_ov = 0, first_hit = -1, first_ov = -1;
    r.found = 0; r.undefined = 0; r.idx = 0; r.fault = FAULT_NONE;
    r.pa = longint'(va); r.c = 1;
    if (!enable) return r;
    for (int i = 0; i < e.size(); i++) begin
      if (in_page(e[i], va)) begin
        n_hit++;
        if (first_hit < 0) first_hit = i;
        if (e[i].attr.o) begin
          n_ov++;
          if (first_ov < 0) first_ov = i;
        end
      end
    end
    if (n_hit == 0) begin
      r.fault = FAULT_TRANS; r.pa = 0; r.c = 0;
      return r;
    end
    r.found = 1;
    if (n_hit == 1)      r.idx = first_hit;
    else if (n_ov == 1)  r.idx = first_ov;
    else begin
      r.undefined = 1;
      r.idx = (n_ov > 0) ? first_ov : first_hit;
    end
    r.c = e[r.idx].attr.c;
    if (acc == ACC_WRITE && !e[r.idx].attr.w)     r.fault = FAULT_WRITE;
    else if (acc == ACC_EXEC && !e[r.idx].attr.x) r.fault = FAULT_EXEC;
    if (r.fault != FAULT_NONE) r.pa = 0;
    else begin
      int s = page_bits(e[r.idx].mask);
      longint unsigned page = longint'(2) ** s;
      longint unsigned mu = longint'(e[r.idx].pfba) / page;
      r.pa = mu * page + (longint'(va) % page);
    end
    return r;
  endfunction

  // entry of page size 2^s mapping virtual page nu to frame mu
  function automatic tlb_entry_t mk_entry(int s, longint nu, longint mu,
                                          bit c, bit w, bit x, bit v, bit o);
    tlb_entry_t e;
    longint unsigned page = longint'(2) ** s;
    e.mask = 32'((longint'(33'h1_0000_0000) - page));
    e.vpba = 32'(nu * page);
    e.pfba = 32'(mu * page);
    e.attr = '{c: c, w: w, x: x, v: v, o: o};
    return e;
  endfunction

  // The eight-entry example configuration (entries 0..5 valid).
  function automatic void example_config(ref tlb_entry_t e[]);
    e = new[8];
    //               s   nu  mu  C  W  X  V  O
    e[0] = mk_entry(31,  0,  0, 1, 0, 1, 1, 0);
    e[1] = mk_entry(30,  2,  3, 1, 1, 0, 1, 0);
    e[2] = mk_entry(28,  2,  1, 1, 0, 1, 1, 1);
    e[3] = mk_entry(29,  2,  3, 1, 0, 1, 1, 1);
    e[4] = mk_entry(27, 10,  6, 1, 0, 1, 1, 1);
    e[5] = mk_entry(28,  9, 10, 1, 0, 0, 1, 0);
    e[6] = '0;
    e[7] = '0;
  endfunction

endpackage
