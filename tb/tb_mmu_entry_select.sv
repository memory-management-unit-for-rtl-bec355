// tb_mmu_entry_select: exhaustive check of the entry-selection rule for
// eight entries (every hit vector with every overlap vector), against a
// reference that counts hits and overlapping hits.
module tb_mmu_entry_select;
  localparam int P = 8;
  logic [P-1:0] hit, ovl, sel_oh;
  logic [2:0]   sel_idx;
  logic         found, undefined;
  int checks = 0, failures = 0;
  int n_single = 0, n_overlap = 0, n_undef = 0, n_none = 0;

  mmu_entry_select dut (
    .hit(hit), .ovl(ovl), .found(found), .sel_idx(sel_idx),
    .sel_oh(sel_oh), .undefined(undefined)
  );

  initial begin
    for (int h = 0; h < 256; h++) begin
      for (int o = 0; o < 256; o++) begin
        int nh, no, fh, fo, exp_idx;
        bit exp_found, exp_undef;
        nh = 0; no = 0; fh = -1; fo = -1; exp_idx = 0;
        hit = 8'(h); ovl = 8'(o);
        for (int i = 0; i < P; i++) begin
          if (hit[i]) begin
            nh++; if (fh < 0) fh = i;
            if (ovl[i]) begin no++; if (fo < 0) fo = i; end
          end
        end
        exp_found = nh > 0;
        exp_undef = (nh > 1) && (no != 1);
        if (nh == 0)       begin exp_idx = 0;  n_none++;    end
        else if (nh == 1)  begin exp_idx = fh; n_single++;  end
        else if (no == 1)  begin exp_idx = fo; n_overlap++; end
        else begin exp_idx = (no > 0) ? fo : fh; n_undef++; end
        #1;
        checks++;
        if (found !== exp_found || undefined !== exp_undef ||
            (exp_found && (sel_idx !== 3'(exp_idx) || sel_oh !== (8'd1 << exp_idx))) ||
            (!exp_found && sel_oh !== '0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL hit=%b ovl=%b found=%0b idx=%0d undef=%0b exp %0b %0d %0b",
                     hit, ovl, found, sel_idx, undefined, exp_found, exp_idx, exp_undef);
        end
      end
    end
    if (n_none == 0 || n_single == 0 || n_overlap == 0 || n_undef == 0) failures++;
    $display("cases: none=%0d single=%0d overlap=%0d undefined=%0d", n_none, n_single, n_overlap, n_undef);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
