// tb_fa_tlb: random fills, lookups, group invalidations and flushes of a
// small fully associative TLB, checked against a reference copy of the
// entries with its own recency list (victim = first invalid entry, else the
// least recently used one). Every cycle the lookup result and the group
// report for a random VPN are compared with the reference.
module tb_fa_tlb;
  localparam int unsigned E = 8, VPN_W = 8, PPN_W = 10, ATTR_W = 4, GB = 2, GN = 4;

  logic clk = 0, rst_n = 0;
  logic [VPN_W-1:0] lk_vpn;
  logic lk_en, hit;
  logic [PPN_W-1:0] ppn;
  logic [ATTR_W-1:0] attr;
  logic [GN-1:0] gp;
  logic [GN-1:0][PPN_W-1:0] gppn;
  logic [GN-1:0][ATTR_W-1:0] gattr;
  logic fill, inval, flush;
  logic [VPN_W-1:0] fvpn;
  logic [PPN_W-1:0] fppn;
  logic [ATTR_W-1:0] fattr;
  logic [VPN_W-GB-1:0] igrp;
  logic [GN-1:0] imask;
  logic [E-1:0] valid;
  int unsigned checks = 0, failures = 0;

  // reference
  bit               m_v[E];
  logic [VPN_W-1:0] m_vpn[E];
  logic [PPN_W-1:0] m_ppn[E];
  logic [ATTR_W-1:0] m_attr[E];
  int unsigned      order[$];

  fa_tlb #(.ENTRIES(E), .VPN_W(VPN_W), .PPN_W(PPN_W), .ATTR_W(ATTR_W), .GRP_BITS(GB)) dut (
    .clk(clk), .rst_n(rst_n), .lk_vpn_i(lk_vpn), .lk_en_i(lk_en), .lk_hit_o(hit), .lk_ppn_o(ppn),
    .lk_attr_o(attr), .grp_present_o(gp), .grp_ppn_o(gppn), .grp_attr_o(gattr), .fill_i(fill),
    .fill_vpn_i(fvpn), .fill_ppn_i(fppn), .fill_attr_i(fattr), .inval_i(inval), .inval_grp_i(igrp),
    .inval_mask_i(imask), .flush_i(flush), .valid_o(valid));

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int m_find(logic [VPN_W-1:0] v);
    for (int i = 0; i < E; i++) if (m_v[i] && m_vpn[i] == v) return i;
    return -1;
  endfunction
  function automatic int m_victim();
    for (int i = 0; i < E; i++) if (!m_v[i]) return i;
    return order[E-1];
  endfunction
  function automatic void m_touch(int i);
    foreach (order[p]) if (order[p] == i) begin order.delete(p); break; end
    order.push_front(i);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t FAIL %s", $time, what);
    end
  endtask

  initial begin
    lk_vpn = '0; lk_en = 0; fill = 0; inval = 0; flush = 0; fvpn = '0; fppn = '0; fattr = '0;
    igrp = '0; imask = '0;
    for (int i = 0; i < E; i++) begin m_v[i] = 0; order.push_back(i); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int r, mi;
      @(negedge clk);
      lk_vpn = VPN_W'($urandom_range(0, 31));
      lk_en = 0; fill = 0; inval = 0; flush = 0;
      r = $urandom_range(0, 99);
      mi = m_find(lk_vpn);
      if (r < 40 && mi < 0) begin
        fill = 1; fvpn = lk_vpn; fppn = PPN_W'($urandom()); fattr = ATTR_W'($urandom());
      end else if (r < 85) begin
        lk_en = 1;
      end else if (r < 95) begin
        inval = 1; igrp = lk_vpn[VPN_W-1:GB]; imask = GN'($urandom());
      end else if (r < 97) begin
        flush = 1;
      end
      #1;
      // combinational lookup
      check("hit", hit == (mi >= 0));
      if (mi >= 0) check("ppn/attr", ppn == m_ppn[mi] && attr == m_attr[mi]);
      for (int s = 0; s < GN; s++) begin
        int gi;
        gi = m_find({lk_vpn[VPN_W-1:GB], GB'(s)});
        check("grp present", gp[s] == (gi >= 0));
        if (gi >= 0) check("grp data", gppn[s] == m_ppn[gi] && gattr[s] == m_attr[gi]);
      end
      // update the reference as the edge will
      @(posedge clk);
      if (flush) begin
        for (int i = 0; i < E; i++) m_v[i] = 0;
      end else begin
        if (inval)
          for (int i = 0; i < E; i++)
            if (m_v[i] && m_vpn[i][VPN_W-1:GB] == igrp && imask[m_vpn[i][GB-1:0]]) m_v[i] = 0;
        if (fill) begin
          int v;
          v = m_victim();
          m_v[v] = 1; m_vpn[v] = fvpn; m_ppn[v] = fppn; m_attr[v] = fattr;
          m_touch(v);
        end
        if (lk_en && mi >= 0) m_touch(mi);
      end
      #1;
      for (int i = 0; i < E; i++) check("valid", valid[i] == m_v[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
