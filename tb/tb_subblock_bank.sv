// tb_subblock_bank: random inserts, lookups and flushes of a complete-
// subblock bank (2 entries, 4 subblocks), checked against a reference copy
// with its own recency list. Checks the hit/PPN/attributes of the addressed
// subblock only, that a disabled bank never hits, and the replacement victim
// the bank reports for write-back.
module tb_subblock_bank;
  localparam int unsigned E = 2, TAG_W = 6, PPN_W = 12, ATTR_W = 4, SB = 2, SN = 4;

  logic clk = 0, rst_n = 0;
  logic en, lk_en, hit, ins, flush, vv;
  logic [TAG_W-1:0] lk_tag, itag, vtag;
  logic [SB-1:0] lk_sub;
  logic [PPN_W-1:0] ppn;
  logic [ATTR_W-1:0] attr;
  logic [SN-1:0] isv, vsv;
  logic [SN-1:0][PPN_W-1:0] ippn, vppn;
  logic [SN-1:0][ATTR_W-1:0] iattr, vattr;
  int unsigned checks = 0, failures = 0;

  bit                         m_bv[E];
  logic [TAG_W-1:0]           m_tag[E];
  logic [SN-1:0]              m_sv[E];
  logic [SN-1:0][PPN_W-1:0]   m_ppn[E];
  logic [SN-1:0][ATTR_W-1:0]  m_attr[E];
  int unsigned                order[$];

  subblock_bank #(.ENTRIES(E), .TAG_W(TAG_W), .PPN_W(PPN_W), .ATTR_W(ATTR_W), .SUB_BITS(SB)) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .lk_tag_i(lk_tag), .lk_sub_i(lk_sub), .lk_en_i(lk_en),
    .hit_o(hit), .ppn_o(ppn), .attr_o(attr), .vict_valid_o(vv), .vict_tag_o(vtag), .vict_sv_o(vsv),
    .vict_ppn_o(vppn), .vict_attr_o(vattr), .ins_i(ins), .ins_tag_i(itag), .ins_sv_i(isv),
    .ins_ppn_i(ippn), .ins_attr_i(iattr), .flush_i(flush));

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int m_find(logic [TAG_W-1:0] t);
    for (int i = 0; i < E; i++) if (m_bv[i] && m_tag[i] == t) return i;
    return -1;
  endfunction
  function automatic int m_victim();
    for (int i = 0; i < E; i++) if (!m_bv[i]) return i;
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
    en = 0; lk_en = 0; ins = 0; flush = 0; lk_tag = '0; lk_sub = '0; itag = '0; isv = '0;
    ippn = '0; iattr = '0;
    for (int i = 0; i < E; i++) begin m_bv[i] = 0; order.push_back(i); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int r, mi, v;
      bit exp_hit;
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      lk_tag = TAG_W'($urandom_range(0, 5));
      lk_sub = SB'($urandom());
      lk_en = 0; ins = 0; flush = 0;
      r = $urandom_range(0, 99);
      mi = m_find(lk_tag);
      if (r < 30 && mi < 0) begin
        ins = 1; itag = lk_tag; isv = ($urandom_range(0, 3) == 0) ? SN'($urandom()) : '1;
        for (int s = 0; s < SN; s++) begin ippn[s] = PPN_W'($urandom()); iattr[s] = ATTR_W'($urandom()); end
      end else if (r < 95) lk_en = 1;
      else if (r < 97) flush = 1;
      #1;
      exp_hit = en && mi >= 0 && m_sv[mi][lk_sub];
      check("hit", hit == exp_hit);
      if (exp_hit) check("data", ppn == m_ppn[mi][lk_sub] && attr == m_attr[mi][lk_sub]);
      v = m_victim();
      check("victim valid", vv == m_bv[v]);
      if (m_bv[v]) check("victim data", vtag == m_tag[v] && vsv == m_sv[v] && vppn == m_ppn[v] && vattr == m_attr[v]);
      @(posedge clk);
      if (flush) for (int i = 0; i < E; i++) m_bv[i] = 0;
      else if (ins) begin
        m_bv[v] = 1; m_tag[v] = itag; m_sv[v] = isv; m_ppn[v] = ippn; m_attr[v] = iattr;
        m_touch(v);
      end else if (lk_en && exp_hit) m_touch(mi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
