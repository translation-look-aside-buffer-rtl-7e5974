// tb_tlb_top: end-to-end run of both TLBs at their default sizes, with
// the task tag taken from the PPN of a task's first translation after a
// switch (the default).
//
// Each task resumes, after every context switch, on its own resume page,
// whose frame no other task's resume page shares, and then touches pages
// with locality. The small-page design runs 20 tasks on its 16 banks with
// working sets of 48 groups (more than its 136 page slots), the large-page
// design 40 tasks on its 32 banks, so entries and banks are replaced.
// Checked for every request: the physical address and attributes against
// the page table and exactly one response; the first request after a
// switch always goes to the walker. Counted, each required at least once:
// shared hit, bank hit, miss, promotion, write-back of an evicted group,
// bank reuse, bank allocation, allocation over a valid bank, context
// switch, clear TLB, a re-walk of a page evicted within one time slice
// (capacity), and a bank hit within 10 requests after a switch.
module tb_tlb_top
  import tlb_pkg::*;
  import tb_pt_pkg::*;
;
  localparam int unsigned NREQ = 40000;

  logic clk = 0, rst_n = 0;
  // small-page design
  logic l_req_valid, l_req_ready, l_resp_valid, l_ctx, l_clr, l_os_ready;
  logic [31:0] l_vaddr, l_paddr;
  logic [3:0] l_attr, l_wr_attr;
  resp_src_e l_src;
  logic l_wq_valid, l_wq_ready, l_wr_valid;
  logic [19:0] l_wq_vpn, l_wr_ppn;
  logic [15:0] l_bcur, l_bval;
  tlb_events_t l_ev;
  // large-page design
  logic o_req_valid, o_req_ready, o_resp_valid, o_ctx, o_clr, o_os_ready;
  logic [31:0] o_vaddr, o_paddr;
  logic [3:0] o_attr, o_wr_attr;
  resp_src_e o_src;
  logic o_wq_valid, o_wq_ready, o_wr_valid;
  logic [11:0] o_wq_vpn, o_wr_ppn;
  logic [31:0] o_bcur, o_bval;
  tlb_events_t o_ev;

  int unsigned l_task = 0, o_task = 0, l_walks, o_walks;
  int unsigned checks = 0, failures = 0;

  tlb_top dut (
    .clk(clk), .rst_n(rst_n),
    .lcs_req_valid_i(l_req_valid), .lcs_req_ready_o(l_req_ready), .lcs_req_vaddr_i(l_vaddr),
    .lcs_pid_i('0), .lcs_resp_valid_o(l_resp_valid), .lcs_resp_paddr_o(l_paddr),
    .lcs_resp_attr_o(l_attr), .lcs_resp_src_o(l_src), .lcs_ctx_switch_i(l_ctx),
    .lcs_clear_tlb_i(l_clr), .lcs_os_ready_o(l_os_ready), .lcs_walk_req_valid_o(l_wq_valid),
    .lcs_walk_req_ready_i(l_wq_ready), .lcs_walk_req_vpn_o(l_wq_vpn),
    .lcs_walk_resp_valid_i(l_wr_valid), .lcs_walk_resp_ppn_i(l_wr_ppn),
    .lcs_walk_resp_attr_i(l_wr_attr), .lcs_bank_current_o(l_bcur), .lcs_bank_valid_o(l_bval),
    .lcs_ev_o(l_ev),
    .orig_req_valid_i(o_req_valid), .orig_req_ready_o(o_req_ready), .orig_req_vaddr_i(o_vaddr),
    .orig_pid_i('0), .orig_resp_valid_o(o_resp_valid), .orig_resp_paddr_o(o_paddr),
    .orig_resp_attr_o(o_attr), .orig_resp_src_o(o_src), .orig_ctx_switch_i(o_ctx),
    .orig_clear_tlb_i(o_clr), .orig_os_ready_o(o_os_ready), .orig_walk_req_valid_o(o_wq_valid),
    .orig_walk_req_ready_i(o_wq_ready), .orig_walk_req_vpn_o(o_wq_vpn),
    .orig_walk_resp_valid_i(o_wr_valid), .orig_walk_resp_ppn_i(o_wr_ppn),
    .orig_walk_resp_attr_i(o_wr_attr), .orig_bank_current_o(o_bcur), .orig_bank_valid_o(o_bval),
    .orig_ev_o(o_ev));

  tb_walker #(.VPN_W(20), .PPN_W(20), .LAT(10)) u_lwalk (
    .clk(clk), .rst_n(rst_n), .task_i(l_task), .req_valid_i(l_wq_valid), .req_ready_o(l_wq_ready),
    .req_vpn_i(l_wq_vpn), .resp_valid_o(l_wr_valid), .resp_ppn_o(l_wr_ppn), .resp_attr_o(l_wr_attr),
    .walks_o(l_walks));
  tb_walker #(.VPN_W(12), .PPN_W(12), .LAT(10)) u_owalk (
    .clk(clk), .rst_n(rst_n), .task_i(o_task), .req_valid_i(o_wq_valid), .req_ready_o(o_wq_ready),
    .req_vpn_i(o_wq_vpn), .resp_valid_o(o_wr_valid), .resp_ppn_o(o_wr_ppn), .resp_attr_o(o_wr_attr),
    .walks_o(o_walks));

  // event counters: 0 hit_shared 1 hit_bank 2 miss 3 promote 4 wb 5 reuse 6 alloc
  // 7 ctx 8 clear 9 alloc over a valid bank
  int unsigned l_n[10], o_n[10];
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    l_n[0] += 32'(l_ev.hit_shared); l_n[1] += 32'(l_ev.hit_bank); l_n[2] += 32'(l_ev.miss);
    l_n[3] += 32'(l_ev.promote);    l_n[4] += 32'(l_ev.victim_wb); l_n[5] += 32'(l_ev.bank_reuse);
    l_n[6] += 32'(l_ev.bank_alloc); l_n[7] += 32'(l_ev.ctx_switch); l_n[8] += 32'(l_ev.clear);
    l_n[9] += 32'(l_ev.bank_alloc && l_bval == '1);
    o_n[0] += 32'(o_ev.hit_shared); o_n[1] += 32'(o_ev.hit_bank); o_n[2] += 32'(o_ev.miss);
    o_n[5] += 32'(o_ev.bank_reuse); o_n[6] += 32'(o_ev.bank_alloc); o_n[7] += 32'(o_ev.ctx_switch);
    o_n[8] += 32'(o_ev.clear);      o_n[9] += 32'(o_ev.bank_alloc && o_bval == '1);
  end

  initial begin
    repeat (NREQ * 2 * 25) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t FAIL %s", $time, what);
    end
  endtask

  // ---- small-page design ----
  task automatic l_xlate(input logic [19:0] vpn, output resp_src_e got);
    @(negedge clk);
    l_vaddr = {vpn, 12'($urandom())};
    l_req_valid = 1;
    do @(posedge clk); while (!l_req_ready);
    @(negedge clk);
    l_req_valid = 0;
    while (!l_resp_valid) @(negedge clk);
    check("lcs pa", l_paddr == {20'(pt_ppn(l_task, 32'(vpn), 20)), l_vaddr[11:0]});
    check("lcs attr", l_attr == pt_attr(l_task, 32'(vpn)));
    got = l_src;
    @(negedge clk);
    check("lcs single response", !l_resp_valid);
  endtask
  task automatic l_os(input bit is_clear);
    @(negedge clk);
    if (is_clear) l_clr = 1; else l_ctx = 1;
    do @(posedge clk); while (!l_os_ready);
    @(negedge clk);
    l_clr = 0; l_ctx = 0;
  endtask

  // ---- large-page design ----
  task automatic o_xlate(input logic [11:0] vpn, output resp_src_e got);
    @(negedge clk);
    o_vaddr = {vpn, 20'($urandom())};
    o_req_valid = 1;
    do @(posedge clk); while (!o_req_ready);
    @(negedge clk);
    o_req_valid = 0;
    while (!o_resp_valid) @(negedge clk);
    check("orig pa", o_paddr == {12'(pt_ppn(o_task, 32'(vpn), 12)), o_vaddr[19:0]});
    check("orig attr", o_attr == pt_attr(o_task, 32'(vpn)));
    got = o_src;
    @(negedge clk);
    check("orig single response", !o_resp_valid);
  endtask
  task automatic o_os(input bit is_clear);
    @(negedge clk);
    if (is_clear) o_clr = 1; else o_ctx = 1;
    do @(posedge clk); while (!o_os_ready);
    @(negedge clk);
    o_clr = 0; o_ctx = 0;
  endtask

  // Resume page of every task: its frame differs from every other task's.
  function automatic void pick_resume(int unsigned ntask, int unsigned ppn_w, int unsigned base,
                                      int unsigned stride, ref int unsigned res[]);
    res = new[ntask];
    for (int unsigned t = 0; t < ntask; t++) begin
      int unsigned v;
      bit clash;
      v = base + t * stride;
      do begin
        clash = 0;
        for (int unsigned u = 0; u < t; u++)
          if (pt_ppn(u, res[u], ppn_w) == pt_ppn(t, v, ppn_w)) clash = 1;
        if (clash) v++;
      end while (clash);
      res[t] = v;
    end
  endfunction

  initial begin
    int unsigned l_res[], o_res[];
    resp_src_e s;
    int unsigned nsw, since, next_sw, hot, l_after = 0, o_after = 0, l_refetch = 0, o_refetch = 0;
    bit seen[int unsigned];
    l_req_valid = 0; l_ctx = 0; l_clr = 0; l_vaddr = '0;
    o_req_valid = 0; o_ctx = 0; o_clr = 0; o_vaddr = '0;
    foreach (l_n[i]) begin l_n[i] = 0; o_n[i] = 0; end
    pick_resume(20, 20, 32'h0100, 32'h200, l_res);
    pick_resume(40, 12, 32'h010, 32'h40, o_res);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // small-page design: 20 tasks, working set of 48 groups each
    nsw = 0; since = 0; next_sw = 0; hot = 0;
    for (int unsigned r = 0; r < NREQ; r++) begin
      logic [19:0] vpn;
      if (r == next_sw) begin
        if (r != 0) begin nsw++; l_os(nsw == 45); end
        l_task  = $urandom_range(0, 19);
        next_sw = r + $urandom_range(200, 1200);
        since   = 0;
        seen.delete();
      end
      if (since == 0) vpn = 20'(l_res[l_task]);
      else begin
        if ($urandom_range(0, 7) == 0) hot = $urandom_range(0, 47);
        vpn = 20'(l_res[l_task] + 16 + ((hot + $urandom_range(0, 3)) % 48) * 4 + $urandom_range(0, 3));
      end
      l_xlate(vpn, s);
      if (since == 0) check("lcs first request after a switch is walked", s == SRC_WALK);
      else if (since < 10 && s == SRC_BANK) l_after++;
      if (s == SRC_WALK && seen.exists(vpn)) l_refetch++;
      seen[vpn] = 1;
      since++;
    end

    // large-page design: 40 tasks, 12 pages each
    nsw = 0; since = 0; next_sw = 0; hot = 0;
    for (int unsigned r = 0; r < NREQ; r++) begin
      logic [11:0] vpn;
      if (r == next_sw) begin
        if (r != 0) begin nsw++; o_os(nsw == 130); end
        o_task  = $urandom_range(0, 39);
        next_sw = r + $urandom_range(100, 400);
        since   = 0;
        seen.delete();
      end
      if (since == 0) vpn = 12'(o_res[o_task]);
      else begin
        if ($urandom_range(0, 31) == 0) hot = $urandom_range(0, 11);
        vpn = 12'(o_res[o_task] + 1 + (hot + $urandom_range(0, 5)) % 12);
      end
      o_xlate(vpn, s);
      if (since == 0) check("orig first request after a switch is walked", s == SRC_WALK);
      else if (since < 10 && s == SRC_BANK) o_after++;
      if (s == SRC_WALK && seen.exists(32'(vpn))) o_refetch++;
      seen[32'(vpn)] = 1;
      since++;
    end

    $display("lcs : hit_shared=%0d hit_bank=%0d miss=%0d promote=%0d wb=%0d reuse=%0d alloc=%0d alloc_over_valid=%0d ctx=%0d clear=%0d refetch=%0d bank_hit_after_switch=%0d",
             l_n[0], l_n[1], l_n[2], l_n[3], l_n[4], l_n[5], l_n[6], l_n[9], l_n[7], l_n[8], l_refetch, l_after);
    $display("orig: hit_bank=%0d miss=%0d reuse=%0d alloc=%0d alloc_over_valid=%0d ctx=%0d clear=%0d refetch=%0d bank_hit_after_switch=%0d",
             o_n[1], o_n[2], o_n[5], o_n[6], o_n[9], o_n[7], o_n[8], o_refetch, o_after);
    $display("miss rate: lcs %0d/%0d, orig %0d/%0d", l_n[2], NREQ, o_n[2], NREQ);
    for (int i = 0; i < 10; i++) check($sformatf("lcs mechanism %0d happened", i), l_n[i] > 0);
    for (int i = 0; i < 10; i++)
      if (i != 0 && i != 3 && i != 4) check($sformatf("orig mechanism %0d happened", i), o_n[i] > 0);
    check("lcs capacity re-walk", l_refetch > 0);
    check("orig capacity re-walk", o_refetch > 0);
    check("lcs bank hit after a switch", l_after > 0);
    check("orig bank hit after a switch", o_after > 0);
    check("walks match misses", l_walks == l_n[2] && o_walks == o_n[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
