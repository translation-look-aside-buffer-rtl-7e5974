// tb_lcs_tlb: random multi-task workload on a reduced low context-switch
// penalty TLB (16-entry shared TLB, 4 banks x 2 entries) so that every
// structure overflows often. Task tags are PIDs (TASK_FROM_PPN = 0), so a
// task's first access after a switch may fall on a page its bank holds.
//
// Six tasks each touch pages of a few 16KB groups with locality; a context
// switch comes every 50..250 requests, a clear-TLB every ~6000. Checked:
// every response's physical address and attributes against the page table,
// exactly one response per request, that the first request after a context
// switch or clear always goes to the walker, and that every mechanism
// (shared hit, bank hit, miss, promotion, write-back, bank reuse, bank
// allocation, context switch, clear, bank hit right after a switch)
// happened at least once.
module tb_lcs_tlb
  import tlb_pkg::*;
  import tb_pt_pkg::*;
;
  localparam int unsigned VPN_W = 20, PPN_W = 20, BANKS = 4, NTASK = 6, NREQ = 30000;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, resp_valid, ctx, clr, os_ready;
  logic [31:0] vaddr, paddr;
  logic [3:0] attr;
  resp_src_e src;
  logic wq_valid, wq_ready, wr_valid;
  logic [VPN_W-1:0] wq_vpn;
  logic [PPN_W-1:0] wr_ppn;
  logic [3:0] wr_attr;
  logic [BANKS-1:0] bcur, bval;
  tlb_events_t ev;
  int unsigned cur_task = 0, walks;
  int unsigned checks = 0, failures = 0;
  int unsigned n_ev[9];
  int unsigned n_src[3];
  int unsigned n_bank_after_switch = 0;

  lcs_tlb #(.SH_ENTRIES(16), .BANKS(BANKS), .BANK_ENTRIES(2), .TASK_FROM_PPN(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .req_valid_i(req_valid), .req_ready_o(req_ready), .req_vaddr_i(vaddr),
    .pid_i(PPN_W'(cur_task + 32'h100)), .resp_valid_o(resp_valid), .resp_paddr_o(paddr),
    .resp_attr_o(attr), .resp_src_o(src), .ctx_switch_i(ctx), .clear_tlb_i(clr), .os_ready_o(os_ready),
    .walk_req_valid_o(wq_valid), .walk_req_ready_i(wq_ready), .walk_req_vpn_o(wq_vpn),
    .walk_resp_valid_i(wr_valid), .walk_resp_ppn_i(wr_ppn), .walk_resp_attr_i(wr_attr),
    .bank_current_o(bcur), .bank_valid_o(bval), .ev_o(ev));

  tb_walker #(.VPN_W(VPN_W), .PPN_W(PPN_W), .LAT(5)) u_walk (
    .clk(clk), .rst_n(rst_n), .task_i(cur_task), .req_valid_i(wq_valid), .req_ready_o(wq_ready),
    .req_vpn_i(wq_vpn), .resp_valid_o(wr_valid), .resp_ppn_o(wr_ppn), .resp_attr_o(wr_attr),
    .walks_o(walks));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (ev.hit_shared) n_ev[0]++;
    if (ev.hit_bank)   n_ev[1]++;
    if (ev.miss)       n_ev[2]++;
    if (ev.promote)    n_ev[3]++;
    if (ev.victim_wb)  n_ev[4]++;
    if (ev.bank_reuse) n_ev[5]++;
    if (ev.bank_alloc) n_ev[6]++;
    if (ev.ctx_switch) n_ev[7]++;
    if (ev.clear)      n_ev[8]++;
  end

  initial begin
    repeat (NREQ * 20) @(posedge clk);
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

  task automatic xlate(input logic [19:0] vpn, output resp_src_e got);
    @(negedge clk);
    vaddr = {vpn, 12'($urandom())};
    req_valid = 1;
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    check("pa", paddr == {PPN_W'(pt_ppn(cur_task, 32'(vpn), PPN_W)), vaddr[11:0]});
    check("attr", attr == pt_attr(cur_task, 32'(vpn)));
    got = src;
    n_src[src]++;
    @(negedge clk);
    check("single response", !resp_valid);
  endtask

  task automatic os_op(input bit is_clear);
    @(negedge clk);
    if (is_clear) clr = 1; else ctx = 1;
    do @(posedge clk); while (!os_ready);
    @(negedge clk);
    clr = 0; ctx = 0;
  endtask

  initial begin
    int unsigned next_switch, since;
    int unsigned hot[NTASK];
    resp_src_e s;
    req_valid = 0; ctx = 0; clr = 0; vaddr = '0;
    foreach (n_ev[i]) n_ev[i] = 0;
    foreach (n_src[i]) n_src[i] = 0;
    foreach (hot[t]) hot[t] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    next_switch = 100;
    since = 0;
    for (int unsigned r = 0; r < NREQ; r++) begin
      logic [19:0] vpn;
      if (r == next_switch) begin
        if ($urandom_range(0, 29) == 0) os_op(1);
        else os_op(0);
        cur_task = $urandom_range(0, NTASK - 1);
        next_switch = r + $urandom_range(50, 250);
        since = 0;
      end
      // locality: a hot group per task that drifts slowly
      if ($urandom_range(0, 15) == 0) hot[cur_task] = $urandom_range(0, 5);
      vpn = 20'h01000 + 20'(cur_task * 64) + 20'(((hot[cur_task] + $urandom_range(0, 2)) % 6) * 4)
          + 20'($urandom_range(0, 3));
      xlate(vpn, s);
      if (since == 0) check("first request after a switch is walked", s == SRC_WALK);
      if (since > 0 && since < 10 && s == SRC_BANK) n_bank_after_switch++;
      since++;
    end
    $display("events: hit_shared=%0d hit_bank=%0d miss=%0d promote=%0d wb=%0d reuse=%0d alloc=%0d ctx=%0d clear=%0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_ev[7], n_ev[8]);
    $display("bank hits within 10 requests of a switch: %0d", n_bank_after_switch);
    foreach (n_ev[i]) check($sformatf("event %0d happened", i), n_ev[i] > 0);
    check("bank hit soon after a switch", n_bank_after_switch > 0);
    check("responses by source match events", n_src[SRC_SHARED] == n_ev[0] && n_src[SRC_BANK] == n_ev[1]
          && n_src[SRC_WALK] == n_ev[2] && walks == n_ev[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
