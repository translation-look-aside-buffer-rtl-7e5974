// tb_lcs_tlb_ctrl: directed test of the control logic's sequencing, run
// through the low context-switch penalty TLB at its default sizes (128-entry
// shared TLB, 16 banks x 2 entries, 4KB pages) with a walker of fixed
// latency.
//
// The sequence: first miss of a task allocates a bank; a repeated access
// hits the shared TLB; completing a 16KB group promotes it into the bank;
// a third promotion evicts the bank's LRU group back to the shared TLB
// while the walk is outstanding; a context switch flushes the shared TLB
// but the promoted groups survive and hit again once the task's bank is
// reselected by its task tag; clear TLB invalidates every bank.
// Checked: physical address, attributes and source of every response, and
// its latency: 1 cycle for a hit, 2 cycles after the walker's response for
// a miss, 3 when a bank has to be selected first (write-back adds nothing
// while the walk is longer than 4 cycles).
module tb_lcs_tlb_ctrl
  import tlb_pkg::*;
  import tb_pt_pkg::*;
;
  localparam int unsigned VPN_W = 20, PPN_W = 20, BANKS = 16;

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
  int unsigned cur_task = 1, walks, wresp_cyc, cyc = 0;
  int unsigned checks = 0, failures = 0;
  int unsigned n_promote = 0, n_wb = 0, n_alloc = 0, n_reuse = 0;

  lcs_tlb dut (
    .clk(clk), .rst_n(rst_n), .req_valid_i(req_valid), .req_ready_o(req_ready), .req_vaddr_i(vaddr),
    .pid_i('0), .resp_valid_o(resp_valid), .resp_paddr_o(paddr), .resp_attr_o(attr), .resp_src_o(src),
    .ctx_switch_i(ctx), .clear_tlb_i(clr), .os_ready_o(os_ready), .walk_req_valid_o(wq_valid),
    .walk_req_ready_i(wq_ready), .walk_req_vpn_o(wq_vpn), .walk_resp_valid_i(wr_valid),
    .walk_resp_ppn_i(wr_ppn), .walk_resp_attr_i(wr_attr), .bank_current_o(bcur), .bank_valid_o(bval),
    .ev_o(ev));

  tb_walker #(.VPN_W(VPN_W), .PPN_W(PPN_W), .LAT(8)) u_walk (
    .clk(clk), .rst_n(rst_n), .task_i(cur_task), .req_valid_i(wq_valid), .req_ready_o(wq_ready),
    .req_vpn_i(wq_vpn), .resp_valid_o(wr_valid), .resp_ppn_o(wr_ppn), .resp_attr_o(wr_attr),
    .walks_o(walks));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (wr_valid) wresp_cyc <= cyc + 1;
    if (ev.promote) n_promote++;
    if (ev.victim_wb) n_wb++;
    if (ev.bank_alloc) n_alloc++;
    if (ev.bank_reuse) n_reuse++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0d FAIL %s", cyc, what);
    end
  endtask

  // Translate one address. exp_lat: hit latency from acceptance, or, for a
  // miss, latency counted from the walker's response.
  task automatic xlate(input logic [19:0] vpn, input resp_src_e exp_src, input int exp_lat);
    int unsigned acc_cyc, walks0;
    logic [31:0] exp_pa;
    walks0 = walks;
    @(negedge clk);
    vaddr = {vpn, 12'(vpn * 7 + 5)};
    req_valid = 1;
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    acc_cyc = cyc - 1;  // the cycle the request was presented in
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    exp_pa = {PPN_W'(pt_ppn(cur_task, 32'(vpn), PPN_W)), vaddr[11:0]};
    check($sformatf("pa of vpn %h", vpn), paddr == exp_pa);
    check($sformatf("attr of vpn %h", vpn), attr == pt_attr(cur_task, 32'(vpn)));
    check($sformatf("src of vpn %h: %s", vpn, src.name()), src == exp_src);
    if (exp_src == SRC_WALK) begin
      check($sformatf("miss latency of vpn %h: %0d", vpn, cyc - wresp_cyc), cyc - wresp_cyc == exp_lat);
      check("one walk", walks == walks0 + 1);
    end else begin
      check($sformatf("hit latency of vpn %h: %0d", vpn, cyc - acc_cyc), cyc - acc_cyc == exp_lat);
      check("no walk", walks == walks0);
    end
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
    req_valid = 0; ctx = 0; clr = 0; vaddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // task 1: first miss allocates a bank
    xlate(20'h00100, SRC_WALK, 3);
    check("one bank current", $countones(bcur) == 1 && $countones(bval) == 1);
    xlate(20'h00100, SRC_SHARED, 1);
    // complete group 0x40 -> promotion
    xlate(20'h00101, SRC_WALK, 2);
    xlate(20'h00102, SRC_WALK, 2);
    xlate(20'h00103, SRC_WALK, 2);
    check("promoted", n_promote == 1);
    for (int p = 0; p < 4; p++) xlate(20'h00100 + 20'(p), SRC_BANK, 1);
    // group 0x41 -> second bank entry
    for (int p = 4; p < 8; p++) xlate(20'h00100 + 20'(p), SRC_WALK, 2);
    check("promoted twice", n_promote == 2 && n_wb == 0);
    xlate(20'h00105, SRC_BANK, 1);
    // group 0x42 -> evicts group 0x40 back to the shared TLB
    for (int p = 8; p < 12; p++) xlate(20'h00100 + 20'(p), SRC_WALK, 2);
    check("write-back", n_promote == 3 && n_wb == 1);
    xlate(20'h00102, SRC_SHARED, 1);
    xlate(20'h0010A, SRC_BANK, 1);
    xlate(20'h00107, SRC_BANK, 1);
    // context switch to task 2
    os_op(0);
    check("no bank current after switch", bcur == '0);
    cur_task = 2;
    xlate(20'h00100, SRC_WALK, 3);
    check("second bank", n_alloc == 2 && $countones(bval) == 2);
    xlate(20'h00100, SRC_SHARED, 1);
    xlate(20'h00105, SRC_WALK, 2);
    // back to task 1: its bank is found by its task tag (PPN of page 0x100)
    os_op(0);
    cur_task = 1;
    xlate(20'h00100, SRC_WALK, 3);
    check("bank reused", n_reuse == 1 && n_alloc == 2);
    xlate(20'h00105, SRC_BANK, 1);   // survived the context switch
    xlate(20'h0010B, SRC_BANK, 1);
    xlate(20'h00100, SRC_SHARED, 1);
    xlate(20'h00102, SRC_WALK, 2);   // shared TLB was flushed
    // clear TLB: every bank invalid
    os_op(1);
    check("all banks invalid", bval == '0 && bcur == '0);
    xlate(20'h00105, SRC_WALK, 3);
    check("allocated after clear", n_alloc == 3);
    $display("promote=%0d wb=%0d alloc=%0d reuse=%0d", n_promote, n_wb, n_alloc, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
