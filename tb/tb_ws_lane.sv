// tb_ws_lane: one lane of the context-switch workload comparison. It runs one
// TLB design at one page size over a byte-address stream, three ways:
//   best   the design with a context switch every SLICE requests: the
//          program's bank survives (lcs_tlb also flushes its shared TLB);
//   worst  the same, but every switch is a clear-TLB, so the banks are lost;
//   conv   a conventional 256-entry fully associative LRU TLB of the same
//          page size (an fa_tlb used as the reference design), flushed at
//          every switch.
// DESIGN selects the design under test: 0 for lcs_tlb (default sizes except
// PAGE_BITS), 1 for orig_tlb (default sizes except PAGE_BITS). The walker
// answers from the tb_pt_pkg page table of task 3.
//
// Interface: pulse start_i once with stream_i holding the addresses; when
// done_o rises, best_o, worst_o and conv_o hold the miss counts, and
// checks_o and failures_o the lane's checks: every translation against the
// page table and best_o <= worst_o. The lane owns the reset of its designs.
module tb_ws_lane
  import tlb_pkg::*;
  import tb_pt_pkg::*;
#(
  parameter int unsigned DESIGN    = 0,
  parameter int unsigned PAGE_BITS = 12,
  parameter int unsigned NREQ      = 20000,
  parameter int unsigned SLICE     = 2000
) (
  input  logic        clk,
  input  logic        start_i,
  input  logic [31:0] stream_i [NREQ],
  output logic        done_o,
  output int unsigned best_o,
  output int unsigned worst_o,
  output int unsigned conv_o,
  output int unsigned checks_o,
  output int unsigned failures_o
);
  localparam int unsigned VPN_W = 32 - PAGE_BITS;
  localparam int unsigned PPN_W = 32 - PAGE_BITS;
  localparam int unsigned TASK  = 3;

  logic rst_n = 0;
  logic req_valid, req_ready, resp_valid, ctx, clr, os_ready;
  logic [31:0] vaddr, paddr;
  logic [3:0] attr, wr_attr;
  resp_src_e src;
  logic wq_valid, wq_ready, wr_valid;
  logic [VPN_W-1:0] wq_vpn;
  logic [PPN_W-1:0] wr_ppn;
  int unsigned walks;

  logic [VPN_W-1:0] c_vpn;
  logic [PPN_W-1:0] c_ppn, c_fppn;
  logic [3:0]       c_attr, c_fattr;
  logic             c_hit, c_en, c_fill, c_flush;

  if (DESIGN == 0) begin : g_lcs
    lcs_tlb #(.PAGE_BITS(PAGE_BITS)) dut (
      .clk(clk), .rst_n(rst_n), .req_valid_i(req_valid), .req_ready_o(req_ready),
      .req_vaddr_i(vaddr), .pid_i('0), .resp_valid_o(resp_valid), .resp_paddr_o(paddr),
      .resp_attr_o(attr), .resp_src_o(src), .ctx_switch_i(ctx), .clear_tlb_i(clr),
      .os_ready_o(os_ready), .walk_req_valid_o(wq_valid), .walk_req_ready_i(wq_ready),
      .walk_req_vpn_o(wq_vpn), .walk_resp_valid_i(wr_valid), .walk_resp_ppn_i(wr_ppn),
      .walk_resp_attr_i(wr_attr), .bank_current_o(), .bank_valid_o(), .ev_o());
  end else begin : g_orig
    orig_tlb #(.PAGE_BITS(PAGE_BITS)) dut (
      .clk(clk), .rst_n(rst_n), .req_valid_i(req_valid), .req_ready_o(req_ready),
      .req_vaddr_i(vaddr), .pid_i('0), .resp_valid_o(resp_valid), .resp_paddr_o(paddr),
      .resp_attr_o(attr), .resp_src_o(src), .ctx_switch_i(ctx), .clear_tlb_i(clr),
      .os_ready_o(os_ready), .walk_req_valid_o(wq_valid), .walk_req_ready_i(wq_ready),
      .walk_req_vpn_o(wq_vpn), .walk_resp_valid_i(wr_valid), .walk_resp_ppn_i(wr_ppn),
      .walk_resp_attr_i(wr_attr), .bank_current_o(), .bank_valid_o(), .ev_o());
  end

  tb_walker #(.VPN_W(VPN_W), .PPN_W(PPN_W), .LAT(10)) u_walk (
    .clk(clk), .rst_n(rst_n), .task_i(TASK), .req_valid_i(wq_valid), .req_ready_o(wq_ready),
    .req_vpn_i(wq_vpn), .resp_valid_o(wr_valid), .resp_ppn_o(wr_ppn), .resp_attr_o(wr_attr),
    .walks_o(walks));

  fa_tlb #(.ENTRIES(256), .VPN_W(VPN_W), .PPN_W(PPN_W), .ATTR_W(4), .GRP_BITS(2)) u_conv (
    .clk(clk), .rst_n(rst_n), .lk_vpn_i(c_vpn), .lk_en_i(c_en), .lk_hit_o(c_hit), .lk_ppn_o(c_ppn),
    .lk_attr_o(c_attr), .grp_present_o(), .grp_ppn_o(), .grp_attr_o(), .fill_i(c_fill),
    .fill_vpn_i(c_vpn), .fill_ppn_i(c_fppn), .fill_attr_i(c_fattr), .inval_i(1'b0), .inval_grp_i('0),
    .inval_mask_i('0), .flush_i(c_flush), .valid_o());

  task automatic check(string what, logic ok);
    checks_o++;
    if (!ok) begin
      failures_o++;
      if (failures_o < 10) $display("%t FAIL lane %0d/%0d %s", $time, DESIGN, PAGE_BITS, what);
    end
  endtask

  function automatic logic [PPN_W-1:0] ppn_of(input logic [31:0] a);
    return PPN_W'(pt_ppn(TASK, 32'(a >> PAGE_BITS), PPN_W));
  endfunction

  task automatic xlate(input logic [31:0] a, output bit missed);
    @(negedge clk);
    vaddr = a;
    req_valid = 1;
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    check("pa", paddr == {ppn_of(a), a[PAGE_BITS-1:0]});
    check("attr", attr == pt_attr(TASK, 32'(a >> PAGE_BITS)));
    missed = (src == SRC_WALK);
  endtask

  task automatic os_op(input bit is_clear);
    @(negedge clk);
    if (is_clear) clr = 1; else ctx = 1;
    do @(posedge clk); while (!os_ready);
    @(negedge clk);
    clr = 0; ctx = 0;
  endtask

  task automatic reset();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  task automatic run_dut(input bit worst, output int unsigned misses);
    bit m;
    misses = 0;
    reset();
    for (int unsigned r = 0; r < NREQ; r++) begin
      if (r != 0 && r % SLICE == 0) os_op(worst);
      xlate(stream_i[r], m);
      misses += 32'(m);
    end
  endtask

  task automatic run_conv(output int unsigned misses);
    misses = 0;
    reset();
    for (int unsigned r = 0; r < NREQ; r++) begin
      @(negedge clk);
      c_flush = (r != 0 && r % SLICE == 0);
      c_en = 0; c_fill = 0;
      if (c_flush) @(negedge clk);
      c_flush = 0;
      c_vpn = VPN_W'(stream_i[r] >> PAGE_BITS);
      c_en = 1;
      #1;
      if (!c_hit) begin
        misses++;
        c_en = 0;
        c_fill = 1;
        c_fppn = ppn_of(stream_i[r]);
        c_fattr = pt_attr(TASK, 32'(c_vpn));
      end else check("conventional pa", c_ppn == ppn_of(stream_i[r]));
      @(negedge clk);
      c_en = 0; c_fill = 0;
    end
  endtask

  initial begin
    done_o = 0; best_o = 0; worst_o = 0; conv_o = 0; checks_o = 0; failures_o = 0;
    req_valid = 0; ctx = 0; clr = 0; vaddr = '0;
    c_vpn = '0; c_en = 0; c_fill = 0; c_flush = 0; c_fppn = '0; c_fattr = '0;
    forever begin
      @(posedge clk iff start_i);
      done_o = 0;
      run_dut(0, best_o);
      run_dut(1, worst_o);
      run_conv(conv_o);
      check("best situation misses no more than worst", best_o <= worst_o);
      check("conventional TLB misses at least once per switch", conv_o >= NREQ / SLICE);
      done_o = 1;
    end
  end
endmodule
