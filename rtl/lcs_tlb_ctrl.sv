// lcs_tlb_ctrl: control logic of the low context-switch penalty TLB.
//
// It sequences the shared TLB, the current promotion bank (seen through the
// bank multiplexers) and the bank tag registers:
//  * IDLE  A request's VPN is looked up in the shared TLB and the current
//          bank in the same cycle. A hit in either is answered on the next
//          cycle. The OS operations (context switch, clear TLB) are accepted
//          here too, ahead of requests: a context switch flushes the shared
//          TLB and the current bits; clear TLB flushes the shared TLB and the
//          bank valid bits.
//  * miss  The translation is requested from the page-table walker. If the
//          other pages of the missing page's 16KB group are all in the shared
//          TLB and a bank is current, the group is promoted: its pages are
//          captured and invalidated in the shared TLB at once. If the current
//          bank then has no free entry, its LRU entry is split into its
//          small pages, which are written back into the shared TLB (WB, one
//          page per cycle) while the walk is outstanding.
//  * FILL  When the walker answers: a promotion inserts the whole group as
//          one entry of the current bank; otherwise the page is filled into
//          the shared TLB. If no bank is current, the bank tag registers
//          first select the task's bank or allocate a victim bank (one extra
//          FILL cycle), using as task tag the fetched PPN (TASK_FROM_PPN=1)
//          or the pid_i input; the page is then filled into the shared TLB
//          unless the reselected bank already maps it. The response follows
//          one cycle after the last FILL cycle.
// Capturing and invalidating the group at miss time, before the write-back,
// is this design's choice: it keeps the write-back from evicting the pages
// being promoted. The request/response handshakes are also its own.
//
// Timing: hit latency 1 cycle; miss latency = 1 (lookup) + 4 (write-back,
// only when promoting into a full bank) overlapped with the walk, then
// 1 (FILL, 2 when a bank must be selected) + 1 (response register) after the
// walker's response has been registered.
module lcs_tlb_ctrl
  import tlb_pkg::*;
#(
  parameter int unsigned VA_W          = 32,
  parameter int unsigned PA_W          = 32,
  parameter int unsigned PAGE_BITS     = 12,
  parameter int unsigned ATTR_W        = 4,
  parameter int unsigned SUB_BITS      = 2,
  parameter bit          TASK_FROM_PPN = 1'b1,
  parameter int unsigned VPN_W         = VA_W - PAGE_BITS,
  parameter int unsigned PPN_W         = PA_W - PAGE_BITS,
  parameter int unsigned TAG_W         = VPN_W - SUB_BITS,
  parameter int unsigned SUB_N         = 1 << SUB_BITS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // CPU request / response
  input  logic                          req_valid_i,
  output logic                          req_ready_o,
  input  logic [VA_W-1:0]               req_vaddr_i,
  input  logic [PPN_W-1:0]              pid_i,
  output logic                          resp_valid_o,
  output logic [PA_W-1:0]               resp_paddr_o,
  output logic [ATTR_W-1:0]             resp_attr_o,
  output resp_src_e                     resp_src_o,
  // OS operations, taken when os_ready_o is high
  input  logic                          ctx_switch_i,
  input  logic                          clear_tlb_i,
  output logic                          os_ready_o,
  // page-table walker
  output logic                          walk_req_valid_o,
  input  logic                          walk_req_ready_i,
  output logic [VPN_W-1:0]              walk_req_vpn_o,
  input  logic                          walk_resp_valid_i,
  input  logic [PPN_W-1:0]              walk_resp_ppn_i,
  input  logic [ATTR_W-1:0]             walk_resp_attr_i,
  // shared TLB
  output logic [VPN_W-1:0]              lk_vpn_o,
  output logic                          sh_lk_en_o,
  input  logic                          sh_hit_i,
  input  logic [PPN_W-1:0]              sh_ppn_i,
  input  logic [ATTR_W-1:0]             sh_attr_i,
  input  logic [SUB_N-1:0]              sh_grp_present_i,
  input  logic [SUB_N-1:0][PPN_W-1:0]   sh_grp_ppn_i,
  input  logic [SUB_N-1:0][ATTR_W-1:0]  sh_grp_attr_i,
  output logic                          sh_fill_o,
  output logic [VPN_W-1:0]              sh_fill_vpn_o,
  output logic [PPN_W-1:0]              sh_fill_ppn_o,
  output logic [ATTR_W-1:0]             sh_fill_attr_o,
  output logic                          sh_inval_o,
  output logic [TAG_W-1:0]              sh_inval_grp_o,
  output logic [SUB_N-1:0]              sh_inval_mask_o,
  output logic                          sh_flush_o,
  // current bank (through the bank multiplexers)
  output logic                          bk_lk_en_o,
  input  logic                          bk_hit_i,
  input  logic [PPN_W-1:0]              bk_ppn_i,
  input  logic [ATTR_W-1:0]             bk_attr_i,
  input  logic                          bk_vict_valid_i,
  input  logic [TAG_W-1:0]              bk_vict_tag_i,
  input  logic [SUB_N-1:0]              bk_vict_sv_i,
  input  logic [SUB_N-1:0][PPN_W-1:0]   bk_vict_ppn_i,
  input  logic [SUB_N-1:0][ATTR_W-1:0]  bk_vict_attr_i,
  output logic                          bk_ins_o,
  output logic [TAG_W-1:0]              bk_ins_tag_o,
  output logic [SUB_N-1:0]              bk_ins_sv_o,
  output logic [SUB_N-1:0][PPN_W-1:0]   bk_ins_ppn_o,
  output logic [SUB_N-1:0][ATTR_W-1:0]  bk_ins_attr_o,
  // bank tag registers
  input  logic                          bt_cur_any_i,
  input  logic                          bt_sel_match_i,
  output logic                          bt_sel_o,
  output logic [PPN_W-1:0]              bt_sel_task_o,
  output logic                          bt_ctx_o,
  output logic                          bt_clear_o,
  // event pulses
  output tlb_events_t                   ev_o
);

  typedef enum logic [1:0] {S_IDLE, S_WB, S_WAIT, S_FILL} state_e;

  state_e                         state_q, state_d;
  logic [VPN_W-1:0]               vpn_q;
  logic [PAGE_BITS-1:0]           off_q;
  logic [PPN_W-1:0]               pid_q;
  logic                           promote_q;
  logic [SUB_N-1:0][PPN_W-1:0]    grp_ppn_q;
  logic [SUB_N-1:0][ATTR_W-1:0]   grp_attr_q;
  logic [TAG_W-1:0]               wb_tag_q;
  logic [SUB_N-1:0]               wb_sv_q;
  logic [SUB_N-1:0][PPN_W-1:0]    wb_ppn_q;
  logic [SUB_N-1:0][ATTR_W-1:0]   wb_attr_q;
  logic [SUB_BITS-1:0]            wb_cnt_q;
  logic                           walk_req_q;
  logic                           walk_done_q;
  logic [PPN_W-1:0]               walk_ppn_q;
  logic [ATTR_W-1:0]              walk_attr_q;

  logic                           resp_valid_q;
  logic [PPN_W-1:0]               resp_ppn_q;
  logic [PAGE_BITS-1:0]           resp_off_q;
  logic [ATTR_W-1:0]              resp_attr_q;
  resp_src_e                      resp_src_q;

  logic [VPN_W-1:0]     req_vpn;
  logic [SUB_BITS-1:0]  req_sub;
  logic                 idle, os_op, accept, miss, promote;
  logic [SUB_N-1:0]     others;

  assign idle    = (state_q == S_IDLE);
  assign os_op   = ctx_switch_i || clear_tlb_i;
  assign req_vpn = req_vaddr_i[VA_W-1:PAGE_BITS];
  assign req_sub = req_vpn[SUB_BITS-1:0];

  assign os_ready_o  = idle;
  assign req_ready_o = idle && !os_op;
  assign accept      = req_valid_i && req_ready_o;
  assign miss        = accept && !sh_hit_i && !bk_hit_i;

  // Promotion: every other page of the group is in the shared TLB.
  always_comb begin
    others          = '1;
    others[req_sub] = 1'b0;
  end
  assign promote = bt_cur_any_i && ((sh_grp_present_i & others) == others);

  assign lk_vpn_o   = idle ? req_vpn : vpn_q;
  assign sh_lk_en_o = accept;
  assign bk_lk_en_o = accept && !sh_hit_i;

  assign sh_flush_o = idle && os_op;
  assign bt_ctx_o   = idle && ctx_switch_i && !clear_tlb_i;
  assign bt_clear_o = idle && clear_tlb_i;

  // Group capture and invalidate at miss time.
  assign sh_inval_o      = miss && promote;
  assign sh_inval_grp_o  = req_vpn[VPN_W-1:SUB_BITS];
  assign sh_inval_mask_o = others;

  assign walk_req_valid_o = walk_req_q;
  assign walk_req_vpn_o   = vpn_q;

  // Shared TLB fill: write-back of the evicted bank entry, or the new page.
  always_comb begin
    sh_fill_o      = 1'b0;
    sh_fill_vpn_o  = vpn_q;
    sh_fill_ppn_o  = walk_ppn_q;
    sh_fill_attr_o = walk_attr_q;
    if (state_q == S_WB) begin
      sh_fill_o      = wb_sv_q[wb_cnt_q];
      sh_fill_vpn_o  = {wb_tag_q, wb_cnt_q};
      sh_fill_ppn_o  = wb_ppn_q[wb_cnt_q];
      sh_fill_attr_o = wb_attr_q[wb_cnt_q];
    end else if (state_q == S_FILL && bt_cur_any_i && !promote_q) begin
      sh_fill_o = !bk_hit_i;
    end
  end

  // Bank insert of a promoted group.
  always_comb begin
    bk_ins_o                          = (state_q == S_FILL) && promote_q;
    bk_ins_tag_o                      = vpn_q[VPN_W-1:SUB_BITS];
    bk_ins_sv_o                       = '1;
    bk_ins_ppn_o                      = grp_ppn_q;
    bk_ins_attr_o                     = grp_attr_q;
    bk_ins_ppn_o[vpn_q[SUB_BITS-1:0]]  = walk_ppn_q;
    bk_ins_attr_o[vpn_q[SUB_BITS-1:0]] = walk_attr_q;
  end

  // Bank selection when no bank is current.
  assign bt_sel_o      = (state_q == S_FILL) && !bt_cur_any_i;
  assign bt_sel_task_o = TASK_FROM_PPN ? walk_ppn_q : pid_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE: if (miss) state_d = (promote && bk_vict_valid_i) ? S_WB : S_WAIT;
      S_WB:   if (wb_cnt_q == SUB_BITS'(SUB_N - 1)) state_d = S_WAIT;
      S_WAIT: if (walk_done_q) state_d = S_FILL;
      S_FILL: if (bt_cur_any_i) state_d = S_IDLE;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      walk_req_q   <= 1'b0;
      walk_done_q  <= 1'b0;
      resp_valid_q <= 1'b0;
      wb_cnt_q     <= '0;
      promote_q    <= 1'b0;
    end else begin
      state_q      <= state_d;
      resp_valid_q <= 1'b0;
      if (walk_req_q && walk_req_ready_i) walk_req_q <= 1'b0;
      if (walk_resp_valid_i && !walk_req_q && state_q != S_IDLE) walk_done_q <= 1'b1;
      if (state_q == S_WB) wb_cnt_q <= wb_cnt_q + 1'b1;
      if (accept && (sh_hit_i || bk_hit_i)) resp_valid_q <= 1'b1;
      if (miss) begin
        walk_req_q  <= 1'b1;
        walk_done_q <= 1'b0;
        promote_q   <= promote;
        wb_cnt_q    <= '0;
      end
      if (state_q == S_FILL && bt_cur_any_i) begin
        resp_valid_q <= 1'b1;
        walk_done_q  <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      vpn_q      <= req_vpn;
      off_q      <= req_vaddr_i[PAGE_BITS-1:0];
      pid_q      <= pid_i;
      grp_ppn_q  <= sh_grp_ppn_i;
      grp_attr_q <= sh_grp_attr_i;
      wb_tag_q   <= bk_vict_tag_i;
      wb_sv_q    <= bk_vict_sv_i;
      wb_ppn_q   <= bk_vict_ppn_i;
      wb_attr_q  <= bk_vict_attr_i;
      resp_off_q <= req_vaddr_i[PAGE_BITS-1:0];
      if (sh_hit_i) begin
        resp_ppn_q  <= sh_ppn_i;
        resp_attr_q <= sh_attr_i;
        resp_src_q  <= SRC_SHARED;
      end else begin
        resp_ppn_q  <= bk_ppn_i;
        resp_attr_q <= bk_attr_i;
        resp_src_q  <= SRC_BANK;
      end
    end
    if (walk_resp_valid_i && !walk_req_q && state_q != S_IDLE && !walk_done_q) begin
      walk_ppn_q  <= walk_resp_ppn_i;
      walk_attr_q <= walk_resp_attr_i;
    end
    if (state_q == S_FILL && bt_cur_any_i) begin
      resp_ppn_q  <= walk_ppn_q;
      resp_attr_q <= walk_attr_q;
      resp_src_q  <= SRC_WALK;
      resp_off_q  <= off_q;
    end
  end

  assign resp_valid_o = resp_valid_q;
  assign resp_paddr_o = {resp_ppn_q, resp_off_q};
  assign resp_attr_o  = resp_attr_q;
  assign resp_src_o   = resp_src_q;

  always_comb begin
    ev_o            = '0;
    ev_o.hit_shared = accept && sh_hit_i;
    ev_o.hit_bank   = accept && !sh_hit_i && bk_hit_i;
    ev_o.miss       = miss;
    ev_o.promote    = bk_ins_o;
    ev_o.victim_wb  = (state_q == S_WB) && (wb_cnt_q == '0);
    ev_o.bank_reuse = bt_sel_o && bt_sel_match_i;
    ev_o.bank_alloc = bt_sel_o && !bt_sel_match_i;
    ev_o.ctx_switch = bt_ctx_o;
    ev_o.clear      = bt_clear_o;
  end

  // Walker handshake: a request is held until it is taken.
  a_walk_hold: assert property (@(posedge clk) disable iff (!rst_n)
    walk_req_valid_o && !walk_req_ready_i |=> walk_req_valid_o && $stable(walk_req_vpn_o));
  // A page is never in the shared TLB and the current bank at once.
  a_no_dup: assert property (@(posedge clk) disable iff (!rst_n)
    !(accept && sh_hit_i && bk_hit_i));

endmodule
