// lcs_tlb: translation look-aside buffer with low context-switch penalty.
//
// A conventional small-page TLB is shared by all tasks and is the only part
// flushed on a context switch. Next to it sit BANKS promotion-TLB banks,
// one per recently run task, each a small complete-subblock TLB of
// BANK_ENTRIES entries mapping groups of 2**SUB_BITS base pages. Only the
// bank whose bank tag register has its current bit set is searched, in
// parallel with the shared TLB, through the bank multiplexers. When a miss
// finds the rest of its group in the shared TLB, the group is promoted into
// the current bank; a bank entry that has to make room is split back into
// small pages in the shared TLB, which so also serves as a victim buffer.
// After a context switch the task's bank is found again by its task tag on
// the first translation, so its promoted translations survive the switch.
//
// Defaults: 4KB pages, 128-entry shared TLB, 16 banks x 2 entries of 16KB
// groups (128 + 16*2*4 = 256 base-page slots), as in the evaluated
// configuration. The 32-bit address widths, 4-bit attributes and the
// handshakes are this design's choice.
//
// Interface: req_valid/req_ready carry a virtual address (and a PID, used
// as task tag only when TASK_FROM_PPN=0); resp_valid pulses with the
// physical address, attributes and the source of the translation, 1 cycle
// after a hit and after the walk plus 2 cycles on a miss. ctx_switch_i and
// clear_tlb_i are taken in a cycle where os_ready_o is high. The walker
// takes walk_req_vpn_o when walk_req_ready_i is high and answers, at least
// one cycle later, with a single walk_resp_valid_i pulse. See lcs_tlb_ctrl
// for the sequencing.
module lcs_tlb
  import tlb_pkg::*;
#(
  parameter int unsigned VA_W          = 32,
  parameter int unsigned PA_W          = 32,
  parameter int unsigned PAGE_BITS     = 12,
  parameter int unsigned ATTR_W        = 4,
  parameter int unsigned SH_ENTRIES    = 128,
  parameter int unsigned BANKS         = 16,
  parameter int unsigned BANK_ENTRIES  = 2,
  parameter int unsigned SUB_BITS      = 2,
  parameter bit          TASK_FROM_PPN = 1'b1,
  parameter int unsigned VPN_W         = VA_W - PAGE_BITS,
  parameter int unsigned PPN_W         = PA_W - PAGE_BITS,
  parameter int unsigned TAG_W         = VPN_W - SUB_BITS,
  parameter int unsigned SUB_N         = 1 << SUB_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid_i,
  output logic                  req_ready_o,
  input  logic [VA_W-1:0]       req_vaddr_i,
  input  logic [PPN_W-1:0]      pid_i,
  output logic                  resp_valid_o,
  output logic [PA_W-1:0]       resp_paddr_o,
  output logic [ATTR_W-1:0]     resp_attr_o,
  output resp_src_e             resp_src_o,
  input  logic                  ctx_switch_i,
  input  logic                  clear_tlb_i,
  output logic                  os_ready_o,
  output logic                  walk_req_valid_o,
  input  logic                  walk_req_ready_i,
  output logic [VPN_W-1:0]      walk_req_vpn_o,
  input  logic                  walk_resp_valid_i,
  input  logic [PPN_W-1:0]      walk_resp_ppn_i,
  input  logic [ATTR_W-1:0]     walk_resp_attr_i,
  output logic [BANKS-1:0]      bank_current_o,
  output logic [BANKS-1:0]      bank_valid_o,
  output tlb_events_t           ev_o
);

  // Bundle each bank drives into the bank multiplexer:
  // hit, ppn, attr, vict_valid, vict_tag, vict_sv, vict_ppn, vict_attr.
  localparam int unsigned BDW = 1 + PPN_W + ATTR_W + 1 + TAG_W + SUB_N
                              + SUB_N * PPN_W + SUB_N * ATTR_W;

  typedef struct packed {
    logic                          hit;
    logic [PPN_W-1:0]              ppn;
    logic [ATTR_W-1:0]             attr;
    logic                          vict_valid;
    logic [TAG_W-1:0]              vict_tag;
    logic [SUB_N-1:0]              vict_sv;
    logic [SUB_N-1:0][PPN_W-1:0]   vict_ppn;
    logic [SUB_N-1:0][ATTR_W-1:0]  vict_attr;
  } bank_out_t;

  // shared TLB wires
  logic [VPN_W-1:0]              lk_vpn;
  logic                          sh_lk_en, sh_hit;
  logic [PPN_W-1:0]              sh_ppn;
  logic [ATTR_W-1:0]             sh_attr;
  logic [SUB_N-1:0]              sh_grp_present;
  logic [SUB_N-1:0][PPN_W-1:0]   sh_grp_ppn;
  logic [SUB_N-1:0][ATTR_W-1:0]  sh_grp_attr;
  logic                          sh_fill;
  logic [VPN_W-1:0]              sh_fill_vpn;
  logic [PPN_W-1:0]              sh_fill_ppn;
  logic [ATTR_W-1:0]             sh_fill_attr;
  logic                          sh_inval;
  logic [TAG_W-1:0]              sh_inval_grp;
  logic [SUB_N-1:0]              sh_inval_mask;
  logic                          sh_flush;

  // bank wires
  bank_out_t [BANKS-1:0]         bank_out;
  bank_out_t                     cur_out;
  logic [BANKS-1:0][1:0]         bank_strobe;   // {ins, lk_en}
  logic                          bk_lk_en, bk_ins;
  logic [TAG_W-1:0]              bk_ins_tag;
  logic [SUB_N-1:0]              bk_ins_sv;
  logic [SUB_N-1:0][PPN_W-1:0]   bk_ins_ppn;
  logic [SUB_N-1:0][ATTR_W-1:0]  bk_ins_attr;

  // bank tag register wires
  logic [BANKS-1:0]              cur, flush_bank;
  logic                          cur_any, sel, sel_match, bt_ctx, bt_clear;
  logic [PPN_W-1:0]              sel_task;

  assign bank_current_o = cur;

  fa_tlb #(
    .ENTRIES (SH_ENTRIES),
    .VPN_W   (VPN_W),
    .PPN_W   (PPN_W),
    .ATTR_W  (ATTR_W),
    .GRP_BITS(SUB_BITS)
  ) u_shared (
    .clk          (clk),
    .rst_n        (rst_n),
    .lk_vpn_i     (lk_vpn),
    .lk_en_i      (sh_lk_en),
    .lk_hit_o     (sh_hit),
    .lk_ppn_o     (sh_ppn),
    .lk_attr_o    (sh_attr),
    .grp_present_o(sh_grp_present),
    .grp_ppn_o    (sh_grp_ppn),
    .grp_attr_o   (sh_grp_attr),
    .fill_i       (sh_fill),
    .fill_vpn_i   (sh_fill_vpn),
    .fill_ppn_i   (sh_fill_ppn),
    .fill_attr_i  (sh_fill_attr),
    .inval_i      (sh_inval),
    .inval_grp_i  (sh_inval_grp),
    .inval_mask_i (sh_inval_mask),
    .flush_i      (sh_flush),
    .valid_o      ()
  );

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    subblock_bank #(
      .ENTRIES (BANK_ENTRIES),
      .TAG_W   (TAG_W),
      .PPN_W   (PPN_W),
      .ATTR_W  (ATTR_W),
      .SUB_BITS(SUB_BITS)
    ) u_bank (
      .clk         (clk),
      .rst_n       (rst_n),
      .en_i        (cur[b]),
      .lk_tag_i    (lk_vpn[VPN_W-1:SUB_BITS]),
      .lk_sub_i    (lk_vpn[SUB_BITS-1:0]),
      .lk_en_i     (bank_strobe[b][0]),
      .hit_o       (bank_out[b].hit),
      .ppn_o       (bank_out[b].ppn),
      .attr_o      (bank_out[b].attr),
      .vict_valid_o(bank_out[b].vict_valid),
      .vict_tag_o  (bank_out[b].vict_tag),
      .vict_sv_o   (bank_out[b].vict_sv),
      .vict_ppn_o  (bank_out[b].vict_ppn),
      .vict_attr_o (bank_out[b].vict_attr),
      .ins_i       (bank_strobe[b][1]),
      .ins_tag_i   (bk_ins_tag),
      .ins_sv_i    (bk_ins_sv),
      .ins_ppn_i   (bk_ins_ppn),
      .ins_attr_i  (bk_ins_attr),
      .flush_i     (flush_bank[b])
    );
  end

  bank_select_mux #(.NB(BANKS), .DW(BDW), .NS(2)) u_mux (
    .sel_i        (cur),
    .bank_data_i  (bank_out),
    .data_o       (cur_out),
    .strobe_i     ({bk_ins, bk_lk_en}),
    .bank_strobe_o(bank_strobe)
  );

  bank_tag_regs #(.NB(BANKS), .TASK_W(PPN_W)) u_btags (
    .clk         (clk),
    .rst_n       (rst_n),
    .sel_i       (sel),
    .sel_task_i  (sel_task),
    .sel_match_o (sel_match),
    .flush_bank_o(flush_bank),
    .ctx_i       (bt_ctx),
    .clear_i     (bt_clear),
    .cur_o       (cur),
    .cur_any_o   (cur_any),
    .valid_o     (bank_valid_o),
    .lru_o       ()
  );

  lcs_tlb_ctrl #(
    .VA_W         (VA_W),
    .PA_W         (PA_W),
    .PAGE_BITS    (PAGE_BITS),
    .ATTR_W       (ATTR_W),
    .SUB_BITS     (SUB_BITS),
    .TASK_FROM_PPN(TASK_FROM_PPN)
  ) u_ctrl (
    .clk              (clk),
    .rst_n            (rst_n),
    .req_valid_i      (req_valid_i),
    .req_ready_o      (req_ready_o),
    .req_vaddr_i      (req_vaddr_i),
    .pid_i            (pid_i),
    .resp_valid_o     (resp_valid_o),
    .resp_paddr_o     (resp_paddr_o),
    .resp_attr_o      (resp_attr_o),
    .resp_src_o       (resp_src_o),
    .ctx_switch_i     (ctx_switch_i),
    .clear_tlb_i      (clear_tlb_i),
    .os_ready_o       (os_ready_o),
    .walk_req_valid_o (walk_req_valid_o),
    .walk_req_ready_i (walk_req_ready_i),
    .walk_req_vpn_o   (walk_req_vpn_o),
    .walk_resp_valid_i(walk_resp_valid_i),
    .walk_resp_ppn_i  (walk_resp_ppn_i),
    .walk_resp_attr_i (walk_resp_attr_i),
    .lk_vpn_o         (lk_vpn),
    .sh_lk_en_o       (sh_lk_en),
    .sh_hit_i         (sh_hit),
    .sh_ppn_i         (sh_ppn),
    .sh_attr_i        (sh_attr),
    .sh_grp_present_i (sh_grp_present),
    .sh_grp_ppn_i     (sh_grp_ppn),
    .sh_grp_attr_i    (sh_grp_attr),
    .sh_fill_o        (sh_fill),
    .sh_fill_vpn_o    (sh_fill_vpn),
    .sh_fill_ppn_o    (sh_fill_ppn),
    .sh_fill_attr_o   (sh_fill_attr),
    .sh_inval_o       (sh_inval),
    .sh_inval_grp_o   (sh_inval_grp),
    .sh_inval_mask_o  (sh_inval_mask),
    .sh_flush_o       (sh_flush),
    .bk_lk_en_o       (bk_lk_en),
    .bk_hit_i         (cur_out.hit),
    .bk_ppn_i         (cur_out.ppn),
    .bk_attr_i        (cur_out.attr),
    .bk_vict_valid_i  (cur_out.vict_valid),
    .bk_vict_tag_i    (cur_out.vict_tag),
    .bk_vict_sv_i     (cur_out.vict_sv),
    .bk_vict_ppn_i    (cur_out.vict_ppn),
    .bk_vict_attr_i   (cur_out.vict_attr),
    .bk_ins_o         (bk_ins),
    .bk_ins_tag_o     (bk_ins_tag),
    .bk_ins_sv_o      (bk_ins_sv),
    .bk_ins_ppn_o     (bk_ins_ppn),
    .bk_ins_attr_o    (bk_ins_attr),
    .bt_cur_any_i     (cur_any),
    .bt_sel_match_i   (sel_match),
    .bt_sel_o         (sel),
    .bt_sel_task_o    (sel_task),
    .bt_ctx_o         (bt_ctx),
    .bt_clear_o       (bt_clear),
    .ev_o             (ev_o)
  );

endmodule
