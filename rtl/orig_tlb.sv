// orig_tlb: the earlier banked TLB with low context-switch penalty, for
// large pages.
//
// The TLB is split into BANKS banks (32 by default) of BANK_ENTRIES fully
// associative, LRU-replaced entries (8 by default, 256 in all) of a large
// page (1MB by default). Each bank holds the translations of one task and
// has a bank tag register (task tag, current, valid and LRU bits). Only the
// current bank is searched, through the bank multiplexer. A context switch
// clears the current bits only, so no translation is flushed; the first
// miss after the switch finds the task's bank again by its task tag, or
// flushes and allocates a victim bank. 'Clear TLB' (page swapped out or
// frame released) invalidates every bank.
//
// Interface and timing as in lcs_tlb: a hit answers 1 cycle after the
// request; a miss asks the walker and answers 2 cycles after the walker's
// response (3 when a bank has to be selected first). The 32-bit address
// widths, 4-bit attributes and the handshakes are this design's choice.
module orig_tlb
  import tlb_pkg::*;
#(
  parameter int unsigned VA_W          = 32,
  parameter int unsigned PA_W          = 32,
  parameter int unsigned PAGE_BITS     = 20,
  parameter int unsigned ATTR_W        = 4,
  parameter int unsigned BANKS         = 32,
  parameter int unsigned BANK_ENTRIES  = 8,
  parameter bit          TASK_FROM_PPN = 1'b1,
  parameter int unsigned VPN_W         = VA_W - PAGE_BITS,
  parameter int unsigned PPN_W         = PA_W - PAGE_BITS
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

  typedef struct packed {
    logic              hit;
    logic [PPN_W-1:0]  ppn;
    logic [ATTR_W-1:0] attr;
  } bank_out_t;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_FILL} state_e;

  state_e                 state_q;
  logic [VPN_W-1:0]       vpn_q;
  logic [PAGE_BITS-1:0]   off_q;
  logic [PPN_W-1:0]       pid_q;
  logic                   walk_req_q, walk_done_q;
  logic [PPN_W-1:0]       walk_ppn_q;
  logic [ATTR_W-1:0]      walk_attr_q;
  logic                   resp_valid_q;
  logic [PPN_W-1:0]       resp_ppn_q;
  logic [PAGE_BITS-1:0]   resp_off_q;
  logic [ATTR_W-1:0]      resp_attr_q;
  resp_src_e              resp_src_q;

  bank_out_t [BANKS-1:0]  bank_out;
  bank_out_t              cur_out;
  logic [BANKS-1:0][1:0]  bank_strobe;   // {fill, lk_en}
  logic [BANKS-1:0]       cur, flush_bank;
  logic                   cur_any, sel, sel_match, bt_ctx, bt_clear;
  logic                   idle, os_op, accept, miss, fill;
  logic [VPN_W-1:0]       lk_vpn;

  assign idle        = (state_q == S_IDLE);
  assign os_op       = ctx_switch_i || clear_tlb_i;
  assign os_ready_o  = idle;
  assign req_ready_o = idle && !os_op;
  assign accept      = req_valid_i && req_ready_o;
  assign miss        = accept && !cur_out.hit;
  assign lk_vpn      = idle ? req_vaddr_i[VA_W-1:PAGE_BITS] : vpn_q;
  assign bt_ctx      = idle && ctx_switch_i && !clear_tlb_i;
  assign bt_clear    = idle && clear_tlb_i;
  // With no current bank, FILL first selects one, then fills it.
  assign sel         = (state_q == S_FILL) && !cur_any;
  assign fill        = (state_q == S_FILL) && cur_any;

  assign bank_current_o = cur;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    fa_tlb #(
      .ENTRIES (BANK_ENTRIES),
      .VPN_W   (VPN_W),
      .PPN_W   (PPN_W),
      .ATTR_W  (ATTR_W),
      .GRP_BITS(1)
    ) u_bank (
      .clk          (clk),
      .rst_n        (rst_n),
      .lk_vpn_i     (lk_vpn),
      .lk_en_i      (bank_strobe[b][0]),
      .lk_hit_o     (bank_out[b].hit),
      .lk_ppn_o     (bank_out[b].ppn),
      .lk_attr_o    (bank_out[b].attr),
      .grp_present_o(),
      .grp_ppn_o    (),
      .grp_attr_o   (),
      .fill_i       (bank_strobe[b][1]),
      .fill_vpn_i   (vpn_q),
      .fill_ppn_i   (walk_ppn_q),
      .fill_attr_i  (walk_attr_q),
      .inval_i      (1'b0),
      .inval_grp_i  ('0),
      .inval_mask_i ('0),
      .flush_i      (flush_bank[b]),
      .valid_o      ()
    );
  end

  bank_select_mux #(.NB(BANKS), .DW($bits(bank_out_t)), .NS(2)) u_mux (
    .sel_i        (cur),
    .bank_data_i  (bank_out),
    .data_o       (cur_out),
    .strobe_i     ({fill, accept}),
    .bank_strobe_o(bank_strobe)
  );

  bank_tag_regs #(.NB(BANKS), .TASK_W(PPN_W)) u_btags (
    .clk         (clk),
    .rst_n       (rst_n),
    .sel_i       (sel),
    .sel_task_i  (TASK_FROM_PPN ? walk_ppn_q : pid_q),
    .sel_match_o (sel_match),
    .flush_bank_o(flush_bank),
    .ctx_i       (bt_ctx),
    .clear_i     (bt_clear),
    .cur_o       (cur),
    .cur_any_o   (cur_any),
    .valid_o     (bank_valid_o),
    .lru_o       ()
  );

  assign walk_req_valid_o = walk_req_q;
  assign walk_req_vpn_o   = vpn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      walk_req_q   <= 1'b0;
      walk_done_q  <= 1'b0;
      resp_valid_q <= 1'b0;
    end else begin
      resp_valid_q <= 1'b0;
      if (walk_req_q && walk_req_ready_i) walk_req_q <= 1'b0;
      if (walk_resp_valid_i && !walk_req_q && state_q == S_WAIT) walk_done_q <= 1'b1;
      unique case (state_q)
        S_IDLE: if (accept) begin
          if (cur_out.hit) resp_valid_q <= 1'b1;
          else begin
            state_q     <= S_WAIT;
            walk_req_q  <= 1'b1;
            walk_done_q <= 1'b0;
          end
        end
        S_WAIT: if (walk_done_q) state_q <= S_FILL;
        S_FILL: if (fill) begin
          state_q      <= S_IDLE;
          resp_valid_q <= 1'b1;
          walk_done_q  <= 1'b0;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      vpn_q       <= req_vaddr_i[VA_W-1:PAGE_BITS];
      off_q       <= req_vaddr_i[PAGE_BITS-1:0];
      pid_q       <= pid_i;
      resp_ppn_q  <= cur_out.ppn;
      resp_attr_q <= cur_out.attr;
      resp_off_q  <= req_vaddr_i[PAGE_BITS-1:0];
      resp_src_q  <= SRC_BANK;
    end
    if (walk_resp_valid_i && !walk_req_q && state_q == S_WAIT && !walk_done_q) begin
      walk_ppn_q  <= walk_resp_ppn_i;
      walk_attr_q <= walk_resp_attr_i;
    end
    if (fill) begin
      resp_ppn_q  <= walk_ppn_q;
      resp_attr_q <= walk_attr_q;
      resp_off_q  <= off_q;
      resp_src_q  <= SRC_WALK;
    end
  end

  assign resp_valid_o = resp_valid_q;
  assign resp_paddr_o = {resp_ppn_q, resp_off_q};
  assign resp_attr_o  = resp_attr_q;
  assign resp_src_o   = resp_src_q;

  always_comb begin
    ev_o            = '0;
    ev_o.hit_bank   = accept && cur_out.hit;
    ev_o.miss       = miss;
    ev_o.bank_reuse = sel && sel_match;
    ev_o.bank_alloc = sel && !sel_match;
    ev_o.ctx_switch = bt_ctx;
    ev_o.clear      = bt_clear;
  end

  a_walk_hold: assert property (@(posedge clk) disable iff (!rst_n)
    walk_req_valid_o && !walk_req_ready_i |=> walk_req_valid_o && $stable(walk_req_vpn_o));

endmodule
