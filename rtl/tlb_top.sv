// tlb_top: the two banked TLBs with low context-switch penalty, side by
// side, each with its own ports.
//
//   lcs_*   the small-page design: a shared 128-entry 4KB TLB plus 16
//           promotion banks of 2 complete-subblock 16KB entries (lcs_tlb).
//   orig_*  the earlier large-page design: 32 banks of 8 fully associative
//           1MB entries (orig_tlb).
// Both translate one virtual address per request, answer one cycle after a
// hit, and fetch missing translations through their own page-table walker
// port. They share only the clock and the reset. In a processor either would
// be instantiated once as the instruction TLB and once as the data TLB.
module tlb_top
  import tlb_pkg::*;
#(
  parameter int unsigned VA_W           = 32,
  parameter int unsigned PA_W           = 32,
  parameter int unsigned ATTR_W         = 4,
  // small-page design
  parameter int unsigned LCS_PAGE_BITS  = 12,
  parameter int unsigned LCS_SH_ENTRIES = 128,
  parameter int unsigned LCS_BANKS      = 16,
  parameter int unsigned LCS_BANK_ENTRIES = 2,
  parameter int unsigned LCS_SUB_BITS   = 2,
  // large-page design
  parameter int unsigned ORIG_PAGE_BITS = 20,
  parameter int unsigned ORIG_BANKS     = 32,
  parameter int unsigned ORIG_BANK_ENTRIES = 8,
  parameter int unsigned LCS_VPN_W      = VA_W - LCS_PAGE_BITS,
  parameter int unsigned LCS_PPN_W      = PA_W - LCS_PAGE_BITS,
  parameter int unsigned ORIG_VPN_W     = VA_W - ORIG_PAGE_BITS,
  parameter int unsigned ORIG_PPN_W     = PA_W - ORIG_PAGE_BITS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // ---- small-page design ----
  input  logic                       lcs_req_valid_i,
  output logic                       lcs_req_ready_o,
  input  logic [VA_W-1:0]            lcs_req_vaddr_i,
  input  logic [LCS_PPN_W-1:0]       lcs_pid_i,
  output logic                       lcs_resp_valid_o,
  output logic [PA_W-1:0]            lcs_resp_paddr_o,
  output logic [ATTR_W-1:0]          lcs_resp_attr_o,
  output resp_src_e                  lcs_resp_src_o,
  input  logic                       lcs_ctx_switch_i,
  input  logic                       lcs_clear_tlb_i,
  output logic                       lcs_os_ready_o,
  output logic                       lcs_walk_req_valid_o,
  input  logic                       lcs_walk_req_ready_i,
  output logic [LCS_VPN_W-1:0]       lcs_walk_req_vpn_o,
  input  logic                       lcs_walk_resp_valid_i,
  input  logic [LCS_PPN_W-1:0]       lcs_walk_resp_ppn_i,
  input  logic [ATTR_W-1:0]          lcs_walk_resp_attr_i,
  output logic [LCS_BANKS-1:0]       lcs_bank_current_o,
  output logic [LCS_BANKS-1:0]       lcs_bank_valid_o,
  output tlb_events_t                lcs_ev_o,
  // ---- large-page design ----
  input  logic                       orig_req_valid_i,
  output logic                       orig_req_ready_o,
  input  logic [VA_W-1:0]            orig_req_vaddr_i,
  input  logic [ORIG_PPN_W-1:0]      orig_pid_i,
  output logic                       orig_resp_valid_o,
  output logic [PA_W-1:0]            orig_resp_paddr_o,
  output logic [ATTR_W-1:0]          orig_resp_attr_o,
  output resp_src_e                  orig_resp_src_o,
  input  logic                       orig_ctx_switch_i,
  input  logic                       orig_clear_tlb_i,
  output logic                       orig_os_ready_o,
  output logic                       orig_walk_req_valid_o,
  input  logic                       orig_walk_req_ready_i,
  output logic [ORIG_VPN_W-1:0]      orig_walk_req_vpn_o,
  input  logic                       orig_walk_resp_valid_i,
  input  logic [ORIG_PPN_W-1:0]      orig_walk_resp_ppn_i,
  input  logic [ATTR_W-1:0]          orig_walk_resp_attr_i,
  output logic [ORIG_BANKS-1:0]      orig_bank_current_o,
  output logic [ORIG_BANKS-1:0]      orig_bank_valid_o,
  output tlb_events_t                orig_ev_o
);

  lcs_tlb #(
    .VA_W        (VA_W),
    .PA_W        (PA_W),
    .PAGE_BITS   (LCS_PAGE_BITS),
    .ATTR_W      (ATTR_W),
    .SH_ENTRIES  (LCS_SH_ENTRIES),
    .BANKS       (LCS_BANKS),
    .BANK_ENTRIES(LCS_BANK_ENTRIES),
    .SUB_BITS    (LCS_SUB_BITS)
  ) u_lcs (
    .clk              (clk),
    .rst_n            (rst_n),
    .req_valid_i      (lcs_req_valid_i),
    .req_ready_o      (lcs_req_ready_o),
    .req_vaddr_i      (lcs_req_vaddr_i),
    .pid_i            (lcs_pid_i),
    .resp_valid_o     (lcs_resp_valid_o),
    .resp_paddr_o     (lcs_resp_paddr_o),
    .resp_attr_o      (lcs_resp_attr_o),
    .resp_src_o       (lcs_resp_src_o),
    .ctx_switch_i     (lcs_ctx_switch_i),
    .clear_tlb_i      (lcs_clear_tlb_i),
    .os_ready_o       (lcs_os_ready_o),
    .walk_req_valid_o (lcs_walk_req_valid_o),
    .walk_req_ready_i (lcs_walk_req_ready_i),
    .walk_req_vpn_o   (lcs_walk_req_vpn_o),
    .walk_resp_valid_i(lcs_walk_resp_valid_i),
    .walk_resp_ppn_i  (lcs_walk_resp_ppn_i),
    .walk_resp_attr_i (lcs_walk_resp_attr_i),
    .bank_current_o   (lcs_bank_current_o),
    .bank_valid_o     (lcs_bank_valid_o),
    .ev_o             (lcs_ev_o)
  );

  orig_tlb #(
    .VA_W        (VA_W),
    .PA_W        (PA_W),
    .PAGE_BITS   (ORIG_PAGE_BITS),
    .ATTR_W      (ATTR_W),
    .BANKS       (ORIG_BANKS),
    .BANK_ENTRIES(ORIG_BANK_ENTRIES)
  ) u_orig (
    .clk              (clk),
    .rst_n            (rst_n),
    .req_valid_i      (orig_req_valid_i),
    .req_ready_o      (orig_req_ready_o),
    .req_vaddr_i      (orig_req_vaddr_i),
    .pid_i            (orig_pid_i),
    .resp_valid_o     (orig_resp_valid_o),
    .resp_paddr_o     (orig_resp_paddr_o),
    .resp_attr_o      (orig_resp_attr_o),
    .resp_src_o       (orig_resp_src_o),
    .ctx_switch_i     (orig_ctx_switch_i),
    .clear_tlb_i      (orig_clear_tlb_i),
    .os_ready_o       (orig_os_ready_o),
    .walk_req_valid_o (orig_walk_req_valid_o),
    .walk_req_ready_i (orig_walk_req_ready_i),
    .walk_req_vpn_o   (orig_walk_req_vpn_o),
    .walk_resp_valid_i(orig_walk_resp_valid_i),
    .walk_resp_ppn_i  (orig_walk_resp_ppn_i),
    .walk_resp_attr_i (orig_walk_resp_attr_i),
    .bank_current_o   (orig_bank_current_o),
    .bank_valid_o     (orig_bank_valid_o),
    .ev_o             (orig_ev_o)
  );

endmodule
