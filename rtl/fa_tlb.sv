// fa_tlb: conventional fully associative TLB with LRU replacement.
//
// Each entry is a tag (VPN and valid bit V) and a data part (PPN and page
// attributes ATTR). A lookup compares the VPN with every valid tag at once
// (a CAM) and returns the PPN and ATTR of the matching entry. In the low
// context-switch penalty TLB this is the shared small-page TLB (128 entries
// of 4KB pages); in the earlier banked design every bank is one of these
// (8 entries of 1MB pages).
//
// For promotion the shared TLB also reports, for the looked-up VPN, which of
// the 2**GRP_BITS pages of its aligned group (a 16KB group of 4KB pages by
// default) it currently holds, together with their PPNs and attributes, and
// it can invalidate a chosen subset of that group in one cycle.
//
// Interface and timing:
//   lookup   lk_vpn_i -> lk_hit_o/lk_ppn_o/lk_attr_o and grp_* combinationally;
//            lk_en_i marks the lookup as used, so a hit updates the LRU state.
//   fill     fill_i writes {fill_vpn_i, fill_ppn_i, fill_attr_i} at the clock
//            edge into the first invalid entry or else the LRU entry.
//            The caller must not fill a VPN that is already present.
//   inval_i  clears, at the edge, every valid entry whose VPN lies in group
//            inval_grp_i and whose position in the group is set in inval_mask_i.
//   flush_i  clears every valid bit (context switch, clear-TLB); it wins
//            over a fill in the same cycle.
// Entry contents other than the valid bits are not reset: they are never
// used while invalid.
module fa_tlb #(
  parameter int unsigned ENTRIES  = 128,
  parameter int unsigned VPN_W    = 20,
  parameter int unsigned PPN_W    = 20,
  parameter int unsigned ATTR_W   = 4,
  parameter int unsigned GRP_BITS = 2,
  parameter int unsigned IDX_W    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  parameter int unsigned GRP_N    = 1 << GRP_BITS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // lookup
  input  logic [VPN_W-1:0]              lk_vpn_i,
  input  logic                          lk_en_i,
  output logic                          lk_hit_o,
  output logic [PPN_W-1:0]              lk_ppn_o,
  output logic [ATTR_W-1:0]             lk_attr_o,
  // group report for the looked-up VPN
  output logic [GRP_N-1:0]              grp_present_o,
  output logic [GRP_N-1:0][PPN_W-1:0]   grp_ppn_o,
  output logic [GRP_N-1:0][ATTR_W-1:0]  grp_attr_o,
  // fill
  input  logic                          fill_i,
  input  logic [VPN_W-1:0]              fill_vpn_i,
  input  logic [PPN_W-1:0]              fill_ppn_i,
  input  logic [ATTR_W-1:0]             fill_attr_i,
  // group invalidate
  input  logic                          inval_i,
  input  logic [VPN_W-GRP_BITS-1:0]     inval_grp_i,
  input  logic [GRP_N-1:0]              inval_mask_i,
  // flush
  input  logic                          flush_i,
  output logic [ENTRIES-1:0]            valid_o
);

  logic [ENTRIES-1:0]             v_q;
  logic [ENTRIES-1:0][VPN_W-1:0]  vpn_q;
  logic [ENTRIES-1:0][PPN_W-1:0]  ppn_q;
  logic [ENTRIES-1:0][ATTR_W-1:0] attr_q;

  logic [ENTRIES-1:0] match;
  logic [IDX_W-1:0]   hit_idx;
  logic [IDX_W-1:0]   victim;
  logic               lru_touch;
  logic [IDX_W-1:0]   lru_idx;

  assign valid_o = v_q;

  // CAM compare; at most one entry matches, so the data are OR-combined.
  always_comb begin
    lk_hit_o      = 1'b0;
    lk_ppn_o      = '0;
    lk_attr_o     = '0;
    hit_idx       = '0;
    grp_present_o = '0;
    grp_ppn_o     = '0;
    grp_attr_o    = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      match[i] = v_q[i] && (vpn_q[i] == lk_vpn_i);
      if (match[i]) begin
        lk_hit_o  = 1'b1;
        lk_ppn_o  = lk_ppn_o  | ppn_q[i];
        lk_attr_o = lk_attr_o | attr_q[i];
        hit_idx   = hit_idx   | IDX_W'(i);
      end
      if (v_q[i] && (vpn_q[i][VPN_W-1:GRP_BITS] == lk_vpn_i[VPN_W-1:GRP_BITS])) begin
        grp_present_o[vpn_q[i][GRP_BITS-1:0]] = 1'b1;
        grp_ppn_o[vpn_q[i][GRP_BITS-1:0]]     = grp_ppn_o[vpn_q[i][GRP_BITS-1:0]]  | ppn_q[i];
        grp_attr_o[vpn_q[i][GRP_BITS-1:0]]    = grp_attr_o[vpn_q[i][GRP_BITS-1:0]] | attr_q[i];
      end
    end
  end

  assign lru_touch = fill_i || (lk_en_i && lk_hit_o);
  assign lru_idx   = fill_i ? victim : hit_idx;

  lru_age #(.N(ENTRIES), .AW(IDX_W)) u_lru (
    .clk         (clk),
    .rst_n       (rst_n),
    .touch_i     (lru_touch),
    .touch_idx_i (lru_idx),
    .valid_i     (v_q),
    .victim_o    (victim),
    .age_o       ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else if (flush_i) begin
      v_q <= '0;
    end else begin
      if (inval_i) begin
        for (int unsigned i = 0; i < ENTRIES; i++) begin
          if (vpn_q[i][VPN_W-1:GRP_BITS] == inval_grp_i && inval_mask_i[vpn_q[i][GRP_BITS-1:0]])
            v_q[i] <= 1'b0;
        end
      end
      if (fill_i) v_q[victim] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fill_i && !flush_i) begin
      vpn_q[victim]  <= fill_vpn_i;
      ppn_q[victim]  <= fill_ppn_i;
      attr_q[victim] <= fill_attr_i;
    end
  end

endmodule
