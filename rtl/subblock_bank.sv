// subblock_bank: one promotion-TLB bank, a small fully associative
// complete-subblock TLB.
//
// Each entry maps one aligned group of SUB_N base pages (a 16KB group of
// four 4KB pages by default) with a single tag: the group tag (the VPN
// without its low SUB_BITS bits) and a block valid bit BV. The data part
// holds, for every base page of the group, its own valid bit, PPN and
// attributes, so the four pages need not be physically contiguous. On a
// lookup only the PPN of the addressed base page is read out. Replacement
// is LRU over the ENTRIES entries (2 by default).
//
// Interface and timing:
//   lookup  en_i selects the bank (only the current bank is searched);
//           {lk_tag_i, lk_sub_i} -> hit_o/ppn_o/attr_o combinationally.
//           lk_en_i marks the lookup as used: a hit then updates the LRU state.
//   victim  vict_* show, combinationally, the entry an insert would replace:
//           vict_valid_o is set when that entry holds a valid group, so the
//           caller can write it back before inserting.
//   insert  ins_i writes a whole group at the clock edge into the victim entry.
//   flush_i clears every BV bit (the bank is reallocated to another task).
module subblock_bank #(
  parameter int unsigned ENTRIES  = 2,
  parameter int unsigned TAG_W    = 18,
  parameter int unsigned PPN_W    = 20,
  parameter int unsigned ATTR_W   = 4,
  parameter int unsigned SUB_BITS = 2,
  parameter int unsigned SUB_N    = 1 << SUB_BITS,
  parameter int unsigned IDX_W    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en_i,
  // lookup
  input  logic [TAG_W-1:0]              lk_tag_i,
  input  logic [SUB_BITS-1:0]           lk_sub_i,
  input  logic                          lk_en_i,
  output logic                          hit_o,
  output logic [PPN_W-1:0]              ppn_o,
  output logic [ATTR_W-1:0]             attr_o,
  // replacement victim
  output logic                          vict_valid_o,
  output logic [TAG_W-1:0]              vict_tag_o,
  output logic [SUB_N-1:0]              vict_sv_o,
  output logic [SUB_N-1:0][PPN_W-1:0]   vict_ppn_o,
  output logic [SUB_N-1:0][ATTR_W-1:0]  vict_attr_o,
  // insert
  input  logic                          ins_i,
  input  logic [TAG_W-1:0]              ins_tag_i,
  input  logic [SUB_N-1:0]              ins_sv_i,
  input  logic [SUB_N-1:0][PPN_W-1:0]   ins_ppn_i,
  input  logic [SUB_N-1:0][ATTR_W-1:0]  ins_attr_i,
  // flush
  input  logic                          flush_i
);

  logic [ENTRIES-1:0]                         bv_q;
  logic [ENTRIES-1:0][TAG_W-1:0]              tag_q;
  logic [ENTRIES-1:0][SUB_N-1:0]              sv_q;
  logic [ENTRIES-1:0][SUB_N-1:0][PPN_W-1:0]   ppn_q;
  logic [ENTRIES-1:0][SUB_N-1:0][ATTR_W-1:0]  attr_q;

  logic [IDX_W-1:0] hit_idx;
  logic [IDX_W-1:0] victim;
  logic             do_ins;

  always_comb begin
    hit_o   = 1'b0;
    ppn_o   = '0;
    attr_o  = '0;
    hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (en_i && bv_q[i] && tag_q[i] == lk_tag_i && sv_q[i][lk_sub_i]) begin
        hit_o   = 1'b1;
        ppn_o   = ppn_o  | ppn_q[i][lk_sub_i];
        attr_o  = attr_o | attr_q[i][lk_sub_i];
        hit_idx = hit_idx | IDX_W'(i);
      end
    end
  end

  assign vict_valid_o = bv_q[victim];
  assign vict_tag_o   = tag_q[victim];
  assign vict_sv_o    = sv_q[victim];
  assign vict_ppn_o   = ppn_q[victim];
  assign vict_attr_o  = attr_q[victim];

  assign do_ins = ins_i && !flush_i;

  lru_age #(.N(ENTRIES), .AW(IDX_W)) u_lru (
    .clk         (clk),
    .rst_n       (rst_n),
    .touch_i     (do_ins || (lk_en_i && hit_o)),
    .touch_idx_i (do_ins ? victim : hit_idx),
    .valid_i     (bv_q),
    .victim_o    (victim),
    .age_o       ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        bv_q <= '0;
    else if (flush_i)  bv_q <= '0;
    else if (do_ins)   bv_q[victim] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (do_ins) begin
      tag_q[victim]  <= ins_tag_i;
      sv_q[victim]   <= ins_sv_i;
      ppn_q[victim]  <= ins_ppn_i;
      attr_q[victim] <= ins_attr_i;
    end
  end

endmodule
