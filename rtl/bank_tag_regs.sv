// bank_tag_regs: the bank tag registers, one per TLB bank.
//
// Each register holds a task tag (PID, or the PPN of the first translation
// made for the task), a current bit (the bank of the running task), a valid
// bit and LRU bits (used to pick a victim bank). At most one current bit
// is set, and it drives the bank multiplexers.
//
// Operations, each applied at the clock edge (priority clear > ctx > sel):
//   clear_i  'clear TLB' (page swapped to disk or frame released): clears
//            every valid bit and every current bit.
//   ctx_i    context switch: clears the current bits only, so the banks keep
//            their translations for when the task runs again.
//   sel_i    no bank is current (first translation after a switch): sel_task_i
//            is compared with the task tags of all valid banks. On a match
//            that bank becomes current (sel_match_o). Otherwise a victim bank
//            is chosen, an invalid one first, else the least recently used;
//            flush_bank_o pulses for it in the same cycle so the bank's
//            entries are flushed, and it is made valid and current with the
//            new task tag. In both cases the LRU bits of all banks are
//            updated, the selected bank becoming most recently used.
// Reset: all banks invalid and not current.
module bank_tag_regs #(
  parameter int unsigned NB     = 16,
  parameter int unsigned TASK_W = 20,
  parameter int unsigned BW     = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sel_i,
  input  logic [TASK_W-1:0]  sel_task_i,
  output logic               sel_match_o,
  output logic [NB-1:0]      flush_bank_o,
  input  logic               ctx_i,
  input  logic               clear_i,
  output logic [NB-1:0]      cur_o,
  output logic               cur_any_o,
  output logic [NB-1:0]      valid_o,
  output logic [NB-1:0][BW-1:0] lru_o
);

  logic [NB-1:0][TASK_W-1:0] task_q;
  logic [NB-1:0]             cur_q;
  logic [NB-1:0]             val_q;

  logic [NB-1:0] match;
  logic [BW-1:0] match_idx;
  logic [BW-1:0] victim;
  logic [BW-1:0] sel_idx;
  logic          do_sel;

  assign cur_o     = cur_q;
  assign cur_any_o = |cur_q;
  assign valid_o   = val_q;
  assign do_sel    = sel_i && !ctx_i && !clear_i;

  always_comb begin
    match_idx = '0;
    for (int unsigned b = 0; b < NB; b++) begin
      match[b] = val_q[b] && (task_q[b] == sel_task_i);
      if (match[b]) match_idx = match_idx | BW'(b);
    end
  end

  assign sel_match_o = |match;
  assign sel_idx     = sel_match_o ? match_idx : victim;

  always_comb begin
    flush_bank_o = '0;
    if (do_sel && !sel_match_o) flush_bank_o[victim] = 1'b1;
  end

  lru_age #(.N(NB), .AW(BW)) u_lru (
    .clk         (clk),
    .rst_n       (rst_n),
    .touch_i     (do_sel),
    .touch_idx_i (sel_idx),
    .valid_i     (val_q),
    .victim_o    (victim),
    .age_o       (lru_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q <= '0;
      val_q <= '0;
    end else if (clear_i) begin
      cur_q <= '0;
      val_q <= '0;
    end else if (ctx_i) begin
      cur_q <= '0;
    end else if (do_sel) begin
      cur_q          <= '0;
      cur_q[sel_idx] <= 1'b1;
      val_q[sel_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_sel && !sel_match_o) task_q[victim] <= sel_task_i;
  end

  // At most one bank is current, and only a valid one.
  a_cur_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cur_q));
  a_cur_valid:  assert property (@(posedge clk) disable iff (!rst_n) (cur_q & ~val_q) == '0);

endmodule
