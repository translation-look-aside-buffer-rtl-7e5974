// tb_bank_tag_regs: random bank selections for a set of tasks, context
// switches and clear-TLB operations on 16 bank tag registers, checked
// against a reference (task tags, valid and current bits, recency list).
// Checks the task match, which bank is flushed on allocation (an invalid
// bank first, else the least recently selected), and the current bits.
module tb_bank_tag_regs;
  localparam int unsigned NB = 16, TASK_W = 20, BW = 4;

  logic clk = 0, rst_n = 0;
  logic sel, smatch, ctx, clr, cur_any;
  logic [TASK_W-1:0] stask;
  logic [NB-1:0] flush, cur, valid;
  logic [NB-1:0][BW-1:0] lru;
  int unsigned checks = 0, failures = 0;
  int unsigned n_alloc = 0, n_reuse = 0, n_evict = 0;

  bit                m_val[NB], m_cur[NB];
  logic [TASK_W-1:0] m_task[NB];
  int unsigned       order[$];

  bank_tag_regs #(.NB(NB), .TASK_W(TASK_W)) dut (
    .clk(clk), .rst_n(rst_n), .sel_i(sel), .sel_task_i(stask), .sel_match_o(smatch),
    .flush_bank_o(flush), .ctx_i(ctx), .clear_i(clr), .cur_o(cur), .cur_any_o(cur_any),
    .valid_o(valid), .lru_o(lru));

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void m_touch(int i);
    foreach (order[p]) if (order[p] == i) begin order.delete(p); break; end
    order.push_front(i);
  endfunction
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t FAIL %s", $time, what);
    end
  endtask

  initial begin
    sel = 0; ctx = 0; clr = 0; stask = '0;
    for (int i = 0; i < NB; i++) begin m_val[i] = 0; m_cur[i] = 0; order.push_back(i); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int r, hit_b, vict;
      logic [NB-1:0] exp_flush;
      @(negedge clk);
      sel = 0; ctx = 0; clr = 0;
      r = $urandom_range(0, 99);
      stask = TASK_W'(32'h1000 + $urandom_range(0, 23));  // 24 tasks for 16 banks
      if (r < 60) sel = 1; else if (r < 98) ctx = 1; else clr = 1;
      hit_b = -1;
      for (int b = 0; b < NB; b++) if (m_val[b] && m_task[b] == stask) hit_b = b;
      vict = -1;
      for (int b = 0; b < NB; b++) if (vict < 0 && !m_val[b]) vict = b;
      if (vict < 0) vict = order[NB-1];
      exp_flush = '0;
      if (sel && hit_b < 0) exp_flush[vict] = 1'b1;
      #1;
      check("match", smatch == (hit_b >= 0));
      check("flush", flush == exp_flush);
      @(posedge clk);
      if (clr) for (int b = 0; b < NB; b++) begin m_val[b] = 0; m_cur[b] = 0; end
      else if (ctx) for (int b = 0; b < NB; b++) m_cur[b] = 0;
      else begin
        int s;
        if (hit_b >= 0) begin s = hit_b; n_reuse++; end
        else begin
          s = vict; n_alloc++;
          if (m_val[vict]) n_evict++;
          m_task[s] = stask; m_val[s] = 1;
        end
        for (int b = 0; b < NB; b++) m_cur[b] = (b == s);
        m_touch(s);
      end
      #1;
      for (int b = 0; b < NB; b++) begin
        check("cur", cur[b] == m_cur[b]);
        check("valid", valid[b] == m_val[b]);
      end
    end
    check("all of reuse, allocation and eviction happened", n_reuse > 0 && n_alloc > 0 && n_evict > 0);
    $display("reuse=%0d alloc=%0d evict=%0d", n_reuse, n_alloc, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
