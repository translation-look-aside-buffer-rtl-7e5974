// tb_lru_age: checks the LRU state against a recency list.
//
// The reference keeps the ways in an ordered list, most recently used
// first; a touch moves a way to the front. After every cycle the testbench
// compares each way's age with its position in the list, and the victim
// with the first invalid way or else the last way of the list.
module tb_lru_age;
  localparam int unsigned N  = 16;
  localparam int unsigned AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic touch;
  logic [AW-1:0] touch_idx;
  logic [N-1:0] valid;
  logic [AW-1:0] victim;
  logic [N-1:0][AW-1:0] age;
  int unsigned checks = 0, failures = 0;
  int unsigned order[$];

  lru_age #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .touch_i(touch), .touch_idx_i(touch_idx),
                        .valid_i(valid), .victim_o(victim), .age_o(age));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned exp_victim();
    for (int unsigned i = 0; i < N; i++) if (!valid[i]) return i;
    return order[N-1];
  endfunction

  task automatic check_state();
    for (int unsigned p = 0; p < N; p++) begin
      checks++;
      if (age[order[p]] != AW'(p)) begin
        failures++;
        if (failures < 10) $display("age of way %0d is %0d, expected %0d", order[p], age[order[p]], p);
      end
    end
    checks++;
    if (victim != AW'(exp_victim())) begin
      failures++;
      if (failures < 10) $display("victim %0d expected %0d", victim, exp_victim());
    end
  endtask

  initial begin
    touch = 0; touch_idx = '0; valid = '1;
    for (int unsigned i = 0; i < N; i++) order.push_back(i);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state();
    for (int it = 0; it < 3000; it++) begin
      touch     = ($urandom_range(0, 3) != 0);
      touch_idx = AW'($urandom_range(0, N - 1));
      valid     = ($urandom_range(0, 2) == 0) ? N'($urandom()) : '1;
      #1 checks++;
      if (victim != AW'(exp_victim())) failures++;
      @(negedge clk);
      if (touch) begin
        foreach (order[p]) if (order[p] == touch_idx) begin order.delete(p); break; end
        order.push_front(touch_idx);
      end
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
