// tb_ctx_workload: miss-count comparison in the style of the evaluation of
// these TLBs. One program runs with a context switch every SLICE requests.
// Its TLB state is kept across the switch (best situation) or lost to a
// clear-TLB (worst situation), and a conventional 256-entry LRU TLB of the
// same page size, flushed at every switch, is the reference (see tb_ws_lane).
// Lanes, all run at once on the same byte-address stream:
//   lcs_tlb with 4KB, 8KB and 16KB base pages (default sizes otherwise),
//   orig_tlb with 1MB pages (its default) and with 4KB pages.
// The stream: the program resumes on one address after every switch, then
// walks with locality (a 128KB window that drifts in 16KB steps) over a
// working set of 384KB or 1.5MB.
// Checked: every translation of every lane against the page table, best
// situation no worse than worst, and some misses in the conventional TLB.
// The relative improvement conventional_misses / misses is printed per lane.
module tb_ctx_workload;
  localparam int unsigned NREQ = 16000, SLICE = 2000, NL = 5;
  localparam int unsigned WIN = 32'h2_0000, STEP = 32'h4000, BASE = 32'h1000_0000;

  logic clk = 0;
  logic start = 0;
  logic [31:0] stream[NREQ];
  logic [NL-1:0] done;
  int unsigned best[NL], worst[NL], conv[NL], lchecks[NL], lfails[NL];
  int unsigned checks = 0, failures = 0;
  string lname[NL] = '{"lcs_tlb 4KB", "lcs_tlb 8KB", "lcs_tlb 16KB", "orig_tlb 1MB", "orig_tlb 4KB"};

  tb_ws_lane #(.DESIGN(0), .PAGE_BITS(12), .NREQ(NREQ), .SLICE(SLICE)) u_l0 (
    .clk(clk), .start_i(start), .stream_i(stream), .done_o(done[0]), .best_o(best[0]),
    .worst_o(worst[0]), .conv_o(conv[0]), .checks_o(lchecks[0]), .failures_o(lfails[0]));
  tb_ws_lane #(.DESIGN(0), .PAGE_BITS(13), .NREQ(NREQ), .SLICE(SLICE)) u_l1 (
    .clk(clk), .start_i(start), .stream_i(stream), .done_o(done[1]), .best_o(best[1]),
    .worst_o(worst[1]), .conv_o(conv[1]), .checks_o(lchecks[1]), .failures_o(lfails[1]));
  tb_ws_lane #(.DESIGN(0), .PAGE_BITS(14), .NREQ(NREQ), .SLICE(SLICE)) u_l2 (
    .clk(clk), .start_i(start), .stream_i(stream), .done_o(done[2]), .best_o(best[2]),
    .worst_o(worst[2]), .conv_o(conv[2]), .checks_o(lchecks[2]), .failures_o(lfails[2]));
  tb_ws_lane #(.DESIGN(1), .PAGE_BITS(20), .NREQ(NREQ), .SLICE(SLICE)) u_l3 (
    .clk(clk), .start_i(start), .stream_i(stream), .done_o(done[3]), .best_o(best[3]),
    .worst_o(worst[3]), .conv_o(conv[3]), .checks_o(lchecks[3]), .failures_o(lfails[3]));
  tb_ws_lane #(.DESIGN(1), .PAGE_BITS(12), .NREQ(NREQ), .SLICE(SLICE)) u_l4 (
    .clk(clk), .start_i(start), .stream_i(stream), .done_o(done[4]), .best_o(best[4]),
    .worst_o(worst[4]), .conv_o(conv[4]), .checks_o(lchecks[4]), .failures_o(lfails[4]));

  always #5 clk = ~clk;

  initial begin
    repeat (NREQ * 3 * 2 * 30) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_stream(input int unsigned ws);
    int unsigned hot = 0;
    for (int unsigned r = 0; r < NREQ; r++) begin
      if (r % SLICE == 0) stream[r] = BASE;
      else begin
        if ($urandom_range(0, 63) == 0) hot = $urandom_range(0, ws / STEP - 1);
        stream[r] = BASE + ((hot * STEP + $urandom_range(0, WIN - 1)) % ws);
      end
    end
  endfunction

  // ratio a/b with two decimals
  function automatic string ratio(input int unsigned a, input int unsigned b);
    if (b == 0) return "inf";
    return $sformatf("%0d.%02d", a / b, (a * 100 / b) % 100);
  endfunction

  initial begin
    int unsigned ws[2] = '{32'h6_0000, 32'h18_0000};
    foreach (ws[w]) begin
      make_stream(ws[w]);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      @(negedge clk);
      wait (&done);
      #1;
      $display("working set %0d KB, %0d requests, switch every %0d:", ws[w] / 1024, NREQ, SLICE);
      for (int l = 0; l < NL; l++)
        $display("  %-13s misses best %6d worst %6d conventional %6d  improvement best %s worst %s",
                 lname[l], best[l], worst[l], conv[l], ratio(conv[l], best[l]), ratio(conv[l], worst[l]));
    end
    for (int l = 0; l < NL; l++) begin
      checks += lchecks[l];
      failures += lfails[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
