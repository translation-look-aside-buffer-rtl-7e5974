// lru_age: true least-recently-used replacement state for N ways.
//
// Every way holds an age; the ages always form a permutation of 0..N-1
// (0 = most recently used, N-1 = least recently used). Touching a way gives
// it age 0 and ages by one every way that was younger than it. The victim
// is the lowest-numbered way that holds no valid contents, or else the way
// whose age is N-1. This is how the TLB banks, the shared TLB and the bank
// tag registers ("LRU bits") choose what to replace; the age-counter
// encoding itself is this design's choice.
//
// Interface: touch_i/touch_idx_i update the state at the clock edge;
// victim_o and age_o are combinational from the current state and valid_i.
// Reset gives way i the age i.
module lru_age #(
  parameter int unsigned N  = 16,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  touch_i,
  input  logic [AW-1:0]         touch_idx_i,
  input  logic [N-1:0]          valid_i,
  output logic [AW-1:0]         victim_o,
  output logic [N-1:0][AW-1:0]  age_o
);

  logic [N-1:0][AW-1:0] age_q;
  logic [AW-1:0]        touched_age;

  assign age_o       = age_q;
  assign touched_age = age_q[touch_idx_i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) age_q[i] <= AW'(i);
    end else if (touch_i) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (AW'(i) == touch_idx_i)          age_q[i] <= '0;
        else if (age_q[i] < touched_age)    age_q[i] <= age_q[i] + 1'b1;
      end
    end
  end

  // Victim: first invalid way, else the oldest way.
  always_comb begin
    logic found;
    found    = 1'b0;
    victim_o = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (!found && !valid_i[i]) begin
        found    = 1'b1;
        victim_o = AW'(i);
      end
    end
    if (!found) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (age_q[i] == AW'(N - 1)) victim_o = AW'(i);
      end
    end
  end

endmodule
