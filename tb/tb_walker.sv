// tb_walker: behavioural page-table walker for the testbenches.
//
// Takes one request at a time (req_ready_o high while idle) and answers LAT
// cycles later with a one-cycle resp_valid_o pulse carrying the PPN and
// attributes of tb_pt_pkg's page table for the task given on task_i.
module tb_walker
  import tb_pt_pkg::*;
#(
  parameter int unsigned VPN_W  = 20,
  parameter int unsigned PPN_W  = 20,
  parameter int unsigned ATTR_W = 4,
  parameter int unsigned LAT    = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  int unsigned       task_i,
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic [VPN_W-1:0]  req_vpn_i,
  output logic              resp_valid_o,
  output logic [PPN_W-1:0]  resp_ppn_o,
  output logic [ATTR_W-1:0] resp_attr_o,
  output int unsigned       walks_o
);

  logic             busy;
  int unsigned      cnt;
  logic [VPN_W-1:0] vpn_q;

  assign req_ready_o = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      cnt          <= 0;
      resp_valid_o <= 1'b0;
      resp_ppn_o   <= '0;
      resp_attr_o  <= '0;
      walks_o      <= 0;
      vpn_q        <= '0;
    end else begin
      resp_valid_o <= 1'b0;
      if (!busy && req_valid_i) begin
        busy    <= 1'b1;
        cnt     <= LAT;
        vpn_q   <= req_vpn_i;
        walks_o <= walks_o + 1;
      end else if (busy) begin
        cnt <= cnt - 1;
        if (cnt <= 1) begin
          busy         <= 1'b0;
          resp_valid_o <= 1'b1;
          resp_ppn_o   <= PPN_W'(pt_ppn(task_i, 32'(vpn_q), PPN_W));
          resp_attr_o  <= ATTR_W'(pt_attr(task_i, 32'(vpn_q)));
        end
      end
    end
  end

endmodule
