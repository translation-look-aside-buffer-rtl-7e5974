// bank_select_mux: the multiplexer and de-multiplexer between the control
// logic and the TLB banks.
//
// The select signal is the one-hot set of current bits from the bank tag
// registers. The multiplexer passes the outputs of the current bank (an
// AND-OR mux, all zero when no bank is current); the de-multiplexer steers
// NS strobe/enable signals of the control logic to the current bank only.
// Purely combinational. The AND-OR structure is this design's choice.
module bank_select_mux #(
  parameter int unsigned NB = 16,  // number of banks
  parameter int unsigned DW = 8,   // width of one bank's output bundle
  parameter int unsigned NS = 2    // number of steered strobes
) (
  input  logic [NB-1:0]          sel_i,
  input  logic [NB-1:0][DW-1:0]  bank_data_i,
  output logic [DW-1:0]          data_o,
  input  logic [NS-1:0]          strobe_i,
  output logic [NB-1:0][NS-1:0]  bank_strobe_o
);

  always_comb begin
    data_o = '0;
    for (int unsigned b = 0; b < NB; b++) begin
      data_o           = data_o | (bank_data_i[b] & {DW{sel_i[b]}});
      bank_strobe_o[b] = strobe_i & {NS{sel_i[b]}};
    end
  end

endmodule
