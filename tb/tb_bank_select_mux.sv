// tb_bank_select_mux: random one-hot (or empty) selections; the output must
// be the selected bank's data (zero with no selection) and the strobes must
// reach the selected bank only.
module tb_bank_select_mux;
  localparam int unsigned NB = 16, DW = 24, NS = 2;
  logic [NB-1:0] sel;
  logic [NB-1:0][DW-1:0] data;
  logic [DW-1:0] out;
  logic [NS-1:0] strobe;
  logic [NB-1:0][NS-1:0] bstrobe;
  int unsigned checks = 0, failures = 0;
  logic clk = 0;

  bank_select_mux #(.NB(NB), .DW(DW), .NS(NS)) dut (.sel_i(sel), .bank_data_i(data), .data_o(out),
                                                   .strobe_i(strobe), .bank_strobe_o(bstrobe));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int k;
      k = $urandom_range(0, NB);   // NB means no bank selected
      sel = '0;
      if (k < NB) sel[k] = 1'b1;
      for (int b = 0; b < NB; b++) data[b] = DW'($urandom());
      strobe = NS'($urandom());
      #1;
      checks++;
      if (out != ((k < NB) ? data[k] : '0)) failures++;
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (bstrobe[b] != ((b == k) ? strobe : '0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
