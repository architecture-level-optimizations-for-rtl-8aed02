// tb_data_mux: self-checking testbench of the Data MUX.
// Applies random unit results and checks, for every unit index and word index, that
// the selected W-bit word of the selected unit is driven (zero for unused indices).
module tb_data_mux;
  import khecc_pkg::*;
  localparam int unsigned W = 34;
  localparam int unsigned S = ELEM_BITS / W;

  logic [ELEM_BITS-1:0] res [2];
  logic [2:0] unit_sel;
  logic [1:0] word_idx;
  logic [W-1:0] wdata, exp_w;
  int checks = 0, failures = 0;

  data_mux #(.W(W), .NUNITS(2)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int u = 0; u < 2; u++)
        res[u] = {8'($urandom), $urandom, $urandom, $urandom, $urandom};
      for (int u = 0; u < 8; u++) begin
        for (int j = 0; j < S; j++) begin
          unit_sel = 3'(u); word_idx = 2'(j);
          exp_w = (u < 2) ? res[u][j*W +: W] : '0;
          #1;
          checks++;
          if (wdata !== exp_w) begin failures++; $display("FAIL u=%0d j=%0d", u, j); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
