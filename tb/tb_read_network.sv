// tb_read_network: random APP contents and random column selects per slot; each
// slot must carry exactly the selected column.
module tb_read_network;
  import ldpc_pkg::*;
  logic [NB-1:0][Z-1:0][QA-1:0]   app_all;
  logic [CMAX-1:0][COLW-1:0]      sel;
  logic [CMAX-1:0][Z-1:0][QA-1:0] slot_app;
  int checks = 0, failures = 0;

  read_network dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int c = 0; c < NB; c++) for (int k = 0; k < Z; k++) app_all[c][k] = QA'($urandom());
      for (int s = 0; s < CMAX; s++) sel[s] = COLW'($urandom_range(0, NB - 1));
      #1;
      for (int s = 0; s < CMAX; s++) begin
        checks++;
        if (slot_app[s] != app_all[sel[s]]) begin
          failures++;
          $display("FAIL test %0d slot %0d", t, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
