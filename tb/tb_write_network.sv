// tb_write_network: random layers with distinct columns per slot and random slot
// valid bits; each column must be written exactly when a valid slot names it and
// enable is high, with that slot's data.
module tb_write_network;
  import ldpc_pkg::*;
  logic                           enable;
  logic [CMAX-1:0][Z-1:0][QA-1:0] slot_data;
  logic [CMAX-1:0][COLW-1:0]      col;
  logic [CMAX-1:0]                valid;
  logic [NB-1:0]                  col_we;
  logic [NB-1:0][Z-1:0][QA-1:0]   col_data;
  int checks = 0, failures = 0;

  write_network dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [NB];
    int tmp, j, owner;
    for (int t = 0; t < 200; t++) begin
      for (int c = 0; c < NB; c++) perm[c] = c;
      for (int c = NB - 1; c > 0; c--) begin
        j = int'($urandom_range(0, c));
        tmp = perm[c]; perm[c] = perm[j]; perm[j] = tmp;
      end
      for (int s = 0; s < CMAX; s++) begin
        col[s] = COLW'(perm[s]);
        for (int k = 0; k < Z; k++) slot_data[s][k] = QA'($urandom());
      end
      valid  = CMAX'($urandom());
      enable = ($urandom_range(0, 4) != 0);
      #1;
      for (int c = 0; c < NB; c++) begin
        owner = -1;
        for (int s = 0; s < CMAX; s++) if (valid[s] && perm[s] == c) owner = s;
        checks++;
        if (col_we[c] != (enable && owner >= 0)) begin
          failures++;
          $display("FAIL test %0d column %0d enable", t, c);
        end else if (col_we[c] && col_data[c] != slot_data[owner]) begin
          failures++;
          $display("FAIL test %0d column %0d data", t, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
