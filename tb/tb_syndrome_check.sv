// tb_syndrome_check: random APP slots and valid masks; each row parity must be the
// XOR of the sign bits of the valid slots (in merge mode: the OR of the two halves'
// parities, slots 0..5 and 6..11), and fail their OR. Includes all-satisfied
// steps built by forcing the parity of slot 0 (and slot 6 in merge mode).
module tb_syndrome_check;
  import ldpc_pkg::*;
  logic [CMAX-1:0][Z-1:0][QA-1:0] slot_app;
  logic [CMAX-1:0] valid;
  logic [Z-1:0] row_parity;
  logic fail, merge;
  int checks = 0, failures = 0, n_pass = 0;

  syndrome_check dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit p, q;
    logic [Z-1:0] e;
    for (int t = 0; t < 200; t++) begin
      merge = (t % 4 >= 2);
      valid = CMAX'($urandom()) | 12'h041;
      for (int s = 0; s < CMAX; s++) for (int k = 0; k < Z; k++) slot_app[s][k] = QA'($urandom());
      if (t % 2 == 0)   // make every check satisfied through slots 0 and 6
        for (int k = 0; k < Z; k++) begin
          p = 0;
          q = 0;
          for (int s = 1; s < CS; s++) if (valid[s]) p ^= slot_app[s][k][QA-1];
          for (int s = CS + 1; s < CMAX; s++) if (valid[s]) q ^= slot_app[s][k][QA-1];
          slot_app[0][k][QA-1] = p;
          slot_app[CS][k][QA-1] = q;
        end
      #1;
      for (int k = 0; k < Z; k++) begin
        p = 0;
        q = 0;
        for (int s = 0; s < CS; s++) if (valid[s]) p ^= slot_app[s][k][QA-1];
        for (int s = CS; s < CMAX; s++) if (valid[s]) q ^= slot_app[s][k][QA-1];
        e[k] = merge ? (p | q) : (p ^ q);
      end
      checks += 2;
      if (row_parity != e) begin failures++; $display("FAIL parity t %0d", t); end
      if (fail != (e != '0)) begin failures++; $display("FAIL flag t %0d", t); end
      if (!fail) n_pass++;
    end
    checks++;
    if (n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
