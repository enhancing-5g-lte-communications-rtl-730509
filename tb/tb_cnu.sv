// tb_cnu: random VTC messages and slot-valid patterns. For every row the expected
// min1/min2 (smallest magnitudes, -32 counted as 31), their slots (lowest slot on
// ties) and the sign bits are worked out here by a direct search. Normal mode
// checks the merged record over all 12 slots; merge mode checks each half alone.
module tb_cnu;
  import ldpc_pkg::*;
  logic [CMAX-1:0][Z-1:0][Q-1:0] vtc;
  logic [CMAX-1:0] valid;
  logic merge;
  ctv_rec_t [Z-1:0] rec_a, rec_b;
  int checks = 0, failures = 0;

  cnu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected record over slots lo..hi
  task automatic expect_rec(input int r, input int lo, input int hi, input ctv_rec_t got, input string tag);
    int m1, m2, i1, i2, m;
    logic [CMAX-1:0] sg;
    m1 = 31; m2 = 31; i1 = -1; i2 = -1; sg = '0;
    for (int s = lo; s <= hi; s++) begin
      if (!valid[s]) continue;
      m = int'($signed(vtc[s][r]));
      sg[s] = (m < 0);
      if (m < 0) m = -m;
      if (m > 31) m = 31;
      if (m < m1) begin m2 = m1; i2 = i1; m1 = m; i1 = s; end
      else if (m < m2) begin m2 = m; i2 = s; end
    end
    checks++;
    if (int'(got.min1) != m1 || int'(got.min2) != m2 || got.sign != sg ||
        (i1 >= 0 && int'(got.idx1) != i1) || (i2 >= 0 && int'(got.idx2) != i2)) begin
      failures++;
      if (failures < 6)
        $display("FAIL %s row %0d: got %0d/%0d idx %0d/%0d sign %h, exp %0d/%0d idx %0d/%0d sign %h",
                 tag, r, got.min1, got.min2, got.idx1, got.idx2, got.sign, m1, m2, i1, i2, sg);
    end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      merge = (t % 2 == 1);
      valid = (t < 60) ? '1 : CMAX'($urandom());
      for (int s = 0; s < CMAX; s++)
        for (int r = 0; r < Z; r++)
          vtc[s][r] = (t % 5 == 0) ? Q'($urandom_range(0, 7) - 4) : Q'($urandom());
      #1;
      for (int r = 0; r < Z; r++)
        if (!merge) expect_rec(r, 0, CMAX - 1, rec_a[r], "normal");
        else begin
          expect_rec(r, 0, CS - 1, rec_a[r], "merge A");
          expect_rec(r, CS, CMAX - 1, rec_b[r], "merge B");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
