// tb_ctv_decompressor: random compressed records and slot-valid patterns; each
// message must be (product of the other valid signs of its check row) *
// max(min - 1, 0), with min2 at slot idx1 and min1 elsewhere, 0 for invalid slots
// and for enable low. In merge mode slots 0..5 form one row (record A) and slots
// 6..11 another (record B).
module tb_ctv_decompressor;
  import ldpc_pkg::*;
  ctv_rec_t [Z-1:0] rec_a, rec_b;
  logic [CMAX-1:0] valid;
  logic enable, merge;
  logic [CMAX-1:0][Z-1:0][Q-1:0] ctv;
  int checks = 0, failures = 0;

  ctv_decompressor #(.OFFSET(1)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, neg;
    for (int t = 0; t < 200; t++) begin
      enable = (t % 10 != 9);
      merge  = (t % 3 == 1);
      valid  = (t < 50) ? '1 : CMAX'($urandom());
      for (int r = 0; r < Z; r++) begin
        rec_a[r].sign = CMAX'($urandom());
        rec_a[r].min1 = (Q-1)'($urandom_range(0, 20));
        rec_a[r].min2 = rec_a[r].min1 + (Q-1)'($urandom_range(0, 10));
        rec_a[r].idx1 = IDXW'($urandom_range(0, merge ? CS - 1 : CMAX - 1));
        rec_a[r].idx2 = IDXW'($urandom_range(0, CMAX - 1));
        rec_b[r].sign = CMAX'($urandom());
        rec_b[r].min1 = (Q-1)'($urandom_range(0, 20));
        rec_b[r].min2 = rec_b[r].min1 + (Q-1)'($urandom_range(0, 10));
        rec_b[r].idx1 = IDXW'($urandom_range(CS, CMAX - 1));
        rec_b[r].idx2 = IDXW'($urandom_range(CS, CMAX - 1));
      end
      #1;
      for (int r = 0; r < Z; r++)
        for (int s = 0; s < CMAX; s++) begin
          ctv_rec_t rc;
          int lo, hi;
          if (merge && s >= CS) begin rc = rec_b[r]; lo = CS; hi = CMAX - 1; end
          else if (merge)       begin rc = rec_a[r]; lo = 0;  hi = CS - 1; end
          else                  begin rc = rec_a[r]; lo = 0;  hi = CMAX - 1; end
          neg = 0;
          for (int o = lo; o <= hi; o++) if (o != s && valid[o] && rc.sign[o]) neg ^= 1;
          e = (s == int'(rc.idx1)) ? int'(rc.min2) : int'(rc.min1);
          e = (e > 1) ? e - 1 : 0;
          if (neg) e = -e;
          if (!enable || !valid[s]) e = 0;
          checks++;
          if (int'($signed(ctv[s][r])) != e) begin
            failures++;
            if (failures < 5) $display("FAIL t %0d row %0d slot %0d got %0d exp %0d", t, r, s, $signed(ctv[s][r]), e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
