// tb_vnu: random and corner APP/CTV pairs; VTC must be APP - CTV clipped to the
// 6-bit range [-32, 31], computed here with integer arithmetic.
module tb_vnu;
  localparam int Z = 42, Q = 6, QA = 8;
  logic [Z-1:0][QA-1:0] app;
  logic [Z-1:0][Q-1:0]  ctv, vtc;
  int checks = 0, failures = 0;

  vnu #(.Z(Z), .Q(Q), .QA(QA)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, c, e;
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < Z; k++) begin
        app[k] = (t < 10) ? QA'(k * 6 - 128) : QA'($urandom());
        ctv[k] = Q'($urandom());
      end
      #1;
      for (int k = 0; k < Z; k++) begin
        a = int'($signed(app[k]));
        c = int'($signed(ctv[k]));
        e = a - c;
        if (e > 31) e = 31;
        if (e < -32) e = -32;
        checks++;
        if (int'($signed(vtc[k])) != e) begin
          failures++;
          if (failures < 5) $display("FAIL app %0d ctv %0d got %0d exp %0d", a, c, $signed(vtc[k]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
