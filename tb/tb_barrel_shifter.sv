// tb_barrel_shifter: random blocks and every shift amount 0..Z-1; the output must
// equal in[(k + shift) mod Z] for every element (computed here independently).
module tb_barrel_shifter;
  localparam int Z = 42, W = 8, SW = 6;
  logic [Z-1:0][W-1:0] in_blk, out_blk;
  logic [SW-1:0] shift;
  int checks = 0, failures = 0;

  barrel_shifter #(.Z(Z), .W(W), .SW(SW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++)
      for (int s = 0; s < Z; s++) begin
        for (int k = 0; k < Z; k++) in_blk[k] = W'($urandom());
        shift = SW'(s);
        #1;
        for (int k = 0; k < Z; k++) begin
          checks++;
          if (out_blk[k] != in_blk[(k + s) % Z]) begin
            failures++;
            if (failures < 5) $display("FAIL shift %0d elem %0d", s, k);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
