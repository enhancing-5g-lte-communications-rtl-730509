// tb_llr_loader: two frames of 672 random LLRs with random gaps in in_valid. Each
// column write must come with the last LLR of the column, name the columns in
// order, and carry the column rotated left by its rotation (random per column,
// supplied by the test); loaded must rise after the 16th column and clear on
// clear_loaded.
module tb_llr_loader;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, clear_loaded = 0;
  logic [QA-1:0] llr_in = '0;
  logic [ZW-1:0] col_rot;
  logic [COLW-1:0] blk_col;
  logic blk_we, loaded;
  logic [Z-1:0][QA-1:0] blk_data;
  logic [ZW-1:0] rot_of [NB];
  logic [QA-1:0] frame [NB*Z];
  int checks = 0, failures = 0, next_col = 0;

  llr_loader dut (.*);
  always #5 clk = ~clk;
  assign col_rot = rot_of[blk_col];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && blk_we) begin
    checks++;
    if (int'(blk_col) != next_col) begin failures++; $display("FAIL column order %0d", blk_col); end
    for (int k = 0; k < Z; k++) begin
      checks++;
      if (blk_data[k] != frame[int'(blk_col) * Z + (k + int'(rot_of[blk_col])) % Z]) failures++;
    end
    next_col = (next_col + 1) % NB;
  end

  initial begin
    for (int c = 0; c < NB; c++) rot_of[c] = ZW'($urandom_range(0, Z - 1));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      foreach (frame[i]) frame[i] = QA'($urandom());
      for (int i = 0; i < NB * Z; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        llr_in = frame[i];
        if (i == NB * Z - 1) begin
          checks++;
          if (loaded != (f == 1 ? 1'b0 : 1'b0)) begin failures++; $display("FAIL loaded early"); end
        end
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!loaded) begin failures++; $display("FAIL loaded not set, frame %0d", f); end
      clear_loaded = 1;
      @(negedge clk);
      clear_loaded = 0;
      checks++;
      if (loaded) begin failures++; $display("FAIL loaded not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
