// tb_app_memory: random multi-column writes against a reference copy; every column
// is compared after each write cycle, and unwritten columns must keep their data.
module tb_app_memory;
  localparam int COLS = 6, Z = 42, QA = 8;
  logic clk = 0;
  logic [COLS-1:0] wr_en;
  logic [COLS-1:0][Z-1:0][QA-1:0] wr_data, rd_data, model;
  int checks = 0, failures = 0;

  app_memory #(.COLS(COLS), .Z(Z), .QA(QA)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every column once
    @(negedge clk);
    wr_en = '1;
    for (int c = 0; c < COLS; c++) for (int k = 0; k < Z; k++) wr_data[c][k] = QA'($urandom());
    model = wr_data;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (rd_data[c] != model[c]) begin
          failures++;
          $display("FAIL step %0d column %0d", t, c);
        end
      end
      wr_en = COLS'($urandom());
      for (int c = 0; c < COLS; c++) begin
        for (int k = 0; k < Z; k++) wr_data[c][k] = QA'($urandom());
        if (wr_en[c]) model[c] = wr_data[c];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
