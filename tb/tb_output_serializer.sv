// tb_output_serializer: columns of random bits are stored rotated by a random
// amount per column (as in APP memory). After start the serializer must return
// kb columns in natural bit order, one bit per acknowledged cycle with random ack
// gaps, keep data_out_ready low between columns' fetch cycles, and pulse done once.
module tb_output_serializer;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, data_out_ack = 0;
  logic [COLW:0] kb;
  logic [COLW-1:0] col;
  logic [Z-1:0] col_bits;
  logic [ZW-1:0] col_rot;
  logic data_out_ready, decoded_data, busy, done;
  logic [Z-1:0] natural [NB];
  logic [Z-1:0] stored [NB];
  logic [ZW-1:0] rot_of [NB];
  int checks = 0, failures = 0, ndone = 0;

  output_serializer dut (.*);
  always #5 clk = ~clk;
  assign col_bits = stored[col];
  assign col_rot  = rot_of[col];
  always @(posedge clk) if (done) ndone++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      kb = (t == 1) ? 5'd13 : 5'd8;
      for (int c = 0; c < NB; c++) begin
        for (int b = 0; b < Z; b++) natural[c][b] = 1'($urandom());
        rot_of[c] = ZW'($urandom_range(0, Z - 1));
        for (int b = 0; b < Z; b++) stored[c][b] = natural[c][(b + int'(rot_of[c])) % Z];
      end
      ndone = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      n = 0;
      while (n < int'(kb) * Z) begin
        if (data_out_ready && $urandom_range(0, 2) != 0) begin
          data_out_ack = 1;
          checks++;
          if (decoded_data != natural[n / Z][n % Z]) begin
            failures++;
            if (failures < 5) $display("FAIL bit %0d", n);
          end
          n++;
        end else data_out_ack = 0;
        @(negedge clk);
      end
      data_out_ack = 0;
      repeat (3) @(negedge clk);
      checks += 2;
      if (ndone != 1) begin failures++; $display("FAIL done pulses %0d", ndone); end
      if (busy || data_out_ready) begin failures++; $display("FAIL not idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
