// tb_vtc_buffer: the buffer must hold the VTC loaded one cycle earlier (and keep it
// while load is low), and the APP output must equal held VTC + new CTV clipped to
// the 8-bit range [-128, 127].
module tb_vtc_buffer;
  import ldpc_pkg::*;
  logic clk = 0, load;
  logic [CMAX-1:0][Z-1:0][Q-1:0]  vtc_in, ctv_new, vtc_q, held;
  logic [CMAX-1:0][Z-1:0][QA-1:0] app_new;
  int checks = 0, failures = 0;

  vtc_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      load = (t == 0) || ($urandom_range(0, 2) != 0);
      for (int s = 0; s < CMAX; s++) for (int k = 0; k < Z; k++) vtc_in[s][k] = Q'($urandom());
      if (load) held = vtc_in;
      @(negedge clk);
      load = 0;
      for (int s = 0; s < CMAX; s++) for (int k = 0; k < Z; k++) ctv_new[s][k] = Q'($urandom());
      #1;
      checks++;
      if (vtc_q != held) begin failures++; $display("FAIL hold %0d", t); end
      for (int s = 0; s < CMAX; s++)
        for (int k = 0; k < Z; k++) begin
          e = int'($signed(held[s][k])) + int'($signed(ctv_new[s][k]));
          if (e > 127) e = 127;
          if (e < -128) e = -128;
          checks++;
          if (int'($signed(app_new[s][k])) != e) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
