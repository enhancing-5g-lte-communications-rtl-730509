// tb_ctv_memory: random interleaved writes and reads on the two ports, including a
// read and a write in the same cycle; read data must appear one clock after the
// read and equal the last word written before that clock edge.
module tb_ctv_memory;
  localparam int WIDTH = 1008, DEPTH = 8, AW = 3;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  ctv_memory #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  initial begin
    logic [WIDTH-1:0] exp_d;
    bit pending;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = rnd(); model[a] = wr_data;
    end
    pending = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rd_data != exp_d) begin failures++; $display("FAIL read at step %0d", t); end
      end
      rd_en   = ($urandom_range(0, 3) != 0);
      rd_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_en   = ($urandom_range(0, 1) != 0);
      wr_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_data = rnd();
      pending = rd_en;
      if (rd_en) exp_d = model[rd_addr];   // read-before-write in the same cycle
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
