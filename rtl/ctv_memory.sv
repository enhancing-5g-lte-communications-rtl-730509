// ctv_memory: simple dual-port RAM for compressed check-to-variable records.
//
// One write port and one read port, both synchronous to clk, so a layer's record
// can be written while the next layer's is read. A read issued with rd_en returns
// its word on rd_data after the next rising edge. DEPTH words of WIDTH bits; the
// decoder uses one instance of depth L (memory 1) and one of depth L0 (memory 2).
// The array is not reset; the controller never uses a word it has not written.
module ctv_memory #(
  parameter int WIDTH = ldpc_pkg::W1,
  parameter int DEPTH = ldpc_pkg::LMAX,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
    if (rd_en && int'(rd_addr) < DEPTH) rd_data <= mem[rd_addr];
  end
endmodule
