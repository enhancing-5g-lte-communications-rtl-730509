// app_memory: one of the three register banks holding the APP (a posteriori) LLRs.
//
// The APP storage is split into three portions; this bank holds COLS block columns
// of Z messages of QA bits. Being built from registers, every column is readable at
// once (the read network picks what a layer needs) and any set of columns can be
// written in the same cycle through per-column write enables. Writes take effect at
// the rising clock edge; reads are combinational. Contents are not reset: a frame is
// always loaded before it is decoded.
module app_memory #(
  parameter int COLS = 6,
  parameter int Z    = ldpc_pkg::Z,
  parameter int QA   = ldpc_pkg::QA
) (
  input  logic                            clk,
  input  logic [COLS-1:0]                 wr_en,
  input  logic [COLS-1:0][Z-1:0][QA-1:0]  wr_data,
  output logic [COLS-1:0][Z-1:0][QA-1:0]  rd_data
);
  logic [COLS-1:0][Z-1:0][QA-1:0] mem;

  always_ff @(posedge clk)
    for (int c = 0; c < COLS; c++)
      if (wr_en[c]) mem[c] <= wr_data[c];

  assign rd_data = mem;
endmodule
