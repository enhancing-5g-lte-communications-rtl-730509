// syndrome_check: parity of the check equations of one processing step.
//
// The hard decision of an APP value is its sign bit (negative LLR = bit 1). The
// slots arrive already rotated into the step's alignment, so element k of every
// slot belongs to check row k. For each k the decisions of the valid slots are
// XORed separately over slots 0..CS-1 and CS..CMAX-1. In normal mode both halves
// belong to one check row, so row_parity is their XOR; with merge high they are two
// rows of two orthogonal layers, and a row fails if either half is odd. fail is the
// OR of row_parity. Evaluating every step with fail low means C * H^T = 0.
// Combinational.
module syndrome_check #(
  parameter int Z    = ldpc_pkg::Z,
  parameter int CMAX = ldpc_pkg::CMAX,
  parameter int CS   = ldpc_pkg::CS,
  parameter int QA   = ldpc_pkg::QA
) (
  input  logic [CMAX-1:0][Z-1:0][QA-1:0] slot_app,
  input  logic [CMAX-1:0]                valid,
  input  logic                           merge,
  output logic [Z-1:0]                   row_parity,
  output logic                           fail
);
  logic [Z-1:0] par_lo, par_hi;

  always_comb begin
    par_lo = '0;
    par_hi = '0;
    for (int s = 0; s < CMAX; s++)
      for (int k = 0; k < Z; k++)
        if (s < CS) par_lo[k] = par_lo[k] ^ (valid[s] & slot_app[s][k][QA-1]);
        else        par_hi[k] = par_hi[k] ^ (valid[s] & slot_app[s][k][QA-1]);
    row_parity = merge ? (par_lo | par_hi) : (par_lo ^ par_hi);
    fail = |row_parity;
  end
endmodule
