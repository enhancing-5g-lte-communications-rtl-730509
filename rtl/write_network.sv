// write_network: routes the CMAX updated APP slots back to their block columns.
//
// Column c is written when enable is high and some valid slot k has col[k] == c;
// it then takes slot_data[k]. A layer never names a column twice, so at most one
// slot matches (checked by an assertion). Sel_W of the architecture is the
// (col, valid) pair per slot plus enable. Combinational.
module write_network #(
  parameter int NB   = ldpc_pkg::NB,
  parameter int CMAX = ldpc_pkg::CMAX,
  parameter int COLW = ldpc_pkg::COLW,
  parameter int Z    = ldpc_pkg::Z,
  parameter int QA   = ldpc_pkg::QA
) (
  input  logic                           enable,
  input  logic [CMAX-1:0][Z-1:0][QA-1:0] slot_data,
  input  logic [CMAX-1:0][COLW-1:0]      col,
  input  logic [CMAX-1:0]                valid,
  output logic [NB-1:0]                  col_we,
  output logic [NB-1:0][Z-1:0][QA-1:0]   col_data
);
  always_comb begin
    col_we   = '0;
    col_data = '0;
    for (int c = 0; c < NB; c++)
      for (int k = 0; k < CMAX; k++)
        if (enable && valid[k] && int'(col[k]) == c) begin
          col_we[c]   = 1'b1;
          col_data[c] = slot_data[k];
        end
  end

  always_comb
    if (enable)
      for (int a = 0; a < CMAX; a++)
        for (int b = a + 1; b < CMAX; b++)
          assert (!(valid[a] && valid[b] && col[a] == col[b]))
            else $error("write_network: slots %0d and %0d write the same column", a, b);
endmodule
