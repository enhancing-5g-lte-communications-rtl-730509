// read_network: routes APP block columns to the CMAX processing slots of a layer.
//
// Slot k receives block column sel[k] of the whole APP store (all three banks
// concatenated, NB columns). The selects come from the controller's layer table
// (Sel_r). Unused slots of a short layer still get some column; the VNU/CNU mask
// them by the slot-valid bits. Combinational.
module read_network #(
  parameter int NB   = ldpc_pkg::NB,
  parameter int CMAX = ldpc_pkg::CMAX,
  parameter int COLW = ldpc_pkg::COLW,
  parameter int Z    = ldpc_pkg::Z,
  parameter int QA   = ldpc_pkg::QA
) (
  input  logic [NB-1:0][Z-1:0][QA-1:0]   app_all,
  input  logic [CMAX-1:0][COLW-1:0]      sel,
  output logic [CMAX-1:0][Z-1:0][QA-1:0] slot_app
);
  always_comb
    for (int k = 0; k < CMAX; k++)
      slot_app[k] = (int'(sel[k]) < NB) ? app_all[sel[k]] : '0;
endmodule
