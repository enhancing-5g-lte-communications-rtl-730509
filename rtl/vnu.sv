// vnu: variable-node unit of one slot, VTC = sat_Q(APP - CTV) for Z elements.
//
// Each Q-bit CTV message is sign-extended to the adder width, subtracted from the
// QA-bit APP message, and the result is saturated to Q bits: above +31 it becomes
// 6'b011111, below -32 it becomes 6'b100000, otherwise the low Q bits are kept.
// Sign extension, adder and truncation follow the variable-node adder structure of
// the decoder; the saturation limits are the largest and smallest Q-bit values.
// Combinational.
module vnu #(
  parameter int Z  = ldpc_pkg::Z,
  parameter int Q  = ldpc_pkg::Q,
  parameter int QA = ldpc_pkg::QA
) (
  input  logic [Z-1:0][QA-1:0] app,
  input  logic [Z-1:0][Q-1:0]  ctv,
  output logic [Z-1:0][Q-1:0]  vtc
);
  localparam int W = QA + 2;   // adder width after sign extension
  localparam logic signed [W-1:0] HI = W'((1 << (Q - 1)) - 1);
  localparam logic signed [W-1:0] LO = -HI - W'(1);

  always_comb
    for (int k = 0; k < Z; k++) begin
      logic signed [W-1:0] d;
      d = W'($signed(app[k])) - W'($signed(ctv[k]));
      if (d > HI)      vtc[k] = {1'b0, {(Q-1){1'b1}}};
      else if (d < LO) vtc[k] = {1'b1, {(Q-1){1'b0}}};
      else             vtc[k] = d[Q-1:0];
    end
endmodule
