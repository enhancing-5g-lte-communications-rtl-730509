// vtc_buffer: holds the VTC messages of the layer in flight and forms the new APPs.
//
// On load the CMAX x Z VTC messages from the VNUs are registered; they feed the
// CNU during the following cycle. The new APP of each element is the held VTC plus
// the freshly decompressed CTV message, saturated to QA bits (layered update
// APP = VTC + CTV_new). The sum is combinational from the register and the CTV input.
module vtc_buffer #(
  parameter int Z    = ldpc_pkg::Z,
  parameter int CMAX = ldpc_pkg::CMAX,
  parameter int Q    = ldpc_pkg::Q,
  parameter int QA   = ldpc_pkg::QA
) (
  input  logic                           clk,
  input  logic                           load,
  input  logic [CMAX-1:0][Z-1:0][Q-1:0]  vtc_in,
  input  logic [CMAX-1:0][Z-1:0][Q-1:0]  ctv_new,
  output logic [CMAX-1:0][Z-1:0][Q-1:0]  vtc_q,
  output logic [CMAX-1:0][Z-1:0][QA-1:0] app_new
);
  localparam logic signed [QA:0] HI = (QA+1)'((1 << (QA - 1)) - 1);
  localparam logic signed [QA:0] LO = -HI - (QA+1)'(1);

  always_ff @(posedge clk)
    if (load) vtc_q <= vtc_in;

  always_comb
    for (int s = 0; s < CMAX; s++)
      for (int k = 0; k < Z; k++) begin
        logic signed [QA:0] a;
        a = (QA+1)'($signed(vtc_q[s][k])) + (QA+1)'($signed(ctv_new[s][k]));
        if (a > HI)      app_new[s][k] = {1'b0, {(QA-1){1'b1}}};
        else if (a < LO) app_new[s][k] = {1'b1, {(QA-1){1'b0}}};
        else             app_new[s][k] = a[QA-1:0];
      end
endmodule
