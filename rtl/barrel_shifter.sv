// barrel_shifter: left rotation of a block of Z elements (the LBS units).
//
// out[k] = in[(k + shift) mod Z]. One shifter sits behind each read-network slot
// (LBS_1 .. LBS_Cmax) and turns a stored block column into the alignment of the
// current layer; the same module rotates channel data on loading (LBS_init) and
// decoded bits back to natural order on output (LBS_Out). Z need not be a power of
// two, so each output is a Z:1 multiplexer indexed by (k + shift) reduced mod Z.
// shift must be below Z. Purely combinational.
module barrel_shifter #(
  parameter int Z  = ldpc_pkg::Z,
  parameter int W  = ldpc_pkg::QA,
  parameter int SW = ldpc_pkg::ZW
) (
  input  logic [Z-1:0][W-1:0] in_blk,
  input  logic [SW-1:0]       shift,
  output logic [Z-1:0][W-1:0] out_blk
);
  always_comb begin
    int idx;
    for (int k = 0; k < Z; k++) begin
      idx = k + int'(shift);
      if (idx >= Z) idx = idx - Z;
      if (idx >= Z) idx = Z - 1;   // shift out of range: keep the index legal
      out_blk[k] = in_blk[idx];
    end
  end
endmodule
