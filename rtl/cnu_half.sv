// cnu_half: the min-finding half of a check-node unit (CNU_1 or CNU_2) for one row.
//
// Takes N magnitudes (sign already removed) with a valid bit each and returns the
// smallest (min1) and second smallest (min2) magnitude and the slots where they
// were found (idx1, idx2). Slot numbers are BASE + local position, so the two
// halves report slots of the full layer. Invalid inputs count as the largest
// magnitude; ties keep the lower slot. Combinational, a linear compare chain.
module cnu_half #(
  parameter int N    = ldpc_pkg::CS,
  parameter int MW   = ldpc_pkg::Q - 1,
  parameter int IDXW = ldpc_pkg::IDXW,
  parameter int BASE = 0
) (
  input  logic [N-1:0][MW-1:0] mag,
  input  logic [N-1:0]         valid,
  output logic [MW-1:0]        min1,
  output logic [MW-1:0]        min2,
  output logic [IDXW-1:0]      idx1,
  output logic [IDXW-1:0]      idx2
);
  always_comb begin
    logic [MW-1:0] m;
    min1 = '1;
    min2 = '1;
    idx1 = IDXW'(BASE);
    idx2 = IDXW'(BASE);
    for (int i = 0; i < N; i++) begin
      m = valid[i] ? mag[i] : '1;
      if (m < min1) begin
        min2 = min1;
        idx2 = idx1;
        min1 = m;
        idx1 = IDXW'(BASE + i);
      end else if (m < min2) begin
        min2 = m;
        idx2 = IDXW'(BASE + i);
      end
    end
  end
endmodule
