// cnu: check-node unit for the Z rows of a layer, offset min-sum with compressed output.
//
// Each Q-bit two's complement VTC message is split into a sign and a (Q-1)-bit
// magnitude (-32 clips to 31). The CMAX slots are divided into two halves: CNU_1
// sees slots 0..CS-1, CNU_2 slots CS..CMAX-1, and each finds its two smallest
// magnitudes and their slots. In normal mode a Compare & Select stage merges the
// two results into the row's min1/min2/idx1/idx2, and rec_a carries the compressed
// record (all signs + mins + indices). With merge high, two orthogonal layers are
// processed at once, one in each half: Compare & Select is bypassed, rec_a holds
// the first half's record (upper sign bits zero) and rec_b the second half's (lower
// sign bits zero). In normal mode rec_b is the second half alone. The offset of
// the min-sum update is applied later, in the decompressor. Combinational.
//
// Lint note: the top bit of the negated value nv is unused on purpose: after
// negation a 6-bit magnitude fits 5 bits except for -32, which is clipped to 31.
//
// Synthesis note: the lower CS sign bits of every rec_b row are constant zero (the
// second half never owns slots 0..CS-1); the record keeps the common ctv_rec_t
// layout so both outputs share one decompressor type.
module cnu #(
  parameter int Z = ldpc_pkg::Z
) (
  input  logic [ldpc_pkg::CMAX-1:0][Z-1:0][ldpc_pkg::Q-1:0] vtc,
  input  logic [ldpc_pkg::CMAX-1:0]                          valid,
  input  logic                                               merge,
  output ldpc_pkg::ctv_rec_t [Z-1:0]                         rec_a,
  output ldpc_pkg::ctv_rec_t [Z-1:0]                         rec_b
);
  import ldpc_pkg::*;

  for (genvar r = 0; r < Z; r++) begin : g_row
    logic [CMAX-1:0][Q-2:0] mag;
    logic [CMAX-1:0]        sgn;
    logic [Q-2:0]    a_min1, a_min2, b_min1, b_min2;
    logic [IDXW-1:0] a_idx1, a_idx2, b_idx1, b_idx2;

    // two's complement -> sign / magnitude
    always_comb
      for (int s = 0; s < CMAX; s++) begin
        logic [Q-1:0] v, nv;
        v  = vtc[s][r];
        nv = -v;
        sgn[s] = valid[s] & v[Q-1];
        if (v == {1'b1, {(Q-1){1'b0}}}) mag[s] = '1;
        else if (v[Q-1])                mag[s] = nv[Q-2:0];
        else                            mag[s] = v[Q-2:0];
      end

    cnu_half #(.N(CS), .MW(Q-1), .IDXW(IDXW), .BASE(0)) u_cnu1 (
      .mag(mag[CS-1:0]), .valid(valid[CS-1:0]),
      .min1(a_min1), .min2(a_min2), .idx1(a_idx1), .idx2(a_idx2));

    cnu_half #(.N(CMAX-CS), .MW(Q-1), .IDXW(IDXW), .BASE(CS)) u_cnu2 (
      .mag(mag[CMAX-1:CS]), .valid(valid[CMAX-1:CS]),
      .min1(b_min1), .min2(b_min2), .idx1(b_idx1), .idx2(b_idx2));

    // Compare & Select
    always_comb begin
      rec_b[r].sign = {sgn[CMAX-1:CS], {CS{1'b0}}};
      rec_b[r].min1 = b_min1;
      rec_b[r].min2 = b_min2;
      rec_b[r].idx1 = b_idx1;
      rec_b[r].idx2 = b_idx2;
      if (merge) begin
        rec_a[r].sign = {{(CMAX-CS){1'b0}}, sgn[CS-1:0]};
        rec_a[r].min1 = a_min1;
        rec_a[r].min2 = a_min2;
        rec_a[r].idx1 = a_idx1;
        rec_a[r].idx2 = a_idx2;
      end else begin
        rec_a[r].sign = sgn;
        if (b_min1 < a_min1) begin
          rec_a[r].min1 = b_min1;
          rec_a[r].idx1 = b_idx1;
          if (a_min1 <= b_min2) begin
            rec_a[r].min2 = a_min1;
            rec_a[r].idx2 = a_idx1;
          end else begin
            rec_a[r].min2 = b_min2;
            rec_a[r].idx2 = b_idx2;
          end
        end else begin
          rec_a[r].min1 = a_min1;
          rec_a[r].idx1 = a_idx1;
          if (a_min2 <= b_min1) begin
            rec_a[r].min2 = a_min2;
            rec_a[r].idx2 = a_idx2;
          end else begin
            rec_a[r].min2 = b_min1;
            rec_a[r].idx2 = b_idx1;
          end
        end
      end
    end
  end
endmodule
