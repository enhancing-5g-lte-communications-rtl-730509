// ctv_decompressor: expands compressed CTV records into per-slot CTV messages.
//
// For each of the Z rows and each valid slot s the message is
//   sign = XOR of the signs of the other valid slots of the same check row,
//   magnitude = max((s == idx1 ? min2 : min1) - OFFSET, 0),
// i.e. the offset min-sum check-node rule, returned as a Q-bit two's complement
// value. In normal mode all CMAX slots belong to one row and use rec_a. With merge
// high the step holds two orthogonal layers: slots 0..CS-1 use rec_a and slots
// CS..CMAX-1 use rec_b, each half with its own sign product. Invalid slots, and
// every slot while enable is low (a step with no stored record yet), give 0.
// Combinational. The decoder uses one instance on the stored (old) records feeding
// the VNUs and one on the CNU output feeding the APP update.
//
// Lint note: rc is a full ctv_rec_t used as a scratch record; its idx2 field is
// not needed to expand the messages (only min1's position matters), so those bits
// are reported unused.
module ctv_decompressor #(
  parameter int Z      = ldpc_pkg::Z,
  parameter int OFFSET = 1
) (
  input  ldpc_pkg::ctv_rec_t [Z-1:0]                         rec_a,
  input  ldpc_pkg::ctv_rec_t [Z-1:0]                         rec_b,
  input  logic [ldpc_pkg::CMAX-1:0]                          valid,
  input  logic                                               merge,
  input  logic                                               enable,
  output logic [ldpc_pkg::CMAX-1:0][Z-1:0][ldpc_pkg::Q-1:0] ctv
);
  import ldpc_pkg::*;

  localparam logic [CMAX-1:0] LOW = {{(CMAX-CS){1'b0}}, {CS{1'b1}}};

  always_comb
    for (int r = 0; r < Z; r++) begin
      logic     tot_a, tot_b, total;
      ctv_rec_t rc;
      logic [Q-2:0] m;
      logic [Q-1:0] mm;
      tot_a = merge ? ^(rec_a[r].sign & valid & LOW) : ^(rec_a[r].sign & valid);
      tot_b = ^(rec_b[r].sign & valid & ~LOW);
      for (int s = 0; s < CMAX; s++) begin
        if (merge && s >= CS) begin
          rc    = rec_b[r];
          total = tot_b;
        end else begin
          rc    = rec_a[r];
          total = tot_a;
        end
        m  = (IDXW'(s) == rc.idx1) ? rc.min2 : rc.min1;
        m  = (int'(m) > OFFSET) ? m - (Q-1)'(OFFSET) : '0;
        mm = {1'b0, m};
        if (!enable || !valid[s]) ctv[s][r] = '0;
        else if (total ^ rc.sign[s]) ctv[s][r] = -mm;
        else ctv[s][r] = mm;
      end
    end
endmodule
