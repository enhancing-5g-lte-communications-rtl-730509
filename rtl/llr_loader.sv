// llr_loader: serial channel-LLR input with the initial barrel shifter (LBS_init).
//
// One QA-bit LLR is accepted per cycle while in_valid is high, in natural bit order,
// block column after block column. The Z LLRs of a column gather in a buffer; in
// the cycle the last one arrives, blk_we is raised and blk_data carries the full
// column rotated left by col_rot (the rotation the column will be stored in), to
// be written into APP memory column blk_col at that clock edge. After NB columns
// loaded goes high and the counters wrap for the next frame; clear_loaded drops
// the flag when decoding starts. Synchronous active-low reset.
module llr_loader #(
  parameter int Z    = ldpc_pkg::Z,
  parameter int ZW   = ldpc_pkg::ZW,
  parameter int NB   = ldpc_pkg::NB,
  parameter int COLW = ldpc_pkg::COLW,
  parameter int QA   = ldpc_pkg::QA
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [QA-1:0]          llr_in,
  input  logic [ZW-1:0]          col_rot,
  input  logic                   clear_loaded,
  output logic [COLW-1:0]        blk_col,
  output logic                   blk_we,
  output logic [Z-1:0][QA-1:0]   blk_data,
  output logic                   loaded
);
  logic [Z-1:0][QA-1:0] buffer;
  logic [Z-1:0][QA-1:0] full_blk;
  logic [ZW-1:0]        cnt;
  logic                 last_elem;

  assign last_elem = (int'(cnt) == Z - 1);
  assign blk_we    = in_valid && last_elem;

  always_comb begin
    full_blk        = buffer;
    full_blk[Z-1]   = llr_in;
  end

  barrel_shifter #(.Z(Z), .W(QA), .SW(ZW)) u_lbs_init (
    .in_blk(full_blk), .shift(col_rot), .out_blk(blk_data));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      blk_col <= '0;
      loaded  <= 1'b0;
    end else begin
      if (clear_loaded) loaded <= 1'b0;
      if (in_valid) begin
        buffer[cnt] <= llr_in;
        if (last_elem) begin
          cnt <= '0;
          if (int'(blk_col) == NB - 1) begin
            blk_col <= '0;
            loaded  <= 1'b1;
          end else begin
            blk_col <= blk_col + 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
