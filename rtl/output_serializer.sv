// output_serializer: serial decoded-data output with the output barrel shifter (LBS_Out).
//
// On start it walks block columns 0 .. kb-1 (the information part). For each column
// it reads the hard decisions col_bits of column col, stored rotated by col_rot,
// rotates them back to natural order (left by Z - col_rot) into a shift register,
// then presents them one bit at a time: decoded_data is valid while data_out_ready
// is high and advances when data_out_ack is seen high at a clock edge. Between
// columns there is one fetch cycle with data_out_ready low. done pulses after the
// last bit is acknowledged. Synchronous active-low reset.
module output_serializer #(
  parameter int Z    = ldpc_pkg::Z,
  parameter int ZW   = ldpc_pkg::ZW,
  parameter int COLW = ldpc_pkg::COLW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [COLW:0]   kb,
  output logic [COLW-1:0] col,
  input  logic [Z-1:0]    col_bits,
  input  logic [ZW-1:0]   col_rot,
  output logic            data_out_ready,
  output logic            decoded_data,
  input  logic            data_out_ack,
  output logic            busy,
  output logic            done
);
  typedef enum logic [1:0] {O_IDLE, O_FETCH, O_SEND} ostate_e;
  ostate_e        state;
  logic [Z-1:0]   sreg;
  logic [Z-1:0]   natural;
  logic [ZW-1:0]  back_rot;
  logic [ZW-1:0]  bitn;

  assign back_rot = (col_rot == '0) ? '0 : ZW'(Z - int'(col_rot));

  barrel_shifter #(.Z(Z), .W(1), .SW(ZW)) u_lbs_out (
    .in_blk(col_bits), .shift(back_rot), .out_blk(natural));

  assign data_out_ready = (state == O_SEND);
  assign decoded_data   = sreg[bitn];
  assign busy           = (state != O_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= O_IDLE;
      col   <= '0;
      bitn  <= '0;
      done  <= 1'b0;
      sreg  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        O_IDLE:
          if (start) begin
            col   <= '0;
            state <= O_FETCH;
          end
        O_FETCH: begin
          sreg  <= natural;
          bitn  <= '0;
          state <= O_SEND;
        end
        O_SEND:
          if (data_out_ack) begin
            if (int'(bitn) == Z - 1) begin
              if ((COLW+1)'(col) + 1'b1 >= kb) begin
                state <= O_IDLE;
                done  <= 1'b1;
              end else begin
                col   <= col + 1'b1;
                state <= O_FETCH;
              end
            end else begin
              bitn <= bitn + 1'b1;
            end
          end
        default: state <= O_IDLE;
      endcase
    end
  end
endmodule
