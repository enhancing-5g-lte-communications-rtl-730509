// ldpc_controller: sequencing of the layered decoder (configure, decode, check, output).
//
// Configuration: while configure is high (in the idle state), max_iter (clamped to 1..15) and the code
// rate are latched. Decoding starts on start in the idle state once a whole frame
// has been loaded (loaded from the LLR loader). An iteration is a sequence of
// steps; a step is one layer or, with LAYER_MERGE set, two orthogonal layers that
// are processed together (merge high: each CNU half serves one layer and Compare &
// Select is bypassed). layer_no is the step number. Each step takes three cycles:
//   RD  read the step's compressed CTV records from both CTV memories (Con_mem);
//   VC  APP columns pass the read network (Sel_r) and the LBSs, the VNUs subtract
//       the old CTV messages, and the VTC buffer captures the result;
//   WB  the CNU output is written to the CTV memories, the new APPs are written
//       back through the write network (Sel_W), and each touched column remembers
//       the layer shift as its new stored rotation. CTV memory 2 is written only
//       for steps that need it: layers of degree > CMAX/2 and merged pairs.
// Because every column is stored in the rotation of the last layer that wrote it,
// the LBS of a slot rotates by (layer shift - stored rotation) mod Z and no
// shifter is needed on write-back. After the last step, a syndrome pass of one
// cycle per step checks C * H^T = 0 on the hard decisions. A zero syndrome ends
// decoding with valid_codeword = 1; otherwise the next iteration starts, until
// max_iter iterations have run (valid_codeword = 0). The decoded information bits
// are then handed to the output serializer. decoder_status is 1 from start until
// the last bit has been acknowledged. Synchronous active-low reset.
//
// Lint note: the controller reads only the merge and use_m2 flags of its step
// table entry; the layer numbers la/lb are kept in step_t for the slot tables and
// for readability, so those bits are reported unused.
//
// Synthesis note: ser_kb is only ever 8 or 13 for the two built-in codes, so its
// bit 4 is constant 0 and bit 3 constant 1; the port is sized for up to NB
// information columns.
module ldpc_controller
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER_LIMIT = ldpc_pkg::MAXITER_LIMIT,
  parameter bit LAYER_MERGE    = 1'b1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         configure,
  input  logic [7:0]                   max_iter,
  input  logic                         code_rate,
  input  logic                         start,
  input  logic                         loaded,
  input  logic                         syn_fail,
  input  logic                         ser_done,
  input  logic [COLW-1:0]              ld_col,
  input  logic [COLW-1:0]              ser_col,
  output rate_e                        mode,
  output logic                         load_accept,
  output logic                         clear_loaded,
  output logic [LW-1:0]                layer_no,
  output logic [CMAX-1:0][COLW-1:0]    sel_r,
  output logic [CMAX-1:0]              slot_valid,
  output logic                         merge,
  output logic [CMAX-1:0][ZW-1:0]      lbs_shift,
  output logic                         vtc_load,
  output logic                         ctv_old_en,
  output logic                         sel_w,
  output con_mem_t                     con_mem,
  output logic [ZW-1:0]                ld_rot,
  output logic [ZW-1:0]                ser_rot,
  output logic                         ser_start,
  output logic [COLW:0]                ser_kb,
  output logic [3:0]                   used_iter,
  output logic                         decoder_status,
  output logic                         valid_codeword
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_VC, S_WB, S_SYN, S_OUT} state_e;

  state_e               state;
  logic [3:0]           max_it;
  logic [3:0]           iter;
  logic [LMAX-1:0]      ctv_valid;
  logic                 syn_acc;
  logic [NB-1:0][ZW-1:0] rot;
  layer_row_t           row;
  logic [LW-1:0]        last_layer;
  rot_tab_t             init_rot;

  localparam step_tab_t STEPS = build_step_tab(LAYER_MERGE);
  localparam code_tab_t SLOTS = build_step_slots(LAYER_MERGE);
  localparam int NSTEPS_R12   = count_steps(0, LAYER_MERGE);
  localparam int NSTEPS_R1316 = count_steps(1, LAYER_MERGE);

  step_t step;
  assign step       = STEPS[mode][layer_no];
  assign row        = SLOTS[mode][layer_no];
  assign merge      = step.merge;
  assign last_layer = LW'(((mode == RATE_1_2) ? NSTEPS_R12 : NSTEPS_R1316) - 1);
  assign init_rot   = (mode == RATE_1_2) ? INIT_ROT_R12 : INIT_ROT_R1316;
  assign ld_rot     = init_rot[ld_col];
  assign ser_rot    = rot[ser_col];
  assign ser_kb     = (COLW+1)'(mode_kb(int'(mode)));

  // Address of a step in CTV memory 2: number of earlier steps that use it.
  function automatic logic [L0W-1:0] mem2_addr(input step_list_t st, input logic [LW-1:0] l);
    int n;
    n = 0;
    for (int i = 0; i < LMAX; i++) if (i < int'(l) && st[i].use_m2) n++;
    return L0W'(n);
  endfunction

  always_comb
    for (int k = 0; k < CMAX; k++) begin
      int d;
      sel_r[k]      = row[k].col;
      slot_valid[k] = row[k].valid;
      d = int'(row[k].shift) + Z - int'(rot[row[k].col]);
      if (d >= Z) d = d - Z;
      lbs_shift[k] = ZW'(d);
    end

  assign load_accept    = (state == S_IDLE);
  assign vtc_load       = (state == S_VC);
  assign ctv_old_en     = ctv_valid[layer_no];
  assign sel_w          = (state == S_WB);
  assign decoder_status = (state != S_IDLE);
  assign clear_loaded   = (state == S_IDLE) && !configure && start && loaded;

  always_comb begin
    con_mem          = '0;
    con_mem.rd_en    = (state == S_RD);
    con_mem.rd_addr1 = layer_no;
    con_mem.rd_addr2 = mem2_addr(STEPS[mode], layer_no);
    con_mem.wr_en1   = (state == S_WB);
    con_mem.wr_en2   = (state == S_WB) && step.use_m2;
    con_mem.wr_addr1 = layer_no;
    con_mem.wr_addr2 = mem2_addr(STEPS[mode], layer_no);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      mode           <= RATE_1_2;
      max_it         <= 4'(MAX_ITER_LIMIT);
      iter           <= '0;
      layer_no       <= '0;
      ctv_valid      <= '0;
      syn_acc        <= 1'b0;
      rot            <= '0;
      ser_start      <= 1'b0;
      used_iter      <= '0;
      valid_codeword <= 1'b0;
    end else begin
      ser_start <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (configure) begin
            mode <= rate_e'(code_rate);
            if (max_iter == 8'd0)                    max_it <= 4'd1;
            else if (int'(max_iter) > MAX_ITER_LIMIT) max_it <= 4'(MAX_ITER_LIMIT);
            else                                     max_it <= max_iter[3:0];
          end else if (start && loaded) begin
            iter      <= 4'd1;
            layer_no  <= '0;
            ctv_valid <= '0;
            rot       <= init_rot;
            state     <= S_RD;
          end
        end
        S_RD: state <= S_VC;
        S_VC: state <= S_WB;
        S_WB: begin
          ctv_valid[layer_no] <= 1'b1;
          for (int k = 0; k < CMAX; k++)
            if (row[k].valid) rot[row[k].col] <= row[k].shift;
          if (layer_no == last_layer) begin
            layer_no <= '0;
            syn_acc  <= 1'b0;
            state    <= S_SYN;
          end else begin
            layer_no <= layer_no + 1'b1;
            state    <= S_RD;
          end
        end
        S_SYN: begin
          syn_acc <= syn_acc | syn_fail;
          if (layer_no == last_layer) begin
            layer_no <= '0;
            if (!(syn_acc | syn_fail)) begin
              valid_codeword <= 1'b1;
              used_iter      <= iter;
              ser_start      <= 1'b1;
              state          <= S_OUT;
            end else if (iter >= max_it) begin
              valid_codeword <= 1'b0;
              used_iter      <= iter;
              ser_start      <= 1'b1;
              state          <= S_OUT;
            end else begin
              iter  <= iter + 1'b1;
              state <= S_RD;
            end
          end else begin
            layer_no <= layer_no + 1'b1;
          end
        end
        S_OUT:
          if (ser_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
