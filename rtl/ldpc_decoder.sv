// ldpc_decoder: layered offset-min-sum decoder for a rate-configurable QC-LDPC code.
//
// Top level. A frame of N = NB*Z = 672 channel LLRs (8-bit two's complement,
// positive favours bit 0) is loaded serially with load high, one per cycle. start
// runs layered decoding: per layer, Z = 42 check rows are processed in parallel -
// APP columns are picked by the read network, aligned by one left barrel shifter
// (LBS) per slot, turned into VTC messages by the VNUs, reduced by the two-half
// CNU to compressed min1/min2/index records kept in two dual-port CTV memories, and
// the new APP values (VTC + new CTV) go back through the write network into the
// three register-based APP memories. With LAYER_MERGE set (the default), pairs of
// orthogonal low-degree layers are processed in one step, one per CNU half, with
// the second layer's record kept in CTV memory 2. After each iteration a syndrome pass decides
// whether to stop (valid codeword) or iterate again, up to max_iter iterations.
// The K information bits then leave serially on decoded_data with a
// data_out_ready / data_out_ack handshake, rotated back to natural order by LBS_Out.
//
// Port names, the 8-bit LLR and MaxIter widths, the 0..15 iteration range, the
// serial load/unload and the datapath structure follow the published
// architecture. The base matrices (see ldpc_pkg), the code_rate port, the
// valid_codeword flag, the 1-bit acknowledge input and the cycle timing are this
// design's choices. Timing: 3 cycles per step plus 1 cycle per step for the
// syndrome pass, i.e. 4*S cycles per iteration for S steps (rate 1/2: S = 5 with
// merging, 8 without; rate 13/16: S = 3). The first output bit is ready 4*S*iter
// + 2 clock edges after the edge that samples start.
// Synchronous active-low reset.
//
// Lint note: mode, layer_no, ser_busy and row_parity are left unconnected inside
// the top on purpose. They are observation points (current code rate, step number,
// output busy, per-row parity of the last syndrome step) for simulation and
// debug; the decision logic only needs the syndrome's single fail bit.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int OFFSET         = 1,
  parameter int MAX_ITER_LIMIT = ldpc_pkg::MAXITER_LIMIT,
  parameter bit LAYER_MERGE    = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          configure,
  input  logic [7:0]    max_iter,
  input  logic          code_rate,
  input  logic          load,
  input  logic [QA-1:0] llr_in,
  input  logic          start,
  output logic          data_out_ready,
  input  logic          data_out_ack,
  output logic          decoded_data,
  output logic [3:0]    used_iter,
  output logic          decoder_status,
  output logic          valid_codeword
);
  // ---------------------------------------------------------------- control
  rate_e                          mode;
  logic                           load_accept, clear_loaded, loaded;
  logic [LW-1:0]                  layer_no;
  logic [CMAX-1:0][COLW-1:0]      sel_r;
  logic [CMAX-1:0]                slot_valid;
  logic                           merge;
  logic [CMAX-1:0][ZW-1:0]        lbs_shift;
  logic                           vtc_load, ctv_old_en, sel_w;
  con_mem_t                       con_mem;
  logic [ZW-1:0]                  ld_rot, ser_rot;
  logic                           ser_start, ser_done, ser_busy;
  logic [COLW:0]                  ser_kb;
  logic [COLW-1:0]                ld_col, ser_col;
  logic                           syn_fail;

  ldpc_controller #(.MAX_ITER_LIMIT(MAX_ITER_LIMIT), .LAYER_MERGE(LAYER_MERGE)) u_ctrl (
    .clk, .rst_n, .configure, .max_iter, .code_rate, .start, .loaded, .syn_fail,
    .ser_done, .ld_col, .ser_col, .mode, .load_accept, .clear_loaded, .layer_no,
    .sel_r, .slot_valid, .merge, .lbs_shift, .vtc_load, .ctv_old_en, .sel_w, .con_mem,
    .ld_rot, .ser_rot, .ser_start, .ser_kb, .used_iter, .decoder_status,
    .valid_codeword);

  // ------------------------------------------------------ input (LBS_init)
  logic                 ld_we;
  logic [Z-1:0][QA-1:0] ld_data;

  llr_loader u_loader (
    .clk, .rst_n, .in_valid(load && load_accept), .llr_in, .col_rot(ld_rot),
    .clear_loaded, .blk_col(ld_col), .blk_we(ld_we), .blk_data(ld_data), .loaded);

  // ------------------------------------------------------------ APP memory
  logic [NB-1:0][Z-1:0][QA-1:0] app_all;
  logic [NB-1:0]                app_we;
  logic [NB-1:0][Z-1:0][QA-1:0] app_wdata;
  logic [NB-1:0]                wn_we;
  logic [NB-1:0][Z-1:0][QA-1:0] wn_data;

  // write multiplexer: channel data while loading, write network while decoding
  always_comb begin
    app_we    = wn_we;
    app_wdata = wn_data;
    if (ld_we) begin
      app_we            = '0;
      app_we[ld_col]    = 1'b1;
      app_wdata[ld_col] = ld_data;
    end
  end

  app_memory #(.COLS(6)) u_app1 (.clk, .wr_en(app_we[5:0]),   .wr_data(app_wdata[5:0]),   .rd_data(app_all[5:0]));
  app_memory #(.COLS(5)) u_app2 (.clk, .wr_en(app_we[10:6]),  .wr_data(app_wdata[10:6]),  .rd_data(app_all[10:6]));
  app_memory #(.COLS(5)) u_app3 (.clk, .wr_en(app_we[15:11]), .wr_data(app_wdata[15:11]), .rd_data(app_all[15:11]));

  // ------------------------------------------------- read network and LBSs
  logic [CMAX-1:0][Z-1:0][QA-1:0] slot_app, aligned;

  read_network u_rdnet (.app_all, .sel(sel_r), .slot_app);

  for (genvar k = 0; k < CMAX; k++) begin : g_lbs
    barrel_shifter u_lbs (.in_blk(slot_app[k]), .shift(lbs_shift[k]), .out_blk(aligned[k]));
  end

  // ------------------------------------------------------- CTV memories
  ctv_rec_t [Z-1:0]  rec_old_a, rec_old_b, rec_new_a, rec_new_b;
  logic [W1-1:0]     m1_rd, m1_wr;
  logic [W2-1:0]     m2_rd, m2_wr;

  ctv_memory #(.WIDTH(W1), .DEPTH(LMAX)) u_ctv_mem1 (
    .clk, .wr_en(con_mem.wr_en1), .wr_addr(con_mem.wr_addr1), .wr_data(m1_wr),
    .rd_en(con_mem.rd_en), .rd_addr(con_mem.rd_addr1), .rd_data(m1_rd));

  ctv_memory #(.WIDTH(W2), .DEPTH(L0)) u_ctv_mem2 (
    .clk, .wr_en(con_mem.wr_en2), .wr_addr(con_mem.wr_addr2), .wr_data(m2_wr),
    .rd_en(con_mem.rd_en), .rd_addr(con_mem.rd_addr2), .rd_data(m2_rd));

  // memory 1 row: {sign[CS-1:0], min1, min2, idx1, idx2} of the (first) layer;
  // memory 2 row: {sign[CMAX-1:CS], min1, min2, idx1, idx2} where the signs complete
  // a heavy layer's record or, with the min/idx fields, form the second layer's
  // record of a merged step.
  localparam int R1 = CS + 2 * (Q - 1) + 2 * IDXW;
  localparam int R2 = (CMAX - CS) + 2 * (Q - 1) + 2 * IDXW;
  always_comb
    for (int r = 0; r < Z; r++) begin
      m1_wr[r*R1 +: R1] = {rec_new_a[r].sign[CS-1:0], rec_new_a[r].min1, rec_new_a[r].min2,
                           rec_new_a[r].idx1, rec_new_a[r].idx2};
      m2_wr[r*R2 +: R2] = {rec_new_b[r].sign[CMAX-1:CS], rec_new_b[r].min1, rec_new_b[r].min2,
                           rec_new_b[r].idx1, rec_new_b[r].idx2};
      {rec_old_a[r].sign[CS-1:0], rec_old_a[r].min1, rec_old_a[r].min2,
       rec_old_a[r].idx1, rec_old_a[r].idx2} = m1_rd[r*R1 +: R1];
      {rec_old_b[r].sign[CMAX-1:CS], rec_old_b[r].min1, rec_old_b[r].min2,
       rec_old_b[r].idx1, rec_old_b[r].idx2} = m2_rd[r*R2 +: R2];
      rec_old_a[r].sign[CMAX-1:CS] = rec_old_b[r].sign[CMAX-1:CS];
      rec_old_b[r].sign[CS-1:0]    = '0;
    end

  // ----------------------------------------------------------- VNU / CNU
  logic [CMAX-1:0][Z-1:0][Q-1:0]  ctv_old, ctv_new, vtc, vtc_q;
  logic [CMAX-1:0][Z-1:0][QA-1:0] app_new;

  ctv_decompressor #(.OFFSET(OFFSET)) u_dec_old (
    .rec_a(rec_old_a), .rec_b(rec_old_b), .valid(slot_valid), .merge,
    .enable(ctv_old_en), .ctv(ctv_old));

  for (genvar k = 0; k < CMAX; k++) begin : g_vnu
    vnu u_vnu (.app(aligned[k]), .ctv(ctv_old[k]), .vtc(vtc[k]));
  end

  vtc_buffer u_vtc (.clk, .load(vtc_load), .vtc_in(vtc), .ctv_new, .vtc_q, .app_new);

  cnu u_cnu (.vtc(vtc_q), .valid(slot_valid), .merge, .rec_a(rec_new_a), .rec_b(rec_new_b));

  ctv_decompressor #(.OFFSET(OFFSET)) u_dec_new (
    .rec_a(rec_new_a), .rec_b(rec_new_b), .valid(slot_valid), .merge,
    .enable(1'b1), .ctv(ctv_new));

  write_network u_wrnet (
    .enable(sel_w), .slot_data(app_new), .col(sel_r), .valid(slot_valid),
    .col_we(wn_we), .col_data(wn_data));

  // ------------------------------------------------------ syndrome check
  logic [Z-1:0] row_parity;
  syndrome_check u_syn (.slot_app(aligned), .valid(slot_valid), .merge, .row_parity, .fail(syn_fail));

  // ------------------------------------------------------ output (LBS_Out)
  logic [Z-1:0] col_bits;
  always_comb
    for (int k = 0; k < Z; k++) col_bits[k] = app_all[ser_col][k][QA-1];

  output_serializer u_out (
    .clk, .rst_n, .start(ser_start), .kb(ser_kb), .col(ser_col), .col_bits,
    .col_rot(ser_rot), .data_out_ready, .decoded_data, .data_out_ack,
    .busy(ser_busy), .done(ser_done));
endmodule
