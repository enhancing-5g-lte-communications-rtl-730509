// tb_ldpc_controller: the controller is driven with a scripted syndrome result and
// its outputs are compared with an independent model of the schedule: per step
// the layers it holds (one, or two orthogonal ones of degree <= 6 paired greedily
// and merged), the slot columns against the base matrix, LBS shifts equal to
// (layer shift - shift of the column's last writer) mod Z starting from the
// initial rotation, RD/VC/WB order, CTV memory 2 writes only for merged steps and
// layers of degree > 6,
// old CTV disabled in the first iteration only, iteration count, max_iter clamp,
// valid_codeword, and decoder_status. A second controller built with LAYER_MERGE = 0
// runs the same scripts after a reset; its outputs are selected by nm and the
// model then expects one layer per step. Interface: none (top-level bench);
// timing: 10-unit clock, stimulus on negedges; all checks are this bench's own.
module tb_ldpc_controller;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0, configure = 0, code_rate = 0, start = 0, loaded = 0;
  logic syn_fail = 0, ser_done = 0;
  logic [7:0] max_iter = 0;
  logic [COLW-1:0] ld_col = '0, ser_col = '0;
  bit nm = 0;  // 0: check the merging controller, 1: the one without merging
  rate_e mode, mode_m, mode_n;
  logic load_accept, load_accept_m, load_accept_n;
  logic clear_loaded, clear_loaded_m, clear_loaded_n;
  logic vtc_load, vtc_load_m, vtc_load_n;
  logic ctv_old_en, ctv_old_en_m, ctv_old_en_n;
  logic sel_w, sel_w_m, sel_w_n;
  logic ser_start, ser_start_m, ser_start_n;
  logic [LW-1:0] layer_no, layer_no_m, layer_no_n;
  logic [CMAX-1:0][COLW-1:0] sel_r, sel_r_m, sel_r_n;
  logic [CMAX-1:0] slot_valid, slot_valid_m, slot_valid_n;
  logic merge, merge_m, merge_n;
  logic [CMAX-1:0][ZW-1:0] lbs_shift, lbs_shift_m, lbs_shift_n;
  con_mem_t con_mem, con_mem_m, con_mem_n;
  logic [ZW-1:0] ld_rot, ld_rot_m, ld_rot_n;
  logic [ZW-1:0] ser_rot, ser_rot_m, ser_rot_n;
  logic [COLW:0] ser_kb, ser_kb_m, ser_kb_n;
  logic [3:0] used_iter, used_iter_m, used_iter_n;
  logic decoder_status, decoder_status_m, decoder_status_n;
  logic valid_codeword, valid_codeword_m, valid_codeword_n;
  int checks = 0, failures = 0;

  ldpc_controller #(.LAYER_MERGE(1'b1)) dut (
    .clk, .rst_n, .configure, .max_iter, .code_rate, .start, .loaded, .syn_fail, .ser_done, .ld_col, .ser_col,
    .mode(mode_m),
    .load_accept(load_accept_m),
    .clear_loaded(clear_loaded_m),
    .vtc_load(vtc_load_m),
    .ctv_old_en(ctv_old_en_m),
    .sel_w(sel_w_m),
    .ser_start(ser_start_m),
    .layer_no(layer_no_m),
    .sel_r(sel_r_m),
    .slot_valid(slot_valid_m),
    .merge(merge_m),
    .lbs_shift(lbs_shift_m),
    .con_mem(con_mem_m),
    .ld_rot(ld_rot_m),
    .ser_rot(ser_rot_m),
    .ser_kb(ser_kb_m),
    .used_iter(used_iter_m),
    .decoder_status(decoder_status_m),
    .valid_codeword(valid_codeword_m)
  );
  ldpc_controller #(.LAYER_MERGE(1'b0)) dut_nm (
    .clk, .rst_n, .configure, .max_iter, .code_rate, .start, .loaded, .syn_fail, .ser_done, .ld_col, .ser_col,
    .mode(mode_n),
    .load_accept(load_accept_n),
    .clear_loaded(clear_loaded_n),
    .vtc_load(vtc_load_n),
    .ctv_old_en(ctv_old_en_n),
    .sel_w(sel_w_n),
    .ser_start(ser_start_n),
    .layer_no(layer_no_n),
    .sel_r(sel_r_n),
    .slot_valid(slot_valid_n),
    .merge(merge_n),
    .lbs_shift(lbs_shift_n),
    .con_mem(con_mem_n),
    .ld_rot(ld_rot_n),
    .ser_rot(ser_rot_n),
    .ser_kb(ser_kb_n),
    .used_iter(used_iter_n),
    .decoder_status(decoder_status_n),
    .valid_codeword(valid_codeword_n)
  );
  assign mode = nm ? mode_n : mode_m;
  assign load_accept = nm ? load_accept_n : load_accept_m;
  assign clear_loaded = nm ? clear_loaded_n : clear_loaded_m;
  assign vtc_load = nm ? vtc_load_n : vtc_load_m;
  assign ctv_old_en = nm ? ctv_old_en_n : ctv_old_en_m;
  assign sel_w = nm ? sel_w_n : sel_w_m;
  assign ser_start = nm ? ser_start_n : ser_start_m;
  assign layer_no = nm ? layer_no_n : layer_no_m;
  assign sel_r = nm ? sel_r_n : sel_r_m;
  assign slot_valid = nm ? slot_valid_n : slot_valid_m;
  assign merge = nm ? merge_n : merge_m;
  assign lbs_shift = nm ? lbs_shift_n : lbs_shift_m;
  assign con_mem = nm ? con_mem_n : con_mem_m;
  assign ld_rot = nm ? ld_rot_n : ld_rot_m;
  assign ser_rot = nm ? ser_rot_n : ser_rot_m;
  assign ser_kb = nm ? ser_kb_n : ser_kb_m;
  assign used_iter = nm ? used_iter_n : used_iter_m;
  assign decoder_status = nm ? decoder_status_n : decoder_status_m;
  assign valid_codeword = nm ? valid_codeword_n : valid_codeword_m;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one decode; syndrome fails until iteration pass_at (0 = never)
  task automatic run(input int m, input int mi, input int pass_at, input int exp_iter, input bit exp_valid);
    int rotm [NB];
    int L, it, s, c, d, la, lb, n, sa;
    int sla [LMAX], slb [LMAX];
    bit used [LMAX];
    // expected schedule
    n = 0;
    foreach (used[i]) used[i] = 0;
    for (int a = 0; a < mode_layers(m); a++) begin
      if (used[a]) continue;
      used[a] = 1; sla[n] = a; slb[n] = -1;
      if (!nm && layer_degree(m, a) <= CS)
        for (int b = a + 1; b < mode_layers(m); b++) begin
          bit orth;
          orth = 1;
          for (int cc = 0; cc < NB; cc++) if (hb_entry(m, a, cc) >= 0 && hb_entry(m, b, cc) >= 0) orth = 0;
          if (!used[b] && slb[n] < 0 && layer_degree(m, b) <= CS && orth) begin used[b] = 1; slb[n] = b; end
        end
      n++;
    end
    L = n;
    sa = 0;
    @(negedge clk); configure = 1; code_rate = m[0]; max_iter = 8'(mi);
    @(negedge clk); configure = 0; loaded = 1;
    for (c = 0; c < NB; c++) begin
      rotm[c] = 0;
      for (int r = L - 1; r >= 0; r--) if (hb_entry(m, r, c) >= 0) rotm[c] = hb_entry(m, r, c);
      ld_col = COLW'(c); #1;
      chk(int'(ld_rot) == rotm[c], "initial rotation");
    end
    @(negedge clk); start = 1;
    #1 chk(clear_loaded, "clear_loaded on start");
    @(negedge clk); start = 0; loaded = 0;
    it = 1;
    forever begin
      for (int l = 0; l < L; l++) begin
        chk(decoder_status && con_mem.rd_en && int'(con_mem.rd_addr1) == l, $sformatf("RD layer %0d", l));
        @(negedge clk);
        chk(vtc_load && int'(layer_no) == l, "VC");
        chk(ctv_old_en == (it > 1), "old CTV enable");
        chk(merge == (slb[l] >= 0), $sformatf("merge flag step %0d", l));
        // every valid slot belongs to the step's layer(s); all their entries appear
        n = 0;
        for (int k = 0; k < CMAX; k++)
          if (slot_valid[k]) begin
            c  = int'(sel_r[k]);
            la = (merge && k >= CS) ? slb[l] : sla[l];
            s  = hb_entry(m, la, c);
            chk(s >= 0, $sformatf("slot %0d column %0d in layer %0d", k, c, la));
            d = (s - rotm[c] + Z) % Z;
            chk(int'(lbs_shift[k]) == d, $sformatf("lbs shift it %0d step %0d slot %0d", it, l, k));
            n++;
          end
        chk(n == layer_degree(m, sla[l]) + ((slb[l] >= 0) ? layer_degree(m, slb[l]) : 0), "slot count");
        @(negedge clk);
        chk(sel_w && con_mem.wr_en1 &&
            con_mem.wr_en2 == (slb[l] >= 0 || layer_degree(m, sla[l]) > CS), "WB");
        if (con_mem.wr_en2) begin
          chk(int'(con_mem.wr_addr2) == sa, "memory 2 address");
          sa++;
        end
        for (int k = 0; k < CMAX; k++)
          if (slot_valid[k]) begin
            la = (merge && k >= CS) ? slb[l] : sla[l];
            rotm[int'(sel_r[k])] = hb_entry(m, la, int'(sel_r[k]));
          end
        @(negedge clk);
      end
      for (int l = 0; l < L; l++) begin
        chk(!vtc_load && !sel_w && int'(layer_no) == l, "SYN");
        syn_fail = !(pass_at != 0 && it >= pass_at) && (l == L - 1);
        @(negedge clk);
      end
      syn_fail = 0;
      sa = 0;
      if (ser_start) break;
      it++;
      if (it > 20) break;
    end
    chk(int'(used_iter) == exp_iter, $sformatf("used_iter %0d expected %0d", used_iter, exp_iter));
    chk(valid_codeword == exp_valid, "valid_codeword");
    chk(int'(ser_kb) == mode_kb(m), "information columns");
    repeat (3) @(negedge clk);
    chk(decoder_status, "busy during output");
    ser_done = 1; @(negedge clk); ser_done = 0;
    chk(!decoder_status && load_accept, "idle after output");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0, 3, 0, 3, 0);     // never valid: stops at max_iter 3
    run(0, 15, 2, 2, 1);    // valid after iteration 2
    run(1, 0, 0, 1, 0);     // max_iter 0 -> 1
    run(1, 99, 4, 4, 1);    // clamp irrelevant, converges at 4
    run(1, 200, 0, 15, 0);  // >15 clamps to 15
    // same scripts on the controller without layer merging
    rst_n = 0; nm = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0, 3, 0, 3, 0);
    run(0, 15, 2, 2, 1);
    run(1, 0, 0, 1, 0);
    run(1, 200, 0, 15, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
