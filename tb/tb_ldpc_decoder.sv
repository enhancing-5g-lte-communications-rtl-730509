// tb_ldpc_decoder: end-to-end test of the decoder at its default parameters.
//
// Random information words are encoded with the staircase rule of the built-in
// codes (independently of the decoder), mapped to 8-bit LLRs (bit 0 -> positive)
// with optional weak, wrong-signed positions, loaded serially, decoded and read
// back through the ready/ack handshake. A bit-exact reference model of the layered
// offset min-sum algorithm, written here, predicts the output bits, the iteration
// count and the success flag of every frame. Also checked: decoded bits against
// the transmitted ones (clean frames, and noisy frames that end on a codeword), valid_codeword,
// used_iter, the start-to-first-bit latency (4 cycles per processing step and
// iteration, +2; counted here from the negative edge before start is sampled), the
// max_iter clamp (0 -> 1, >15 -> 15) and decoder_status. Mechanisms counted and
// required: early stop in iteration 1, convergence after more than one iteration,
// stop at max_iter without a codeword, both code rates, clamping, output stalls
// (ack held low while a bit is ready), merged-layer steps (Compare & Select
// bypassed) and heavy-layer steps that use CTV memory 2 for sign bits.
`timescale 1ns/1ps
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  logic clk = 0, rst_n = 0, configure = 0, code_rate = 0, load = 0, start = 0, data_out_ack = 0;
  logic [7:0] max_iter = 8'd15;
  logic [QA-1:0] llr_in = '0;
  logic data_out_ready, decoded_data, decoder_status, valid_codeword;
  logic [3:0] used_iter;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_merged = 0, n_heavy = 0;
  always @(posedge clk) if (dut.u_ctrl.vtc_load) begin
    if (dut.u_ctrl.merge) n_merged++;
    else if (dut.u_ctrl.con_mem.rd_addr2 != 0 || dut.u_ctrl.mode == RATE_13_16) n_heavy++;
  end
  int n_conv = 0, n_noconv = 0;
  int n_early = 0, n_multi = 0, n_maxstop = 0, n_r12 = 0, n_r1316 = 0, n_clamp = 0, n_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit info [NB*Z];
  bit cw   [NB*Z];
  logic signed [7:0] llr [NB*Z];

  // Staircase encoder of the built-in codes: parity block r = parity block r-1 xor s_r.
  task automatic encode(input int mode);
    int kb, mb, s;
    bit sr [Z];
    bit prev [Z];
    kb = mode_kb(mode);
    mb = mode_layers(mode);
    foreach (cw[i]) cw[i] = 0;
    for (int i = 0; i < kb * Z; i++) cw[i] = info[i];
    foreach (prev[k]) prev[k] = 0;
    for (int r = 0; r < mb; r++) begin
      foreach (sr[k]) sr[k] = 0;
      for (int c = 0; c < kb; c++) begin
        s = hb_entry(mode, r, c);
        if (s >= 0) for (int k = 0; k < Z; k++) sr[k] ^= info[c * Z + (k + s) % Z];
      end
      for (int k = 0; k < Z; k++) begin
        prev[k] ^= sr[k];
        cw[(kb + r) * Z + k] = prev[k];
      end
    end
  endtask

  function automatic bit codeword_ok(input int mode);
    bit p;
    int s;
    for (int r = 0; r < mode_layers(mode); r++)
      for (int k = 0; k < Z; k++) begin
        p = 0;
        for (int c = 0; c < NB; c++) begin
          s = hb_entry(mode, r, c);
          if (s >= 0) p ^= cw[c * Z + (k + s) % Z];
        end
        if (p) return 0;
      end
    return 1;
  endfunction

  // Noisy LLRs: mean +-mean, plus the sum of four uniform values in [-spread, spread]
  // (an approximately Gaussian channel), saturated to 8 bits.
  task automatic make_noisy_llr(input int mean, input int spread);
    int v;
    for (int i = 0; i < NB * Z; i++) begin
      v = cw[i] ? -mean : mean;
      for (int u = 0; u < 4; u++) v += int'($urandom_range(0, 2 * spread)) - spread;
      if (v > 127) v = 127;
      if (v < -128) v = -128;
      llr[i] = 8'(v);
    end
  endtask

  // LLRs: strong correct values, nerr positions with a weak wrong sign.
  task automatic make_llr(input int nerr, input bit garbage);
    int pos;
    for (int i = 0; i < NB * Z; i++) begin
      int m;
      m = 8 + int'($urandom_range(0, 12));
      llr[i] = cw[i] ? 8'(-m) : 8'(m);
      if (garbage) llr[i] = 8'($urandom_range(0, 255));
    end
    for (int e = 0; e < nerr; e++) begin
      pos = int'($urandom_range(0, NB * Z - 1));
      llr[pos] = cw[pos] ? 8'(int'($urandom_range(1, 3))) : 8'(-int'($urandom_range(1, 3)));
    end
  endtask

  // Reference decoder: layered offset min-sum with the decoder's quantisation
  // (VTC clipped to [-32,31], magnitudes to 31, offset 1, APP clipped to 8 bits),
  // layers in the order of the processing steps (a merged pair of orthogonal
  // layers gives the same result as the two layers one after the other), lowest
  // slot wins ties, stop on zero syndrome or after maxit iterations.
  int  ref_iter;
  bit  ref_valid;
  bit  ref_bits [NB*Z];

  function automatic int clip(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic ref_decode(input int mode, input int maxit);
    int app [NB*Z];
    int ctvm [LMAX][Z][CMAX];
    int order [LMAX];
    int cols [CMAX], shf [CMAX], vt [CMAX];
    int nl, deg, no, m1, m2, i1, mg, ng, idx, sgn, nm;
    bit ok, p;
    step_list_t st;
    nl = mode_layers(mode);
    st = build_steps(mode, 1'b1);
    no = 0;
    for (int i = 0; i < count_steps(mode, 1'b1); i++) begin
      order[no++] = int'(st[i].la);
      if (st[i].merge) order[no++] = int'(st[i].lb);
    end
    for (int i = 0; i < NB * Z; i++) app[i] = int'(llr[i]);
    for (int l = 0; l < LMAX; l++) for (int k = 0; k < Z; k++) for (int j = 0; j < CMAX; j++) ctvm[l][k][j] = 0;
    ref_valid = 0;
    ref_iter  = 0;
    for (int it = 1; it <= maxit; it++) begin
      ref_iter = it;
      for (int oi = 0; oi < nl; oi++) begin
        int r;
        r = order[oi];
        deg = 0;
        for (int c = 0; c < NB; c++) if (hb_entry(mode, r, c) >= 0) begin
          cols[deg] = c; shf[deg] = hb_entry(mode, r, c); deg++;
        end
        for (int k = 0; k < Z; k++) begin
          m1 = 31; m2 = 31; i1 = -1; ng = 0;
          for (int j = 0; j < deg; j++) begin
            idx = cols[j] * Z + (k + shf[j]) % Z;
            vt[j] = clip(app[idx] - ctvm[r][k][j], -32, 31);
            mg = (vt[j] < 0) ? clip(-vt[j], 0, 31) : vt[j];
            if (vt[j] < 0) ng ^= 1;
            if (mg < m1) begin m2 = m1; m1 = mg; i1 = j; end
            else if (mg < m2) m2 = mg;
          end
          for (int j = 0; j < deg; j++) begin
            idx = cols[j] * Z + (k + shf[j]) % Z;
            nm  = (j == i1) ? m2 : m1;
            nm  = (nm > 1) ? nm - 1 : 0;
            sgn = ng ^ ((vt[j] < 0) ? 1 : 0);
            ctvm[r][k][j] = (sgn != 0) ? -nm : nm;
            app[idx] = clip(vt[j] + ctvm[r][k][j], -128, 127);
          end
        end
      end
      ok = 1;
      for (int r = 0; r < nl; r++)
        for (int k = 0; k < Z; k++) begin
          p = 0;
          for (int c = 0; c < NB; c++) if (hb_entry(mode, r, c) >= 0)
            p ^= (app[c * Z + (k + hb_entry(mode, r, c)) % Z] < 0);
          if (p) ok = 0;
        end
      if (ok) begin
        ref_valid = 1;
        break;
      end
    end
    for (int i = 0; i < NB * Z; i++) ref_bits[i] = (app[i] < 0);
  endtask

  task automatic do_configure(input int mode, input int mi);
    @(negedge clk);
    configure = 1; code_rate = mode[0]; max_iter = 8'(mi);
    @(negedge clk);
    configure = 0;
  endtask

  task automatic load_frame();
    for (int i = 0; i < NB * Z; i++) begin
      @(negedge clk);
      load = 1; llr_in = llr[i];
    end
    @(negedge clk);
    load = 0;
  endtask

  // Start, measure latency, read all information bits with random ack stalls.
  task automatic run_decode(input int mode, input bit expect_valid, input int expect_iter,
                            input string tag);
    int cyc, kb, nbits, errs;
    bit got [NB*Z];
    kb = mode_kb(mode);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    check(decoder_status == 1'b1, {tag, ": decoder_status active after start"});
    while (!data_out_ready && cyc < 5000) begin
      @(negedge clk);
      cyc++;
    end
    check(used_iter == 4'(expect_iter), $sformatf("%s: used_iter %0d expected %0d", tag, used_iter, expect_iter));
    check(valid_codeword == expect_valid, $sformatf("%s: valid_codeword %0d", tag, valid_codeword));
    check(cyc == 4 * count_steps(mode, 1'b1) * int'(used_iter) + 3,
          $sformatf("%s: latency %0d expected %0d", tag, cyc, 4 * count_steps(mode, 1'b1) * int'(used_iter) + 3));
    nbits = 0;
    while (nbits < kb * Z) begin
      if (data_out_ready) begin
        if ($urandom_range(0, 3) == 0) begin
          data_out_ack = 0;
          n_stall++;
        end else begin
          data_out_ack = 1;
          got[nbits] = decoded_data;
          nbits++;
        end
      end else data_out_ack = 0;
      @(negedge clk);
    end
    data_out_ack = 0;
    repeat (2) @(negedge clk);
    check(data_out_ready == 1'b0, {tag, ": no extra output bits"});
    check(decoder_status == 1'b0, {tag, ": decoder_status idle after output"});
    if (expect_valid) begin
      errs = 0;
      for (int i = 0; i < kb * Z; i++) if (got[i] != info[i]) errs++;
      check(errs == 0, $sformatf("%s: %0d wrong information bits", tag, errs));
    end
    ref_decode(mode, expect_iter);
    errs = 0;
    for (int i = 0; i < kb * Z; i++) if (got[i] != ref_bits[i]) errs++;
    check(errs == 0 && ref_iter == int'(used_iter) && ref_valid == valid_codeword,
          $sformatf("%s: reference model differs (%0d bits, iter %0d/%0d)", tag, errs, ref_iter, used_iter));
    if (mode == 0) n_r12++; else n_r1316++;
  endtask

  task automatic frame(input int mode, input int nerr, input bit garbage, input int mi,
                       input bit expect_valid, input int expect_iter, input string tag);
    foreach (info[i]) info[i] = 1'($urandom());
    encode(mode);
    check(codeword_ok(mode), {tag, ": reference encoder produced a codeword"});
    make_llr(nerr, garbage);
    do_configure(mode, mi);
    load_frame();
    run_decode(mode, expect_valid, expect_iter, tag);
  endtask

  // Decode with a noisy frame whose iteration count is not known in advance.
  task automatic frame_noisy(input int mode, input int mean, input int spread, input string tag);
    int kb, cyc, errs, nbits, raw;
    bit got [NB*Z];
    foreach (info[i]) info[i] = 1'($urandom());
    encode(mode);
    make_noisy_llr(mean, spread);
    raw = 0;
    for (int i = 0; i < NB * Z; i++) if ((llr[i] < 0) != cw[i]) raw++;
    do_configure(mode, 15);
    load_frame();
    kb = mode_kb(mode);
    @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!data_out_ready && cyc < 5000) begin @(negedge clk); cyc++; end
    if (valid_codeword) n_conv++; else n_noconv++;
    check(cyc == 4 * count_steps(mode, 1'b1) * int'(used_iter) + 3, $sformatf("%s: latency %0d", tag, cyc));
    $display("%s: %0d channel bit errors, %0d iterations", tag, raw, used_iter);
    if (used_iter > 1 && valid_codeword) n_multi++;
    if (used_iter == 1) n_early++;
    nbits = 0;
    data_out_ack = 1;
    while (nbits < kb * Z) begin
      if (data_out_ready) begin got[nbits] = decoded_data; nbits++; end
      @(negedge clk);
    end
    data_out_ack = 0;
    errs = 0;
    for (int i = 0; i < kb * Z; i++) if (got[i] != info[i]) errs++;
    if (valid_codeword)
      check(errs == 0, $sformatf("%s: %0d wrong information bits (iter %0d)", tag, errs, used_iter));
    ref_decode(mode, 15);
    errs = 0;
    for (int i = 0; i < kb * Z; i++) if (got[i] != ref_bits[i]) errs++;
    check(errs == 0 && ref_iter == int'(used_iter) && ref_valid == valid_codeword,
          $sformatf("%s: reference model differs (%0d bits, iter %0d/%0d)", tag, errs, ref_iter, used_iter));
    if (mode == 0) n_r12++; else n_r1316++;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(decoder_status == 1'b0, "idle after reset");

    // start without a loaded frame is ignored
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(decoder_status == 1'b0, "start ignored before a frame is loaded");

    frame(0, 0, 0, 15, 1, 1, "r1/2 clean");        n_early++;
    frame(1, 0, 0, 15, 1, 1, "r13/16 clean");      n_early++;
    frame(0, 0, 1, 3, 0, 3, "r1/2 garbage max3");  n_maxstop++;
    frame(0, 0, 1, 200, 0, 15, "r1/2 garbage max200->15"); n_maxstop++; n_clamp++;
    frame(1, 0, 1, 0, 0, 1, "r13/16 garbage max0->1");     n_maxstop++; n_clamp++;
    frame(1, 0, 1, 4, 0, 4, "r13/16 garbage max4");        n_maxstop++;
    for (int t = 0; t < 4; t++) frame_noisy(0, 8, 4, $sformatf("r1/2 noisy %0d", t));
    for (int t = 0; t < 3; t++) frame_noisy(1, 10, 3, $sformatf("r13/16 noisy %0d", t));

    $display("steps: merged=%0d heavy=%0d; noisy frames converged=%0d not=%0d", n_merged, n_heavy, n_conv, n_noconv);
    check(n_conv >= 4, "most noisy frames converge");
    check(n_merged > 0, "merged-layer step seen");
    check(n_heavy > 0, "heavy-layer step seen");
    $display("mechanisms: early=%0d multi_iter=%0d max_stop=%0d rate1/2=%0d rate13/16=%0d clamp=%0d ack_stall=%0d",
             n_early, n_multi, n_maxstop, n_r12, n_r1316, n_clamp, n_stall);
    check(n_early > 0, "early stop seen");
    check(n_multi > 0, "multi-iteration convergence seen");
    check(n_maxstop > 0, "max-iteration stop seen");
    check(n_r12 > 0 && n_r1316 > 0, "both code rates decoded");
    check(n_clamp > 0, "max_iter clamp exercised");
    check(n_stall > 0, "output stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
