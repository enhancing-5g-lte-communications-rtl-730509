// ldpc_pkg: sizes, message types and the quasi-cyclic code tables shared by the
// layered min-sum LDPC decoder.
//
// The decoder works on codewords of N = NB * Z = 16 * 42 = 672 bits, the block
// length at which the decoder is evaluated. The expansion factor Z = 42 is also the
// parallelism: one layer processes Z check rows at once. CTV and VTC messages are
// Q = 6 bit two's complement numbers, APP messages QA = 8 bits (the width of the
// channel LLR input).
//
// The base matrices are this design's own, defined by formula below, because no
// base matrix is published with the decoder. Two code rates are built in:
//   mode 0, rate 1/2  : MB = 8 layers, KB = 8 information block columns.
//       Layer r holds information column c when (c + r) is even.
//   mode 1, rate 13/16: MB = 3 layers, KB = 13 information block columns.
//       Layer r holds information column c when (c mod 3) != r.
// The parity part is a staircase: parity column KB+p sits in layers p and p+1 with
// shift 0, so a codeword is encoded by p_0 = s_0, p_r = p_(r-1) xor s_r, where s_r
// is the rotated-information sum of layer r.
// Information shifts (both modes): (5c(r+1) + 3r) mod Z. Two information columns
// sharing two layers r1, r2 would close a 4-cycle only if 5(c1-c2)(r1-r2) = 0
// mod 42, which cannot happen for these column and layer ranges.
// A shift s means check row k of the layer reads bit (k + s) mod Z of the column.
//
// Lint note: when this package is linted on its own, QA, L0, MAXITER_LIMIT, W1,
// W2 and the INIT_ROT tables are reported unused; they are read by the modules
// that import the package (top, controller, memories), not by the package itself.
package ldpc_pkg;

  localparam int Z      = 42;                // expansion factor = parallelism
  localparam int ZW     = 6;                 // bits of a rotation amount (0..Z-1)
  localparam int NB     = 16;                // block columns
  localparam int COLW   = 4;                 // bits of a block-column index
  localparam int CMAX   = 12;                // maximum row degree (slots per layer)
  localparam int CS     = CMAX / 2;          // slots per CNU half
  localparam int IDXW   = 4;                 // ceil(log2(CMAX))
  localparam int Q      = 6;                 // CTV / VTC message width
  localparam int QA     = 8;                 // APP message width
  localparam int LMAX   = 8;                 // most layers of any mode (L)
  localparam int LW     = 3;                 // bits of a layer index
  localparam int L0     = 3;                 // layers with degree > CS (depth of CTV memory 2)
  localparam int L0W    = 2;                 // bits of a CTV memory 2 address
  localparam int NMODES = 2;
  localparam int MAXITER_LIMIT = 15;

  // Compressed CTV record of one check row (Figure-3 layout).
  typedef struct packed {
    logic [CMAX-1:0] sign;   // sign of each incoming VTC message, 1 = negative
    logic [Q-2:0]    min1;   // smallest magnitude
    logic [Q-2:0]    min2;   // second smallest magnitude
    logic [IDXW-1:0] idx1;   // slot of min1
    logic [IDXW-1:0] idx2;   // slot of min2
  } ctv_rec_t;

  // Width of the two CTV memory words (one word = Z rows of one layer).
  localparam int W1 = Z * (CS + 2 * (Q - 1) + 2 * IDXW);   // memory 1: first signs + min/idx
  // memory 2: remaining signs, plus min/idx of the second layer of a merged pair
  localparam int W2 = Z * (CMAX - CS + 2 * (Q - 1) + 2 * IDXW);

  // One slot of a layer: which block column it reads and with which shift.
  typedef struct packed {
    logic            valid;
    logic [COLW-1:0] col;
    logic [ZW-1:0]   shift;
  } slot_t;
  typedef slot_t [CMAX-1:0]     layer_row_t;
  typedef layer_row_t [LMAX-1:0] mode_tab_t;
  typedef mode_tab_t [NMODES-1:0] code_tab_t;
  typedef logic [NB-1:0][ZW-1:0]  rot_tab_t;

  // CTV memory control (Con_mem): one read of both memories, one write of each.
  typedef struct packed {
    logic           rd_en;
    logic [LW-1:0]  rd_addr1;
    logic [L0W-1:0] rd_addr2;
    logic           wr_en1;
    logic           wr_en2;
    logic [LW-1:0]  wr_addr1;
    logic [L0W-1:0] wr_addr2;
  } con_mem_t;

  typedef enum logic [0:0] {RATE_1_2 = 1'b0, RATE_13_16 = 1'b1} rate_e;

  function automatic int mode_layers(input int mode);
    return (mode == 0) ? 8 : 3;
  endfunction

  function automatic int mode_kb(input int mode);
    return (mode == 0) ? 8 : 13;
  endfunction

  // Shift of base-matrix entry (r, c), or -1 for an empty (all-zero) block.
  function automatic int hb_entry(input int mode, input int r, input int c);
    int kb;
    kb = mode_kb(mode);
    if (r >= mode_layers(mode)) return -1;
    if (c >= kb) begin
      if ((c - kb) == r || (c - kb) == r - 1) return 0;
      return -1;
    end
    if (mode == 0) begin
      if (((c + r) % 2) == 0) return (5 * c * (r + 1) + 3 * r) % Z;
      return -1;
    end
    if ((c % 3) != r) return (5 * c * (r + 1) + 3 * r) % Z;
    return -1;
  endfunction

  // Slot table: the non-empty entries of each layer in ascending column order.
  function automatic code_tab_t build_code_tab();
    code_tab_t t;
    int k, s;
    t = '0;
    for (int m = 0; m < NMODES; m++)
      for (int r = 0; r < LMAX; r++) begin
        k = 0;
        for (int c = 0; c < NB; c++) begin
          s = hb_entry(m, r, c);
          if (s >= 0 && k < CMAX) begin
            t[m][r][k].valid = 1'b1;
            t[m][r][k].col   = COLW'(c);
            t[m][r][k].shift = ZW'(s);
            k++;
          end
        end
      end
    return t;
  endfunction

  localparam code_tab_t CODE_TAB = build_code_tab();

  // Rotation a column is stored in right after loading: the shift of the first
  // layer that reads it, so the first read of every column needs no rotation.
  function automatic rot_tab_t build_init_rot(input int mode);
    rot_tab_t t;
    int s;
    t = '0;
    for (int c = 0; c < NB; c++)
      for (int r = LMAX - 1; r >= 0; r--) begin
        s = hb_entry(mode, r, c);
        if (s >= 0) t[c] = ZW'(s);
      end
    return t;
  endfunction

  localparam rot_tab_t INIT_ROT_R12   = build_init_rot(0);
  localparam rot_tab_t INIT_ROT_R1316 = build_init_rot(1);

  // Row degree of a layer.
  function automatic int layer_degree(input int mode, input int r);
    int d;
    d = 0;
    for (int c = 0; c < NB; c++) if (hb_entry(mode, r, c) >= 0) d++;
    return d;
  endfunction

  // ----------------------------------------------------------------------
  // Processing schedule. A step is one layer, or two orthogonal layers (no common
  // block column, each of degree <= CS) merged into one step: the first layer
  // uses slots 0..CS-1 and CNU_1, the second slots CS..CMAX-1 and CNU_2. Pairs are
  // found greedily in layer order. Rate 1/2 gives (0,3) (1,4) (2,5) 6 7; rate 13/16
  // has no light layers and keeps 0 1 2. With merging off, step i is layer i.
  typedef struct packed {
    logic          merge;    // step holds two layers
    logic          use_m2;   // step keeps data in CTV memory 2
    logic [LW-1:0] la;       // (first) layer
    logic [LW-1:0] lb;       // second layer of a merged step
  } step_t;
  typedef step_t [LMAX-1:0]       step_list_t;
  typedef step_list_t [NMODES-1:0] step_tab_t;

  function automatic bit orthogonal(input int mode, input int a, input int b);
    for (int c = 0; c < NB; c++)
      if (hb_entry(mode, a, c) >= 0 && hb_entry(mode, b, c) >= 0) return 0;
    return 1;
  endfunction

  function automatic step_list_t build_steps(input int mode, input bit merge_en);
    step_list_t st;
    bit used [LMAX];
    int n, nl;
    st = '0;
    n  = 0;
    nl = mode_layers(mode);
    for (int a = 0; a < LMAX; a++) used[a] = 0;
    for (int a = 0; a < nl; a++) begin
      if (used[a]) continue;
      used[a] = 1;
      st[n].la     = LW'(a);
      st[n].use_m2 = (layer_degree(mode, a) > CS);
      if (merge_en && layer_degree(mode, a) <= CS)
        for (int b = a + 1; b < nl; b++)
          if (!used[b] && !st[n].merge && layer_degree(mode, b) <= CS && orthogonal(mode, a, b)) begin
            used[b]      = 1;
            st[n].merge  = 1'b1;
            st[n].use_m2 = 1'b1;
            st[n].lb     = LW'(b);
          end
      n++;
    end
    return st;
  endfunction

  function automatic int count_steps(input int mode, input bit merge_en);
    step_list_t st;
    int n, cov;
    st  = build_steps(mode, merge_en);
    n   = 0;
    cov = 0;
    for (int i = 0; i < LMAX; i++)
      if (cov < mode_layers(mode)) begin
        cov += st[i].merge ? 2 : 1;
        n++;
      end
    return n;
  endfunction

  function automatic step_tab_t build_step_tab(input bit merge_en);
    step_tab_t t;
    for (int m = 0; m < NMODES; m++) t[m] = build_steps(m, merge_en);
    return t;
  endfunction

  // Slot table of each step: a merged step takes the first CS slots of each layer.
  function automatic code_tab_t build_step_slots(input bit merge_en);
    code_tab_t t;
    step_list_t st;
    t = '0;
    for (int m = 0; m < NMODES; m++) begin
      st = build_steps(m, merge_en);
      for (int i = 0; i < count_steps(m, merge_en); i++)
        if (st[i].merge)
          for (int k = 0; k < CS; k++) begin
            t[m][i][k]      = CODE_TAB[m][st[i].la][k];
            t[m][i][CS + k] = CODE_TAB[m][st[i].lb][k];
          end
        else
          t[m][i] = CODE_TAB[m][st[i].la];
    end
    return t;
  endfunction

endpackage
