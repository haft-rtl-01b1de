// haft_defect_run: one run of the defect-tolerance workload on a 3 x 3 HAFT
// fabric whose configuration memory has PCT percent defective crosspoints.
//
// The run works like a small defect-aware mapper:
//   1. write all ones to every configuration word and read them back; a bit
//      that reads 0 is a crosspoint that cannot be closed;
//   2. search, row by row, for a mapping of the circuit q <= x ^ y with x
//      and y from the west pads of the row and q to its east pad, using
//      only working crosspoints. Where a bypass buffer is broken the signal
//      is relayed through the east MUT of the ROLE before the gap, used as a
//      plain multiplexer (its LUT bits are not needed, so a MUT with a
//      defective LUT still serves). The logic MUT needs its two used LUT
//      entries, its two crosspoints and one select bit;
//   3. load the mapping, check the readback, and run random x, y, checking
//      q one clock later.
// A row is the unit of area here: the mapper takes the first row that
// works, so rows_needed grows as defects make rows unusable.
// Results are reported on the output ports when done is set.
module haft_defect_run #(
  parameter int unsigned ROWS = 3,
  parameter int unsigned PCT  = 0,
  parameter int unsigned SEED = 1
)(
  output logic done,
  output int   checks,
  output int   failures,
  output logic mapped,
  output int   relays_bad_lut,   // MUTs with a defective LUT used as multiplexers
  output int   rows_needed       // rows searched before a mapping was found
);
  import haft_pkg::*;

  localparam int unsigned COLS = 3, N_MUT = 4, NS = 1, T = 3;
  localparam int unsigned LEN = COLS;
  localparam int unsigned POOL     = role_pool(N_MUT, T);
  localparam int unsigned ROLE_CFG = role_cfg_bits(N_MUT, T);
  localparam int unsigned HCH_CFG  = chan_cfg_bits(COLS, T);
  localparam int unsigned VCH_CFG  = chan_cfg_bits(ROWS, T);
  localparam int unsigned ROLE_WORDS = (ROLE_CFG + CFG_WORD_W - 1) / CFG_WORD_W;
  localparam int unsigned HCH_WORDS  = (HCH_CFG + CFG_WORD_W - 1) / CFG_WORD_W;
  localparam int unsigned VCH_WORDS  = (VCH_CFG + CFG_WORD_W - 1) / CFG_WORD_W;
  localparam int unsigned N_TILES  = ROWS*COLS + ROWS + COLS;
  localparam int unsigned WORD_AW  = $clog2(ROLE_WORDS);
  localparam int unsigned TILE_AW  = $clog2(N_TILES);
  localparam int unsigned MAXB     = ROLE_WORDS * CFG_WORD_W;
  localparam int BYP_INC = 3, DRV_INC = 2;
  localparam int EAST = 1;                  // east MUT index

  logic clk = 1'b0, rst_n = 1'b0, fabric_en = 1'b0;
  logic cfg_we = 1'b0;
  logic [TILE_AW+WORD_AW-1:0] cfg_addr = '0;
  logic [CFG_WORD_W-1:0] cfg_wdata = '0, cfg_rdata;
  logic [ROWS-1:0][T-1:0] h_pad_in_w, h_pad_in_e, h_pad_out_e, h_pad_out_w;
  logic [COLS-1:0][T-1:0] v_pad_in_n, v_pad_in_s, v_pad_out_s, v_pad_out_n;

  haft_fpga #(.ROWS(ROWS), .DEFECT_PCT(PCT), .DEFECT_SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  logic [MAXB-1:0] ok  [N_TILES];   // 1 = crosspoint works
  logic [MAXB-1:0] img [N_TILES];

  function automatic int role_tile(int r, int c); return r*COLS + c; endfunction
  function automatic int hch_tile(int r);         return ROWS*COLS + r; endfunction
  function automatic int words_of(int tile);
    if (tile < ROWS*COLS) return ROLE_WORDS;
    return (tile < ROWS*COLS + ROWS) ? HCH_WORDS : VCH_WORDS;
  endfunction

  function automatic bit brk(int g, int t);
    if (g == 0 || g == LEN || t < NS) return 1;
    return ((g + t - NS) % 2) == 0;
  endfunction

  function automatic bit gap_ok(int r, int g, int t, int field);
    return ok[hch_tile(r)][(g*T + t)*GAP_CFG_W + field];
  endfunction
  function automatic int xp_bit(int m, int i, int p);
    return N_MUT*MUT_CFG_W + (m*MUT_IN + i)*POOL + p;
  endfunction
  function automatic int sel_bit(int m, int k); return m*MUT_CFG_W + LUT_BITS + k; endfunction
  function automatic int lut_bit(int m, int k); return m*MUT_CFG_W + k; endfunction

  function automatic bit sel_ok(int r, int c, int m, mut_sel_e s);
    for (int k = 0; k < SEL_W; k++)
      if (s[k] && !ok[role_tile(r, c)][sel_bit(m, k)]) return 0;
    return 1;
  endfunction

  // first input slot through which ROLE (r,c) can relay h track t, or -1
  function automatic int relay_slot(int r, int c, int t);
    for (int s = 0; s < MUT_IN; s++)
      if (ok[role_tile(r, c)][xp_bit(EAST, s, t)] && sel_ok(r, c, EAST, mut_sel_e'(s + 2)))
        return s;
    return -1;
  endfunction

  // A path is described by the track of the segment over each ROLE and,
  // for each gap, the relay slot used in the ROLE before it (-1: none).
  typedef struct {
    bit valid;
    int trk  [LEN];
    int slot [LEN+1];
  } path_t;

  // path from the west pad on track t0, through choices at gaps 1..c_end,
  // ending on the segment over ROLE c_end. choice digit 0 = keep track,
  // k > 0 = relay onto track k-1.
  function automatic path_t in_path(int r, int t0, int c_end, int code);
    path_t p;
    p.valid = 0;
    for (int g = 0; g <= LEN; g++) p.slot[g] = -1;
    for (int c = 0; c < LEN; c++) p.trk[c] = -1;
    if (!gap_ok(r, 0, t0, BYP_INC)) return p;
    p.trk[0] = t0;
    for (int g = 1; g <= c_end; g++) begin
      int k = code % (T + 1);
      int tp = p.trk[g-1];
      code = code / (T + 1);
      if (k == 0) begin
        if (brk(g, tp) && !gap_ok(r, g, tp, BYP_INC)) return p;
        p.trk[g] = tp;
      end else begin
        int s;
        if (!brk(g, k-1) || !gap_ok(r, g, k-1, DRV_INC)) return p;
        s = relay_slot(r, g-1, tp);
        if (s < 0) return p;
        p.slot[g] = s;
        p.trk[g] = k - 1;
      end
    end
    if (code != 0) return p;
    p.valid = 1;
    return p;
  endfunction

  // path from ROLE c0 (driving at gap c0+1 on track t0) to the east pad
  function automatic path_t out_path(int r, int c0, int t0, int code);
    path_t p;
    p.valid = 0;
    for (int g = 0; g <= LEN; g++) p.slot[g] = -1;
    for (int c = 0; c < LEN; c++) p.trk[c] = -1;
    if (!brk(c0 + 1, t0) || !gap_ok(r, c0 + 1, t0, DRV_INC)) return p;
    if (c0 + 1 == LEN) begin p.valid = (code == 0); p.trk[c0] = t0; return p; end
    p.trk[c0 + 1] = t0;
    for (int g = c0 + 2; g < LEN; g++) begin
      int k = code % (T + 1);
      int tp = p.trk[g-1];
      code = code / (T + 1);
      if (k == 0) begin
        if (brk(g, tp) && !gap_ok(r, g, tp, BYP_INC)) return p;
        p.trk[g] = tp;
      end else begin
        int s;
        if (!brk(g, k-1) || !gap_ok(r, g, k-1, DRV_INC)) return p;
        s = relay_slot(r, g-1, tp);
        if (s < 0) return p;
        p.slot[g] = s;
        p.trk[g] = k - 1;
      end
    end
    if (code != 0) return p;
    if (!gap_ok(r, LEN, p.trk[LEN-1], BYP_INC)) return p;
    p.valid = 1;
    return p;
  endfunction

  function automatic int pow_codes(int n);
    int v = 1;
    for (int i = 0; i < n; i++) v = v * (T + 1);
    return v;
  endfunction

  function automatic bit lut_defective(int r, int c, int m);
    for (int k = 0; k < LUT_BITS; k++)
      if (!ok[role_tile(r, c)][lut_bit(m, k)]) return 1;
    return 0;
  endfunction

  int map_row;
  path_t px, py, po;
  int map_c, slot_x, slot_y;

  // search for a mapping; fills map_row, px, py, po, map_c, slot_x/y
  task automatic search(output bit found);
    found = 0;
    for (int r = 0; r < ROWS && !found; r++)
      for (int c = 0; c < LEN && !found; c++) begin
        if (!sel_ok(r, c, EAST, SEL_FF)) continue;
        for (int tx = 0; tx < T && !found; tx++)
          for (int ty = 0; ty < T && !found; ty++)
            for (int cx = 0; cx < pow_codes(c) && !found; cx++)
              for (int cy = 0; cy < pow_codes(c) && !found; cy++) begin
                path_t a, b;
                bit clash;
                a = in_path(r, tx, c, cx);
                if (!a.valid) continue;
                b = in_path(r, ty, c, cy);
                if (!b.valid) continue;
                clash = 0;
                for (int k = 0; k <= c; k++) if (a.trk[k] == b.trk[k]) clash = 1;
                for (int g = 1; g <= c; g++) if (a.slot[g] >= 0 && b.slot[g] >= 0) clash = 1;
                if (clash) continue;
                // logic MUT: slots i != j with working crosspoints and LUT bits
                for (int i = 0; i < 4 && !found; i++)
                  for (int j = 0; j < 4 && !found; j++) begin
                    if (i == j) continue;
                    if (!ok[role_tile(r, c)][xp_bit(EAST, i, a.trk[c])]) continue;
                    if (!ok[role_tile(r, c)][xp_bit(EAST, j, b.trk[c])]) continue;
                    if (!ok[role_tile(r, c)][lut_bit(EAST, 1 << i)]) continue;
                    if (!ok[role_tile(r, c)][lut_bit(EAST, 1 << j)]) continue;
                    for (int to = 0; to < T && !found; to++)
                      for (int co = 0; co < pow_codes(LEN - c - 2 > 0 ? LEN - c - 2 : 0) && !found; co++) begin
                        path_t o;
                        o = out_path(r, c, to, co);
                        if (!o.valid) continue;
                        found = 1;
                        map_row = r; map_c = c; px = a; py = b; po = o;
                        slot_x = i; slot_y = j;
                      end
                  end
              end
      end
  endtask

  task automatic apply_path(int r, path_t p, int g_first, int g_last);
    for (int g = g_first; g <= g_last; g++) begin
      if (p.slot[g] >= 0) begin
        mut_cfg_t mc;
        int tp = p.trk[g-1];
        mc.sel = mut_sel_e'(p.slot[g] + 2);
        mc.lut = '0;
        img[role_tile(r, g-1)][EAST*MUT_CFG_W +: MUT_CFG_W] = mc;
        img[role_tile(r, g-1)][xp_bit(EAST, p.slot[g], tp)] = 1'b1;
        img[hch_tile(r)][(g*T + p.trk[g])*GAP_CFG_W + DRV_INC] = 1'b1;
        if (lut_defective(r, g-1, EAST)) relays_bad_lut++;
      end else if (g == 0) begin
        img[hch_tile(r)][(0*T + p.trk[0])*GAP_CFG_W + BYP_INC] = 1'b1;
      end else if (g < LEN && p.trk[g] >= 0 && brk(g, p.trk[g])) begin
        img[hch_tile(r)][(g*T + p.trk[g])*GAP_CFG_W + BYP_INC] = 1'b1;
      end
    end
  endtask

  initial begin
    bit found;
    done = 0; checks = 0; failures = 0; mapped = 0; relays_bad_lut = 0; rows_needed = 0;
    h_pad_in_w = '0; h_pad_in_e = '0; v_pad_in_n = '0; v_pad_in_s = '0;
    // 1. probe the defects
    for (int k = 0; k < N_TILES; k++)
      for (int w = 0; w < words_of(k); w++) begin
        @(negedge clk);
        cfg_addr = {TILE_AW'(k), WORD_AW'(w)}; cfg_wdata = '1; cfg_we = 1'b1;
      end
    @(negedge clk);
    cfg_we = 1'b0;
    for (int k = 0; k < N_TILES; k++) begin
      ok[k] = '0;
      for (int w = 0; w < words_of(k); w++) begin
        cfg_addr = {TILE_AW'(k), WORD_AW'(w)};
        #1;
        ok[k][w*CFG_WORD_W +: CFG_WORD_W] = cfg_rdata;
      end
    end
    // 2. map
    search(found);
    mapped = found;
    rows_needed = found ? map_row + 1 : 0;
    if (found) begin
      mut_cfg_t mc;
      for (int k = 0; k < N_TILES; k++) img[k] = '0;
      apply_path(map_row, px, 0, map_c);
      apply_path(map_row, py, 0, map_c);
      mc.sel = SEL_FF;
      mc.lut = '0;
      mc.lut[1 << slot_x] = 1'b1;
      mc.lut[1 << slot_y] = 1'b1;
      img[role_tile(map_row, map_c)][EAST*MUT_CFG_W +: MUT_CFG_W] = mc;
      img[role_tile(map_row, map_c)][xp_bit(EAST, slot_x, px.trk[map_c])] = 1'b1;
      img[role_tile(map_row, map_c)][xp_bit(EAST, slot_y, py.trk[map_c])] = 1'b1;
      if (map_c + 1 == LEN) begin
        img[hch_tile(map_row)][(LEN*T + po.trk[map_c])*GAP_CFG_W + DRV_INC] = 1'b1;
      end else begin
        img[hch_tile(map_row)][((map_c+1)*T + po.trk[map_c+1])*GAP_CFG_W + DRV_INC] = 1'b1;
        apply_path(map_row, po, map_c + 2, LEN - 1);
        img[hch_tile(map_row)][(LEN*T + po.trk[LEN-1])*GAP_CFG_W + BYP_INC] = 1'b1;
      end
      // 3. load, read back, run
      for (int k = 0; k < N_TILES; k++)
        for (int w = 0; w < words_of(k); w++) begin
          @(negedge clk);
          cfg_addr = {TILE_AW'(k), WORD_AW'(w)};
          cfg_wdata = img[k][w*CFG_WORD_W +: CFG_WORD_W];
          cfg_we = 1'b1;
        end
      @(negedge clk);
      cfg_we = 1'b0;
      for (int k = 0; k < N_TILES; k++)
        for (int w = 0; w < words_of(k); w++) begin
          cfg_addr = {TILE_AW'(k), WORD_AW'(w)};
          #1;
          checks++;
          if (cfg_rdata !== img[k][w*CFG_WORD_W +: CFG_WORD_W]) begin
            failures++;
            $display("haft_defect_run(%0d%%): readback tile %0d word %0d differs", PCT, k, w);
          end
        end
      fabric_en = 1'b1;
      rst_n = 1'b1;
      begin
        logic expq = 1'b0;
        for (int cyc = 0; cyc < 100; cyc++) begin
          logic x, y;
          @(negedge clk);
          checks++;
          if (h_pad_out_e[map_row] != T'(0) && h_pad_out_e[map_row] != T'(1) << po.trk[LEN-1]) begin
            failures++;
            $display("haft_defect_run(%0d%%): stray pad output", PCT);
          end
          checks++;
          if (h_pad_out_e[map_row][po.trk[LEN-1]] !== expq) begin
            failures++;
            $display("haft_defect_run(%0d%%): q got %b exp %b", PCT,
                     h_pad_out_e[map_row][po.trk[LEN-1]], expq);
          end
          x = 1'($urandom); y = 1'($urandom);
          h_pad_in_w = '0;
          h_pad_in_w[map_row][px.trk[0]] = x;
          h_pad_in_w[map_row][py.trk[0]] = y;
          expq = x ^ y;
        end
      end
      $display("haft_defect_run(%0d%%): mapped in row %0d, logic in ROLE(%0d,%0d), %0d relays through MUTs with defective LUTs",
               PCT, map_row, map_row, map_c, relays_bad_lut);
    end else begin
      $display("haft_defect_run(%0d%%): no mapping found", PCT);
    end
    done = 1;
  end
endmodule
