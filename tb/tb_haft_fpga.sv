// tb_haft_fpga: end-to-end testbench of the HAFT fabric at its default size
// (3 x 3 ROLE blocks, 4 MUTs each, one Single and two Double tracks per
// channel, defect-free configuration memory).
//
// The testbench builds a configuration image, loads it word by word through
// the configuration port, reads every word back, and then runs four mapped
// circuits side by side on random pad inputs:
//   A  row 0:  x, y enter at the west pads; x travels on a Single track
//      through a bypass buffer past ROLE(0,0), y on a Double segment spanning
//      ROLE(0,0) and ROLE(0,1). ROLE(0,1) computes x^y in a LUT and registers
//      it; the result is driven east and leaves at the east pad one clock
//      later.
//   B  ROLE(1,0) works as a routing block: a MUT in multiplexer mode turns a
//      signal from the row-1 channel into the column-0 channel (a bend),
//      combinationally, to the south pad.
//   C  ROLE(2,2) holds a toggle flip-flop fed back through its own
//      crosspoint matrix; it drives north through two bypasses.
//   D  ROLE(1,2) evaluates a 4-input function (a&b)|(c^d) of three west-going
//      wires and one south-going wire and drives it west to the west pad.
// The expected outputs are computed from the pad inputs only. Every
// mechanism (bypass, Double pass-through, logic mode, flip-flop, routing
// mode, feedback, block drive) is counted and must happen.
module tb_haft_fpga;
  import haft_pkg::*;

  localparam int unsigned ROWS = 3, COLS = 3, N_MUT = 4, T = 3;
  localparam int unsigned POOL     = role_pool(N_MUT, T);
  localparam int unsigned ROLE_CFG = role_cfg_bits(N_MUT, T);
  localparam int unsigned CH_CFG   = chan_cfg_bits(3, T);
  localparam int unsigned ROLE_WORDS = (ROLE_CFG + CFG_WORD_W - 1) / CFG_WORD_W;
  localparam int unsigned CH_WORDS   = (CH_CFG + CFG_WORD_W - 1) / CFG_WORD_W;
  localparam int unsigned N_TILES  = ROWS*COLS + ROWS + COLS;
  localparam int unsigned WORD_AW  = $clog2(ROLE_WORDS);
  localparam int unsigned TILE_AW  = $clog2(N_TILES);
  localparam int unsigned MAXB     = ROLE_WORDS * CFG_WORD_W;
  // gap_cfg_t bit positions
  localparam int BYP_INC = 3, DRV_INC = 2, BYP_DEC = 1, DRV_DEC = 0;

  logic clk = 1'b0, rst_n = 1'b0, fabric_en = 1'b0;
  logic cfg_we = 1'b0;
  logic [TILE_AW+WORD_AW-1:0] cfg_addr = '0;
  logic [CFG_WORD_W-1:0] cfg_wdata = '0, cfg_rdata;
  logic [ROWS-1:0][T-1:0] h_pad_in_w, h_pad_in_e, h_pad_out_e, h_pad_out_w;
  logic [COLS-1:0][T-1:0] v_pad_in_n, v_pad_in_s, v_pad_out_s, v_pad_out_n;

  haft_fpga dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_double = 0, n_logic_ff = 0, n_route = 0, n_feedback = 0,
      n_lut4 = 0, n_drive = 0, n_readback = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("tb_haft_fpga: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ configuration image
  logic [MAXB-1:0] img [N_TILES];

  function automatic int role_tile(int r, int c); return r*COLS + c; endfunction
  function automatic int hch_tile(int r);         return ROWS*COLS + r; endfunction
  function automatic int vch_tile(int c);         return ROWS*COLS + ROWS + c; endfunction

  task automatic set_mut(int r, int c, int m, mut_sel_e sel, logic [15:0] lut);
    mut_cfg_t mc;
    mc.sel = sel; mc.lut = lut;
    img[role_tile(r, c)][m*MUT_CFG_W +: MUT_CFG_W] = mc;
  endtask

  // close crosspoint: MUT m input i (0=a .. 5=f) onto pool wire p
  task automatic set_xp(int r, int c, int m, int i, int p);
    img[role_tile(r, c)][N_MUT*MUT_CFG_W + (m*MUT_IN + i)*POOL + p] = 1'b1;
  endtask

  task automatic set_gap(int tile, int g, int t, int field);
    img[tile][(g*T + t)*GAP_CFG_W + field] = 1'b1;
  endtask

  function automatic int words_of(int tile);
    return (tile < ROWS*COLS) ? ROLE_WORDS : CH_WORDS;
  endfunction

  // pool indices
  function automatic int p_hinc(int t); return t;       endfunction
  function automatic int p_hdec(int t); return T + t;   endfunction
  function automatic int p_vinc(int t); return 2*T + t; endfunction
  function automatic int p_mut(int m);  return 4*T + m; endfunction

  task automatic build_image();
    for (int k = 0; k < N_TILES; k++) img[k] = '0;
    // A: x on Single track 0, y on Double track 1 (breaks at gaps 0, 2, 3)
    set_gap(hch_tile(0), 0, 0, BYP_INC);
    set_gap(hch_tile(0), 1, 0, BYP_INC);      // bypass past ROLE(0,0)
    set_gap(hch_tile(0), 0, 1, BYP_INC);      // Double: spans ROLE(0,0), ROLE(0,1)
    set_mut(0, 1, 1, SEL_FF, 16'h6666);       // east MUT: a ^ b, registered
    set_xp (0, 1, 1, 0, p_hinc(0));
    set_xp (0, 1, 1, 1, p_hinc(1));
    set_gap(hch_tile(0), 2, 0, DRV_INC);      // ROLE(0,1) drives east
    set_gap(hch_tile(0), 3, 0, BYP_INC);      // to the east pad
    // B: bend in ROLE(1,0), south MUT as a multiplexer
    set_gap(hch_tile(1), 0, 0, BYP_INC);
    set_mut(1, 0, 2, SEL_C, 16'h0000);
    set_xp (1, 0, 2, 2, p_hinc(0));
    set_gap(vch_tile(0), 2, 0, DRV_INC);      // ROLE(1,0) drives south
    set_gap(vch_tile(0), 3, 0, BYP_INC);
    // C: toggle flip-flop in ROLE(2,2), north MUT reads its own output
    set_mut(2, 2, 0, SEL_FF, 16'h5555);
    set_xp (2, 2, 0, 0, p_mut(0));
    set_gap(vch_tile(2), 2, 0, DRV_DEC);      // ROLE(2,2) drives north
    set_gap(vch_tile(2), 1, 0, BYP_DEC);
    set_gap(vch_tile(2), 0, 0, BYP_DEC);
    // D: 4-input LUT in ROLE(1,2), west MUT
    set_gap(hch_tile(1), 3, 0, BYP_DEC);
    set_gap(hch_tile(1), 3, 1, BYP_DEC);
    set_gap(hch_tile(1), 3, 2, BYP_DEC);
    set_gap(vch_tile(2), 0, 0, BYP_INC);
    set_gap(vch_tile(2), 1, 0, BYP_INC);
    set_mut(1, 2, 3, SEL_LUT, lut_of_d());
    set_xp (1, 2, 3, 0, p_hdec(0));
    set_xp (1, 2, 3, 1, p_hdec(1));
    set_xp (1, 2, 3, 2, p_hdec(2));
    set_xp (1, 2, 3, 3, p_vinc(0));
    set_gap(hch_tile(1), 2, 0, DRV_DEC);      // ROLE(1,2) drives west
    set_gap(hch_tile(1), 1, 0, BYP_DEC);
    set_gap(hch_tile(1), 0, 0, BYP_DEC);
  endtask

  function automatic logic fn_d(logic a, logic b, logic c, logic d);
    return (a & b) | (c ^ d);
  endfunction

  function automatic logic [15:0] lut_of_d();
    logic [15:0] l;
    for (int i = 0; i < 16; i++) l[i] = fn_d(i[0], i[1], i[2], i[3]);
    return l;
  endfunction

  task automatic load_image();
    for (int k = 0; k < N_TILES; k++)
      for (int w = 0; w < words_of(k); w++) begin
        @(negedge clk);
        cfg_addr  = {TILE_AW'(k), WORD_AW'(w)};
        cfg_wdata = img[k][w*CFG_WORD_W +: CFG_WORD_W];
        cfg_we    = 1'b1;
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
          $display("tb_haft_fpga: readback tile %0d word %0d got %h exp %h",
                   k, w, cfg_rdata, img[k][w*CFG_WORD_W +: CFG_WORD_W]);
        end else n_readback++;
      end
  endtask

  task automatic cmp(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("tb_haft_fpga: %s got %b exp %b at %0t", what, got, exp, $time);
    end
  endtask

  // ------------------------------------------------------------ stimulus
  logic exp_a, exp_c, prev_a, prev_c, prev_b, prev_d;

  initial begin
    h_pad_in_w = '0; h_pad_in_e = '0; v_pad_in_n = '0; v_pad_in_s = '0;
    build_image();
    load_image();
    @(negedge clk);
    fabric_en = 1'b1;
    rst_n = 1'b1;
    exp_a = 1'b0; exp_c = 1'b1;   // one clock edge passes before the first check
    prev_a = 1'b0; prev_b = 1'b0; prev_c = 1'b0; prev_d = 1'b0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      logic x, y, z, da, db, dc, dd;
      @(negedge clk);
      // registered outputs reflect the inputs of the previous cycle
      cmp(h_pad_out_e[0][0], exp_a, "A xor ff");
      cmp(v_pad_out_n[2][0], exp_c, "C toggle");
      if (h_pad_out_e[0][0] == exp_a && exp_a != prev_a) begin
        n_bypass++; n_double++; n_logic_ff++; n_drive++;
      end
      if (v_pad_out_n[2][0] == exp_c && exp_c != prev_c) n_feedback++;
      prev_a = exp_a; prev_c = exp_c;
      x = 1'($urandom); y = 1'($urandom); z = 1'($urandom);
      da = 1'($urandom); db = 1'($urandom); dc = 1'($urandom); dd = 1'($urandom);
      h_pad_in_w = '0; h_pad_in_e = '0; v_pad_in_n = '0; v_pad_in_s = '1;
      h_pad_in_w[0][0] = x;
      h_pad_in_w[0][1] = y;
      h_pad_in_w[1][0] = z;
      h_pad_in_e[1] = {dc, db, da};
      v_pad_in_n[2][0] = dd;
      #1;
      cmp(v_pad_out_s[0][0], z, "B bend");
      cmp(h_pad_out_w[1][0], fn_d(da, db, dc, dd), "D lut4");
      if (v_pad_out_s[0][0] == z && z != prev_b) n_route++;
      if (h_pad_out_w[1][0] == fn_d(da, db, dc, dd) && h_pad_out_w[1][0] != prev_d) n_lut4++;
      prev_b = z; prev_d = h_pad_out_w[1][0];
      // unused pads stay quiet
      cmp(h_pad_out_e[2][0], 1'b0, "unused pad");
      exp_a = x ^ y;
      exp_c = ~exp_c;
    end
    if (n_bypass == 0 || n_double == 0 || n_logic_ff == 0 || n_route == 0 ||
        n_feedback == 0 || n_lut4 == 0 || n_drive == 0 || n_readback == 0) begin
      failures++;
      $display("tb_haft_fpga: a mechanism never happened");
    end
    $display("tb_haft_fpga: bypass %0d double %0d logic+ff %0d routing-mux %0d feedback %0d lut4 %0d drive %0d readback %0d",
             n_bypass, n_double, n_logic_ff, n_route, n_feedback, n_lut4, n_drive, n_readback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
