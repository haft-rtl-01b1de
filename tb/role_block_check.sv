// role_block_check: self-checking test of one ROLE block with N_MUT MUTs
// and 3 tracks per channel, used by tb_role_block.
//
// Phase 1 loads random configurations in which every MUT input closes
// exactly one crosspoint onto a channel wire, and compares the four side
// outputs with a model built from the configuration alone. The counts of
// MUTs used for logic and for routing show that the block has worked as a
// logic block, a routing block and a mix of both. Phase 2 closes a
// feedback crosspoint: MUT 0 reads its own registered output through the
// crosspoint matrix and inverts it, so the north output toggles every clock.
module role_block_check #(
  parameter int unsigned N_MUT = 4
)(
  output logic done,
  output int   checks,
  output int   failures
);
  import haft_pkg::*;

  localparam int unsigned T     = 3;
  localparam int unsigned MPS   = N_MUT / 4;   // MUTs per side
  localparam int unsigned POOL  = role_pool(N_MUT, T);
  localparam int unsigned CFG_W = role_cfg_bits(N_MUT, T);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CFG_W-1:0] cfg;
  logic [T-1:0] h_inc, h_dec, v_inc, v_dec;
  logic [T-1:0] e_out, w_out, s_out, n_out;
  int n_logic_blk = 0, n_route_blk = 0, n_hybrid_blk = 0, n_toggle = 0;

  role_block #(.N_MUT(N_MUT), .T(T)) dut (
    .clk, .rst_n, .en(1'b1), .cfg,
    .h_inc_in(h_inc), .h_dec_in(h_dec), .v_inc_in(v_inc), .v_dec_in(v_dec),
    .e_out, .w_out, .s_out, .n_out);

  always #5 clk = ~clk;

  // testbench copy of the configuration
  mut_cfg_t    mc  [N_MUT];
  int unsigned src [N_MUT][MUT_IN];
  logic        ffm [N_MUT];

  function automatic logic [CFG_W-1:0] pack_cfg();
    logic [CFG_W-1:0] v = '0;
    for (int m = 0; m < N_MUT; m++) begin
      v[m*MUT_CFG_W +: MUT_CFG_W] = mc[m];
      for (int i = 0; i < MUT_IN; i++)
        v[N_MUT*MUT_CFG_W + (m*MUT_IN + i)*POOL + src[m][i]] = 1'b1;
    end
    return v;
  endfunction

  function automatic logic pool_bit(int unsigned p);
    if (p < T)       return h_inc[p];
    if (p < 2*T)     return h_dec[p-T];
    if (p < 3*T)     return v_inc[p-2*T];
    return v_dec[p-3*T];
  endfunction

  function automatic logic [3:0] lut_idx(int m);
    return {pool_bit(src[m][3]), pool_bit(src[m][2]), pool_bit(src[m][1]), pool_bit(src[m][0])};
  endfunction

  function automatic logic exp_g(int m);
    case (mc[m].sel)
      SEL_LUT: return mc[m].lut[lut_idx(m)];
      SEL_FF:  return ffm[m];
      default: return pool_bit(src[m][int'(mc[m].sel) - 2]);
    endcase
  endfunction

  task automatic cmp(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("role_block_check: %s got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int m = 0; m < N_MUT; m++) begin
      mc[m] = '{sel: SEL_A, lut: '0};
      ffm[m] = 1'b0;
      for (int i = 0; i < MUT_IN; i++) src[m][i] = 0;
    end
    cfg = pack_cfg();
    {h_inc, h_dec, v_inc, v_dec} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: random configurations, channel wires only
    for (int it = 0; it < 1500; it++) begin
      int nl;
      @(negedge clk);
      if (it % 5 == 0) begin
        nl = 0;
        for (int m = 0; m < N_MUT; m++) begin
          mc[m].lut = 16'($urandom);
          case (it % 15)
            5:       mc[m].sel = mut_sel_e'($urandom_range(0, 1));   // all logic
            10:      mc[m].sel = mut_sel_e'($urandom_range(2, 7));   // all routing
            default: mc[m].sel = mut_sel_e'($urandom_range(0, 7));
          endcase
          if (mc[m].sel inside {SEL_LUT, SEL_FF}) nl++;
          for (int i = 0; i < MUT_IN; i++) src[m][i] = $urandom_range(0, 4*T - 1);
        end
        if (nl == N_MUT) n_logic_blk++;
        else if (nl == 0) n_route_blk++;
        else n_hybrid_blk++;
        cfg = pack_cfg();
      end
      {h_inc, h_dec, v_inc, v_dec} = 12'($urandom);
      #1;
      for (int t = 0; t < T; t++) begin
        cmp(n_out[t], exp_g(0*MPS + t % MPS), "n_out");
        cmp(e_out[t], exp_g(1*MPS + t % MPS), "e_out");
        cmp(s_out[t], exp_g(2*MPS + t % MPS), "s_out");
        cmp(w_out[t], exp_g(3*MPS + t % MPS), "w_out");
      end
      // flip-flops sample at the next rising edge
      for (int m = 0; m < N_MUT; m++) ffm[m] = mc[m].lut[lut_idx(m)];
    end
    // phase 2: feedback through the crosspoint matrix (toggle flip-flop)
    @(negedge clk);
    rst_n = 1'b0;
    mc[0] = '{sel: SEL_FF, lut: 16'h5555};     // g = ~a, registered
    cfg = pack_cfg();
    cfg[N_MUT*MUT_CFG_W +: POOL] = '0;
    cfg[N_MUT*MUT_CFG_W + 4*T + 0] = 1'b1;     // MUT0.a <- MUT0.g
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      cmp(n_out[0], logic'((k + 1) % 2), "toggle");
      if (n_out[0] == logic'((k + 1) % 2)) n_toggle++;
    end
    if (n_logic_blk == 0 || n_route_blk == 0 || n_hybrid_blk == 0 || n_toggle == 0) begin
      failures++;
      $display("role_block_check: a use of the block was never exercised");
    end
    $display("role_block_check(%0d MUTs): logic blocks %0d, routing blocks %0d, hybrid %0d, toggles %0d",
             N_MUT, n_logic_blk, n_route_blk, n_hybrid_blk, n_toggle);
    done = 1'b1;
  end
endmodule
