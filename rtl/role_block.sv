// role_block: a ROLE (Routing or Logic Element) block.
//
// A ROLE holds N_MUT 6-MUTs and a crosspoint matrix that connects every MUT
// input to the wires of the block. Depending on how its MUTs are configured
// the same block works as a routing block (all MUTs pass an input through),
// a logic block (all MUTs use their LUT and flip-flop) or a mix of both, so
// the split of the chip between logic and routing is decided per mapping at
// configuration time.
//
// Input pool of the crosspoint matrix, index p:
//   [0 ,T)        inc wires of the horizontal channel over the block (east-going)
//   [T ,2T)       dec wires of the horizontal channel (west-going)
//   [2T,3T)       inc wires of the vertical channel (south-going)
//   [3T,4T)       dec wires of the vertical channel (north-going)
//   [4T,4T+N_MUT) the MUT outputs of this block (feedback)
// Each MUT input is the OR of the pool wires whose crosspoint is closed; a
// proper configuration closes one crosspoint per used input. A crosspoint
// that cannot be closed (a defect) is avoided by picking another input slot
// or another MUT.
//
// Outputs: the N_MUT/4 MUTs of side s drive the channel on that side; track t
// of side s is offered MUT s*MPS + t%MPS. The channel's tri-state enables
// decide whether the value is actually put on the wire.
//
// Configuration layout (cfg, LSB first): N_MUT mut_cfg_t words (MUT 0 at the
// bottom), then the crosspoints, bit (m*6+i)*POOL+p closing MUT m input i
// (a..f) onto pool wire p.
//
// From the architecture: MUTs with a 4-LUT, FF and MUX, all configuration in
// the crosspoint memory, the routing/logic/hybrid use, and the four-LUT
// logic block (N_MUT = 4). The full input matrix, the pool order and the
// side assignment of the MUTs are choices of this implementation.
//
// Timing: combinational from wires to outputs except through MUT flip-flops.
// The feedback pool makes a structural loop (MUT output -> crosspoint ->
// MUT input -> multiplexer -> MUT output) that lint tools report as
// circular logic. It is inherent to a programmable block: it is closed only
// by a configuration that feeds a MUT in LUT or multiplexer mode back to
// itself without its flip-flop, which a valid configuration never does.
module role_block
  import haft_pkg::*;
#(
  parameter int unsigned N_MUT = 4,
  parameter int unsigned T     = 3,
  localparam int unsigned POOL  = role_pool(N_MUT, T),
  localparam int unsigned CFG_W = role_cfg_bits(N_MUT, T),
  localparam int unsigned MPS   = N_MUT / N_SIDES
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,       // fabric enable (MUT outputs 0 while low)
  input  logic [CFG_W-1:0] cfg,
  // wires of the channels passing over the block
  input  logic [T-1:0]     h_inc_in,
  input  logic [T-1:0]     h_dec_in,
  input  logic [T-1:0]     v_inc_in,
  input  logic [T-1:0]     v_dec_in,
  // values offered to the channels at the block edges
  output logic [T-1:0]     e_out,    // onto h inc wires at the east edge
  output logic [T-1:0]     w_out,    // onto h dec wires at the west edge
  output logic [T-1:0]     s_out,    // onto v inc wires at the south edge
  output logic [T-1:0]     n_out     // onto v dec wires at the north edge
);

  initial begin
    assert (N_MUT % N_SIDES == 0 && N_MUT > 0)
      else $error("role_block: N_MUT must be a positive multiple of 4");
  end

  logic [N_MUT-1:0]       mut_g;
  mut_cfg_t               mcfg [N_MUT];
  logic [POOL-1:0]        pool;
  logic [MUT_IN-1:0]      min  [N_MUT];

  for (genvar m = 0; m < N_MUT; m++) begin : g_cfg
    assign mcfg[m] = mut_cfg_t'(cfg[m*MUT_CFG_W +: MUT_CFG_W]);
  end

  assign pool = {mut_g, v_dec_in, v_inc_in, h_dec_in, h_inc_in};

  // crosspoint matrix: wired-OR of closed crosspoints
  for (genvar m = 0; m < N_MUT; m++) begin : g_xbar
    for (genvar i = 0; i < MUT_IN; i++) begin : g_in
      localparam int unsigned BASE = N_MUT*MUT_CFG_W + (m*MUT_IN + i)*POOL;
      assign min[m][i] = |(cfg[BASE +: POOL] & pool);
    end
  end

  for (genvar m = 0; m < N_MUT; m++) begin : g_mut
    mut u_mut (
      .clk, .rst_n, .en,
      .cfg     (mcfg[m]),
      .a       (min[m][0]), .b (min[m][1]), .c (min[m][2]),
      .d       (min[m][3]), .e (min[m][4]), .f (min[m][5]),
      .g       (mut_g[m])
    );
  end

  for (genvar t = 0; t < T; t++) begin : g_side
    assign n_out[t] = mut_g[int'(SIDE_N)*MPS + t % MPS];
    assign e_out[t] = mut_g[int'(SIDE_E)*MPS + t % MPS];
    assign s_out[t] = mut_g[int'(SIDE_S)*MPS + t % MPS];
    assign w_out[t] = mut_g[int'(SIDE_W)*MPS + t % MPS];
  end

endmodule
