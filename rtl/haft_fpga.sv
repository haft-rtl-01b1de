// haft_fpga: a HAFT FPGA fabric, an array of ROLE blocks under an
// interconnect overlay, configured from a (defective) nano-crossbar memory.
//
// ROWS x COLS ROLE blocks sit under one horizontal overlay channel per row
// and one vertical overlay channel per column. A ROLE reads the wires of the
// two channels passing over it and offers one value per side and track:
// east/west onto its row channel, south/north onto its column channel. The
// tri-state enables of the channels decide which segment each value drives,
// and chain segments past blocks without entering them. Which blocks do
// logic and which do routing is purely a matter of configuration.
//
// Every configuration bit (ROLE MUTs, ROLE crosspoints, channel buffer
// enables) lives in a nano_config_mem instance, one per tile:
//   tile r*COLS+c          ROLE block (r,c)
//   tile ROWS*COLS+r       horizontal channel of row r
//   tile ROWS*COLS+ROWS+c  vertical channel of column c
// The configuration port writes and reads one CFG_WORD_W-bit word; the
// address is {tile, word}. Reading back a word after writing it shows the
// crosspoints that are defective (they read 0), so a loader can map around
// them. DEFECT_PCT sets the defect rate of every memory; DEFECT_SEED
// selects the defect pattern.
//
// fabric_en must be held low while a configuration is loaded: every MUT
// output and every channel buffer is then off, so a partly written (or
// power-up random) configuration cannot short two drivers or close a
// combinational loop. The global enable is a choice of this implementation,
// in the manner of the global output enable of commercial FPGAs.
//
// I/O: the ends of every channel are brought out as pads, one input and one
// output per track at each end.
//
// From the architecture: the ROLE array with horizontal and vertical
// overlay channels, four-LUT ROLE blocks, Single and Double segments,
// nano-crossbar configuration memory. The array size, the track counts, the
// pads at the channel ends and the configuration port are choices of this
// implementation.
//
// Timing: the user logic is clocked by clk through the MUT flip-flops and
// reset by rst_n; everything else in the fabric is combinational. The
// fabric contains configurable combinational paths that form loops (ROLE
// output -> channel -> ROLE input); like any FPGA routing fabric, a
// configuration must not close one, and lint tools report the structural
// loops as such.
module haft_fpga
  import haft_pkg::*;
#(
  parameter int unsigned ROWS        = 3,
  parameter int unsigned COLS        = 3,
  parameter int unsigned N_MUT       = 4,
  parameter int unsigned N_SINGLE    = 1,
  parameter int unsigned N_DOUBLE    = 2,
  parameter int unsigned DEFECT_PCT  = 0,
  parameter int unsigned DEFECT_SEED = 1,
  localparam int unsigned T        = N_SINGLE + N_DOUBLE,
  localparam int unsigned ROLE_CFG = role_cfg_bits(N_MUT, T),
  localparam int unsigned HCH_CFG  = chan_cfg_bits(COLS, T),
  localparam int unsigned VCH_CFG  = chan_cfg_bits(ROWS, T),
  localparam int unsigned MAX_CFG  = (ROLE_CFG > HCH_CFG)
                                     ? ((ROLE_CFG > VCH_CFG) ? ROLE_CFG : VCH_CFG)
                                     : ((HCH_CFG > VCH_CFG) ? HCH_CFG : VCH_CFG),
  localparam int unsigned MAX_WORDS = (MAX_CFG + CFG_WORD_W - 1) / CFG_WORD_W,
  localparam int unsigned WORD_AW  = (MAX_WORDS > 1) ? $clog2(MAX_WORDS) : 1,
  localparam int unsigned N_TILES  = ROWS*COLS + ROWS + COLS,
  localparam int unsigned TILE_AW  = $clog2(N_TILES),
  localparam int unsigned CFG_AW   = TILE_AW + WORD_AW
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       fabric_en,    // 0 while loading configuration
  // configuration port
  input  logic                       cfg_we,
  input  logic [CFG_AW-1:0]          cfg_addr,     // {tile, word}
  input  logic [CFG_WORD_W-1:0]      cfg_wdata,
  output logic [CFG_WORD_W-1:0]      cfg_rdata,
  // pads at the ends of the horizontal channels
  input  logic [ROWS-1:0][T-1:0]     h_pad_in_w,   // into east-going wires
  input  logic [ROWS-1:0][T-1:0]     h_pad_in_e,   // into west-going wires
  output logic [ROWS-1:0][T-1:0]     h_pad_out_e,
  output logic [ROWS-1:0][T-1:0]     h_pad_out_w,
  // pads at the ends of the vertical channels
  input  logic [COLS-1:0][T-1:0]     v_pad_in_n,   // into south-going wires
  input  logic [COLS-1:0][T-1:0]     v_pad_in_s,   // into north-going wires
  output logic [COLS-1:0][T-1:0]     v_pad_out_s,
  output logic [COLS-1:0][T-1:0]     v_pad_out_n
);

  logic [TILE_AW-1:0] tile_sel;
  logic [WORD_AW-1:0] word_sel;
  assign {tile_sel, word_sel} = cfg_addr;

  logic [CFG_WORD_W-1:0] tile_rdata [N_TILES];

  // signals between ROLE blocks and channels
  logic [T-1:0] h_role_inc [ROWS][COLS];   // ROLE east edge
  logic [T-1:0] h_role_dec [ROWS][COLS];   // ROLE west edge
  logic [T-1:0] h_seg_inc  [ROWS][COLS];
  logic [T-1:0] h_seg_dec  [ROWS][COLS];
  logic [T-1:0] v_role_inc [COLS][ROWS];   // ROLE south edge
  logic [T-1:0] v_role_dec [COLS][ROWS];   // ROLE north edge
  logic [T-1:0] v_seg_inc  [COLS][ROWS];
  logic [T-1:0] v_seg_dec  [COLS][ROWS];

  // ---------------------------------------------------------------- ROLEs
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned TILE = r*COLS + c;
      localparam int unsigned AW   = ((ROLE_CFG + CFG_WORD_W - 1) / CFG_WORD_W > 1)
                                     ? $clog2((ROLE_CFG + CFG_WORD_W - 1) / CFG_WORD_W) : 1;
      logic [ROLE_CFG-1:0] cfg;

      nano_config_mem #(
        .BITS(ROLE_CFG), .DEFECT_PCT(DEFECT_PCT), .SEED(DEFECT_SEED*1009 + TILE)
      ) u_mem (
        .clk,
        .we    (cfg_we && tile_sel == TILE_AW'(TILE)),
        .addr  (word_sel[AW-1:0]),
        .wdata (cfg_wdata),
        .rdata (tile_rdata[TILE]),
        .bits  (cfg)
      );

      role_block #(.N_MUT(N_MUT), .T(T)) u_role (
        .clk, .rst_n,
        .en       (fabric_en),
        .cfg      (cfg),
        .h_inc_in (h_seg_inc[r][c]),
        .h_dec_in (h_seg_dec[r][c]),
        .v_inc_in (v_seg_inc[c][r]),
        .v_dec_in (v_seg_dec[c][r]),
        .e_out    (h_role_inc[r][c]),
        .w_out    (h_role_dec[r][c]),
        .s_out    (v_role_inc[c][r]),
        .n_out    (v_role_dec[c][r])
      );
    end
  end

  // ----------------------------------------------------- horizontal channels
  for (genvar r = 0; r < ROWS; r++) begin : g_hch
    localparam int unsigned TILE = ROWS*COLS + r;
    localparam int unsigned AW   = ((HCH_CFG + CFG_WORD_W - 1) / CFG_WORD_W > 1)
                                   ? $clog2((HCH_CFG + CFG_WORD_W - 1) / CFG_WORD_W) : 1;
    logic [HCH_CFG-1:0] cfg;

    nano_config_mem #(
      .BITS(HCH_CFG), .DEFECT_PCT(DEFECT_PCT), .SEED(DEFECT_SEED*1009 + TILE)
    ) u_mem (
      .clk,
      .we    (cfg_we && tile_sel == TILE_AW'(TILE)),
      .addr  (word_sel[AW-1:0]),
      .wdata (cfg_wdata),
      .rdata (tile_rdata[TILE]),
      .bits  (cfg)
    );

    overlay_channel #(.LEN(COLS), .N_SINGLE(N_SINGLE), .N_DOUBLE(N_DOUBLE)) u_ch (
      .en         (fabric_en),
      .cfg        (cfg),
      .pad_in_lo  (h_pad_in_w[r]),
      .pad_in_hi  (h_pad_in_e[r]),
      .role_inc   (h_role_inc[r]),
      .role_dec   (h_role_dec[r]),
      .seg_inc    (h_seg_inc[r]),
      .seg_dec    (h_seg_dec[r]),
      .pad_out_hi (h_pad_out_e[r]),
      .pad_out_lo (h_pad_out_w[r])
    );
  end

  // ------------------------------------------------------- vertical channels
  for (genvar c = 0; c < COLS; c++) begin : g_vch
    localparam int unsigned TILE = ROWS*COLS + ROWS + c;
    localparam int unsigned AW   = ((VCH_CFG + CFG_WORD_W - 1) / CFG_WORD_W > 1)
                                   ? $clog2((VCH_CFG + CFG_WORD_W - 1) / CFG_WORD_W) : 1;
    logic [VCH_CFG-1:0] cfg;

    nano_config_mem #(
      .BITS(VCH_CFG), .DEFECT_PCT(DEFECT_PCT), .SEED(DEFECT_SEED*1009 + TILE)
    ) u_mem (
      .clk,
      .we    (cfg_we && tile_sel == TILE_AW'(TILE)),
      .addr  (word_sel[AW-1:0]),
      .wdata (cfg_wdata),
      .rdata (tile_rdata[TILE]),
      .bits  (cfg)
    );

    overlay_channel #(.LEN(ROWS), .N_SINGLE(N_SINGLE), .N_DOUBLE(N_DOUBLE)) u_ch (
      .en         (fabric_en),
      .cfg        (cfg),
      .pad_in_lo  (v_pad_in_n[c]),
      .pad_in_hi  (v_pad_in_s[c]),
      .role_inc   (v_role_inc[c]),
      .role_dec   (v_role_dec[c]),
      .seg_inc    (v_seg_inc[c]),
      .seg_dec    (v_seg_dec[c]),
      .pad_out_hi (v_pad_out_s[c]),
      .pad_out_lo (v_pad_out_n[c])
    );
  end

  // configuration readback
  always_comb begin
    cfg_rdata = '0;
    for (int unsigned i = 0; i < N_TILES; i++)
      if (tile_sel == TILE_AW'(i)) cfg_rdata = tile_rdata[i];
  end

endmodule
