// haft_pkg: types and constants shared by the HAFT fabric.
//
// A HAFT fabric is an array of ROLE (Routing or Logic Element) blocks under a
// segmented interconnect overlay. Every ROLE is built from 6-MUTs, each a
// 4-input LUT, a flip-flop and an 8-input multiplexer whose output is chosen
// among the LUT, the flip-flop and the six raw inputs a..f. The numbers that
// come from the architecture itself are the 4-LUT, the six MUT inputs and the
// 8-way output multiplexer; the select encoding, the LUT bit order and the
// configuration word width are choices of this implementation.
package haft_pkg;

  localparam int unsigned LUT_K     = 4;             // 4-input LUT
  localparam int unsigned LUT_BITS  = 1 << LUT_K;    // 16 truth-table bits
  localparam int unsigned MUT_IN    = 6;             // inputs a..f of a 6-MUT
  localparam int unsigned MUX_IN    = 8;             // 8-MUX: LUT, FF, a..f
  localparam int unsigned SEL_W     = $clog2(MUX_IN);
  localparam int unsigned N_SIDES   = 4;             // N, E, S, W
  localparam int unsigned CFG_WORD_W = 16;           // configuration write word

  // Output select of the 8-MUX inside a MUT.
  typedef enum logic [SEL_W-1:0] {
    SEL_LUT = 3'd0,   // combinational LUT output (logic mode)
    SEL_FF  = 3'd1,   // registered LUT output (logic mode with FF)
    SEL_A   = 3'd2,   // pass input a (routing mode)
    SEL_B   = 3'd3,
    SEL_C   = 3'd4,
    SEL_D   = 3'd5,
    SEL_E   = 3'd6,
    SEL_F   = 3'd7
  } mut_sel_e;

  // Configuration of one MUT: 19 bits. lut[i] is the output for the input
  // pattern i = {d, c, b, a}.
  typedef struct packed {
    mut_sel_e             sel;
    logic [LUT_BITS-1:0]  lut;
  } mut_cfg_t;

  localparam int unsigned MUT_CFG_W = $bits(mut_cfg_t);

  // Sides of a ROLE block; MUT k*MPS..k*MPS+MPS-1 drive side k.
  typedef enum logic [1:0] {
    SIDE_N = 2'd0,
    SIDE_E = 2'd1,
    SIDE_S = 2'd2,
    SIDE_W = 2'd3
  } side_e;

  // Tri-state buffer enables at one switch point (gap) of one track.
  // "inc" is the wire running towards increasing column/row (east or
  // south), "dec" the one running towards decreasing column/row.
  typedef struct packed {
    logic byp_inc;   // continue the incoming inc wire across the gap
    logic drv_inc;   // drive the inc wire from the ROLE before the gap
    logic byp_dec;   // continue the incoming dec wire across the gap
    logic drv_dec;   // drive the dec wire from the ROLE after the gap
  } gap_cfg_t;

  localparam int unsigned GAP_CFG_W = $bits(gap_cfg_t);

  // Configuration bits of one ROLE block with n_mut MUTs and t tracks per
  // channel: MUT words first, then the input crosspoint matrix.
  function automatic int unsigned role_pool(int unsigned n_mut, int unsigned t);
    return N_SIDES * t + n_mut;
  endfunction

  function automatic int unsigned role_cfg_bits(int unsigned n_mut, int unsigned t);
    return n_mut * MUT_CFG_W + n_mut * MUT_IN * role_pool(n_mut, t);
  endfunction

  function automatic int unsigned chan_cfg_bits(int unsigned len, int unsigned t);
    return (len + 1) * t * GAP_CFG_W;
  endfunction

  // A track is Single when idx < n_single, otherwise Double. Double tracks
  // alternate their phase so that half of them break at every gap. The two
  // ends of a channel are always a break.
  function automatic bit is_break(int unsigned gap, int unsigned len,
                                  int unsigned track, int unsigned n_single);
    if (gap == 0 || gap == len || track < n_single) return 1'b1;
    return ((gap + (track - n_single)) % 2) == 0;
  endfunction

endpackage
