// mut: one 6-MUT (Multiplexer or look-Up Table) of a ROLE block.
//
// Inputs a..d address a 16-entry look-up table; the LUT output also feeds a
// flip-flop. An 8-input multiplexer picks the MUT output g from the LUT, the
// flip-flop, or any of the six raw inputs a..f. With g taken from a..f the
// MUT is a 6-input routing multiplexer (a "6-MUX"); with g taken from the
// LUT or flip-flop it is a 4-LUT logic cell. If some LUT bits of the
// configuration memory are defective the MUT can still serve as a 6-MUX,
// which only needs the three select bits.
//
// The structure (4-LUT, FF fed by the LUT, 8-MUX over LUT/FF/a..f) follows the
// architecture. The select encoding (haft_pkg::mut_sel_e), the LUT index
// order {d,c,b,a} and the asynchronous active-low reset of the flip-flop are
// choices of this implementation.
//
// The enable input en holds g at 0 while the configuration is being loaded,
// so that a half-written configuration cannot close a combinational loop
// through the fabric; this global enable is a choice of this implementation.
//
// Timing: g is combinational from a..f and cfg except when SEL_FF is chosen;
// the flip-flop samples the LUT output on the rising clock edge.
module mut
  import haft_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,       // fabric enable; g is 0 while low
  input  mut_cfg_t  cfg,
  input  logic      a, b, c, d, e, f,
  output logic      g
);

  logic ff_q;
  logic lut_out;

  assign lut_out = cfg.lut[{d, c, b, a}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ff_q <= 1'b0;
    else        ff_q <= lut_out;
  end

  always_comb begin
    g = 1'b0;
    if (en) unique case (cfg.sel)
      SEL_LUT: g = lut_out;
      SEL_FF:  g = ff_q;
      SEL_A:   g = a;
      SEL_B:   g = b;
      SEL_C:   g = c;
      SEL_D:   g = d;
      SEL_E:   g = e;
      SEL_F:   g = f;
      default: g = 1'b0;
    endcase
  end

endmodule
