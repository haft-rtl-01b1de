// nano_config_mem: behavioural model of the nano-crossbar configuration
// memory that sits on top of the CMOS fabric.
//
// In the real part every configuration bit is a programmable nanowire
// crosspoint; it has no clocked write port of its own, and some of its
// crosspoints are defective. This model keeps the bits in a register array
// that is written one CFG_WORD_W-bit word at a time, and applies a fixed
// defect map: a defective crosspoint cannot be closed, so its bit reads 0
// whatever is written (stuck-open). The map is derived from SEED and
// DEFECT_PCT by a hash of the bit index, so each instance (given its own
// seed) has its own random pattern with about DEFECT_PCT percent of bits
// defective. The stored bits drive the fabric in parallel (bits) and can be
// read back word by word (rdata), which is how a loader finds the defects.
//
// From the architecture: a dense, defective nano-crossbar used only as
// configuration memory, a percentage of randomly chosen non-functional
// crosspoints. The word interface, the stuck-open defect model and the hash
// are choices of this model.
//
// Timing: a write takes effect at the rising clock edge; rdata and bits are
// combinational. The array is not reset: configuration is loaded before use.
module nano_config_mem
  import haft_pkg::*;
#(
  parameter int unsigned BITS       = 64,
  parameter int unsigned DEFECT_PCT = 0,     // percent of defective crosspoints
  parameter int unsigned SEED       = 1,
  localparam int unsigned WORDS = (BITS + CFG_WORD_W - 1) / CFG_WORD_W,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
)(
  input  logic                  clk,
  input  logic                  we,
  input  logic [AW-1:0]         addr,
  input  logic [CFG_WORD_W-1:0] wdata,
  output logic [CFG_WORD_W-1:0] rdata,
  output logic [BITS-1:0]       bits
);

  localparam int unsigned PAD_BITS = WORDS * CFG_WORD_W;

  // integer hash of (seed, index) -> 0..99
  function automatic int unsigned defect_roll(int unsigned seed, int unsigned idx);
    logic [31:0] h;
    h = seed * 32'h9E37_79B9 + idx * 32'h85EB_CA6B + 32'h1234_5678;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    h = h * 32'h846C_A68B;
    h = h ^ (h >> 16);
    return h % 100;
  endfunction

  function automatic logic [PAD_BITS-1:0] make_ok_map(int unsigned seed, int unsigned pct);
    logic [PAD_BITS-1:0] m;
    for (int unsigned i = 0; i < PAD_BITS; i++)
      m[i] = (defect_roll(seed, i) >= pct);
    return m;
  endfunction

  localparam logic [PAD_BITS-1:0] OK_MAP = make_ok_map(SEED, DEFECT_PCT);

  function automatic logic in_range(logic [AW-1:0] a);
    return {1'b0, a} < (AW+1)'(WORDS);
  endfunction

  logic [CFG_WORD_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we && in_range(addr))
      mem[addr] <= wdata & OK_MAP[addr*CFG_WORD_W +: CFG_WORD_W];
  end

  for (genvar i = 0; i < BITS; i++) begin : g_bits
    assign bits[i] = mem[i / CFG_WORD_W][i % CFG_WORD_W];
  end

  assign rdata = in_range(addr) ? mem[addr] : '0;

endmodule
