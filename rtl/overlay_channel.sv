// overlay_channel: one routing channel of the interconnect overlay.
//
// The channel runs over a row (or column) of LEN ROLE blocks. It has T
// tracks; each track is made of Single segments (one block long) or Double
// segments (two blocks long) and each segment is a pair of unidirectional
// wires, "inc" towards higher block index and "dec" towards lower. Between
// two blocks (a gap) a segment may end; at such a break each wire is driven
// through two tri-state buffers:
//   byp_*  continues the wire from the segment on the other side of the gap,
//          so long connections are formed without entering a ROLE block;
//   drv_*  drives the wire from the ROLE block it leaves (block g-1 for the
//          inc wire at gap g, block g for the dec wire).
// With neither buffer enabled the segment is undriven; it reads as 0 here
// because the model has no high-impedance state. Enabling both at once is a
// bus conflict and is flagged by an assertion.
//
// Gaps are numbered 0..LEN; gap 0 and gap LEN are the channel ends and face
// the I/O pads. Tracks [0,N_SINGLE) are Single; the rest are Double, with
// alternating phase so Double breaks are staggered (haft_pkg::is_break).
// Buffer enables at a gap where a Double track does not break have no
// buffer to act on and are ignored.
//
// From the architecture: Single and Double segments only, two unidirectional
// wires per segment, tri-state buffers joining segments directly or to
// routing blocks. The track counts, the staggering and the pad connection
// at the ends are choices of this implementation.
//
// While en is low every buffer is off, as an unconfigured or half-loaded
// channel must not drive anything; this enable is a choice of this
// implementation.
//
// Timing: purely combinational.
module overlay_channel
  import haft_pkg::*;
#(
  parameter int unsigned LEN      = 3,
  parameter int unsigned N_SINGLE = 1,
  parameter int unsigned N_DOUBLE = 2,
  localparam int unsigned T     = N_SINGLE + N_DOUBLE,
  localparam int unsigned CFG_W = chan_cfg_bits(LEN, T)
)(
  input  logic             en,           // fabric enable: all buffers off while low
  input  logic [CFG_W-1:0] cfg,          // gap_cfg_t at (gap*T + track)
  input  logic [T-1:0]     pad_in_lo,    // into the inc wires at gap 0
  input  logic [T-1:0]     pad_in_hi,    // into the dec wires at gap LEN
  input  logic [T-1:0]     role_inc [LEN], // block c offers onto inc at gap c+1
  input  logic [T-1:0]     role_dec [LEN], // block c offers onto dec at gap c
  output logic [T-1:0]     seg_inc  [LEN], // inc wire over block c
  output logic [T-1:0]     seg_dec  [LEN], // dec wire over block c
  output logic [T-1:0]     pad_out_hi,   // inc wires leaving at gap LEN
  output logic [T-1:0]     pad_out_lo    // dec wires leaving at gap 0
);

  gap_cfg_t gcfg [LEN+1][T];

  for (genvar gp = 0; gp <= LEN; gp++) begin : g_gap
    for (genvar t = 0; t < T; t++) begin : g_trk
      assign gcfg[gp][t] = en ? gap_cfg_t'(cfg[(gp*T + t)*GAP_CFG_W +: GAP_CFG_W])
                              : gap_cfg_t'('0);
    end
  end

  for (genvar t = 0; t < T; t++) begin : g_track
    // inc direction: segment over block c starts at gap c
    for (genvar c = 0; c < LEN; c++) begin : g_inc
      logic w;   // the inc wire over block c
      if (is_break(c, LEN, t, N_SINGLE)) begin : g_brk
        logic from_prev, from_role;
        if (c == 0) begin : g_end
          assign from_prev = pad_in_lo[t];
          assign from_role = 1'b0;
        end else begin : g_mid
          assign from_prev = g_inc[c-1].w;
          assign from_role = role_inc[c-1][t];
        end
        assign w = (gcfg[c][t].byp_inc & from_prev)
                 | (gcfg[c][t].drv_inc & from_role);
      end else begin : g_thru
        assign w = g_inc[c-1].w;
      end
      assign seg_inc[c][t] = w;
    end
    // dec direction: segment over block c starts at gap c+1
    for (genvar c = 0; c < LEN; c++) begin : g_dec
      logic w;   // the dec wire over block c
      if (is_break(c+1, LEN, t, N_SINGLE)) begin : g_brk
        logic from_prev, from_role;
        if (c == LEN-1) begin : g_end
          assign from_prev = pad_in_hi[t];
          assign from_role = 1'b0;
        end else begin : g_mid
          assign from_prev = g_dec[c+1].w;
          assign from_role = role_dec[c+1][t];
        end
        assign w = (gcfg[c+1][t].byp_dec & from_prev)
                 | (gcfg[c+1][t].drv_dec & from_role);
      end else begin : g_thru
        assign w = g_dec[c+1].w;
      end
      assign seg_dec[c][t] = w;
    end
    // the channel ends: the pad is the segment beyond the last gap
    assign pad_out_hi[t] = (gcfg[LEN][t].byp_inc & g_inc[LEN-1].w)
                         | (gcfg[LEN][t].drv_inc & role_inc[LEN-1][t]);
    assign pad_out_lo[t] = (gcfg[0][t].byp_dec & g_dec[0].w)
                         | (gcfg[0][t].drv_dec & role_dec[0][t]);
  end

  // one tri-state driver per wire at a time
  for (genvar gp = 0; gp <= LEN; gp++) begin : g_chk
    for (genvar t = 0; t < T; t++) begin : g_trk
      always_comb begin
        if (is_break(gp, LEN, t, N_SINGLE)) begin
          assert (!(gcfg[gp][t].byp_inc && gcfg[gp][t].drv_inc))
            else $error("overlay_channel: two drivers on inc wire, gap %0d track %0d", gp, t);
          assert (!(gcfg[gp][t].byp_dec && gcfg[gp][t].drv_dec))
            else $error("overlay_channel: two drivers on dec wire, gap %0d track %0d", gp, t);
        end
      end
    end
  end

endmodule
