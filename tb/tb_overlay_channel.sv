// tb_overlay_channel: self-checking testbench of one overlay channel
// (3 blocks long, one Single and two Double tracks).
//
// Random buffer settings (never two drivers on one wire) and random pad and
// block values are applied; the expected wire values are computed by
// walking each wire from its starting end, using the segment rule written
// out here: a Single track breaks at every gap, Double track d breaks at
// the gaps g with (g+d) even, and both ends are always breaks. It counts
// how often a value crossed a gap through a bypass buffer, was driven by a
// block, and passed a gap inside a Double segment, and fails if any of them
// never happened.
module tb_overlay_channel;
  import haft_pkg::*;

  localparam int unsigned LEN = 3, NS = 1, ND = 2, T = NS + ND;
  localparam int unsigned CFG_W = (LEN + 1) * T * 4;

  logic [CFG_W-1:0] cfg;
  logic [T-1:0] pad_in_lo, pad_in_hi, pad_out_hi, pad_out_lo;
  logic [T-1:0] role_inc [LEN];
  logic [T-1:0] role_dec [LEN];
  logic [T-1:0] seg_inc  [LEN];
  logic [T-1:0] seg_dec  [LEN];
  int checks = 0, failures = 0;
  int n_bypass = 0, n_drive = 0, n_double_thru = 0;
  logic clk = 1'b0;
  logic en = 1'b0;   // buffers off until the first configuration is applied

  overlay_channel #(.LEN(LEN), .N_SINGLE(NS), .N_DOUBLE(ND)) dut (
    .en, .cfg, .pad_in_lo, .pad_in_hi, .role_inc, .role_dec,
    .seg_inc, .seg_dec, .pad_out_hi, .pad_out_lo);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("tb_overlay_channel: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // buffer enables: [gap][track] = {byp_inc, drv_inc, byp_dec, drv_dec}
  logic [3:0] be [LEN+1][T];

  function automatic bit brk(int g, int t);
    if (g == 0 || g == LEN || t < NS) return 1;
    return ((g + t - NS) % 2) == 0;
  endfunction

  function automatic logic [1:0] pick_pair();
    // 0: off, 1: bypass, 2: drive
    case ($urandom_range(0, 2))
      0: return 2'b00;
      1: return 2'b10;
      default: return 2'b01;
    endcase
  endfunction

  task automatic cmp(logic got, logic exp, string what, int c, int t);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("tb_overlay_channel: %s block %0d track %0d got %b exp %b", what, c, t, got, exp);
    end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      logic ei [LEN+1];   // inc value after gap g (ei[LEN] is the pad)
      logic di [LEN+1];   // dec value before gap g (di[0] is the pad)
      @(negedge clk);
      for (int g = 0; g <= LEN; g++)
        for (int t = 0; t < T; t++) begin
          be[g][t] = {pick_pair(), pick_pair()};
          cfg[(g*T + t)*4 +: 4] = be[g][t];
        end
      en = 1'b1;
      pad_in_lo = T'($urandom);
      pad_in_hi = T'($urandom);
      for (int c = 0; c < LEN; c++) begin
        role_inc[c] = T'($urandom);
        role_dec[c] = T'($urandom);
      end
      #1;
      for (int t = 0; t < T; t++) begin
        // inc wire, west to east
        for (int g = 0; g <= LEN; g++) begin
          logic prev, role;
          prev = (g == 0) ? pad_in_lo[t] : ei[g-1];
          role = (g == 0) ? 1'b0 : role_inc[g-1][t];
          if (brk(g, t)) begin
            ei[g] = (be[g][t][3] & prev) | (be[g][t][2] & role);
            if (be[g][t][3] && g > 0 && g < LEN) n_bypass++;
            if (be[g][t][2] && g > 0) n_drive++;
          end else begin
            ei[g] = prev;
            n_double_thru++;
          end
        end
        // dec wire, east to west
        for (int g = LEN; g >= 0; g--) begin
          logic prev, role;
          prev = (g == LEN) ? pad_in_hi[t] : di[g+1];
          role = (g == LEN) ? 1'b0 : role_dec[g][t];
          if (brk(g, t)) begin
            di[g] = (be[g][t][1] & prev) | (be[g][t][0] & role);
            if (be[g][t][1] && g > 0 && g < LEN) n_bypass++;
            if (be[g][t][0] && g < LEN) n_drive++;
          end else begin
            di[g] = prev;
          end
        end
        for (int c = 0; c < LEN; c++) begin
          cmp(seg_inc[c][t], ei[c],   "seg_inc", c, t);
          cmp(seg_dec[c][t], di[c+1], "seg_dec", c, t);
        end
        cmp(pad_out_hi[t], ei[LEN], "pad_out_hi", LEN, t);
        cmp(pad_out_lo[t], di[0],   "pad_out_lo", 0, t);
      end
    end
    // a long connection: pad to pad on the Single track through all bypasses
    @(negedge clk);
    cfg = '0;
    for (int g = 0; g <= LEN; g++) cfg[(g*T + 0)*4 + 3] = 1'b1;
    pad_in_lo = '1;
    #1;
    cmp(pad_out_hi[0], 1'b1, "long wire", LEN, 0);
    pad_in_lo = '0;
    #1;
    cmp(pad_out_hi[0], 1'b0, "long wire", LEN, 0);
    // disabled channel: no buffer drives
    en = 1'b0;
    pad_in_lo = '1;
    #1;
    cmp(pad_out_hi[0], 1'b0, "disabled", LEN, 0);
    if (n_bypass == 0 || n_drive == 0 || n_double_thru == 0) begin
      failures++;
      $display("tb_overlay_channel: a mechanism never happened");
    end
    $display("tb_overlay_channel: bypasses %0d, block drives %0d, double pass-throughs %0d",
             n_bypass, n_drive, n_double_thru);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
