// tb_haft_defects: defect-rate sweep of the HAFT fabric.
//
// Runs the defect-tolerance workload (haft_defect_run) on 12 x 3 fabrics whose
// configuration memories have 0, 10, 20, 30, 40 and 50 percent defective
// crosspoints. Each run must find a mapping around its defects and compute
// its circuit correctly. At least one run must have used a MUT with a
// defective LUT as a routing multiplexer.
module tb_haft_defects;
  localparam int N = 6;
  localparam int unsigned RATES [N] = '{0, 10, 20, 30, 40, 50};

  logic done   [N];
  int   chk    [N];
  int   fail   [N];
  logic mapped [N];
  int   relays [N];
  int   rows   [N];
  localparam int unsigned ROWS = 12;

  for (genvar k = 0; k < N; k++) begin : g_run
    haft_defect_run #(.ROWS(ROWS), .PCT(RATES[k]), .SEED(k + 3)) u_run (
      .done(done[k]), .checks(chk[k]), .failures(fail[k]),
      .mapped(mapped[k]), .relays_bad_lut(relays[k]), .rows_needed(rows[k]));
  end

  int checks = 0, failures = 0;

  initial begin
    #2000000;
    $display("tb_haft_defects: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int total_relays = 0;
    #1;
    for (int k = 0; k < N; k++) wait (done[k] === 1'b1);
    for (int k = 0; k < N; k++) begin
      checks += chk[k] + 1;
      failures += fail[k];
      if (!mapped[k]) begin
        failures++;
        $display("tb_haft_defects: %0d%% defects: not mapped", RATES[k]);
      end
      total_relays += relays[k];
      $display("tb_haft_defects: %0d%% defects: %0d of %0d rows searched", RATES[k], rows[k], ROWS);
    end
    checks++;
    if (total_relays == 0) begin
      failures++;
      $display("tb_haft_defects: no MUT with a defective LUT was used as a multiplexer");
    end
    $display("tb_haft_defects: %0d relays through defective-LUT MUTs in all runs", total_relays);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
