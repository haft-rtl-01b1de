// tb_mut: self-checking testbench of one 6-MUT.
//
// Random truth tables, selects and inputs are applied; the expected output
// is worked out from the truth table and a model of the flip-flop kept in the
// testbench (one clock of latency for the SEL_FF path). Both uses of the MUT
// are counted: as a 4-LUT logic cell and as a 6-input routing multiplexer.
module tb_mut;
  import haft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mut_cfg_t cfg;
  logic [5:0] in;
  logic g;
  int checks = 0, failures = 0;
  int n_logic = 0, n_route = 0;

  logic en = 1'b1;
  mut dut (.clk, .rst_n, .en, .cfg,
           .a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .e(in[4]), .f(in[5]),
           .g);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("tb_mut: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp, string what);
    checks++;
    if (g !== exp) begin
      failures++;
      $display("tb_mut: %s mismatch sel=%0d in=%b lut=%h got %b exp %b",
               what, cfg.sel, in, cfg.lut, g, exp);
    end
  endtask

  logic model_ff;

  initial begin
    cfg = '{sel: SEL_A, lut: 16'h0000};
    in  = '0;
    repeat (2) @(posedge clk);
    // flip-flop is cleared by reset
    cfg.sel = SEL_FF; #1; check(1'b0, "reset");
    rst_n = 1'b1;
    model_ff = 1'b0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      cfg.lut = 16'($urandom);
      cfg.sel = mut_sel_e'($urandom_range(0, 7));
      in      = 6'($urandom);
      #1;
      case (cfg.sel)
        SEL_LUT: begin check(cfg.lut[{in[3], in[2], in[1], in[0]}], "lut"); n_logic++; end
        SEL_FF:  begin check(model_ff, "ff"); n_logic++; end
        default: begin check(in[int'(cfg.sel) - 2], "mux"); n_route++; end
      endcase
      model_ff = cfg.lut[{in[3], in[2], in[1], in[0]}];   // sampled at next posedge
    end
    // a 2-input XOR registered: output appears one cycle after the inputs
    @(negedge clk);
    cfg = '{sel: SEL_FF, lut: 16'h6666};
    in = 6'b000001;
    @(negedge clk); check(1'b1, "xor ff 01");
    in = 6'b000011;
    @(negedge clk); check(1'b0, "xor ff 11");
    // disabled fabric: output held at 0
    cfg = '{sel: SEL_A, lut: 16'h0000};
    in = 6'b000001; en = 1'b0; #1; check(1'b0, "disabled");
    en = 1'b1; #1; check(1'b1, "enabled");
    if (n_logic == 0 || n_route == 0) begin
      failures++; $display("tb_mut: a mode was never exercised");
    end
    $display("tb_mut: logic uses %0d, routing uses %0d", n_logic, n_route);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
