// tb_nano_config_mem: self-checking testbench of the configuration memory
// model.
//
// A defect-free instance must hold every written word exactly. An instance
// with a 30 % defect rate must read back each written word with some bits
// forced to 0, must show the same pattern whatever is written (defects are
// fixed), and must have a defect fraction near 30 %. The parallel bit
// output must equal the words read back.
module tb_nano_config_mem;
  import haft_pkg::*;

  localparam int unsigned BITS = 460;
  localparam int unsigned WORDS = (BITS + CFG_WORD_W - 1) / CFG_WORD_W;
  localparam int unsigned AW = $clog2(WORDS);

  logic clk = 1'b0;
  logic we0, we1;
  logic [AW-1:0] addr;
  logic [CFG_WORD_W-1:0] wdata, rdata0, rdata1;
  logic [BITS-1:0] bits0, bits1;
  int checks = 0, failures = 0;

  nano_config_mem #(.BITS(BITS), .DEFECT_PCT(0), .SEED(7)) u_good (
    .clk, .we(we0), .addr, .wdata, .rdata(rdata0), .bits(bits0));
  nano_config_mem #(.BITS(BITS), .DEFECT_PCT(30), .SEED(7)) u_bad (
    .clk, .we(we1), .addr, .wdata, .rdata(rdata1), .bits(bits1));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("tb_nano_config_mem: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(logic [CFG_WORD_W-1:0] got, logic [CFG_WORD_W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("tb_nano_config_mem: %s addr %0d got %h exp %h", what, addr, got, exp);
    end
  endtask

  logic [CFG_WORD_W-1:0] img  [WORDS];
  logic [CFG_WORD_W-1:0] okw  [WORDS];
  int n_def, n_bits;

  initial begin
    we0 = 0; we1 = 0; addr = '0; wdata = '0;
    // write all ones to find the working crosspoints of the defective copy
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk); addr = AW'(w); wdata = '1; we0 = 1; we1 = 1;
    end
    @(negedge clk); we0 = 0; we1 = 0;
    n_def = 0; n_bits = 0;
    for (int w = 0; w < WORDS; w++) begin
      addr = AW'(w); #1;
      okw[w] = rdata1;
      for (int b = 0; b < CFG_WORD_W; b++) begin
        n_bits++;
        if (!rdata1[b]) n_def++;
      end
    end
    // random images
    for (int rep = 0; rep < 4; rep++) begin
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        img[w] = CFG_WORD_W'($urandom);
        addr = AW'(w); wdata = img[w]; we0 = 1; we1 = 1;
      end
      @(negedge clk); we0 = 0; we1 = 0;
      for (int w = 0; w < WORDS; w++) begin
        addr = AW'(w); #1;
        cmp(rdata0, img[w], "good readback");
        cmp(rdata1, img[w] & okw[w], "defective readback");
      end
      for (int i = 0; i < BITS; i++) begin
        checks++;
        if (bits0[i] !== img[i / CFG_WORD_W][i % CFG_WORD_W] ||
            bits1[i] !== (img[i / CFG_WORD_W][i % CFG_WORD_W] & okw[i / CFG_WORD_W][i % CFG_WORD_W])) begin
          failures++;
          $display("tb_nano_config_mem: parallel bit %0d wrong", i);
        end
      end
    end
    // defect rate near the set percentage (30 % of 464 bits)
    checks++;
    if (n_def < n_bits * 20 / 100 || n_def > n_bits * 40 / 100) begin
      failures++;
      $display("tb_nano_config_mem: %0d of %0d bits defective, expected about 30 %%", n_def, n_bits);
    end
    $display("tb_nano_config_mem: %0d of %0d crosspoints defective", n_def, n_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
