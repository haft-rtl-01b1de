// tb_role_block: self-checking testbench of the ROLE block.
//
// Runs role_block_check on two block sizes: the default four-MUT block
// (one MUT per side, a four-LUT logic block) and a twelve-MUT block (three
// MUTs per side). Each run compares the side outputs of random
// configurations with a model, and makes the block work as a logic block,
// a routing block and a hybrid, and through a feedback crosspoint.
module tb_role_block;
  logic done4, done12;
  int   chk4, chk12, fail4, fail12;
  int   checks = 0, failures = 0;

  role_block_check #(.N_MUT(4))  u_4  (.done(done4),  .checks(chk4),  .failures(fail4));
  role_block_check #(.N_MUT(12)) u_12 (.done(done12), .checks(chk12), .failures(fail12));

  initial begin
    #200000;
    $display("tb_role_block: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done4 === 1'b1 && done12 === 1'b1);
    checks   = chk4 + chk12;
    failures = fail4 + fail12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
