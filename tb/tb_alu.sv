// Self-checking testbench of alu: every operand pair under every function
// code, compared with integer arithmetic, plus the reference vectors of the
// specification's reference waveform (for example 148+249 -> 141 with overflow,
// 35-99 -> 64 with sign).
module tb_alu;
  import alu_pkg::*;

  logic [7:0] a, b, result;
  alu_fn_e    fn;
  logic       sign, overflow;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .fn, .result, .sign, .overflow);

  task automatic check(input logic [7:0] ea, eb, input alu_fn_e efn,
                       input int exp_res, input bit exp_sign, input bit exp_ovf);
    a = ea; b = eb; fn = efn;
    #1;
    checks++;
    if (result !== exp_res[7:0] || sign !== exp_sign || overflow !== exp_ovf) begin
      failures++;
      if (failures < 10)
        $display("FAIL fn=%0d a=%0d b=%0d: got %0d s=%0b o=%0b, expected %0d s=%0b o=%0b",
                 efn, ea, eb, result, sign, overflow, exp_res, exp_sign, exp_ovf);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reference vectors: fn, a, b, result, sign, overflow.
    check(5,   3,   FN_PASS_A, 5,   0, 0);
    check(9,   3,   FN_PASS_B, 3,   0, 0);
    check(17,  145, FN_PASS_A, 17,  0, 0);
    check(145, 124, FN_PASS_B, 124, 0, 0);
    check(148, 249, FN_ADD,    141, 0, 1);
    check(213, 105, FN_SUB,    108, 0, 0);
    check(35,  99,  FN_SUB,    64,  1, 0);
    check(242, 104, FN_ADD,    90,  0, 1);
    check(49,  45,  FN_SUB,    4,   0, 0);
    check(85,  36,  FN_ADD,    121, 0, 0);
    // Exhaustive.
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        check(i[7:0], j[7:0], FN_PASS_A, i, 0, 0);
        check(i[7:0], j[7:0], FN_PASS_B, j, 0, 0);
        check(i[7:0], j[7:0], FN_ADD, (i + j) % 256, 0, (i + j) > 255);
        check(i[7:0], j[7:0], FN_SUB, (i >= j) ? i - j : j - i, j > i, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
