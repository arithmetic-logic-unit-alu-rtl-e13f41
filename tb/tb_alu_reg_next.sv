// Self-checking testbench of alu_reg_next: random register contents and
// switch values under each register control code.
module tb_alu_reg_next;
  import alu_pkg::*;
  logic [7:0] reg_a, reg_b, in_sw, next_reg_a, next_reg_b;
  reg_ctrl_e  reg_ctrl;
  int checks = 0, failures = 0;

  alu_reg_next dut (.reg_a, .reg_b, .in_sw, .reg_ctrl, .next_reg_a, .next_reg_b);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] ea, eb;
      reg_a = 8'($urandom); reg_b = 8'($urandom); in_sw = 8'($urandom);
      case (n % 3)
        0: begin reg_ctrl = RC_LOAD_A; ea = in_sw; eb = reg_b; end
        1: begin reg_ctrl = RC_LOAD_B; ea = reg_a; eb = in_sw; end
        default: begin reg_ctrl = RC_HOLD; ea = reg_a; eb = reg_b; end
      endcase
      #1;
      checks++;
      if (next_reg_a !== ea || next_reg_b !== eb) begin
        failures++;
        if (failures < 10) $display("FAIL ctrl=%0d a=%0d b=%0d in=%0d -> %0d %0d",
                                    reg_ctrl, reg_a, reg_b, in_sw, next_reg_a, next_reg_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
