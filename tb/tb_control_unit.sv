// tb_control_unit: self-checking test of the main decoder.
// Applies all 16 opcodes with all 8 function codes and compares every
// field of the control word with the reference decoder in risc16_asm_pkg.
// Fields that do not matter for an instruction are compared too, since the
// reference fixes them to the same defaults.
module tb_control_unit;
  import risc16_pkg::*;
  import risc16_asm_pkg::*;

  logic       clk = 0;
  logic [3:0] op;
  logic [2:0] funct;
  ctrl_t      ctrl, exp;
  int         checks = 0, failures = 0;

  control_unit dut (.op(op), .funct(funct), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      for (int f = 0; f < 8; f++) begin
        op = 4'(o); funct = 3'(f);
        #1;
        exp = ref_ctrl({op, 9'($urandom), funct});
        checks++;
        if (ctrl !== exp) begin
          failures++;
          $display("FAIL op=%0d f=%0d got=%p exp=%p", o, f, ctrl, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
