// tb_alu: self-checking test of the ALU.
// Applies directed corner values and random operands to all thirteen
// operations and compares with a reference written in the testbench.
module tb_alu;
  import risc16_pkg::*;

  logic [15:0] a, b, y;
  alu_op_e     op;
  logic        clk = 0;
  int          checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .y(y));

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_alu(alu_op_e o, logic [15:0] x, logic [15:0] z);
    int s = int'(z[3:0]);
    logic [15:0] r;
    case (o)
      ALU_ADD:  r = x + z;
      ALU_SUB:  r = x - z;
      ALU_AND:  r = x & z;
      ALU_OR:   r = x | z;
      ALU_NOR:  r = ~(x | z);
      ALU_XOR:  r = x ^ z;
      ALU_SLT:  r = ($signed(x) < $signed(z)) ? 16'd1 : 16'd0;
      ALU_SLTU: r = (x < z) ? 16'd1 : 16'd0;
      ALU_SLL:  r = x << s;
      ALU_SRL:  r = x >> s;
      ALU_SRA:  begin r = x; for (int i = 0; i < s; i++) r = {r[15], r[15:1]}; end
      ALU_ROL:  begin r = x; for (int i = 0; i < s; i++) r = {r[14:0], r[15]}; end
      ALU_ROR:  begin r = x; for (int i = 0; i < s; i++) r = {r[0], r[15:1]}; end
      default:  r = 16'h0;
    endcase
    return r;
  endfunction

  task automatic check(alu_op_e o, logic [15:0] x, logic [15:0] z);
    logic [15:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, e);
    end
  endtask

  initial begin
    // watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed
    check(ALU_ADD, 16'h7fff, 16'h0001);
    check(ALU_SUB, 16'h0000, 16'h0001);
    check(ALU_SLT, 16'h8000, 16'h0001);   // -32768 < 1
    check(ALU_SLTU, 16'h8000, 16'h0001);  // 32768 > 1
    check(ALU_SRA, 16'h8000, 16'h000f);
    check(ALU_SRL, 16'h8000, 16'h000f);
    check(ALU_SLL, 16'h0001, 16'hfff4);   // only low 4 bits of B count
    check(ALU_ROL, 16'h8001, 16'h0001);
    check(ALU_ROR, 16'h8001, 16'h0001);
    check(ALU_ROL, 16'h1234, 16'h0000);
    check(ALU_NOR, 16'h0f0f, 16'h00ff);
    // random
    for (int n = 0; n < 4000; n++)
      check(alu_op_e'($urandom_range(0, 12)), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
