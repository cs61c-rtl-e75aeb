// tb_alu: self-checking testbench of the ALU.
// For add, subtract and or, random and corner operands are applied and the
// result and Zero flag are compared with values computed in the testbench;
// equal operands under subtract must raise Zero (the beq comparison).
module tb_alu;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, r, exp_r;
  alu_op_e     op;
  logic        z;

  alu dut (.a(a), .b(b), .alu_ctr(op), .result(r), .zero(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input alu_op_e o);
    a = x; b = y; op = o; #1;
    case (o)
      ALU_ADD: exp_r = x + y;
      ALU_SUB: exp_r = x - y;
      default: exp_r = x | y;
    endcase
    checks += 2;
    if (r !== exp_r) begin
      failures++;
      $display("op=%s a=%h b=%h got %h expected %h", o.name(), x, y, r, exp_r);
    end
    if (z !== (exp_r == 32'd0)) begin
      failures++;
      $display("zero flag wrong: op=%s a=%h b=%h z=%0b", o.name(), x, y, z);
    end
  endtask

  initial begin
    alu_op_e ops[3] = '{ALU_ADD, ALU_SUB, ALU_OR};
    logic [31:0] v;
    check(32'h7fffffff, 32'h1, ALU_ADD);
    check(32'hffffffff, 32'h1, ALU_ADD);
    check(32'h0, 32'h1, ALU_SUB);
    check(32'h0, 32'h0, ALU_OR);
    for (int i = 0; i < 50; i++) begin
      v = $urandom;
      check(v, v, ALU_SUB);            // beq equal: Zero must be 1
      check(v, v + 32'd1, ALU_SUB);    // beq not equal
    end
    for (int i = 0; i < 300; i++) check($urandom, $urandom, ops[$urandom_range(2)]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
