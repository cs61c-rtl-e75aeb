// tb_extender: self-checking testbench of the immediate extender.
// Checks edge values and random immediates against zero/sign extension
// computed with SystemVerilog's own signed conversion.
module tb_extender;
  int checks = 0, failures = 0;
  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] y, exp_y;

  extender dut (.imm16(imm), .ext_op(ext_op), .imm32(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] v, input logic op);
    imm = v; ext_op = op; #1;
    exp_y = op ? 32'(signed'(v)) : {16'h0000, v};
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("imm=%h ext_op=%0b got %h expected %h", v, op, y, exp_y);
    end
  endtask

  initial begin
    check(16'h0000, 0); check(16'h0000, 1);
    check(16'hffff, 0); check(16'hffff, 1);
    check(16'h8000, 0); check(16'h8000, 1);
    check(16'h7fff, 0); check(16'h7fff, 1);
    for (int i = 0; i < 300; i++) check(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
