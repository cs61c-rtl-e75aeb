// tb_single_cycle_cpu: directed program on the single-cycle processor.
//
// The program sums 10 + 9 + ... + 1 in a loop (add, sub, beq leaving the
// loop, j back to its top), stores the sum, loads it back, builds a
// negative number from a zero-extended ori immediate and a subtract, stores
// and loads it through a negative (sign-extended) offset, adds the two and
// stores the result, then halts on a beq to itself. The testbench checks
// the three memory writes and the two loaded values against values worked
// out by hand, and checks that the processor completes exactly one
// instruction per clock: the halt must be reached after 51 cycles, the
// number of instructions the program executes (3 set-up, 10 loop passes of
// 4 less the final j, 9 after the loop).
module tb_single_cycle_cpu;
  import cpu_pkg::*;
  import mips_asm_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst = 1, prog_we = 0;
  logic [31:0] prog_addr = 0, prog_data = 0;
  logic [31:0] pc, instr, bus_w, bus_b, alu_result;
  ctrl_t       ctrl;
  logic        zero;
  logic [4:0]  rw;
  logic [31:0] prog [16];
  int          nst = 0, cycles = 0;
  logic [31:0] st_addr [3] = '{32'd16, 32'd24, 32'd28};
  logic [31:0] st_data [3] = '{32'd55, 32'hffff_0001, 32'hffff_0038};

  single_cycle_cpu dut (
    .clk(clk), .rst(rst), .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .pc(pc), .instr(instr), .ctrl(ctrl), .zero(zero), .rw(rw), .bus_w(bus_w),
    .bus_b(bus_b), .alu_result(alu_result));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog[0]  = enc_ori(1, 0, 16'd10);        // n = 10
    prog[1]  = enc_ori(2, 0, 16'd0);         // sum = 0
    prog[2]  = enc_ori(3, 0, 16'd1);         // one = 1
    prog[3]  = enc_add(2, 2, 1);             // loop: sum += n
    prog[4]  = enc_sub(1, 1, 3);             //       n -= 1
    prog[5]  = enc_beq(1, 0, 16'd1);         //       if n == 0 goto 7
    prog[6]  = enc_j(26'd3);                 //       goto loop
    prog[7]  = enc_sw(2, 0, 16'd16);         // MEM[16] = 55
    prog[8]  = enc_lw(4, 0, 16'd16);         // r4 = 55
    prog[9]  = enc_ori(5, 0, 16'hffff);      // r5 = 0x0000ffff (zero-extended)
    prog[10] = enc_sub(6, 0, 5);             // r6 = -65535 = 0xffff0001
    prog[11] = enc_ori(7, 0, 16'd32);        // r7 = 32
    prog[12] = enc_sw(6, 7, 16'hfff8);       // MEM[32 - 8] = r6
    prog[13] = enc_lw(8, 0, 16'd24);         // r8 = 0xffff0001
    prog[14] = enc_add(9, 8, 4);             // r9 = 0xffff0038
    prog[15] = enc_sw(9, 0, 16'd28);         // MEM[28] = r9
  end

  initial begin
    // halt instruction: beq $0, $0, -1
    for (int i = 0; i < 17; i++) begin
      @(posedge clk);
      prog_we = 1; prog_addr = 32'(i) << 2;
      prog_data = (i < 16) ? prog[i] : enc_beq(0, 0, 16'hffff);
    end
    @(posedge clk); prog_we = 0;
    @(negedge clk);
    @(posedge clk); rst = 0;
    while (pc != 32'd64 && cycles < 200) begin
      #1;
      if (ctrl.mem_wr) begin
        checks += 2;
        if (nst < 3) begin
          if (alu_result !== st_addr[nst]) begin failures++; $display("store %0d address %h exp %h", nst, alu_result, st_addr[nst]); end
          if (bus_b !== st_data[nst])      begin failures++; $display("store %0d data %h exp %h", nst, bus_b, st_data[nst]); end
        end else begin
          failures++; $display("unexpected store to %h", alu_result);
        end
        nst++;
      end
      if (ctrl.reg_wr && ctrl.mem_to_reg) begin
        checks++;
        if (rw == 4 && bus_w !== 32'd55) begin failures++; $display("lw r4 = %h", bus_w); end
        else if (rw == 8 && bus_w !== 32'hffff_0001) begin failures++; $display("lw r8 = %h", bus_w); end
        else if (rw != 4 && rw != 8) begin failures++; $display("load into r%0d", rw); end
      end
      @(negedge clk);
      cycles++;
      @(posedge clk);
    end
    checks += 2;
    if (nst != 3) begin failures++; $display("%0d stores, expected 3", nst); end
    if (cycles != 51) begin failures++; $display("halt reached after %0d cycles, expected 51", cycles); end
    // the halt loop keeps the PC in place
    repeat (3) @(negedge clk);
    #1;
    checks++;
    if (pc !== 32'd64) begin failures++; $display("PC left the halt loop: %h", pc); end
    $display("cycles to halt = %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
