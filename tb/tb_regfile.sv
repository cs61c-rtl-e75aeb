// tb_regfile: self-checking testbench of the 32 x 32-bit register file.
// A reference array in the testbench tracks every write; both read ports
// are compared with it after every falling clock edge. Writes to register
// 0, writes with RegWr = 0 and the reset are all exercised.
module tb_regfile;
  int checks = 0, failures = 0;
  logic        clk = 0, rst = 1, we = 0;
  logic [4:0]  rw = 0, ra = 0, rb = 0;
  logic [31:0] bw = 0, ba, bb;
  logic [31:0] model [32];

  regfile dut (.clk(clk), .rst(rst), .reg_wr(we), .rw(rw), .bus_w(bw),
               .ra(ra), .rb(rb), .bus_a(ba), .bus_b(bb));

  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      checks += 2;
      if (ba !== model[i])      begin failures++; $display("busA r%0d=%h exp %h", i, ba, model[i]); end
      if (bb !== model[31 - i]) begin failures++; $display("busB r%0d=%h exp %h", 31 - i, bb, model[31 - i]); end
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    @(negedge clk); @(negedge clk);
    #1 check_reads();
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      @(posedge clk);
      we = 1'($urandom_range(3) != 0);
      rw = (n % 50 == 0) ? 5'd0 : 5'($urandom);
      bw = $urandom;
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      // reads during the cycle still return the old value
      checks += 2;
      if (ba !== model[ra]) begin failures++; $display("pre-edge busA r%0d=%h exp %h", ra, ba, model[ra]); end
      if (bb !== model[rb]) begin failures++; $display("pre-edge busB r%0d=%h exp %h", rb, bb, model[rb]); end
      @(negedge clk);
      if (we && rw != 0) model[rw] = bw;
      #1;
      if (n % 40 == 0) check_reads();
      else begin
        ra = rw; rb = 5'($urandom); #1;
        checks += 2;
        if (ba !== model[ra]) begin failures++; $display("busA r%0d=%h exp %h", ra, ba, model[ra]); end
        if (bb !== model[rb]) begin failures++; $display("busB r%0d=%h exp %h", rb, bb, model[rb]); end
      end
    end
    // synchronous reset clears everything
    @(posedge clk); we = 0; rst = 1;
    @(negedge clk); #1;
    for (int i = 0; i < 32; i++) model[i] = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
