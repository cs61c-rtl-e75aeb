// tb_data_memory: self-checking testbench of the data memory.
// Random aligned writes and reads over the whole address range; the
// testbench keeps its own copy of every word written and checks each read
// against it (words never written are not checked). A read is
// combinational and a write lands on the falling clock edge.
module tb_data_memory;
  localparam int WORDS = 1024;
  int checks = 0, failures = 0;
  logic        clk = 0, we = 0;
  logic [31:0] adr = 0, din = 0, dout;
  logic [31:0] model [int];

  data_memory #(.WORDS(WORDS)) dut (.clk(clk), .wr_en(we), .adr(adr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk);
      idx = $urandom_range(WORDS - 1);
      // high address bits above the memory size are set at random: they wrap
      adr = {$urandom_range(3) == 0 ? 20'($urandom) : 20'd0, 10'(idx), 2'b00};
      we  = 1'($urandom_range(1));
      din = $urandom;
      #1;
      if (model.exists(idx)) begin
        checks++;
        if (dout !== model[idx]) begin failures++; $display("read word %0d = %h exp %h", idx, dout, model[idx]); end
      end
      @(negedge clk);
      if (we) model[idx] = din;
      #1;
      if (we) begin
        checks++;
        if (dout !== din) begin failures++; $display("after write word %0d = %h exp %h", idx, dout, din); end
      end
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
