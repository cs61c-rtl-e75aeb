// tb_pla_fuse: self-checking testbench of the field-programmable PLA.
//
// Instance F is a fuse array (3 inputs, 5 terms, 4 outputs): every
// crosspoint outside the personality of F0 = A + B'C', F1 = AC' + AB,
// F2 = B'C' + AB, F3 = B'C + A is blown. Instance X is an anti-fuse array
// (4 inputs, 4 terms, 4 outputs): exactly the crosspoints of
// F0 = AB + A'B', F1 = CD' + C'D are made. The testbench checks:
//   - both arrays output all zeros before programming, for every input;
//   - after programming, every output for every input combination;
//   - programming the same crosspoints again changes nothing (one-way);
//   - blowing one more fuse (AB from F1) leaves F1 = AC';
//   - reset returns the arrays to their unprogrammed state.
module tb_pla_fuse;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  // fuse instance
  logic       f_en = 0;
  logic [1:0] f_plane = 0;
  logic [2:0] f_row = 0, f_col = 0;
  logic [2:0] f_in = 0;
  logic [4:0] f_terms;
  logic [3:0] f_out;
  // anti-fuse instance
  logic       x_en = 0;
  logic [1:0] x_plane = 0;
  logic [1:0] x_row = 0, x_col = 0;
  logic [3:0] x_in = 0;
  logic [3:0] x_terms;
  logic [3:0] x_out;

  pla_fuse #(.N_IN(3), .N_TERMS(5), .N_OUT(4), .ANTIFUSE(1'b0)) dut_f (
    .clk(clk), .rst(rst), .prog_en(f_en), .prog_plane(f_plane), .prog_row(f_row),
    .prog_col(f_col), .in(f_in), .terms(f_terms), .out(f_out));

  pla_fuse #(.N_IN(4), .N_TERMS(4), .N_OUT(4), .ANTIFUSE(1'b1)) dut_x (
    .clk(clk), .rst(rst), .prog_en(x_en), .prog_plane(x_plane), .prog_row(x_row),
    .prog_col(x_col), .in(x_in), .terms(x_terms), .out(x_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Target personalities. Input bit 2 = A, 1 = B, 0 = C (fuse array);
  // bit 3 = A ... bit 0 = D (anti-fuse array). Terms of the fuse array:
  // 0 AB, 1 B'C, 2 AC', 3 B'C', 4 A; of the anti-fuse array: 0 AB, 1 A'B',
  // 2 CD', 3 C'D.
  bit [2:0] ft [5] = '{3'b110, 3'b001, 3'b100, 3'b000, 3'b100};
  bit [2:0] fc [5] = '{3'b000, 3'b010, 3'b001, 3'b011, 3'b000};
  bit [4:0] fo [4] = '{5'b11000, 5'b00101, 5'b01001, 5'b10010};  // F0..F3 over terms 4..0
  bit [3:0] xt [4] = '{4'b1100, 4'b0000, 4'b0010, 4'b0001};
  bit [3:0] xc [4] = '{4'b0000, 4'b1100, 4'b0001, 4'b0010};
  bit [3:0] xo [4] = '{4'b0011, 4'b1100, 4'b0000, 4'b0000};

  task automatic prog_f(input int plane, input int row, input int col);
    @(posedge clk); #1;
    f_en = 1; f_plane = 2'(plane); f_row = 3'(row); f_col = 3'(col);
    @(posedge clk); #1;
    f_en = 0;
  endtask

  task automatic prog_x(input int plane, input int row, input int col);
    @(posedge clk); #1;
    x_en = 1; x_plane = 2'(plane); x_row = 2'(row); x_col = 2'(col);
    @(posedge clk); #1;
    x_en = 0;
  endtask

  task automatic program_all();
    // fuse array: blow what is not wanted
    for (int t = 0; t < 5; t++)
      for (int i = 0; i < 3; i++) begin
        if (!ft[t][i]) prog_f(0, t, i);
        if (!fc[t][i]) prog_f(1, t, i);
      end
    for (int o = 0; o < 4; o++)
      for (int t = 0; t < 5; t++)
        if (!fo[o][t]) prog_f(2, o, t);
    // anti-fuse array: make what is wanted
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < 4; i++) begin
        if (xt[t][i]) prog_x(0, t, i);
        if (xc[t][i]) prog_x(1, t, i);
      end
    for (int o = 0; o < 4; o++)
      for (int t = 0; t < 4; t++)
        if (xo[o][t]) prog_x(2, o, t);
  endtask

  task automatic check_unprogrammed(input string when);
    for (int v = 0; v < 16; v++) begin
      f_in = 3'(v); x_in = 4'(v); #1;
      checks += 2;
      if (f_out !== 4'b0000) begin failures++; $display("%s: fuse out=%b for in=%0d", when, f_out, v); end
      if (x_out !== 4'b0000) begin failures++; $display("%s: anti-fuse out=%b for in=%0d", when, x_out, v); end
    end
  endtask

  task automatic check_programmed(input string when, input bit f1_ab_blown);
    logic a, b, c, d;
    logic [3:0] ef;
    for (int v = 0; v < 8; v++) begin
      f_in = 3'(v); {a, b, c} = 3'(v); #1;
      ef[0] = a | (~b & ~c);
      ef[1] = f1_ab_blown ? (a & ~c) : ((a & ~c) | (a & b));
      ef[2] = (~b & ~c) | (a & b);
      ef[3] = (~b & c) | a;
      checks++;
      if (f_out !== ef) begin failures++; $display("%s: fuse ABC=%03b F=%b exp %b", when, v, f_out, ef); end
    end
    for (int v = 0; v < 16; v++) begin
      x_in = 4'(v); {a, b, c, d} = 4'(v); #1;
      checks++;
      if (x_out !== {2'b00, c ^ d, a ~^ b}) begin
        failures++; $display("%s: anti-fuse ABCD=%04b F=%b", when, v, x_out);
      end
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    check_unprogrammed("before programming");
    program_all();
    check_programmed("programmed", 0);
    program_all();                     // repeating has no further effect
    check_programmed("programmed twice", 0);
    prog_f(2, 1, 0);                   // blow term AB from F1
    check_programmed("AB blown from F1", 1);
    @(posedge clk); #1 rst = 1;
    @(posedge clk); #1 rst = 0;
    check_unprogrammed("after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
