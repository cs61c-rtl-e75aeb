// tb_pla: self-checking testbench of the generic PLA.
// Instance 1 uses the default personality (three inputs, five shared
// terms, four outputs) and is checked exhaustively against the Boolean
// equations F0 = A + B'C', F1 = AC' + AB, F2 = B'C' + AB, F3 = B'C + A and
// against each product term. Instance 2 is programmed here with random
// personalities over six inputs, and every output is compared with a
// sum-of-products evaluation done in the testbench, including terms wired
// to both forms of an input (always 0) and terms wired to none (always 1).
module tb_pla;
  int checks = 0, failures = 0;
  logic [2:0] in1;
  logic [4:0] t1;
  logic [3:0] o1;
  logic a, b, c;

  pla dut1 (.in(in1), .terms(t1), .out(o1));

  localparam int NI = 6, NT = 8, NO = 5;
  localparam logic [NT-1:0][NI-1:0] AT = {6'b100000, 6'b000000, 6'b110011, 6'b000101,
                                          6'b010000, 6'b001100, 6'b100001, 6'b111111};
  localparam logic [NT-1:0][NI-1:0] AC = {6'b000001, 6'b000000, 6'b000100, 6'b101000,
                                          6'b100000, 6'b110011, 6'b010010, 6'b000000};
  localparam logic [NO-1:0][NT-1:0] OP = {8'b1000_0001, 8'b0100_0010, 8'b0011_0100,
                                          8'b0000_1000, 8'b1111_0000};
  logic [NI-1:0] in2;
  logic [NT-1:0] t2;
  logic [NO-1:0] o2;

  pla #(.N_IN(NI), .N_TERMS(NT), .N_OUT(NO), .AND_TRUE(AT), .AND_COMP(AC), .OR_PLANE(OP))
    dut2 (.in(in2), .terms(t2), .out(o2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] ef;
    logic [4:0] et;
    logic [NT-1:0] et2;
    logic [NO-1:0] eo2;
    logic       tv;
    for (int v = 0; v < 8; v++) begin
      in1 = 3'(v); {a, b, c} = 3'(v); #1;
      et = {a, !b && !c, a && !c, !b && c, a && b};           // A, B'C', AC', B'C, AB
      ef[0] = a | (!b & !c);
      ef[1] = (a & !c) | (a & b);
      ef[2] = (!b & !c) | (a & b);
      ef[3] = (!b & c) | a;
      checks += 2;
      if (o1 !== ef) begin failures++; $display("ABC=%03b F=%b exp %b", v, o1, ef); end
      if (t1 !== et) begin failures++; $display("ABC=%03b terms=%b exp %b", v, t1, et); end
    end
    for (int v = 0; v < 64; v++) begin
      in2 = 6'(v); #1;
      for (int t = 0; t < NT; t++) begin
        tv = 1'b1;
        for (int i = 0; i < NI; i++) begin
          if (AT[t][i] && !in2[i]) tv = 1'b0;
          if (AC[t][i] &&  in2[i]) tv = 1'b0;
        end
        et2[t] = tv;
      end
      for (int o = 0; o < NO; o++) begin
        eo2[o] = 1'b0;
        for (int t = 0; t < NT; t++) if (OP[o][t] && et2[t]) eo2[o] = 1'b1;
      end
      checks += 2;
      if (t2 !== et2) begin failures++; $display("in=%06b terms=%b exp %b", v, t2, et2); end
      if (o2 !== eo2) begin failures++; $display("in=%06b out=%b exp %b", v, o2, eo2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
