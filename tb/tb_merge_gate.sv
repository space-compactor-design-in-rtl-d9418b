// tb_merge_gate: exhaustive check of merge_gate in every logic family.
//
// Seven instances cover the default 3-input XOR and a 5-input gate of each
// family over the mask 5'b10110 (inputs 1, 2 and 4 selected, 0 and 3 must be
// ignored). For all 32 input values each output is compared with a
// reference worked out bit by bit in the testbench.
module tb_merge_gate;
  import compactor_pkg::*;

  localparam logic [4:0] M = 5'b10110;

  logic [4:0] in5;
  logic       y_xor3, y_and, y_nand, y_or, y_nor, y_xor, y_xnor, y_pass;
  int checks = 0, failures = 0;

  merge_gate                                         u_def  (.in(in5[2:0]), .out(y_xor3));
  merge_gate #(.N(5), .GATE(GATE_AND),  .MASK(M))     u_and  (.in(in5), .out(y_and));
  merge_gate #(.N(5), .GATE(GATE_NAND), .MASK(M))     u_nand (.in(in5), .out(y_nand));
  merge_gate #(.N(5), .GATE(GATE_OR),   .MASK(M))     u_or   (.in(in5), .out(y_or));
  merge_gate #(.N(5), .GATE(GATE_NOR),  .MASK(M))     u_nor  (.in(in5), .out(y_nor));
  merge_gate #(.N(5), .GATE(GATE_XOR),  .MASK(M))     u_xor  (.in(in5), .out(y_xor));
  merge_gate #(.N(5), .GATE(GATE_XNOR), .MASK(M))     u_xnor (.in(in5), .out(y_xnor));
  merge_gate #(.N(5), .GATE(GATE_PASS), .MASK(5'b01000)) u_pass (.in(in5), .out(y_pass));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%b got=%b exp=%b", what, in5, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, o, x;
    for (int v = 0; v < 32; v++) begin
      in5 = 5'(v);
      #1;
      a = 1'b1; o = 1'b0; x = 1'b0;
      for (int i = 0; i < 5; i++) begin
        if (M[i]) begin
          a = a & in5[i];
          o = o | in5[i];
          x = x ^ in5[i];
        end
      end
      check("xor3", y_xor3, in5[0] ^ in5[1] ^ in5[2]);
      check("and",  y_and,  a);
      check("nand", y_nand, !a);
      check("or",   y_or,   o);
      check("nor",  y_nor,  !o);
      check("xor",  y_xor,  x);
      check("xnor", y_xnor, !x);
      check("pass", y_pass, in5[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
