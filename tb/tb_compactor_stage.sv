// tb_compactor_stage: exhaustive check of the default stage (c432 stage 1)
// and of a second configuration using AND/OR/XNOR classes.
//
// Default stage: lines_in[0..6] = lines 426..432; expected outputs are
// {432, 431, 430, 428, 426^427^429}. Every one of the 128 input values is
// applied with no fault, and again with each output wire forced stuck-at-0
// and stuck-at-1. The second instance (6 inputs, 3 outputs) checks that
// masks and gate types are taken per output line.
module tb_compactor_stage;
  import compactor_pkg::*;

  logic    [6:0] lin;
  fi_sel_e [4:0] fi;
  logic    [4:0] lout;

  logic    [5:0] lin2;
  fi_sel_e [2:0] fi2;
  logic    [2:0] lout2;

  int checks = 0, failures = 0;

  compactor_stage dut (.lines_in(lin), .fi_sel(fi), .lines_out(lout));

  compactor_stage #(
    .N_IN(6), .N_OUT(3),
    .MASK({6'b110000, 6'b001100, 6'b000011}),
    .GATE({GATE_XNOR, GATE_OR, GATE_AND})
  ) dut2 (.lines_in(lin2), .fi_sel(fi2), .lines_out(lout2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] ref_s1(input logic [6:0] r);
    return {r[6], r[5], r[4], r[2], r[0] ^ r[1] ^ r[3]};
  endfunction

  initial begin
    logic [4:0] exp;
    logic [2:0] exp2;
    for (int f = -1; f < 10; f++) begin   // -1: no fault; 2k: line k sa0, 2k+1: line k sa1
      for (int k = 0; k < 5; k++) fi[k] = FI_NORMAL;
      if (f >= 0) fi[f/2] = (f % 2) ? FI_SA1 : FI_SA0;
      for (int v = 0; v < 128; v++) begin
        lin = 7'(v);
        #1;
        exp = ref_s1(lin);
        if (f >= 0) exp[f/2] = 1'(f % 2);
        checks++;
        if (lout !== exp) begin
          failures++;
          $display("FAIL stage1 fault=%0d in=%b got=%b exp=%b", f, lin, lout, exp);
        end
      end
    end
    for (int k = 0; k < 3; k++) fi2[k] = FI_NORMAL;
    for (int v = 0; v < 64; v++) begin
      lin2 = 6'(v);
      #1;
      exp2 = {!(lin2[5] ^ lin2[4]), lin2[3] | lin2[2], lin2[1] & lin2[0]};
      checks++;
      if (lout2 !== exp2) begin
        failures++;
        $display("FAIL stage2cfg in=%b got=%b exp=%b", lin2, lout2, exp2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
