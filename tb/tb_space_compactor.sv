// tb_space_compactor: exhaustive check of the c432 7-to-1 compactor.
//
// The reference is the line-by-line network written out in the testbench:
// 433 = 426^427^429; 434 = 430^432; 435 = 433^431; z = 434^435^428.
// For all 128 response values it checks the stage-1 and stage-2 lines and z,
// with no fault and with every compactor wire stuck-at-0 and stuck-at-1
// (9 wires, 18 faults). It also checks the zero-aliasing property: an error
// on any single CUT output line always changes z, and that every one of the
// 18 compactor faults changes z for at least one response (100% coverage of
// the compactor's own stuck-at faults under exhaustive responses).
module tb_space_compactor;
  import compactor_pkg::*;

  logic    [6:0] resp;
  fi_sel_e [4:0] fi_s1;
  fi_sel_e [2:0] fi_s2;
  fi_sel_e [0:0] fi_s3;
  logic    [4:0] s1_lines;
  logic    [2:0] s2_lines;
  logic          z;

  int checks = 0, failures = 0;

  space_compactor dut (.resp, .fi_s1, .fi_s2, .fi_s3, .s1_lines, .s2_lines, .z);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fault f: -1 none; wire w = f/2 (0..4 stage 1, 5..7 stage 2, 8 output), sa = f%2
  function automatic logic force_w(input logic v, input int f, input int w);
    if (f >= 0 && f / 2 == w) return 1'(f % 2);
    return v;
  endfunction

  task automatic ref_net(input logic [6:0] r, input int f,
                         output logic [4:0] s1, output logic [2:0] s2, output logic zz);
    logic l426, l427, l428, l429, l430, l431, l432, l433, l434, l435;
    {l432, l431, l430, l429, l428, l427, l426} = r;
    l433 = force_w(l426 ^ l427 ^ l429, f, 0);
    l428 = force_w(l428, f, 1);
    l430 = force_w(l430, f, 2);
    l431 = force_w(l431, f, 3);
    l432 = force_w(l432, f, 4);
    s1   = {l432, l431, l430, l428, l433};
    l434 = force_w(l430 ^ l432, f, 5);
    l435 = force_w(l433 ^ l431, f, 6);
    l428 = force_w(l428, f, 7);
    s2   = {l428, l435, l434};
    zz   = force_w(l434 ^ l435 ^ l428, f, 8);
  endtask

  task automatic set_fault(input int f);
    for (int k = 0; k < 5; k++) fi_s1[k] = FI_NORMAL;
    for (int k = 0; k < 3; k++) fi_s2[k] = FI_NORMAL;
    fi_s3[0] = FI_NORMAL;
    if (f >= 0) begin
      if (f / 2 < 5)      fi_s1[f/2]     = (f % 2) ? FI_SA1 : FI_SA0;
      else if (f / 2 < 8) fi_s2[f/2 - 5] = (f % 2) ? FI_SA1 : FI_SA0;
      else                fi_s3[0]       = (f % 2) ? FI_SA1 : FI_SA0;
    end
  endtask

  initial begin
    logic [4:0] e1;
    logic [2:0] e2;
    logic       ez;
    logic       golden [128];
    logic       z_other;
    int         detected;

    // fault-free and every single compactor fault, all responses
    for (int f = -1; f < 18; f++) begin
      set_fault(f);
      detected = 0;
      for (int v = 0; v < 128; v++) begin
        resp = 7'(v);
        #1;
        ref_net(resp, f, e1, e2, ez);
        checks++;
        if (s1_lines !== e1 || s2_lines !== e2 || z !== ez) begin
          failures++;
          $display("FAIL fault=%0d resp=%b s1=%b/%b s2=%b/%b z=%b/%b",
                   f, resp, s1_lines, e1, s2_lines, e2, z, ez);
        end
        if (f < 0) golden[v] = z;
        else if (z != golden[v]) detected++;
      end
      if (f >= 0) begin
        checks++;
        if (detected == 0) begin
          failures++;
          $display("FAIL compactor fault %0d never reaches z", f);
        end
      end
    end

    // zero aliasing for single-line errors on the CUT outputs
    set_fault(-1);
    for (int v = 0; v < 128; v++) begin
      for (int k = 0; k < 7; k++) begin
        resp = 7'(v) ^ (7'd1 << k);
        #1;
        z_other = z;
        checks++;
        if (z_other == golden[v]) begin
          failures++;
          $display("FAIL single error on line %0d masked for resp=%b", 426 + k, 7'(v));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
