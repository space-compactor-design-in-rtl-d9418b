// tb_bist_compactor_top: end-to-end BIST sessions at the default size.
//
// The top runs with all its default parameters (3253 patterns, 36-bit
// generator, 4096-entry buffer) around the stand-in circuit cut_stub. The
// sequence is:
//   1. golden session (capture_mode = 1), fault free;
//   2. test session with no fault: fail must stay low;
//   3. one test session per single stuck-at fault: each of the 36 CUT input
//      lines, the 7 CUT output lines and the 9 compactor wires, stuck-at-0
//      and stuck-at-1 (104 faulty sessions). Every fault on an output line or
//      compactor wire must be detected; input faults are counted (whether
//      they show depends on the circuit).
// During every session the testbench follows the patterns with its own
// 36-bit LFSR model, recomputes the compacted bit with its own line-by-line
// model of the network (fault included), compares compact_out every cycle,
// and predicts err_count as the number of patterns whose compacted bit
// differs from the golden one, and checks that cut_pattern carries an
// injected input fault. It also checks start->done = 3256 cycles.
// Mechanisms counted (each must occur): golden capture, clean pass, fault on
// a CUT line, fault on a compactor wire, stuck-at-0, stuck-at-1, detected
// fault, mismatch pulse, fault on a CUT input.
module tb_bist_compactor_top;
  import compactor_pkg::*;

  localparam int N = 3253;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, capture_mode = 1'b0;
  logic [35:0] cut_pattern;
  logic [6:0]  cut_response;
  fi_sel_e [35:0] fi_in;
  fi_sel_e [6:0] fi_cut;
  fi_sel_e [4:0] fi_s1;
  fi_sel_e [2:0] fi_s2;
  fi_sel_e [0:0] fi_s3;
  logic compact_out, busy, done, mismatch, fail;
  logic [4:0] s1_lines;
  logic [2:0] s2_lines;
  logic [12:0] err_count;

  int checks = 0, failures = 0;
  int n_capture = 0, n_clean_pass = 0, n_cut_fault = 0, n_cmp_fault = 0, n_in_fault = 0, n_in_detected = 0;
  int n_sa0 = 0, n_sa1 = 0, n_detected = 0, n_mismatch = 0;

  bist_compactor_top dut (
    .clk, .rst_n, .start, .capture_mode, .cut_pattern, .cut_response,
    .fi_in, .fi_cut, .fi_s1, .fi_s2, .fi_s3, .compact_out, .s1_lines, .s2_lines,
    .busy, .done, .mismatch, .fail, .err_count
  );

  cut_stub u_cut (.a(cut_pattern), .y(cut_response));

  always #5 clk = ~clk;

  always @(posedge clk) if (mismatch) n_mismatch++;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fault id: -1 none; 0..13 CUT line f/2; 14..31 compactor wire (f-14)/2
  function automatic logic fw(input logic v, input int f, input int wire_id);
    if (f >= 0 && f / 2 == wire_id) return 1'(f % 2);
    return v;
  endfunction

  function automatic logic ref_z(input logic [6:0] y, input int f);
    logic [6:0] r;
    logic l433, l428, l430, l431, l432, l434, l435, l428b;
    if (f >= 32) f = -1;    // input faults act inside the CUT, not on these wires
    for (int k = 0; k < 7; k++) r[k] = fw(y[k], f, k);
    l433  = fw(r[0] ^ r[1] ^ r[3], f, 7);
    l428  = fw(r[2], f, 8);
    l430  = fw(r[4], f, 9);
    l431  = fw(r[5], f, 10);
    l432  = fw(r[6], f, 11);
    l434  = fw(l430 ^ l432, f, 12);
    l435  = fw(l433 ^ l431, f, 13);
    l428b = fw(l428, f, 14);
    return fw(l434 ^ l435 ^ l428b, f, 15);
  endfunction

  task automatic set_fault(input int f);
    fi_sel_e s;
    for (int k = 0; k < 36; k++) fi_in[k] = FI_NORMAL;
    for (int k = 0; k < 7; k++) fi_cut[k] = FI_NORMAL;
    for (int k = 0; k < 5; k++) fi_s1[k] = FI_NORMAL;
    for (int k = 0; k < 3; k++) fi_s2[k] = FI_NORMAL;
    fi_s3[0] = FI_NORMAL;
    if (f < 0) return;
    s = (f % 2) ? FI_SA1 : FI_SA0;
    if (f >= 32)         fi_in[(f-32)/2] = s;
    else if (f / 2 < 7)  fi_cut[f/2]     = s;
    else if (f / 2 < 12) fi_s1[f/2 - 7]  = s;
    else if (f / 2 < 15) fi_s2[f/2 - 12] = s;
    else                 fi_s3[0]        = s;
  endtask

  logic golden [N];

  task automatic session(input logic cap, input int f);
    logic [35:0] model, exp_pat;
    int cycles, idx, predicted;
    logic zr;
    set_fault(f);
    @(negedge clk);
    start = 1'b1;
    capture_mode = cap;
    @(negedge clk);
    start = 1'b0;
    cycles = 1; idx = 0; predicted = 0; model = '1;
    while (!done && cycles < N + 20) begin
      if (busy && idx < N) begin
        checks++;
        exp_pat = model;
        if (f >= 32) exp_pat[(f-32)/2] = 1'(f % 2);
        if (cut_pattern !== exp_pat) begin
          failures++;
          $display("FAIL pattern %0d got %h exp %h", idx, cut_pattern, exp_pat);
        end
        zr = ref_z(cut_response, f);
        checks++;
        if (compact_out !== zr) begin
          failures++;
          $display("FAIL fault %0d pattern %0d compact_out %b exp %b", f, idx, compact_out, zr);
        end
        if (cap) golden[idx] = zr;
        else if (zr != golden[idx]) predicted++;
        model = {model[34:0], model[35] ^ model[24]};
        idx++;
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != N + 3) begin
      failures++;
      $display("FAIL session length %0d cycles, expected %0d", cycles, N + 3);
    end
    if (!cap) begin
      checks++;
      if (int'(err_count) != predicted || fail != (predicted != 0)) begin
        failures++;
        $display("FAIL fault %0d err_count %0d fail %b predicted %0d", f, err_count, fail, predicted);
      end
      if (f < 0 && !fail) n_clean_pass++;
      if (f >= 0 && fail) n_detected++;
      if (f >= 0 && f / 2 < 7) n_cut_fault++;
      if (f >= 14 && f < 32) n_cmp_fault++;
      if (f >= 32) n_in_fault++;
      if (f >= 32 && fail) n_in_detected++;
      if (f >= 0 && f % 2 == 0) n_sa0++;
      if (f >= 0 && f % 2 == 1) n_sa1++;
    end else begin
      n_capture++;
    end
  endtask

  task automatic mech(input string name, input int n);
    $display("mechanism %-22s %0d", name, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    set_fault(-1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    session(1'b1, -1);
    session(1'b0, -1);
    for (int f = 0; f < 104; f++) session(1'b0, f);
    $display("stuck-at faults detected through the compactor: %0d of 104 (%0d of 72 on CUT inputs)",
             n_detected, n_in_detected);
    // every fault on a CUT output line or compactor wire must be caught
    checks++;
    if (n_detected - n_in_detected != 32) begin
      failures++;
      $display("FAIL output-side faults detected %0d of 32", n_detected - n_in_detected);
    end
    mech("golden capture", n_capture);
    mech("clean pass", n_clean_pass);
    mech("fault on CUT line", n_cut_fault);
    mech("fault on compactor wire", n_cmp_fault);
    mech("fault on CUT input", n_in_fault);
    mech("stuck-at-0", n_sa0);
    mech("stuck-at-1", n_sa1);
    mech("fault detected", n_detected);
    mech("mismatch pulse", n_mismatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
