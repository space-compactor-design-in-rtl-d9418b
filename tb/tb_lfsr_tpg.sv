// tb_lfsr_tpg: pattern generator checks.
//
// The default 3-bit register is checked against the documented sequence
// (Q1 Q2 Q3): 111, 011, 001, 100, 010, 101, 110, then 111 again, so the
// period is 7. Holding en low must freeze the state; load must restore the
// seed. A 36-bit instance with taps 36 and 25 (as used by the BIST top) is
// compared step by step with a software model for 5000 steps.
module tb_lfsr_tpg;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0, en = 1'b0;
  logic [2:0]  q3;
  logic [35:0] q36;
  logic [35:0] model;
  int checks = 0, failures = 0;

  localparam logic [35:0] TAPS36 = (36'd1 << 35) | (36'd1 << 24);

  lfsr_tpg dut3 (.clk, .rst_n, .load, .en, .q(q3));
  lfsr_tpg #(.WIDTH(36), .TAPS(TAPS36), .SEED('1)) dut36 (.clk, .rst_n, .load, .en, .q(q36));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Table order is Q1 Q2 Q3 = q[0] q[1] q[2]
  function automatic logic [2:0] as_q(input logic [2:0] q1q2q3);
    return {q1q2q3[0], q1q2q3[1], q1q2q3[2]};
  endfunction

  task automatic check3(input string what, input logic [2:0] exp_q1q2q3);
    checks++;
    if (q3 !== as_q(exp_q1q2q3)) begin
      failures++;
      $display("FAIL %s: Q1Q2Q3 got %b%b%b exp %b", what, q3[0], q3[1], q3[2], exp_q1q2q3);
    end
  endtask

  initial begin
    logic [2:0] table31 [8] = '{3'b111, 3'b011, 3'b001, 3'b100, 3'b010, 3'b101, 3'b110, 3'b111};
    logic [2:0] held;
    int         period;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check3("reset seed", 3'b111);
    en = 1'b1;
    for (int k = 1; k < 8; k++) begin
      @(negedge clk);
      check3($sformatf("table step %0d", k + 1), table31[k]);
    end
    // period: count steps until the seed returns
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (q3 != 3'b111 && period < 20);
    checks++;
    if (period != 7) begin
      failures++;
      $display("FAIL period %0d, expected 7", period);
    end
    // hold
    @(negedge clk);
    en = 1'b0;
    held = q3;
    repeat (3) @(negedge clk);
    checks++;
    if (q3 !== held) begin
      failures++;
      $display("FAIL state moved while en low");
    end
    // load restores the seed
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check3("load", 3'b111);

    // 36-bit instance against a model
    model = '1;
    checks++;
    if (q36 !== model) begin
      failures++;
      $display("FAIL 36-bit seed %h", q36);
    end
    en = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      model = {model[34:0], model[35] ^ model[24]};
      checks++;
      if (q36 !== model || q36 == '0) begin
        failures++;
        $display("FAIL 36-bit step %0d got %h exp %h", k, q36, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
