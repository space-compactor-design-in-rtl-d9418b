// tb_bist_controller: session sequencing checks.
//
// With N_PATTERNS = 10 and DEPTH = 16 it runs a golden session and a test
// session and checks: tpg_load and ana_clear pulse in the start cycle only;
// ana_valid is high for exactly N_PATTERNS cycles with ana_addr counting
// 0..N-1; tpg_en matches ana_valid; ana_capture follows capture_mode as
// sampled at start; done rises 1 + N_PATTERNS + 2 cycles after start and
// stays high until the next start.
module tb_bist_controller;

  localparam int N = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, capture_mode = 1'b0;
  logic tpg_load, tpg_en, ana_clear, ana_valid, ana_capture, busy, done;
  logic [3:0] ana_addr;
  int checks = 0, failures = 0;

  bist_controller #(.N_PATTERNS(N), .DEPTH(16)) dut (
    .clk, .rst_n, .start, .capture_mode, .tpg_load, .tpg_en, .ana_clear,
    .ana_valid, .ana_capture, .ana_addr, .busy, .done
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic session(input logic cap);
    int cycles, nvalid, next_addr, loads;
    logic cap_seen;
    @(negedge clk);
    start = 1'b1;
    capture_mode = cap;
    #1;
    expect_eq("tpg_load in start cycle", int'(tpg_load), 1);
    expect_eq("ana_clear in start cycle", int'(ana_clear), 1);
    @(negedge clk);
    start = 1'b0;
    capture_mode = !cap;                 // must be ignored from now on
    cycles = 1; nvalid = 0; next_addr = 0; loads = 0; cap_seen = cap;
    while (!done && cycles < 100) begin
      if (ana_valid) begin
        expect_eq("addr order", int'(ana_addr), next_addr);
        next_addr++;
        nvalid++;
        if (ana_capture !== cap) cap_seen = !cap;
      end
      if (tpg_en !== ana_valid) expect_eq("tpg_en tracks valid", int'(tpg_en), int'(ana_valid));
      if (tpg_load) loads++;
      @(negedge clk);
      cycles++;
    end
    expect_eq("cycles start->done", cycles, 1 + N + 2);
    expect_eq("valid cycles", nvalid, N);
    expect_eq("extra loads", loads, 0);
    expect_eq("capture held", int'(cap_seen), int'(cap));
    repeat (3) @(negedge clk);
    expect_eq("done holds", int'(done), 1);
    expect_eq("not busy when done", int'(busy), 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq("idle after reset", int'(busy || done || ana_valid), 0);
    session(1'b1);
    session(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
