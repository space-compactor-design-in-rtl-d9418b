// tb_response_analyzer: buffer and comparator checks.
//
// A 16-deep, 2-bit-wide analyzer stores a random golden run, then is fed
// (1) the same responses: no mismatch, fail stays low;
// (2) responses with errors at chosen addresses: mismatch must pulse exactly
//     two clock edges after each wrong response, err_count must equal the
//     number of wrong responses and fail must be set;
// (3) clear must reset fail and err_count.
module tb_response_analyzer;

  localparam int DEPTH = 16;
  localparam int W     = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, valid = 1'b0, capture = 1'b0;
  logic [3:0]   addr = '0;
  logic [W-1:0] resp = '0;
  logic         mismatch, fail;
  logic [4:0]   err_count;
  int checks = 0, failures = 0;

  response_analyzer #(.W(W), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .clear, .valid, .capture, .addr, .resp, .mismatch, .fail, .err_count
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] golden [DEPTH];
  logic         exp_pipe [3];   // expected mismatch, by age in cycles

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b at %0t", what, got, exp, $time);
    end
  endtask

  // one pass over the buffer; err_mask selects addresses given a wrong value
  task automatic run_pass(input logic cap, input logic [DEPTH-1:0] err_mask);
    for (int a = 0; a < DEPTH + 2; a++) begin
      if (a < DEPTH) begin
        valid   = 1'b1;
        capture = cap;
        addr    = 4'(a);
        resp    = golden[a] ^ (err_mask[a] ? W'(1 + a % 3) : '0);
      end else begin
        valid = 1'b0;
      end
      exp_pipe[2] = exp_pipe[1];
      exp_pipe[1] = exp_pipe[0];
      exp_pipe[0] = (a < DEPTH) && !cap && err_mask[a];
      @(negedge clk);
      // a response applied 2 edges ago shows now
      check($sformatf("mismatch step %0d", a), mismatch, exp_pipe[1]);
    end
    valid = 1'b0;
    exp_pipe = '{default: 1'b0};
  endtask

  initial begin
    logic [DEPTH-1:0] errs;
    exp_pipe = '{default: 1'b0};
    for (int a = 0; a < DEPTH; a++) golden[a] = W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;

    run_pass(1'b1, '0);                          // golden run
    check("no fail after capture", fail, 1'b0);
    run_pass(1'b0, '0);                          // clean compare
    check("no fail after clean run", fail, 1'b0);
    checks++;
    if (err_count !== 0) begin failures++; $display("FAIL err_count %0d", err_count); end

    errs = 16'b1000_0100_0010_0011;
    run_pass(1'b0, errs);                        // faulty compare
    check("fail after errors", fail, 1'b1);
    checks++;
    if (err_count !== 5'($countones(errs))) begin
      failures++;
      $display("FAIL err_count %0d exp %0d", err_count, $countones(errs));
    end

    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check("clear resets fail", fail, 1'b0);
    checks++;
    if (err_count !== 0) begin failures++; $display("FAIL err_count not cleared"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
