// response_analyzer: test data analyzer for the compacted response.
//
// Holds a buffer of fault-free responses, one W-bit word per test pattern,
// and a comparator. With capture high, each valid response is written into
// the buffer at addr (the golden run). With capture low, each valid response
// is compared with the stored word at addr; a difference raises mismatch for
// one cycle, increments err_count and sets the sticky fail flag (Not OK).
// clear resets fail and err_count at the start of a test session.
//
// Timing: the buffer is read synchronously, so the comparison of a response
// presented in cycle t is visible on mismatch/fail/err_count after the
// clock edge ending cycle t+1 (two-cycle latency). The buffer, comparator and
// OK/Not OK output are from the BIST test data analyzer; the capture mode,
// the latency and the error counter are this design's choices.
module response_analyzer #(
  parameter int W     = 1,
  parameter int DEPTH = 4096,
  parameter int AW    = $clog2(DEPTH),
  parameter int CW    = AW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          valid,
  input  logic          capture,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  resp,
  output logic          mismatch,
  output logic          fail,
  output logic [CW-1:0] err_count
);

  logic [W-1:0] buffer [DEPTH];
  logic [W-1:0] golden_q;
  logic [W-1:0] resp_q;
  logic         cmp_q;

  // buffer write (golden run) and synchronous read (test run)
  always_ff @(posedge clk) begin
    if (valid && capture) buffer[addr] <= resp;
    golden_q <= buffer[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_q    <= '0;
      cmp_q     <= 1'b0;
      mismatch  <= 1'b0;
      fail      <= 1'b0;
      err_count <= '0;
    end else begin
      resp_q   <= resp;
      cmp_q    <= valid && !capture && !clear;
      mismatch <= 1'b0;
      if (clear) begin
        fail      <= 1'b0;
        err_count <= '0;
      end else if (cmp_q && (golden_q != resp_q)) begin
        mismatch  <= 1'b1;
        fail      <= 1'b1;
        err_count <= err_count + 1'b1;
      end
    end
  end

  addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    valid |-> (int'(addr) < DEPTH));

endmodule
