// bist_controller: sequences one BIST session.
//
// On start it reloads the pattern generator seed and clears the analyzer,
// then spends N_PATTERNS cycles in RUN: in each, the current pattern is
// applied, the analyzer gets valid with addr = pattern index, and the
// generator advances. capture_mode, sampled at start, selects a golden run
// (store fault-free responses) or a test run (compare). FLUSH waits out the
// analyzer's two-cycle latency, then DONE holds done high until the next
// start. A session takes 1 + N_PATTERNS + 2 cycles from start to done.
// The document only states that test generation, application and response
// verification are done by built-in hardware; this sequencing is this
// design's own. N_PATTERNS defaults to the pseudorandom test length reported
// for c432 with its compactor.
module bist_controller #(
  parameter int N_PATTERNS = 3253,
  parameter int DEPTH      = 4096,
  parameter int AW         = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          capture_mode,
  output logic          tpg_load,
  output logic          tpg_en,
  output logic          ana_clear,
  output logic          ana_valid,
  output logic          ana_capture,
  output logic [AW-1:0] ana_addr,
  output logic          busy,
  output logic          done
);

  if (N_PATTERNS > DEPTH || N_PATTERNS < 1) begin : g_bad_len
    $error("bist_controller: N_PATTERNS must be in 1..DEPTH");
  end

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_DONE} state_e;

  state_e        state;
  logic [AW-1:0] idx;
  logic [1:0]    flush_cnt;
  logic          cap_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      flush_cnt <= '0;
      cap_q     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_RUN;
            idx   <= '0;
            cap_q <= capture_mode;
          end
        end
        S_RUN: begin
          if (int'(idx) == N_PATTERNS - 1) begin
            state     <= S_FLUSH;
            flush_cnt <= '0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_FLUSH: begin
          flush_cnt <= flush_cnt + 1'b1;
          if (flush_cnt == 2'd1) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    tpg_load    = (state == S_IDLE || state == S_DONE) && start;
    ana_clear   = tpg_load;
    tpg_en      = (state == S_RUN);
    ana_valid   = (state == S_RUN);
    ana_capture = cap_q;
    ana_addr    = idx;
    busy        = (state == S_RUN) || (state == S_FLUSH);
    done        = (state == S_DONE);
  end

endmodule
