// bist_compactor_top: built-in self-test response path for the c432 circuit.
//
// The circuit under test is outside this module: cut_pattern drives its 36
// inputs (cut_pattern[k] = input k+1) and cut_response returns its 7 outputs
// (cut_response[0] = line 426 ... [6] = line 432), combinationally in the
// same cycle. Inside:
//   lfsr_tpg          36-bit pseudorandom pattern generator
//   fault_inject_mux  one stuck-at injector per CUT input line (fi_in) and
//                     per CUT output line (fi_cut)
//   space_compactor   the 7-to-1 c432 compaction network (fi_s1..fi_s3
//                     inject faults on its own wires)
//   response_analyzer fault-free response buffer and comparator
//   bist_controller   session sequencing
// Use: run a session with capture_mode = 1 on a fault-free circuit to store
// the golden compacted responses, then run sessions with capture_mode = 0;
// fail (Not OK) is set if any pattern's compacted response differs.
//
// Timing: start -> done in 1 + N_PATTERNS + 2 cycles. pattern k is on
// cut_pattern during RUN cycle k. compact_out is the compacted line for the
// current pattern; s1_lines and s2_lines show the compactor's inner lines. The structure (generator, circuit, compactor, analyzer
// with buffer and comparator, fault injection) follows the BIST and fault
// simulation set-ups; the 36-bit tap set, the controller and the port-level
// fault selects are this design's choices.
module bist_compactor_top
  import compactor_pkg::*;
#(
  parameter int                     N_PATTERNS = 3253,
  parameter int                     DEPTH      = 4096,
  parameter int                     TPG_WIDTH  = C432_INPUTS,
  parameter logic [TPG_WIDTH-1:0]   TPG_TAPS   = TPG_WIDTH'((64'd1 << 35) | (64'd1 << 24)),
  parameter logic [TPG_WIDTH-1:0]   TPG_SEED   = '1,
  localparam int                    AW         = $clog2(DEPTH),
  localparam int                    CW         = AW + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       capture_mode,
  // circuit under test
  output logic [TPG_WIDTH-1:0]       cut_pattern,
  input  logic [C432_OUTPUTS-1:0]    cut_response,
  // stuck-at fault injection selects (FI_NORMAL = no fault)
  input  fi_sel_e [TPG_WIDTH-1:0]    fi_in,
  input  fi_sel_e [C432_OUTPUTS-1:0] fi_cut,
  input  fi_sel_e [C432_S1_OUT-1:0]  fi_s1,
  input  fi_sel_e [C432_S2_OUT-1:0]  fi_s2,
  input  fi_sel_e [C432_S3_OUT-1:0]  fi_s3,
  // results
  output logic                       compact_out,
  output logic [C432_S1_OUT-1:0]     s1_lines,
  output logic [C432_S2_OUT-1:0]     s2_lines,
  output logic                       busy,
  output logic                       done,
  output logic                       mismatch,
  output logic                       fail,
  output logic [CW-1:0]              err_count
);

  logic          tpg_load, tpg_en;
  logic          ana_clear, ana_valid, ana_capture;
  logic [AW-1:0] ana_addr;
  logic [TPG_WIDTH-1:0]    pattern;
  logic [C432_OUTPUTS-1:0] resp_fi;

  bist_controller #(
    .N_PATTERNS (N_PATTERNS),
    .DEPTH      (DEPTH)
  ) u_ctrl (
    .clk, .rst_n, .start, .capture_mode,
    .tpg_load, .tpg_en, .ana_clear, .ana_valid, .ana_capture, .ana_addr,
    .busy, .done
  );

  lfsr_tpg #(
    .WIDTH (TPG_WIDTH),
    .TAPS  (TPG_TAPS),
    .SEED  (TPG_SEED)
  ) u_tpg (
    .clk, .rst_n, .load(tpg_load), .en(tpg_en), .q(pattern)
  );

  fault_inject_mux #(.WIDTH(TPG_WIDTH)) u_fi_in (
    .d(pattern), .sel(fi_in), .q(cut_pattern)
  );

  fault_inject_mux #(.WIDTH(C432_OUTPUTS)) u_fi_cut (
    .d(cut_response), .sel(fi_cut), .q(resp_fi)
  );

  space_compactor u_compactor (
    .resp(resp_fi), .fi_s1, .fi_s2, .fi_s3,
    .s1_lines, .s2_lines, .z(compact_out)
  );

  response_analyzer #(
    .W     (1),
    .DEPTH (DEPTH)
  ) u_ana (
    .clk, .rst_n, .clear(ana_clear), .valid(ana_valid), .capture(ana_capture),
    .addr(ana_addr), .resp(compact_out),
    .mismatch, .fail, .err_count
  );

endmodule
