// compactor_stage: one stage of the space-compaction tree.
//
// Each of the N_OUT output lines is a merge_gate over the input lines its
// MASK row selects, with the gate family of its GATE entry. A merged class of
// compatible lines becomes one new line; a line that belongs to no class is
// carried with GATE_PASS and a one-hot mask. Every output wire passes through
// a fault_inject_mux so that stuck-at faults can be injected into the
// compactor itself, as the design flow re-checks fault coverage on the
// circuit plus compactor after each stage.
//
// Interface: lines_in[N_IN-1:0], lines_out[N_OUT-1:0], fi_sel (one 2-bit
// select per output wire, FI_NORMAL for normal operation).
// Combinational, no clock. Defaults: stage 1 of the c432 compactor.
module compactor_stage
  import compactor_pkg::*;
#(
  parameter int    N_IN  = C432_OUTPUTS,
  parameter int    N_OUT = C432_S1_OUT,
  parameter logic  [N_OUT-1:0][N_IN-1:0] MASK = C432_S1_MASK,
  parameter gate_e [N_OUT-1:0]           GATE = C432_S1_GATE
) (
  input  logic    [N_IN-1:0]  lines_in,
  input  fi_sel_e [N_OUT-1:0] fi_sel,
  output logic    [N_OUT-1:0] lines_out
);

  logic [N_OUT-1:0] merged;

  for (genvar j = 0; j < N_OUT; j++) begin : g_line
    merge_gate #(
      .N    (N_IN),
      .GATE (GATE[j]),
      .MASK (MASK[j])
    ) u_gate (
      .in  (lines_in),
      .out (merged[j])
    );
  end

  fault_inject_mux #(.WIDTH(N_OUT)) u_fi (
    .d   (merged),
    .sel (fi_sel),
    .q   (lines_out)
  );

endmodule
