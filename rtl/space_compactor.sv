// space_compactor: zero-aliasing space compactor for the c432 circuit.
//
// Folds the 7 output lines of c432 (resp[0] = line 426 ... resp[6] = line
// 432) into a single line z, a compaction ratio of 1/7, in three stages of
// compactor_stage:
//   stage 1: 433 = 426 ^ 427 ^ 429 (the three lines found strongly XOR
//            compatible with each other); 428, 430, 431, 432 carried
//   stage 2: 434 = 430 ^ 432, 435 = 433 ^ 431; 428 carried
//   stage 3: z = 434 ^ 435 ^ 428
// Stage 1 is the documented first stage. Stages 2 and 3 are this design's
// choice among the reported stage-2 XOR compatibility classes, followed by
// the rule that the lines left over are merged with one XOR. The network is
// four gates. Every stage output can be forced stuck-at-0/1 through fi_s1,
// fi_s2 and fi_s3 (FI_NORMAL everywhere for normal use).
//
// Combinational, no clock: z settles one gate-tree delay after resp.
module space_compactor
  import compactor_pkg::*;
(
  input  logic    [C432_OUTPUTS-1:0] resp,
  input  fi_sel_e [C432_S1_OUT-1:0]  fi_s1,
  input  fi_sel_e [C432_S2_OUT-1:0]  fi_s2,
  input  fi_sel_e [C432_S3_OUT-1:0]  fi_s3,
  output logic    [C432_S1_OUT-1:0]  s1_lines,
  output logic    [C432_S2_OUT-1:0]  s2_lines,
  output logic                       z
);

  logic [C432_S3_OUT-1:0] s3_lines;

  compactor_stage #(
    .N_IN (C432_OUTPUTS), .N_OUT(C432_S1_OUT),
    .MASK (C432_S1_MASK), .GATE (C432_S1_GATE)
  ) u_stage1 (
    .lines_in (resp), .fi_sel(fi_s1), .lines_out(s1_lines)
  );

  compactor_stage #(
    .N_IN (C432_S1_OUT), .N_OUT(C432_S2_OUT),
    .MASK (C432_S2_MASK), .GATE (C432_S2_GATE)
  ) u_stage2 (
    .lines_in (s1_lines), .fi_sel(fi_s2), .lines_out(s2_lines)
  );

  compactor_stage #(
    .N_IN (C432_S2_OUT), .N_OUT(C432_S3_OUT),
    .MASK (C432_S3_MASK), .GATE (C432_S3_GATE)
  ) u_stage3 (
    .lines_in (s2_lines), .fi_sel(fi_s3), .lines_out(s3_lines)
  );

  assign z = s3_lines[0];

endmodule
