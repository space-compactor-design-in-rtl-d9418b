// compactor_pkg: types and constants shared by the space-compactor design.
//
// gate_e names the logic families a merge gate can use (AND/NAND, OR/NOR,
// XOR/XNOR), plus GATE_PASS for a line that a stage carries through without
// merging. fi_sel_e is the 2-bit select of the per-wire fault-injection
// multiplexer: 00 and 11 run the wire normally, 01 forces stuck-at-1 and 10
// forces stuck-at-0.
//
// The C432_* constants describe the compaction network for the ISCAS 85 c432
// circuit (7 outputs, lines 426..432, folded to one line in three stages).
// Line i of a stage's input vector is bit i. Stage 1 (documented) merges
// 426, 427 and 429 with one 3-input XOR into a new line 433 and carries 428,
// 430, 431, 432. Stages 2 and 3 are this design's reading of the XOR maximal
// compatibility classes reported for stage 2: (430,432) -> 434,
// (433,431) -> 435, 428 carried; stage 3 XORs the three remaining lines.
package compactor_pkg;

  typedef enum logic [2:0] {
    GATE_AND  = 3'd0,
    GATE_NAND = 3'd1,
    GATE_OR   = 3'd2,
    GATE_NOR  = 3'd3,
    GATE_XOR  = 3'd4,
    GATE_XNOR = 3'd5,
    GATE_PASS = 3'd6
  } gate_e;

  typedef enum logic [1:0] {
    FI_NORMAL  = 2'b00,
    FI_SA1     = 2'b01,
    FI_SA0     = 2'b10,
    FI_NORMAL2 = 2'b11
  } fi_sel_e;

  // c432 circuit under test
  localparam int C432_INPUTS  = 36;
  localparam int C432_OUTPUTS = 7;

  // Stage 1: inputs {432,431,430,429,428,427,426}, outputs {432,431,430,428,433}
  localparam int C432_S1_OUT = 5;
  localparam logic [C432_S1_OUT-1:0][C432_OUTPUTS-1:0] C432_S1_MASK = {
    7'b1000000,   // out4 = 432
    7'b0100000,   // out3 = 431
    7'b0010000,   // out2 = 430
    7'b0000100,   // out1 = 428
    7'b0001011    // out0 = 433 = 426 ^ 427 ^ 429
  };
  localparam gate_e [C432_S1_OUT-1:0] C432_S1_GATE = {
    GATE_PASS, GATE_PASS, GATE_PASS, GATE_PASS, GATE_XOR
  };

  // Stage 2: inputs {432,431,430,428,433}, outputs {428,435,434}
  localparam int C432_S2_OUT = 3;
  localparam logic [C432_S2_OUT-1:0][C432_S1_OUT-1:0] C432_S2_MASK = {
    5'b00010,     // out2 = 428
    5'b01001,     // out1 = 435 = 433 ^ 431
    5'b10100      // out0 = 434 = 430 ^ 432
  };
  localparam gate_e [C432_S2_OUT-1:0] C432_S2_GATE = {
    GATE_PASS, GATE_XOR, GATE_XOR
  };

  // Stage 3: inputs {428,435,434}, output {z}
  localparam int C432_S3_OUT = 1;
  localparam logic [C432_S3_OUT-1:0][C432_S2_OUT-1:0] C432_S3_MASK = {3'b111};
  localparam gate_e [C432_S3_OUT-1:0] C432_S3_GATE = {GATE_XOR};

endpackage
