// merge_gate: one gate of a space-compaction tree.
//
// Merges the input lines selected by MASK with the logic family GATE:
// AND/NAND, OR/NOR or XOR/XNOR over the selected lines (unselected lines are
// ignored), or GATE_PASS, which carries the selected line(s) through as an OR
// and is meant for a mask with a single bit set. The gate families and the
// idea of merging any number of lines with one gate come from the compactor
// method; the mask form is this design's way of making one gate module serve
// every merge class. Purely combinational, no clock.
//
// Interface: in[N-1:0] are the candidate lines, out is the merged line.
// Defaults: the 3-input XOR that forms the first c432 stage.
module merge_gate
  import compactor_pkg::*;
#(
  parameter int           N    = 3,
  parameter gate_e        GATE = GATE_XOR,
  parameter logic [N-1:0] MASK = '1
) (
  input  logic [N-1:0] in,
  output logic         out
);

  logic [N-1:0] sel;

  always_comb begin
    sel = in & MASK;
    unique case (GATE)
      GATE_AND:  out =  (&(in | ~MASK));
      GATE_NAND: out = ~(&(in | ~MASK));
      GATE_OR:   out =  (|sel);
      GATE_NOR:  out = ~(|sel);
      GATE_XOR:  out =  (^sel);
      GATE_XNOR: out = ~(^sel);
      default:   out =  (|sel);       // GATE_PASS
    endcase
  end

endmodule
