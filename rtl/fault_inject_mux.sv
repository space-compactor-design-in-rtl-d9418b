// fault_inject_mux: hardware stuck-at fault injection on one wire.
//
// A 3-input multiplexer placed in a wire: it passes the wire (select 00 or
// 11), forces a stuck-at-1 (select 01) or forces a stuck-at-0 (select 10).
// The select encoding follows the hardware fault-injection scheme; WIDTH lets
// one instance cover a bundle of wires with one 2-bit select per wire.
// Combinational, no clock.
module fault_inject_mux
  import compactor_pkg::*;
#(
  parameter int WIDTH = 1
) (
  input  logic    [WIDTH-1:0] d,
  input  fi_sel_e [WIDTH-1:0] sel,
  output logic    [WIDTH-1:0] q
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      unique case (sel[i])
        FI_SA1:  q[i] = 1'b1;
        FI_SA0:  q[i] = 1'b0;
        default: q[i] = d[i];       // FI_NORMAL, FI_NORMAL2
      endcase
    end
  end

endmodule
