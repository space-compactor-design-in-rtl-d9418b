// tb_fault_inject_mux: checks every select code of the stuck-at injector.
//
// A 4-wire instance gets random data and random per-wire selects; each wire
// must pass (00, 11), read 1 (01, stuck-at-1) or read 0 (10, stuck-at-0).
module tb_fault_inject_mux;
  import compactor_pkg::*;

  logic    [3:0] d, q;
  fi_sel_e [3:0] sel;
  int checks = 0, failures = 0;

  fault_inject_mux #(.WIDTH(4)) dut (.d, .sel, .q);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int n = 0; n < 400; n++) begin
      d = 4'($urandom);
      for (int i = 0; i < 4; i++) sel[i] = fi_sel_e'(2'($urandom));
      #1;
      for (int i = 0; i < 4; i++) begin
        case (2'(sel[i]))
          2'b01:   exp = 1'b1;
          2'b10:   exp = 1'b0;
          default: exp = d[i];
        endcase
        checks++;
        if (q[i] !== exp) begin
          failures++;
          $display("FAIL wire %0d d=%b sel=%b q=%b", i, d[i], 2'(sel[i]), q[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
