// cut_stub: stand-in combinational circuit under test for simulation.
//
// Behavioural model only. It has the port shape of the c432 benchmark
// (36 inputs, 7 outputs; y[0] is line 426 ... y[6] is line 432) but NOT its
// logic: each output is a small AND/OR/XOR function of a few inputs, enough
// to give every output line both values over a pseudorandom test. Replace it
// with the real c432 netlist for a real test.
module cut_stub (
  input  logic [35:0] a,
  output logic [6:0]  y
);
  always_comb begin
    for (int k = 0; k < 7; k++) begin
      y[k] = (a[5*k] & a[5*k+1]) | (a[5*k+2] ^ a[(5*k+3) % 36]) ^ (a[(5*k+4) % 36] & ~a[35 - k]);
    end
  end
endmodule
