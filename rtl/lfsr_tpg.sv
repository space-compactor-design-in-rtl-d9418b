// lfsr_tpg: linear feedback shift register test pattern generator.
//
// A Fibonacci LFSR: on each enabled clock the register shifts one place
// towards the higher bit (q[i] <= q[i-1]) and q[0] takes the XOR of the bits
// selected by TAPS. The defaults are the documented 3-bit register (Q1 = q[0],
// Q2 = q[1], Q3 = q[2]; Q2 XOR Q3 fed back into Q1) with seed 111, which runs
// 111, 011, 001, 100, 010, 101, 110 and repeats after 7 = 2^3 - 1 patterns.
// Wider instances use a maximal-length tap set chosen by this design.
//
// Interface: load (synchronous, highest priority) reloads SEED; en advances
// one state. rst_n (active low, asynchronous) also loads SEED. q is the
// current pattern, registered. SEED must not be all zeros.
module lfsr_tpg #(
  parameter int               WIDTH = 3,
  parameter logic [WIDTH-1:0] TAPS  = 3'b110,
  parameter logic [WIDTH-1:0] SEED  = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  if (SEED == '0) begin : g_bad_seed
    $error("lfsr_tpg: an all-zero seed locks the register");
  end

  logic feedback;
  assign feedback = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= SEED;
    else if (load)   q <= SEED;
    else if (en)     q <= {q[WIDTH-2:0], feedback};
  end

endmodule
