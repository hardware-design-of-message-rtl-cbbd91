// cplex_sreg: shift register that delays the twiddle factor of the FFT core.
//
// Delays a 64-bit complex word by exactly DEPTH cycles (set equal to the
// cplex_addsub latency) so that the twiddle read from the table at the same
// time as the two data operands meets the add/sub result at the multiplier.
// Follows the modelled FFT core.
module cplex_sreg #(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic [63:0] d,
  output logic [63:0] q
);
  logic [63:0] sr [DEPTH];
  always_ff @(posedge clk) begin
    sr[0] <= d;
    for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
  end
  assign q = sr[DEPTH-1];
endmodule
