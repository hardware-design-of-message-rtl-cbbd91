// fft_core: radix-2 decimation-in-frequency butterfly datapath.
//
// Inputs are the local operand a, the remote operand b and the twiddle
// factor t (complex, {re, im} single precision). cplex_addsub forms a + b or
// a - b; cplex_sreg delays t by the add/sub latency; cplex_mul multiplies the
// add/sub result by the delayed twiddle. `use_mul` selects the output:
//   use_mul = 0 : y = a +/- b            latency ADD_LAT
//   use_mul = 1 : y = (a +/- b) * t      latency 2*ADD_LAT + MUL_LAT
// One operand set per cycle. The selection must stay constant while results
// are in flight (it is fixed for a whole stage by the caller).
// The structure (addsub -> mul, twiddle shift register, output select)
// follows the modelled FFT core.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of the checking assertions in the instantiated submodules; no flop is reset synchronously.
module fft_core #(
  parameter int unsigned ADD_LAT = 4,
  parameter int unsigned MUL_LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        sub,
  input  logic        use_mul,
  input  logic [63:0] cplex_a,
  input  logic [63:0] cplex_b,
  input  logic [63:0] cplex_t,
  output logic        out_valid,
  output logic [63:0] y
);
  logic        as_v, mul_v;
  logic [63:0] as_y, mul_y, t_d;

  cplex_addsub #(.LAT(ADD_LAT)) u_as (.clk, .rst_n, .in_valid, .sub, .a(cplex_a), .b(cplex_b),
                                      .out_valid(as_v), .y(as_y));
  cplex_sreg #(.DEPTH(ADD_LAT)) u_sr (.clk, .d(cplex_t), .q(t_d));
  cplex_mul #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_mul (.clk, .rst_n, .in_valid(as_v && use_mul),
                                      .a(as_y), .t(t_d), .out_valid(mul_v), .y(mul_y));

  assign out_valid = use_mul ? mul_v : as_v;
  assign y         = use_mul ? mul_y : as_y;
endmodule
