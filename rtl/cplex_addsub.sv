// cplex_addsub: complex add/subtract of the FFT core.
//
// Two fp32_add units, one for the real and one for the imaginary part,
// compute a + b, or a - b when `sub` is set. Pipelined with latency LAT: one
// complex pair per cycle, result with out_valid LAT cycles later. A complex
// number is {re[63:32], im[31:0]}, each a single-precision float.
// The two add/sub units and the add-or-subtract control follow the modelled
// FFT core; the packing of a complex number is this design's.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of this module's checking assertions; no flop is reset synchronously.
module cplex_addsub #(
  parameter int unsigned LAT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        sub,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        out_valid,
  output logic [63:0] y
);
  logic v_re, v_im;
  logic [0:0] t_re, t_im;
  fp32_add #(.LAT(LAT)) u_re (.clk, .rst_n, .in_valid, .a(a[63:32]), .b(b[63:32]), .sub,
                              .in_tag(1'b0), .out_valid(v_re), .y(y[63:32]), .out_tag(t_re));
  fp32_add #(.LAT(LAT)) u_im (.clk, .rst_n, .in_valid, .a(a[31:0]), .b(b[31:0]), .sub,
                              .in_tag(1'b0), .out_valid(v_im), .y(y[31:0]), .out_tag(t_im));
  assign out_valid = v_re;

  a_lanes: assert property (@(posedge clk) disable iff (!rst_n) v_re == v_im);
endmodule
