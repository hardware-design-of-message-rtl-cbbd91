// cplex_mul: complex multiplier of the FFT core.
//
// (a_re + j a_im)(t_re + j t_im) = (a_re*t_re - a_im*t_im) + j(a_re*t_im + a_im*t_re), from four
// fp32_mul units followed by two fp32_add units (one subtracting, one
// adding). Latency MUL_LAT + ADD_LAT, one complex pair per cycle. A complex
// number is {re[63:32], im[31:0]}.
// Four multipliers and two add/sub units follow the modelled FFT core.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of this module's checking assertions; no flop is reset synchronously.
module cplex_mul #(
  parameter int unsigned MUL_LAT = 3,
  parameter int unsigned ADD_LAT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] a,
  input  logic [63:0] t,
  output logic        out_valid,
  output logic [63:0] y
);
  logic [31:0] rr, ii, ri, ir;
  logic [3:0]  mv;
  logic [0:0]  mt [4];
  fp32_mul #(.LAT(MUL_LAT)) u_rr (.clk, .rst_n, .in_valid, .a(a[63:32]), .b(t[63:32]), .in_tag(1'b0), .out_valid(mv[0]), .y(rr), .out_tag(mt[0]));
  fp32_mul #(.LAT(MUL_LAT)) u_ii (.clk, .rst_n, .in_valid, .a(a[31:0]),  .b(t[31:0]),  .in_tag(1'b0), .out_valid(mv[1]), .y(ii), .out_tag(mt[1]));
  fp32_mul #(.LAT(MUL_LAT)) u_ri (.clk, .rst_n, .in_valid, .a(a[63:32]), .b(t[31:0]),  .in_tag(1'b0), .out_valid(mv[2]), .y(ri), .out_tag(mt[2]));
  fp32_mul #(.LAT(MUL_LAT)) u_ir (.clk, .rst_n, .in_valid, .a(a[31:0]),  .b(t[63:32]), .in_tag(1'b0), .out_valid(mv[3]), .y(ir), .out_tag(mt[3]));

  logic v_re, v_im;
  logic [0:0] t_re, t_im;
  fp32_add #(.LAT(ADD_LAT)) u_re (.clk, .rst_n, .in_valid(mv[0]), .a(rr), .b(ii), .sub(1'b1),
                                  .in_tag(1'b0), .out_valid(v_re), .y(y[63:32]), .out_tag(t_re));
  fp32_add #(.LAT(ADD_LAT)) u_im (.clk, .rst_n, .in_valid(mv[2]), .a(ri), .b(ir), .sub(1'b0),
                                  .in_tag(1'b0), .out_valid(v_im), .y(y[31:0]), .out_tag(t_im));
  assign out_valid = v_re;

  a_lanes: assert property (@(posedge clk) disable iff (!rst_n) (mv == 4'b0000 || mv == 4'b1111) && v_re == v_im);
endmodule
