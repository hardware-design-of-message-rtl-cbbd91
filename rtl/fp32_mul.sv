// fp32_mul: pipelined IEEE-754 single-precision multiplier (LAT >= 2).
//
// Computes a * b with round-to-nearest-even in one combinational step and
// carries the result through LAT register stages: one operand pair per cycle,
// result with out_valid LAT cycles later, `in_tag` travelling alongside.
// Subnormals are flushed to zero; infinities propagate and 0 * inf or a NaN
// operand gives the quiet NaN 0x7FC00000. The unit stands in for the
// vendor-generated multiplier of the modelled system; its latency is this
// design's choice.
module fp32_mul #(
  parameter int unsigned LAT   = 3,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      y,
  output logic [TAG_W-1:0] out_tag
);
  function automatic logic [31:0] fmul(input logic [31:0] x, input logic [31:0] z);
    logic        sr, g, st, rup;
    logic [7:0]  ex, ez;
    logic [47:0] p;
    logic [24:0] mr;
    logic signed [10:0] e;
    sr = x[31] ^ z[31];
    ex = x[30:23]; ez = z[30:23];
    if ((ex == 8'hFF && x[22:0] != 0) || (ez == 8'hFF && z[22:0] != 0)) return 32'h7FC00000;
    if (ex == 8'hFF || ez == 8'hFF) begin
      if (ex == 0 || ez == 0) return 32'h7FC00000;
      return {sr, 8'hFF, 23'd0};
    end
    if (ex == 0 || ez == 0) return {sr, 31'd0};
    p = {1'b1, x[22:0]} * {1'b1, z[22:0]};
    e = 11'(ex) + 11'(ez) - 11'sd127;
    if (p[47]) begin
      mr = {1'b0, p[47:24]}; g = p[23]; st = |p[22:0]; e = e + 1;
    end else begin
      mr = {1'b0, p[46:23]}; g = p[22]; st = |p[21:0];
    end
    rup = g && (st || mr[0]);
    mr  = mr + (rup ? 25'd1 : 25'd0);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e <= 0) return {sr, 31'd0};
    if (e >= 255) return {sr, 8'hFF, 23'd0};
    return {sr, e[7:0], mr[22:0]};
  endfunction

  logic [31:0]      pipe_y [LAT];
  logic [LAT-1:0]   pipe_v;
  logic [TAG_W-1:0] pipe_t [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pipe_v <= '0;
    else        pipe_v <= {pipe_v[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    pipe_y[0] <= fmul(a, b);
    pipe_t[0] <= in_tag;
    for (int i = 1; i < LAT; i++) begin
      pipe_y[i] <= pipe_y[i-1];
      pipe_t[i] <= pipe_t[i-1];
    end
  end

  assign out_valid = pipe_v[LAT-1];
  assign y         = pipe_y[LAT-1];
  assign out_tag   = pipe_t[LAT-1];
endmodule
