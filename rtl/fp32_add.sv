// fp32_add: pipelined IEEE-754 single-precision add/subtract unit (LAT >= 2).
//
// Computes a + b, or a - b when `sub` is set, rounding to nearest-even. The
// result is computed in one combinational step and then carried through LAT
// register stages, so a new operand pair may enter every cycle and its result
// appears with out_valid exactly LAT cycles later; `in_tag` travels beside it.
// Subnormal inputs and results are flushed to zero (as the FPGA vendor cores
// of this class usually do); infinities propagate and invalid cases give the
// quiet NaN 0x7FC00000. These units stand in for the vendor-generated
// floating-point cores of the modelled system; their latency is this design's
// choice.
module fp32_add #(
  parameter int unsigned LAT   = 4,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic             sub,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      y,
  output logic [TAG_W-1:0] out_tag
);
  function automatic logic [31:0] fadd(input logic [31:0] x, input logic [31:0] z);
    logic        sx, sz, sr;
    logic [7:0]  ex, ez;
    logic [23:0] mx, mz;
    logic [26:0] ax, az;
    logic [27:0] s;
    logic [8:0]  d;
    logic signed [10:0] e;
    logic [24:0] mr;
    logic        sticky, rup;
    int          lz;
    sx = x[31]; ex = x[30:23]; mx = (ex == 0) ? 24'd0 : {1'b1, x[22:0]};
    sz = z[31]; ez = z[30:23]; mz = (ez == 0) ? 24'd0 : {1'b1, z[22:0]};
    if (ex == 8'hFF || ez == 8'hFF) begin
      if ((ex == 8'hFF && x[22:0] != 0) || (ez == 8'hFF && z[22:0] != 0)) return 32'h7FC00000;
      if (ex == 8'hFF && ez == 8'hFF) return (sx == sz) ? x : 32'h7FC00000;
      return (ex == 8'hFF) ? x : z;
    end
    // order so that |x| >= |z|
    if ({ez, mz} > {ex, mx}) begin
      {sx, ex, mx, sz, ez, mz} = {sz, ez, mz, sx, ex, mx};
    end
    if (mx == 0) return 32'h0;             // both zero (or flushed)
    d  = {1'b0, ex} - {1'b0, ez};
    ax = {mx, 3'b000};
    if (mz == 0) az = '0;
    else if (d >= 9'd27) az = 27'd1;
    else begin
      az = {mz, 3'b000} >> d;
      sticky = |({mz, 3'b000} & ((27'd1 << d) - 27'd1));
      az[0] = az[0] | sticky;
    end
    e  = 11'(ex);
    sr = sx;
    if (sx == sz) begin
      s = {1'b0, ax} + {1'b0, az};
      if (s[27]) begin
        s = {1'b0, s[27:1]} | {27'd0, s[0]};
        e = e + 1;
      end
    end else begin
      s = {1'b0, ax} - {1'b0, az};
      if (s == 0) return 32'h0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (s[i]) break;
        lz++;
      end
      s = s << lz;
      e = e - 11'(lz);
    end
    // s[26:3] mantissa, s[2] guard, s[1:0] round/sticky
    rup = s[2] && (s[1] || s[0] || s[3]);
    mr  = {1'b0, s[26:3]} + (rup ? 25'd1 : 25'd0);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e <= 0) return {sr, 31'd0};
    if (e >= 255) return {sr, 8'hFF, 23'd0};
    return {sr, e[7:0], mr[22:0]};
  endfunction

  logic [31:0]      pipe_y   [LAT];
  logic [LAT-1:0]   pipe_v;
  logic [TAG_W-1:0] pipe_t   [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pipe_v <= '0;
    else        pipe_v <= {pipe_v[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    pipe_y[0] <= fadd(a, sub ? {~b[31], b[30:0]} : b);
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
