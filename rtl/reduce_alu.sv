// reduce_alu: the computation unit of the MPE's reduce operation.
//
// Combines two 32-bit words with a commutative, associative operation chosen
// by `op`: single-precision floating-point ADD (through fp32_add) or MAX, or
// two's-complement integer ADD or MAX. Every operation has the same latency,
// LAT cycles, so one operand pair may enter per cycle and results leave in
// order with out_valid. Floating-point MAX compares sign-magnitude values
// (zeros of either sign compare equal; NaN is not treated specially).
// The set of operations (ADD and MAX, float and integer) and the fixed
// latency are this design's reading of "a commutative and associative
// computation" done in a hardware floating-point unit.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of this module's checking assertions; no flop is reset synchronously.
module reduce_alu
  import mpe_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);
  // floating-point path
  logic        fa_valid;
  logic [31:0] fa_y;
  logic [0:0]  fa_tag;

  fp32_add #(.LAT(LAT), .TAG_W(1)) u_fadd (
    .clk, .rst_n, .in_valid(in_valid && op == ALU_FADD), .a, .b, .sub(1'b0),
    .in_tag(1'b0), .out_valid(fa_valid), .y(fa_y), .out_tag(fa_tag)
  );

  function automatic logic fgt(input logic [31:0] x, input logic [31:0] z);
    // x > z for floats, sign-magnitude ordering
    if (x[31] != z[31]) return !x[31] && (x[30:0] != 0 || z[30:0] != 0);
    if (!x[31]) return x[30:0] > z[30:0];
    return x[30:0] < z[30:0];
  endfunction

  logic [31:0] other;
  always_comb begin
    unique case (op)
      ALU_FMAX: other = fgt(a, b) ? a : b;
      ALU_IADD: other = a + b;
      ALU_IMAX: other = ($signed(a) > $signed(b)) ? a : b;
      default:  other = a;
    endcase
  end

  // non-FADD results are delayed to the same latency
  logic [31:0]    pipe_y [LAT];
  logic [LAT-1:0] pipe_v;
  logic [LAT-1:0] pipe_f;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe_v <= '0;
      pipe_f <= '0;
    end else begin
      pipe_v <= {pipe_v[LAT-2:0], in_valid};
      pipe_f <= {pipe_f[LAT-2:0], op == ALU_FADD};
    end
  end
  always_ff @(posedge clk) begin
    pipe_y[0] <= other;
    for (int i = 1; i < LAT; i++) pipe_y[i] <= pipe_y[i-1];
  end

  assign out_valid = pipe_v[LAT-1];
  assign y         = pipe_f[LAT-1] ? fa_y : pipe_y[LAT-1];

  // The float adder and the local pipeline stay in step.
  a_fadd_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (pipe_v[LAT-1] && pipe_f[LAT-1]) |-> fa_valid);
endmodule
