// tb_reduce_alu: all four reduce operations on random operands, one pair per
// cycle with the operation changing from cycle to cycle; every result is
// compared with a reference and must appear exactly LAT cycles later.
module tb_reduce_alu;
  import mpe_pkg::*;
  import tb_fp_pkg::*;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  alu_op_e op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] exp_q [$];
  int cin [$];
  always @(posedge clk) cyc <= cyc + 1;

  reduce_alu #(.LAT(LAT)) dut (.clk, .rst_n, .in_valid, .op, .a, .b, .out_valid, .y);

  function automatic logic [31:0] ref_op(alu_op_e o, logic [31:0] x, logic [31:0] z);
    unique case (o)
      ALU_FADD: return ref_add(x, z);
      ALU_FMAX: return (b2r(x) > b2r(z)) ? x : z;
      ALU_IADD: return x + z;
      default:  return ($signed(x) > $signed(z)) ? x : z;
    endcase
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    int c;
    e = exp_q.pop_front();
    c = cin.pop_front();
    checks++;
    if (y != e || cyc - c != LAT) begin
      failures++;
      if (failures < 5) $display("got %h exp %h lat %0d", y, e, cyc - c);
    end
  end

  initial begin
    in_valid = 0; op = ALU_FADD; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      op = alu_op_e'($urandom_range(0, 3));
      a = rnd_float(110, 140);
      b = (i % 5 == 0) ? {~a[31], a[30:0]} : rnd_float(110, 140);
      if (in_valid) begin
        exp_q.push_back(ref_op(op, a, b));
        cin.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
