// tb_fft_core: DIF butterfly datapath against a reference, in blocks that
// alternate between the add/sub output and the multiplied output.
// Operands enter on random cycles; each result is compared bit for bit with
// the same sequence of correctly rounded single-precision operations, and
// must appear exactly 4 (add/sub) or 11 (multiplied) cycles after its operands.
module tb_fft_core;
  import tb_fp_pkg::*;
  int LAT;
  assign LAT = use_mul ? 11 : 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, sub, use_mul, out_valid;
  logic [63:0] a, b, t, y;
  int checks = 0, failures = 0, cyc = 0;
  logic [63:0] exp_q [$];
  int cin [$];
  always @(posedge clk) cyc <= cyc + 1;
  function automatic logic [31:0] neg(logic [31:0] x); return {~x[31], x[30:0]}; endfunction
  function automatic logic [63:0] c_as(logic [63:0] x, logic [63:0] z, bit s);
    return {ref_add(x[63:32], s ? neg(z[63:32]) : z[63:32]), ref_add(x[31:0], s ? neg(z[31:0]) : z[31:0])};
  endfunction
  function automatic logic [63:0] c_mul(logic [63:0] x, logic [63:0] t);
    return {ref_add(ref_mul(x[63:32], t[63:32]), neg(ref_mul(x[31:0], t[31:0]))),
            ref_add(ref_mul(x[63:32], t[31:0]), ref_mul(x[31:0], t[63:32]))};
  endfunction
  function automatic logic [63:0] rc(); return {rnd_float(115, 135), rnd_float(115, 135)}; endfunction

  fft_core #(.ADD_LAT(4), .MUL_LAT(3)) dut (.clk, .rst_n, .in_valid, .sub, .use_mul, .cplex_a(a), .cplex_b(b),
                                      .cplex_t(t), .out_valid, .y);
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] e;
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
    in_valid = 0; sub = 0; use_mul = 0; a = 0; b = 0; t = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i % 200 == 0) begin
        in_valid = 0;
        repeat (LAT + 12) @(negedge clk);
        use_mul = ((i / 200) % 2 == 1);
      end
      in_valid = ($urandom_range(0, 3) != 0);
      a = rc(); b = rc(); t = rc();
      sub = 1'($urandom);
      if (in_valid) begin
        exp_q.push_back(use_mul ? c_mul(c_as(a, b, sub), t) : c_as(a, b, sub));
        cin.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (14) @(posedge clk);
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
