// tb_fp32_add: checks the pipelined float adder against a reference.
// Random operand pairs (including near-cancelling ones, equal magnitudes,
// zeros and subtraction) enter every cycle; each result is compared bit for
// bit with the correctly rounded sum and must appear exactly LAT cycles after
// its operands.
module tb_fp32_add;
  import tb_fp_pkg::*;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, sub, out_valid;
  logic [31:0] a, b, y;
  logic [7:0] tin, tout;
  int checks = 0, failures = 0;

  fp32_add #(.LAT(LAT), .TAG_W(8)) dut (.clk, .rst_n, .in_valid, .a, .b, .sub, .in_tag(tin),
                                        .out_valid, .y, .out_tag(tout));

  logic [31:0] exp_q [$];
  int          cyc_in [$];
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    int c;
    e = exp_q.pop_front();
    c = cyc_in.pop_front();
    checks++;
    if (y !== e || (cyc - c) != LAT) begin
      failures++;
      if (failures < 10) $display("mismatch: got %h exp %h latency %0d", y, e, cyc - c);
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0; sub = 0; tin = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = 1;
      a = rnd_float(100, 154);
      unique case (i % 6)
        0: b = rnd_float(100, 154);
        1: b = {~a[31], a[30:0]} ^ 32'(1 << $urandom_range(0, 3)); // near cancellation
        2: b = {1'($urandom), a[30:23] - 8'($urandom_range(0, 30)), 23'($urandom)};
        3: b = a;
        4: b = 32'h0;
        default: b = rnd_float(120, 130);
      endcase
      sub = (i % 7 == 3);
      exp_q.push_back(ref_add(a, sub ? {~b[31], b[30:0]} : b));
      cyc_in.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
