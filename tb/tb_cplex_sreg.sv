// tb_cplex_sreg: random words in every cycle; each must come out exactly
// DEPTH cycles later.
module tb_cplex_sreg;
  localparam int DEPTH = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] d, q;
  logic [63:0] hist [$];
  int checks = 0, failures = 0;
  cplex_sreg #(.DEPTH(DEPTH)) dut (.clk, .d, .q);
  initial begin
    d = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (hist.size() >= DEPTH) begin
        checks++;
        if (q != hist[hist.size() - DEPTH]) failures++;
      end
      d = {$urandom, $urandom};
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
