// tb_monitor: random event inputs for a few thousand cycles; each counter and
// the cycle counter must equal the tally kept by the testbench. Then the
// disable, clear and re-enable controls are checked.
module tb_monitor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] ev;
  logic [11:0] bus_addr;
  logic bus_we;
  logic [31:0] bus_wdata, bus_rdata;
  int checks = 0, failures = 0;
  int tally [8];
  int cycles;
  monitor #(.NEV(8)) dut (.clk, .rst_n, .ev, .bus_addr, .bus_we, .bus_wdata, .bus_rdata);

  task automatic chk(input logic [11:0] a, input int e);
    bus_addr = a; #1;
    checks++;
    if (int'(bus_rdata) != e) begin
      failures++;
      $display("reg %h: got %0d exp %0d", a, bus_rdata, e);
    end
  endtask

  initial begin
    ev = 0; bus_addr = 0; bus_we = 0; bus_wdata = 0; cycles = 0;
    foreach (tally[i]) tally[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      ev = 8'($urandom);
      @(posedge clk);
      cycles++;
      for (int i = 0; i < 8; i++) if (ev[i]) tally[i]++;
      @(negedge clk);
    end
    ev = 0;
    chk(12'h1, cycles);
    for (int i = 0; i < 8; i++) chk(12'h10 + 12'(i), tally[i]);
    // disable: counters hold
    @(negedge clk);
    bus_addr = 0; bus_wdata = 32'h0; bus_we = 1; @(negedge clk); bus_we = 0;
    ev = 8'hFF; repeat (10) @(negedge clk); ev = 0;
    chk(12'h10, tally[0]);
    // clear and enable
    @(negedge clk);
    bus_addr = 0; bus_wdata = 32'h3; bus_we = 1; @(negedge clk); bus_we = 0;
    chk(12'h10, 0);
    @(negedge clk);
    ev = 8'h01; repeat (5) @(negedge clk); ev = 0;
    chk(12'h10, 5);
    chk(12'h11, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
