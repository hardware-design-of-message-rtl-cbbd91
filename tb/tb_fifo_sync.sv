// tb_fifo_sync: random pushes and pops (also simultaneous, also when full or
// empty) against a queue model; checks head data, empty, full and count
// every cycle, and a clear.
module tb_fifo_sync;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, push, pop, empty, full;
  logic [31:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [31:0] model [$];

  fifo_sync #(.WIDTH(32), .DEPTH(D)) dut (.clk, .rst_n, .clear, .push, .wr_data, .pop,
                                           .rd_data, .empty, .full, .count);
  initial begin
    clear = 0; push = 0; pop = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == D) ||
          (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        if (failures < 5) $display("cycle %0d: count %0d model %0d", i, count, model.size());
      end
      clear   = (i == 2500);
      push    = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 35));
      pop     = ($urandom_range(0, 99) < 50);
      wr_data = $urandom;
      @(posedge clk);
      #1;
      if (clear) model.delete();
      else begin
        bit can_push;
        // a push into a full FIFO is dropped unless a word leaves in the same cycle
        can_push = model.size() < D || pop;
        if (pop && model.size() > 0) void'(model.pop_front());
        if (push && can_push) model.push_back(wr_data);
      end
    end
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
