// tb_src_sink: the core's output is looped back to its input through a
// testbench stage that applies random back-pressure. Several packets of
// different lengths and seeds are sent; the framing of every word, and the
// sink's packet count, word count and payload sum are compared with values
// computed here. The source must move one word per cycle when not held.
module tb_src_sink;
  import mpe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  flit_t in_flit, out_flit;
  logic in_valid, in_ready, out_valid, out_ready, busy;
  logic [11:0] bus_addr;
  logic bus_we;
  logic [31:0] bus_wdata, bus_rdata;
  int checks = 0, failures = 0;
  bit hold;

  src_sink dut (.clk, .rst_n, .my_id(6'd5), .in_flit, .in_valid, .in_ready, .out_flit, .out_valid,
                .out_ready, .bus_addr, .bus_we, .bus_wdata, .bus_rdata, .busy);
  assign in_flit   = out_flit;
  assign in_valid  = out_valid && !hold;
  assign out_ready = in_ready && !hold;
  always @(negedge clk) hold = ($urandom_range(0, 3) == 0) && (bus_addr != 12'hFFF);

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    bus_addr = a; #1;
    d = bus_rdata;
  endtask

  // framing monitor
  int wpos = 0, exp_len = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_flit.sof != (wpos == 0) || out_flit.eof != (wpos == exp_len + 1)) failures++;
    wpos = out_flit.eof ? 0 : wpos + 1;
  end

  initial begin
    logic [31:0] sum, r;
    int words, pk, t0, t1;
    bus_addr = 0; bus_we = 0; bus_wdata = 0; sum = 0; words = 0; pk = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(12'h0, mk_hdr(6'd5, P_SRC, 6'd0, 4'd0, MT_STREAM, 8'd1));
    wr(12'h1, 32'hABCD);
    for (int p = 0; p < 6; p++) begin
      int len;
      logic [31:0] seed;
      len = (p == 0) ? 0 : $urandom_range(1, 200);
      seed = $urandom;
      exp_len = len;
      wr(12'h2, len); wr(12'h3, seed);
      wr(12'h4, 1);
      while (busy) @(negedge clk);
      for (int k = 0; k < len; k++) sum += seed + k;
      words += len; pk++;
    end
    repeat (3) @(negedge clk);
    rd(12'h6, r); checks++; if (r != pk)    begin failures++; $display("packets %0d", r); end
    rd(12'h7, r); checks++; if (r != words) begin failures++; $display("words %0d", r); end
    rd(12'h8, r); checks++; if (r != sum)   begin failures++; $display("sum %h exp %h", r, sum); end
    rd(12'h5, r); checks++; if (r != 32'h2) failures++;
    // rate: with no back-pressure a 100-word packet takes 102 cycles
    bus_addr = 12'hFFF; hold = 0;
    exp_len = 100;
    wr(12'h2, 100);
    @(negedge clk); bus_addr = 12'hFFF; bus_wdata = 1; bus_we = 0;
    force hold = 1'b0;
    wr(12'h4, 1);
    t0 = $time;
    while (busy) @(negedge clk);
    t1 = $time;
    release hold;
    checks++;
    if ((t1 - t0) / 10 != 102) begin failures++; $display("rate: %0d cycles", (t1 - t0) / 10); end
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
