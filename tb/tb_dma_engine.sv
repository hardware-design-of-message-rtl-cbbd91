// tb_dma_engine: the engine runs against a word-addressed memory model that
// grants requests at random and returns read data in order after a random
// delay, and against a network sink with random back-pressure. Send jobs of
// random length (zero included) are programmed over the register bus and the
// emitted packet is compared word by word with the memory contents and the
// programmed header (with the source fields filled in). At the same time
// random packets are pushed into the receive side and the memory is checked
// to hold their payload at the address given in their second word. Status
// bits, the interrupt and the receive counters are checked after each job.
// With an always-granting memory that returns data two cycles after the
// grant and no back-pressure, a send of N words must occupy the link for
// N+3 cycles: N+2 words plus one bubble, because the first read is issued
// with the header and its data arrives one cycle after the second header word.
module tb_dma_engine;
  import mpe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  flit_t in_flit, out_flit;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [11:0] bus_addr = 0;
  logic bus_we = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic irq, send_busy, recv_busy;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  bit fast = 0;

  dma_engine #(.OBUF_DEPTH(8)) dut (.clk, .rst_n, .my_id(6'd9), .in_flit, .in_valid, .in_ready,
    .out_flit, .out_valid, .out_ready, .bus_addr, .bus_we, .bus_wdata, .bus_rdata, .irq,
    .send_busy, .recv_busy, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid,
    .mem_rdata);

  // memory model: send area 0..1023 holds a pattern, receive area 4096..
  logic [31:0] mem [0:8191];
  logic [31:0] rq[$];
  int lat_q[$];
  initial for (int i = 0; i < 8192; i++) mem[i] = 32'h5a00_0000 ^ (i * 32'h9e37);
  always @(negedge clk) mem_gnt = fast ? 1'b1 : ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (rq.size() > 0 && (fast || $urandom_range(0, 2) != 0)) begin
      mem_rvalid <= 1'b1;
      mem_rdata  <= rq.pop_front();
    end
    if (rst_n && mem_req && mem_gnt) begin
      if (mem_we) mem[mem_addr[12:0]] <= mem_wdata;
      else rq.push_back(mem[mem_addr[12:0]]);
    end
  end
  always @(negedge clk) out_ready = fast ? 1'b1 : ($urandom_range(0, 2) != 0);

  // the send and receive threads share the bus: one access at a time
  bit bus_lock = 0;
  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    while (bus_lock) @(negedge clk);
    bus_lock = 1; bus_addr = a; bus_we = 1; bus_wdata = d;
    @(negedge clk); bus_we = 0; bus_lock = 0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    while (bus_lock) @(negedge clk);
    bus_lock = 1; bus_addr = a; #1 d = bus_rdata; bus_lock = 0;
  endtask

  // sender check
  logic [31:0] exp_q[$];
  int opkts = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected flit"); end
    else begin
      logic [31:0] e;
      e = exp_q.pop_front();
      if (out_flit.data != e) begin failures++; $display("send data %h exp %h", out_flit.data, e); end
      if (out_flit.eof != (exp_q.size() == 0)) failures++;
      if (out_flit.eof) opkts++;
    end
  end

  // receive injector
  int rx_done = 0;
  task automatic inject(input int base, input int len);
    for (int w = 0; w < len + 2; w++) begin
      @(negedge clk);
      in_valid = 1;
      in_flit.data = (w == 0) ? mk_hdr(6'd9, 4'(P_DMA), 6'd3, 4'(P_DMA), MT_DMA_WRITE, 8'd1) :
                     (w == 1) ? 32'(base) : (32'hc0de_0000 + 32'(base + w));
      in_flit.sof = (w == 0);
      in_flit.eof = (w == len + 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk) in_valid = 0;
    end
  endtask

  initial begin
    logic [31:0] v;
    int t0;
    in_valid = 0; in_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin : sends
        for (int j = 0; j < 20; j++) begin
          int src, len;
          hdr_t h;
          src = $urandom_range(0, 900);
          len = (j == 0) ? 0 : $urandom_range(1, 100);
          h = hdr_t'(mk_hdr(6'($urandom_range(0, 63)), 4'($urandom_range(0, 15)), 6'd0, 4'd0,
                            MT_DMA_WRITE, 8'(j)));
          wr(12'h0, 32'(src)); wr(12'h1, 32'(len)); wr(12'h2, h); wr(12'h3, 32'(j * 7));
          h.src_node = 6'd9; h.src_port = 4'(P_DMA);
          exp_q.push_back(h); exp_q.push_back(32'(j * 7));
          for (int k = 0; k < len; k++) exp_q.push_back(mem[src + k]);
          wr(12'h4, 32'd1);
          do rd(12'h5, v); while (v[0]);
          checks++; if (!v[1]) failures++;
          checks++; if (!irq) begin failures++; $display("irq"); end
          wr(12'h5, 32'h2);
          checks++; if (exp_q.size() != 0) failures++;
        end
      end
      begin : recvs
        for (int j = 0; j < 20; j++) begin
          int base, len;
          base = 4096 + j * 128;
          len = (j == 3) ? 0 : $urandom_range(1, 100);
          inject(base, len);
          wait (!recv_busy);
          repeat (2) @(negedge clk);
          for (int k = 0; k < len; k++) begin
            checks++;
            if (mem[base + k] != 32'hc0de_0000 + 32'(base + k + 2)) begin
              failures++; $display("recv mem %0d", base + k);
            end
          end
          rd(12'h6, v); checks++; if (v != 32'(len)) begin failures++; $display("rwords %0d %0d", v, len); end
          rd(12'h5, v); checks++; if (!v[2]) failures++;
          wr(12'h5, 32'h4);
          rx_done++;
        end
      end
    join
    rd(12'h5, v); checks++; if (v[2:1] != 0 || irq) failures++;
    checks++; if (opkts != 20) failures++;
    // timing: full-rate send
    fast = 1;
    repeat (4) @(negedge clk);
    wr(12'h0, 32'd0); wr(12'h1, 32'd64); wr(12'h2, 32'd0); wr(12'h3, 32'd0);
    exp_q.push_back(mk_hdr(6'd0, 4'd0, 6'd9, 4'(P_DMA), MT_DMA_WRITE, 8'd0));
    exp_q.push_back(0);
    for (int k = 0; k < 64; k++) exp_q.push_back(mem[k]);
    wr(12'h4, 32'd1);
    t0 = 0;
    while (!(out_valid && out_flit.sof)) @(negedge clk);
    while (send_busy) begin @(negedge clk); t0++; end
    checks++; if (t0 != 67) begin failures++; $display("send cycles %0d", t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
