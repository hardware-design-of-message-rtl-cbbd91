// tb_xbar_router: every input port injects random packets (random lengths,
// random gaps) for local ports of this node and for other nodes of the torus,
// while every output applies random back-pressure. Each packet carries its
// source, the output port worked out by an independent dimension-order rule
// and a sequence number. Every output checks that packets arrive whole and
// uninterleaved, at the expected port, with the right payload, and in order
// per source; at the end all packets must have arrived. A lone packet on an
// idle router is timed: grant plus one word per cycle.
module tb_xbar_router;
  import mpe_pkg::*;
  localparam int NP = 16;
  localparam logic [5:0] ME = 6'd21;   // x=1, y=1, z=1
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  flit_t [NP-1:0] in_flit, out_flit;
  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [11:0] bus_addr;
  logic bus_we;
  logic [31:0] bus_wdata, bus_rdata;
  logic [NODE_W-1:0] my_id;
  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  bit bp_on = 1;

  xbar_router #(.NP(NP), .IBUF_DEPTH(4), .K(4)) dut (.clk, .rst_n, .in_flit, .in_valid, .in_ready,
    .out_flit, .out_valid, .out_ready, .bus_addr, .bus_we, .bus_wdata, .bus_rdata, .my_id);

  function automatic int ref_port(int src, int dst, int lp);
    for (int d = 0; d < 3; d++) begin
      int s, t, f;
      s = (src >> (2*d)) & 3; t = (dst >> (2*d)) & 3;
      f = (t - s + 4) % 4;
      if (f != 0) return (f < 2 || (f == 2 && (s & 1) == 0)) ? 2*d : 2*d + 1;
    end
    return lp;
  endfunction

  // sources
  for (genvar i = 0; i < NP; i++) begin : g_src
    initial begin
      int seq [NP];
      in_valid[i] = 0; in_flit[i] = '0;
      foreach (seq[k]) seq[k] = 0;
      wait (rst_n);
      repeat (20) @(negedge clk);
      for (int p = 0; p < 40; p++) begin
        int dn, lp, eo, len;
        logic [31:0] h1;
        dn = ($urandom_range(0, 1) == 0) ? int'(ME) : $urandom_range(0, 63);
        lp = $urandom_range(6, 15);
        eo = ref_port(int'(ME), dn, lp);
        len = $urandom_range(0, 12);
        h1 = {8'(i), 8'(eo), 16'(seq[eo])};
        seq[eo]++;
        for (int w = 0; w < len + 2; w++) begin
          in_valid[i] = 1;
          in_flit[i].data = (w == 0) ? mk_hdr(6'(dn), 4'(lp), 6'd0, 4'(i), MT_STREAM, 8'(len)) :
                            (w == 1) ? h1 : (h1 ^ 32'(w));
          in_flit[i].sof = (w == 0);
          in_flit[i].eof = (w == len + 1);
          @(posedge clk);
          while (!in_ready[i]) @(posedge clk);
          @(negedge clk);
          in_valid[i] = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
        sent++;
      end
    end
  end

  // sinks
  for (genvar o = 0; o < NP; o++) begin : g_snk
    int pos = 0, len = 0;
    logic [31:0] h1;
    int nextseq [NP];
    initial foreach (nextseq[k]) nextseq[k] = 0;
    always @(negedge clk) out_ready[o] = bp_on ? ($urandom_range(0, 2) != 0) : 1'b1;
    always @(posedge clk) if (rst_n && out_valid[o] && out_ready[o]) begin
      checks++;
      if (out_flit[o].sof != (pos == 0)) failures++;
      if (pos == 0) len = int'(out_flit[o].data[7:0]);
      else if (pos == 1) begin
        h1 = out_flit[o].data;
        if (int'(h1[23:16]) != o) begin failures++; $display("port %0d got packet for %0d", o, h1[23:16]); end
        if (int'(h1[15:0]) != nextseq[h1[31:24]]) begin failures++; $display("order at %0d", o); end
        nextseq[h1[31:24]] = int'(h1[15:0]) + 1;
      end else if (out_flit[o].data != (h1 ^ 32'(pos))) failures++;
      if (out_flit[o].eof != (pos == len + 1)) failures++;
      if (out_flit[o].eof) begin pos = 0; got++; end
      else pos++;
    end
  end

  initial begin
    bus_addr = 0; bus_we = 0; bus_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); bus_we = 1; bus_wdata = 32'(ME); @(negedge clk); bus_we = 0;
    checks++; if (my_id != ME) failures++;
    wait (got == NP * 40);
    repeat (5) @(negedge clk);
    checks++; if (sent != got) failures++;
    bus_addr = 12'h1; #1;
    checks++; if (bus_rdata != NP * 40) begin failures++; $display("routed %0d", bus_rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("sent %0d got %0d", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
