// tb_fft_io: four FFT I/O units joined by a behavioural network (packets are
// queued whole per destination node; packets a unit addresses to a node's
// memory go to a per-node sink). Each unit is given its configuration and a
// twiddle table over the bus, then its points as local-load packets, and is
// started; units are started at random times and the network adds random
// delays. The units run the inter-node stages of a radix-2
// decimation-in-frequency FFT and send their points out. The result of each
// unit is compared, within a single-precision tolerance, with the same
// stages computed here in double precision on the whole vector. Runs cover
// four nodes (two inter-node stages) and two pairs of two nodes (one stage),
// with several block sizes, and also check done/irq and the output header.
module tb_fft_io;
  import mpe_pkg::*;
  import tb_fp_pkg::*;
  localparam int NN = 4;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t in_flit [NN], out_flit [NN];
  logic [NN-1:0] in_valid, in_ready, out_valid, out_ready, irq, busy;
  logic [11:0] bus_addr [NN];
  logic [NN-1:0] bus_we, sel_reg, sel_tre, sel_tim;
  logic [31:0] bus_wdata [NN], bus_rdata [NN];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NN; i++) begin : g_n
    fft_io #(.FFT_DEPTH(64), .TW_DEPTH(64), .ADD_LAT(4), .MUL_LAT(3)) u (.clk, .rst_n,
      .my_id(6'(i)), .in_flit(in_flit[i]), .in_valid(in_valid[i]), .in_ready(in_ready[i]),
      .out_flit(out_flit[i]), .out_valid(out_valid[i]), .out_ready(out_ready[i]),
      .bus_addr(bus_addr[i]), .bus_we(bus_we[i]), .bus_sel_reg(sel_reg[i]),
      .bus_sel_tre(sel_tre[i]), .bus_sel_tim(sel_tim[i]), .bus_wdata(bus_wdata[i]),
      .bus_rdata(bus_rdata[i]), .irq(irq[i]), .busy(busy[i]));
  end

  // ---------------- network model ----------------
  logic [32:0] inq [NN][$];
  logic [32:0] snk [NN][$];
  logic [32:0] cur [NN][$];
  for (genvar i = 0; i < NN; i++) begin : g_net
    always @(negedge clk) out_ready[i] = ($urandom_range(0, 3) != 0);
    always @(posedge clk) if (rst_n && out_valid[i] && out_ready[i]) begin
      cur[i].push_back({out_flit[i].eof, out_flit[i].data});
      if (out_flit[i].eof) begin
        hdr_t h;
        h = hdr_t'(cur[i][0][31:0]);
        if (h.dst_port != P_FFT)
          while (cur[i].size() > 0) snk[h.dst_node].push_back(cur[i].pop_front());
        else
          while (cur[i].size() > 0) inq[h.dst_node].push_back(cur[i].pop_front());
      end
    end
    initial begin
      in_valid[i] = 0; in_flit[i] = '0;
      forever begin
        @(negedge clk);
        if (inq[i].size() > 0 && $urandom_range(0, 2) != 0) begin
          logic [32:0] w;
          bit first;
          first = 1;
          do begin
            w = inq[i].pop_front();
            in_valid[i] = 1;
            in_flit[i] = '{data: w[31:0], sof: first, eof: w[32]};
            first = 0;
            @(posedge clk);
            while (!in_ready[i]) @(posedge clk);
            @(negedge clk);
            in_valid[i] = 0;
            if ($urandom_range(0, 4) == 0) @(negedge clk);
          end while (!w[32]);
        end
      end
    end
  end

  task automatic wr(input int n, input int sel, input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_addr[n] = a; bus_we[n] = 1; bus_wdata[n] = d;
    sel_reg[n] = (sel == 0); sel_tre[n] = (sel == 1); sel_tim[n] = (sel == 2);
    @(negedge clk); bus_we[n] = 0;
  endtask
  task automatic rd(input int n, input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_addr[n] = a; sel_reg[n] = 1; sel_tre[n] = 0; sel_tim[n] = 0;
    #1 d = bus_rdata[n];
  endtask

  real xr [], xi [];
  logic [31:0] ir [], ii [];
  int started;

  // one run: groups of 2^nst nodes starting at node 0, M = 2^log2m points each
  task automatic run(input int nst, input int log2m);
    int n, m, np;
    n = 1 << nst; m = 1 << log2m; np = n * m;
    for (int g = 0; g < NN / n; g++) begin
      // input vector of this group
      xr = new[np]; xi = new[np]; ir = new[np]; ii = new[np];
      for (int k = 0; k < np; k++) begin
        ir[k] = r2b(real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
        ii[k] = r2b(real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
        xr[k] = b2r(ir[k]); xi[k] = b2r(ii[k]);
      end
      for (int r = 0; r < n; r++) begin
        int nd;
        nd = g * n + r;
        wr(nd, 0, 12'h2, {20'd0, 4'(nst), 4'd0, 4'(log2m)});
        wr(nd, 0, 12'h3, 32'(r));
        wr(nd, 0, 12'h4, 32'(g * n));
        wr(nd, 0, 12'h5, mk_hdr(6'(nd), 4'(P_DMA), 6'd0, 4'd0, MT_DMA_WRITE, 8'(nd)));
        wr(nd, 0, 12'h6, 32'h4000 + 32'(nd));
        for (int k = 0; k < np / 2; k++) begin
          wr(nd, 1, 12'(k), r2b($cos(2.0 * PI * k / np)));
          wr(nd, 2, 12'(k), r2b(-$sin(2.0 * PI * k / np)));
        end
      end
      // reference: the inter-node DIF stages, with the table's rounded twiddles
      for (int s = 0; s < nst; s++) begin
        int h;
        h = np >> (s + 1);
        for (int j = 0; j < np; j++) if ((j & h) == 0) begin
          real a_re, a_im, b_re, b_im, dr, di, wr_, wi;
          int k;
          k = (j % h) << s;
          wr_ = b2r(r2b($cos(2.0 * PI * k / np)));
          wi  = b2r(r2b(-$sin(2.0 * PI * k / np)));
          a_re = xr[j]; a_im = xi[j]; b_re = xr[j + h]; b_im = xi[j + h];
          xr[j] = a_re + b_re; xi[j] = a_im + b_im;
          dr = a_re - b_re; di = a_im - b_im;
          xr[j + h] = dr * wr_ - di * wi;
          xi[j + h] = dr * wi + di * wr_;
        end
      end
      // start, then load (in two packets) at random times
      started = 0;
      for (int r = 0; r < n; r++) begin
        automatic int rr = r, nd = g * n + r;
        fork begin
          repeat ($urandom_range(0, 100)) @(negedge clk);
          wr(nd, 0, 12'h0, 32'd1);
          for (int part = 0; part < 2; part++) begin
            logic [32:0] w [$];
            w.push_back({1'b0, mk_hdr(6'(nd), 4'(P_FFT), 6'(nd), 4'(P_DMA), MT_FFT_LOCAL, 8'd0)});
            w.push_back({1'b0, 32'd0});
            for (int k = part * m / 2; k < (part + 1) * m / 2; k++) begin
              w.push_back({1'b0, ir[rr * m + k]});
              w.push_back({k == (part + 1) * m / 2 - 1, ii[rr * m + k]});
            end
            foreach (w[q]) inq[nd].push_back(w[q]);
            repeat ($urandom_range(0, 30)) @(negedge clk);
          end
          started++;
        end join_none
      end
      wait (started == n);
      for (int r = 0; r < n; r++) while (!irq[g * n + r]) @(negedge clk);
      repeat (10) @(negedge clk);
      for (int r = 0; r < n; r++) begin
        int nd;
        logic [32:0] w;
        logic [31:0] v;
        hdr_t hh;
        nd = g * n + r;
        checks++;
        if (snk[nd].size() != 2 * m + 2) begin
          failures++; $display("node %0d output size %0d", nd, snk[nd].size()); snk[nd].delete(); continue;
        end
        w = snk[nd].pop_front(); hh = hdr_t'(w[31:0]);
        checks++;
        if (hh.dst_port != P_DMA || hh.src_node != 6'(nd) || hh.src_port != P_FFT || hh.tag != 8'(nd)) failures++;
        w = snk[nd].pop_front(); checks++; if (w[31:0] != 32'h4000 + 32'(nd)) failures++;
        for (int k = 0; k < m; k++) begin
          real yr, yi;
          logic [32:0] w2;
          w = snk[nd].pop_front(); w2 = snk[nd].pop_front();
          yr = b2r(w[31:0]); yi = b2r(w2[31:0]);
          checks++;
          if (!close(yr, xr[r * m + k], 1e-4 * n) || !close(yi, xi[r * m + k], 1e-4 * n) ||
              w2[32] != (k == m - 1)) begin
            failures++;
            if (failures < 20) $display("nst %0d node %0d pt %0d got %f,%f exp %f,%f", nst, nd, k,
                                        yr, yi, xr[r * m + k], xi[r * m + k]);
          end
        end
        rd(nd, 12'h1, v); checks++; if (v[1:0] != 2'b10) failures++;
        wr(nd, 0, 12'h1, 32'h2);
        checks++; if (irq[nd]) failures++;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NN; i++) begin
      bus_addr[i] = 0; bus_we[i] = 0; bus_wdata[i] = 0; sel_reg[i] = 0; sel_tre[i] = 0; sel_tim[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(2, 3);
    run(2, 4);
    run(1, 2);
    run(1, 5);
    run(2, 1);
    run(2, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
