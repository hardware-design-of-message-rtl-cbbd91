// tb_mpe_node: end-to-end test of four complete nodes at their default sizes.
// The nodes 0..3 form the X ring of the torus (x = 0..3): each node's X+ link
// feeds the next node's X- input and each X- link the previous node's X+
// input, with random stalls on every link. Every node has its own main memory
// model (random grants, in-order reads) and its own register bus, driven the
// way node software would drive it. The test runs, checking every result
// against values computed here:
//   point-to-point DMA transfers (two at once, crossing each other),
//   a source-to-sink test stream over two hops,
//   a barrier (binomial tree, nodes arriving at different times),
//   a broadcast of a full 4096-word buffer from memory to every other memory,
//   a reduce (float add) and an allreduce (integer max),
//   a four-node FFT (two inter-node stages) loaded from and written back to
//     memory by the DMA,
//   a matrix-vector product: vector B broadcast by the MPE straight into the
//     MACC cores, rows sent to each node's MACC cores by DMA, results written
//     back to memory,
// and then reads the monitor and router counters. It counts how often each
// mechanism happened (the operations above, link stalls, packets forwarded
// through an intermediate node, FIFO rotation for several children, each
// interrupt line, every monitor event) and counts a failure for any that never
// happened.
module tb_mpe_node;
  import mpe_pkg::*;
  import tb_fp_pkg::*;
  localparam int NN = 4;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] bus_addr [NN];
  logic [NN-1:0] bus_we, bus_re;
  logic [31:0] bus_wdata [NN], bus_rdata [NN];
  flit_t [5:0] li_flit [NN], lo_flit [NN];
  logic [5:0] li_valid [NN], li_ready [NN], lo_valid [NN], lo_ready [NN];
  logic [NN-1:0] mem_req, mem_we, mem_gnt, mem_rvalid, irq_dma, irq_mpe, irq_fft;
  logic [31:0] mem_addr [NN], mem_wdata [NN], mem_rdata [NN];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NN; i++) begin : g_node
    mpe_node u (.clk, .rst_n, .bus_addr(bus_addr[i]), .bus_we(bus_we[i]), .bus_re(bus_re[i]),
      .bus_wdata(bus_wdata[i]), .bus_rdata(bus_rdata[i]),
      .link_in_flit(li_flit[i]), .link_in_valid(li_valid[i]), .link_in_ready(li_ready[i]),
      .link_out_flit(lo_flit[i]), .link_out_valid(lo_valid[i]), .link_out_ready(lo_ready[i]),
      .mem_req(mem_req[i]), .mem_we(mem_we[i]), .mem_addr(mem_addr[i]),
      .mem_wdata(mem_wdata[i]), .mem_gnt(mem_gnt[i]), .mem_rvalid(mem_rvalid[i]),
      .mem_rdata(mem_rdata[i]), .irq_dma(irq_dma[i]), .irq_mpe(irq_mpe[i]), .irq_fft(irq_fft[i]));
  end

  // ---------------- links: X ring with random stalls ----------------
  logic [NN-1:0] go_p, go_m;
  always @(negedge clk) for (int i = 0; i < NN; i++) begin
    go_p[i] = ($urandom_range(0, 4) != 0);
    go_m[i] = ($urandom_range(0, 4) != 0);
  end
  always_comb for (int i = 0; i < NN; i++) begin
    int nx, pv;
    nx = (i + 1) % NN; pv = (i + NN - 1) % NN;
    li_flit[i] = '0; li_valid[i] = '0; lo_ready[i] = 6'b111100;
    li_flit[i][P_XM]  = lo_flit[pv][P_XP];
    li_valid[i][P_XM] = lo_valid[pv][P_XP] && go_p[pv];
    li_flit[i][P_XP]  = lo_flit[nx][P_XM];
    li_valid[i][P_XP] = lo_valid[nx][P_XM] && go_m[nx];
    lo_ready[i][P_XP] = li_ready[nx][P_XM] && go_p[i];
    lo_ready[i][P_XM] = li_ready[pv][P_XP] && go_m[i];
  end

  // ---------------- memories ----------------
  logic [31:0] mem [NN][65536];
  logic [31:0] rq [NN][$];
  for (genvar i = 0; i < NN; i++) begin : g_mem
    always @(negedge clk) mem_gnt[i] = ($urandom_range(0, 7) != 0);
    always @(posedge clk) begin
      mem_rvalid[i] <= 1'b0;
      if (rq[i].size() > 0 && $urandom_range(0, 3) != 0) begin
        mem_rvalid[i] <= 1'b1;
        mem_rdata[i]  <= rq[i].pop_front();
      end
      if (rst_n && mem_req[i] && mem_gnt[i]) begin
        if (mem_we[i]) mem[i][mem_addr[i][15:0]] <= mem_wdata[i];
        else rq[i].push_back(mem[i][mem_addr[i][15:0]]);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_coll0 = 0, n_link_stall = 0, n_forward = 0, n_irq_dma = 0, n_irq_mpe = 0, n_irq_fft = 0;
  logic [NN-1:0] irq_dma_q, irq_mpe_q, irq_fft_q;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NN; i++) begin
      for (int p = 0; p < 2; p++) begin
        if (lo_valid[i][p] && !lo_ready[i][p]) n_link_stall++;
        // a packet entering node i from a link and addressed to another node
        if (li_valid[i][p] && li_ready[i][p] && li_flit[i][p].sof &&
            int'(li_flit[i][p].data[31:26]) != i) n_forward++;
      end
      // collective data packets leaving node 0 (the broadcast root)
      if (i == 0) for (int p = 0; p < 2; p++)
        if (lo_valid[0][p] && lo_ready[0][p] && lo_flit[0][p].sof &&
            lo_flit[0][p].data[15:12] == P_MPE && lo_flit[0][p].data[11:8] == 4'(MT_COLL_DATA)) n_coll0++;
      if (irq_dma[i] && !irq_dma_q[i]) n_irq_dma++;
      if (irq_mpe[i] && !irq_mpe_q[i]) n_irq_mpe++;
      if (irq_fft[i] && !irq_fft_q[i]) n_irq_fft++;
    end
    irq_dma_q <= irq_dma; irq_mpe_q <= irq_mpe; irq_fft_q <= irq_fft;
  end

  // ---------------- register bus ----------------
  bit lock [NN];
  task automatic wr(input int n, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    while (lock[n]) @(negedge clk);
    lock[n] = 1;
    bus_addr[n] = a; bus_we[n] = 1; bus_wdata[n] = d;
    @(negedge clk); bus_we[n] = 0; lock[n] = 0;
  endtask
  task automatic rd(input int n, input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    while (lock[n]) @(negedge clk);
    lock[n] = 1;
    bus_addr[n] = a; bus_re[n] = 1;
    @(negedge clk); bus_re[n] = 0; d = bus_rdata[n]; lock[n] = 0;
  endtask

  // DMA send: start, wait for send done, clear it
  task automatic dma_send(input int n, input int src, input int len, input logic [31:0] h,
                          input logic [31:0] aux);
    logic [31:0] v;
    wr(n, 16'h1000, 32'(src)); wr(n, 16'h1001, 32'(len));
    wr(n, 16'h1002, h); wr(n, 16'h1003, aux);
    wr(n, 16'h1004, 32'd1);
    do rd(n, 16'h1005, v); while (!v[1]);
    wr(n, 16'h1005, 32'h2);
  endtask
  // wait until n packets have landed in node n's memory through the DMA
  task automatic dma_wait_recv(input int n);
    logic [31:0] v;
    do rd(n, 16'h1005, v); while (!v[2]);
    wr(n, 16'h1005, 32'h4);
  endtask

  task automatic mpe_start(input int n, input int op, input int aop);
    wr(n, 16'h2000, {26'd0, 2'(aop), 1'b0, 3'(op)});
  endtask
  task automatic mpe_wait(input int n);
    while (!irq_mpe[n]) @(negedge clk);
    wr(n, 16'h2001, 32'h2);
  endtask

  int n_p2p = 0, n_stream = 0, n_barrier = 0, n_bcast = 0, n_reduce = 0, n_allreduce = 0;
  int n_fft = 0, n_mvm = 0, n_rotate = 0, n_mon = 0;
  int done_cnt;

  task automatic check_mem(input int n, input int a, input logic [31:0] e, input string what);
    checks++;
    if (mem[n][a] !== e) begin
      failures++;
      if (failures < 20) $display("%s: node %0d mem[%h] = %h exp %h", what, n, a, mem[n][a], e);
    end
  endtask

  // FFT data
  real xr [], xi [];
  logic [31:0] ir [], ii [];

  initial begin
    logic [31:0] v;
    for (int i = 0; i < NN; i++) begin
      bus_addr[i] = 0; bus_we[i] = 0; bus_re[i] = 0; bus_wdata[i] = 0; lock[i] = 0;
      for (int a = 0; a < 65536; a++) mem[i][a] = 32'hdead_0000 ^ 32'(a);
    end
    irq_dma_q = 0; irq_mpe_q = 0; irq_fft_q = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NN; i++) begin
      wr(i, 16'h0000, 32'(i));
      rd(i, 16'h0000, v); checks++; if (v != 32'(i)) failures++;
    end

    // ---- point-to-point DMA: 0 -> 2 and 3 -> 1 at the same time
    for (int k = 0; k < 300; k++) begin mem[0][16'h0100 + k] = 32'h0a000000 + 32'(k); mem[3][16'h0100 + k] = 32'h3a000000 + 32'(k); end
    fork
      dma_send(0, 16'h0100, 300, mk_hdr(6'd2, P_DMA, 6'd0, 4'd0, MT_DMA_WRITE, 8'd1), 32'h8000);
      dma_send(3, 16'h0100, 300, mk_hdr(6'd1, P_DMA, 6'd0, 4'd0, MT_DMA_WRITE, 8'd2), 32'h8000);
      dma_wait_recv(2);
      dma_wait_recv(1);
    join
    for (int k = 0; k < 300; k++) begin
      check_mem(2, 16'h8000 + k, 32'h0a000000 + 32'(k), "p2p");
      check_mem(1, 16'h8000 + k, 32'h3a000000 + 32'(k), "p2p");
    end
    n_p2p += 2;

    // ---- source/sink stream 1 -> 3 (two hops: 1 -> 2 -> 3)
    wr(1, 16'h3000, mk_hdr(6'd3, P_SRC, 6'd0, 4'd0, MT_STREAM, 8'd5));
    wr(1, 16'h3001, 32'd0); wr(1, 16'h3002, 32'd500); wr(1, 16'h3003, 32'd1000);
    wr(1, 16'h3004, 32'd1);
    do rd(3, 16'h3007, v); while (v != 500);
    rd(3, 16'h3006, v); checks++; if (v != 1) failures++;
    rd(3, 16'h3008, v); checks++; if (v != 32'(500 * 1000 + 499 * 500 / 2)) begin failures++; $display("sum %0d", v); end
    n_stream++;

    // ---- MPE topology: binomial tree rooted at 0: 0 -> {1, 2}, 1 -> {3}
    wr(0, 16'h2002, {9'd0, 7'd2, 7'd0, 1'b1, 8'd0}); wr(0, 16'h2100, 1); wr(0, 16'h2101, 2);
    wr(1, 16'h2002, {9'd0, 7'd1, 7'd0, 1'b0, 8'd0}); wr(1, 16'h2100, 3);
    wr(2, 16'h2002, {9'd0, 7'd0, 7'd0, 1'b0, 8'd0});
    wr(3, 16'h2002, {9'd0, 7'd0, 7'd0, 1'b0, 8'd1});

    // ---- barrier, node 3 last
    fork
      begin mpe_start(0, OP_BARRIER, 0); end
      begin mpe_start(1, OP_BARRIER, 0); end
      begin mpe_start(2, OP_BARRIER, 0); end
    join
    repeat (300) @(negedge clk);
    checks++; if (irq_mpe != 0) begin failures++; $display("barrier released early"); end
    mpe_start(3, OP_BARRIER, 0);
    for (int i = 0; i < NN; i++) mpe_wait(i);
    n_barrier++;

    // ---- broadcast of 4096 words from node 0 memory to memories of 1..3
    for (int i = 0; i < NN; i++) begin
      wr(i, 16'h2003, mk_hdr(6'd0, P_DMA, 6'd0, 4'd0, MT_DMA_WRITE, 8'd3));
      wr(i, 16'h2004, 32'h9000);
    end
    for (int k = 0; k < 4096; k++) mem[0][16'h1000 + k] = $urandom;
    for (int i = 1; i < NN; i++) mpe_start(i, OP_BCAST, 0);
    mpe_start(0, OP_BCAST, 0);
    dma_send(0, 16'h1000, 4096, mk_hdr(6'd0, P_MPE, 6'd0, 4'd0, MT_COLL_DATA, 8'd0), 32'd0);
    for (int i = 0; i < NN; i++) mpe_wait(i);
    for (int i = 1; i < NN; i++) begin
      dma_wait_recv(i);
      for (int k = 0; k < 4096; k++) check_mem(i, 16'h9000 + k, mem[0][16'h1000 + k], "bcast");
    end
    n_bcast++;
    // node 0 sent its one FIFO copy to both children by rotating it
    if (n_coll0 >= 2) n_rotate++;
    rd(0, 16'h2005, v); checks++; if (v != 4096) failures++;

    // ---- reduce (float add) to node 0, then allreduce (integer max)
    for (int op = OP_REDUCE; op <= OP_ALLREDUCE; op++) begin
      int len;
      logic [31:0] res [];
      len = (op == OP_REDUCE) ? 200 : 77;
      res = new[len];
      for (int k = 0; k < len; k++) begin
        for (int i = 0; i < NN; i++)
          mem[i][16'h2000 + k] = (op == OP_REDUCE) ? r2b(real'($urandom_range(0, 100)) - 50.0) : $urandom;
        res[k] = mem[0][16'h2000 + k];
        for (int i = 1; i < NN; i++)
          res[k] = (op == OP_REDUCE) ? r2b(b2r(res[k]) + b2r(mem[i][16'h2000 + k])) :
                   (($signed(mem[i][16'h2000 + k]) > $signed(res[k])) ? mem[i][16'h2000 + k] : res[k]);
      end
      for (int i = 0; i < NN; i++) wr(i, 16'h2004, (op == OP_REDUCE) ? 32'hA000 : 32'hB000);
      done_cnt = 0;
      for (int i = 0; i < NN; i++) begin
        automatic int ii2 = i, oo = op, ll = len;
        fork begin
          repeat ($urandom_range(0, 100)) @(negedge clk);
          mpe_start(ii2, oo, (oo == OP_REDUCE) ? ALU_FADD : ALU_IMAX);
          dma_send(ii2, 16'h2000, ll, mk_hdr(6'(ii2), P_MPE, 6'd0, 4'd0, MT_COLL_DATA, 8'd0), 32'd0);
          mpe_wait(ii2);
          if (oo == OP_ALLREDUCE || ii2 == 0) dma_wait_recv(ii2);
          done_cnt++;
        end join_none
      end
      wait (done_cnt == NN);
      for (int i = 0; i < NN; i++)
        if (op == OP_ALLREDUCE || i == 0)
          for (int k = 0; k < len; k++) check_mem(i, ((op == OP_REDUCE) ? 16'hA000 : 16'hB000) + k, res[k], "reduce");
      if (op == OP_REDUCE) n_reduce++; else n_allreduce++;
    end

    // ---- FFT: 4 nodes, 16 points each, 64-point transform
    begin
      int m, np;
      m = 16; np = 64;
      xr = new[np]; xi = new[np]; ir = new[np]; ii = new[np];
      for (int k = 0; k < np; k++) begin
        ir[k] = r2b(real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
        ii[k] = r2b(real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
        xr[k] = b2r(ir[k]); xi[k] = b2r(ii[k]);
      end
      for (int i = 0; i < NN; i++) begin
        wr(i, 16'h5002, {20'd0, 4'd2, 4'd0, 4'd4});
        wr(i, 16'h5003, 32'(i)); wr(i, 16'h5004, 32'd0);
        wr(i, 16'h5005, mk_hdr(6'(i), P_DMA, 6'd0, 4'd0, MT_DMA_WRITE, 8'd4));
        wr(i, 16'h5006, 32'hC000);
        for (int k = 0; k < np / 2; k++) begin
          wr(i, 16'h6000 + 16'(k), r2b($cos(2.0 * PI * k / np)));
          wr(i, 16'h7000 + 16'(k), r2b(-$sin(2.0 * PI * k / np)));
        end
        for (int k = 0; k < m; k++) begin
          mem[i][16'h3000 + 2 * k] = ir[i * m + k];
          mem[i][16'h3000 + 2 * k + 1] = ii[i * m + k];
        end
      end
      for (int s = 0; s < 2; s++) begin
        int h;
        h = np >> (s + 1);
        for (int j = 0; j < np; j++) if ((j & h) == 0) begin
          real a_re, a_im, b_re, b_im, dr, di, twr, twi;
          int k;
          k = (j % h) << s;
          twr = b2r(r2b($cos(2.0 * PI * k / np))); twi = b2r(r2b(-$sin(2.0 * PI * k / np)));
          a_re = xr[j]; a_im = xi[j]; b_re = xr[j + h]; b_im = xi[j + h];
          xr[j] = a_re + b_re; xi[j] = a_im + b_im;
          dr = a_re - b_re; di = a_im - b_im;
          xr[j + h] = dr * twr - di * twi; xi[j + h] = dr * twi + di * twr;
        end
      end
      done_cnt = 0;
      for (int i = 0; i < NN; i++) begin
        automatic int ii2 = i;
        fork begin
          repeat ($urandom_range(0, 50)) @(negedge clk);
          wr(ii2, 16'h5000, 32'd1);
          dma_send(ii2, 16'h3000, 2 * 16, mk_hdr(6'(ii2), P_FFT, 6'd0, 4'd0, MT_FFT_LOCAL, 8'd0), 32'd0);
          while (!irq_fft[ii2]) @(negedge clk);
          wr(ii2, 16'h5001, 32'h2);
          dma_wait_recv(ii2);
          done_cnt++;
        end join_none
      end
      wait (done_cnt == NN);
      for (int i = 0; i < NN; i++)
        for (int k = 0; k < m; k++) begin
          checks++;
          if (!close(b2r(mem[i][16'hC000 + 2 * k]), xr[i * m + k], 4e-4) ||
              !close(b2r(mem[i][16'hC000 + 2 * k + 1]), xi[i * m + k], 4e-4)) begin
            failures++;
            $display("fft node %0d pt %0d got %f,%f exp %f,%f", i, k, b2r(mem[i][16'hC000 + 2 * k]),
                     b2r(mem[i][16'hC000 + 2 * k + 1]), xr[i * m + k], xi[i * m + k]);
          end
        end
      n_fft++;
    end

    // ---- matrix-vector product: 32-element B, 4 rows per MACC, MACC 0 on
    //      every node and MACC 5 on node 0
    begin
      int L, R;
      logic [31:0] b [];
      L = 32; R = 4;
      b = new[L];
      for (int k = 0; k < L; k++) begin
        b[k] = r2b(real'($urandom_range(0, 16)) - 8.0);
        mem[0][16'h4000 + k] = b[k];
      end
      for (int i = 0; i < NN; i++) begin
        for (int r = 0; r < 2 * R; r++)
          for (int k = 0; k < L; k++) mem[i][16'h5000 + r * L + k] = r2b(real'($urandom_range(0, 16)) - 8.0);
        wr(i, 16'h2003, mk_hdr(6'd0, P_MACC0, 6'd0, 4'd0, MT_MACC_VEC, 8'd0));
        wr(i, 16'h8000, mk_hdr(6'(i), P_DMA, 6'd0, 4'd0, MT_DMA_WRITE, 8'd6));
        wr(i, 16'h8001, 32'hD000);
      end
      wr(0, 16'h8500, mk_hdr(6'd0, P_DMA, 6'd0, 4'd0, MT_DMA_WRITE, 8'd6));
      wr(0, 16'h8501, 32'hD100);
      // B to every MACC 0 by broadcast, and by DMA to node 0's own MACCs
      for (int i = 1; i < NN; i++) mpe_start(i, OP_BCAST, 0);
      mpe_start(0, OP_BCAST, 0);
      dma_send(0, 16'h4000, L, mk_hdr(6'd0, P_MPE, 6'd0, 4'd0, MT_COLL_DATA, 8'd0), 32'd0);
      for (int i = 0; i < NN; i++) mpe_wait(i);
      dma_send(0, 16'h4000, L, mk_hdr(6'd0, P_MACC0, 6'd0, 4'd0, MT_MACC_VEC, 8'd0), 32'd0);
      dma_send(0, 16'h4000, L, mk_hdr(6'd0, P_MACC0 + 4'd5, 6'd0, 4'd0, MT_MACC_VEC, 8'd0), 32'd0);
      for (int i = 0; i < NN; i++) begin
        dma_send(i, 16'h5000, R * L, mk_hdr(6'(i), P_MACC0, 6'd0, 4'd0, MT_MACC_ROWS, 8'd0), 32'd0);
        dma_wait_recv(i);
      end
      dma_send(0, 16'h5000 + R * L, R * L, mk_hdr(6'd0, P_MACC0 + 4'd5, 6'd0, 4'd0, MT_MACC_ROWS, 8'd0), 32'd0);
      dma_wait_recv(0);
      for (int i = 0; i < NN; i++)
        for (int r = 0; r < ((i == 0) ? 2 * R : R); r++) begin
          real acc;
          acc = 0.0;
          for (int k = 0; k < L; k++) acc += b2r(mem[i][16'h5000 + r * L + k]) * b2r(b[k]);
          check_mem(i, ((r < R) ? 16'hD000 + r : 16'hD100 + r - R), r2b(acc), "mvm");
        end
      n_mvm++;
    end

    // ---- counters
    for (int i = 0; i < NN; i++) begin
      int nz;
      nz = 0;
      for (int e = 0; e < 8; e++) begin
        rd(i, 16'h4010 + 16'(e), v);
        if (v != 0) nz++;
      end
      // node 1 (stream source) and node 0/1/2 see all events; every node
      // has had MPE, DMA, FFT, MACC and link activity
      checks++; if (nz < ((i == 1) ? 8 : 7)) begin failures++; $display("monitor node %0d: %0d events seen", i, nz); end
      n_mon += nz;
      rd(i, 16'h0001, v); checks++; if (v == 0) failures++;
    end

    // ---- mechanism report
    begin
      int cnt [string];
      cnt["p2p_dma"] = n_p2p; cnt["stream"] = n_stream; cnt["barrier"] = n_barrier;
      cnt["broadcast"] = n_bcast; cnt["reduce"] = n_reduce; cnt["allreduce"] = n_allreduce;
      cnt["fft"] = n_fft; cnt["mvm"] = n_mvm; cnt["fifo_rotate"] = n_rotate;
      cnt["link_stall"] = n_link_stall; cnt["forward_hop"] = n_forward;
      cnt["irq_dma"] = n_irq_dma; cnt["irq_mpe"] = n_irq_mpe; cnt["irq_fft"] = n_irq_fft;
      cnt["monitor_events"] = n_mon;
      foreach (cnt[k]) begin
        $display("mechanism %-15s %0d", k, cnt[k]);
        checks++; if (cnt[k] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
