// tb_mpe_collectives: the collective workloads at full size. Thirty-two
// Message Passing Engines at their default parameters (4096-word FIFO, up to
// 64 children) are joined by a behavioural network that collects each packet
// whole and then delivers it to its destination node at one word per cycle,
// with no back-pressure. For the binomial, linear-chain and flat-star trees,
// each rooted at a random node, it runs a barrier, broadcasts of 8 and 4096
// words, a 4096-word floating-point reduce, a 4096-word floating-point
// allreduce and a 64-word integer-max allreduce, and prints the cycles each
// operation took (these include the network's own whole-packet delay, so
// they show the relative cost of the tree shapes, not link timing). Checks:
// no node leaves a barrier before the last node entered it; every node
// receives the root's broadcast data; the root receives the reduction
// computed here; every node receives the allreduce result; the local packets
// carry the programmed header and auxiliary word; done/irq and the operation
// counter. Because each engine stores a whole message before forwarding it,
// a 4096-word broadcast must take at least 31 x 4096 cycles both down the
// chain (31 hops) and from the star's root (31 copies); that bound is
// checked. The node counts and message sizes are the largest of the
// evaluated configurations; the three tree shapes are those compared there.
module tb_mpe_collectives;
  import mpe_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 32;
  localparam int FD = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t in_flit [N], out_flit [N];
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready, irq, busy, waiting;
  logic [11:0] bus_addr [N];
  logic [N-1:0] bus_we;
  logic [31:0] bus_wdata [N], bus_rdata [N];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g_n
    mpe_core u (.clk, .rst_n,
      .my_id(6'(i)), .in_flit(in_flit[i]), .in_valid(in_valid[i]), .in_ready(in_ready[i]),
      .out_flit(out_flit[i]), .out_valid(out_valid[i]), .out_ready(out_ready[i]),
      .bus_addr(bus_addr[i]), .bus_we(bus_we[i]), .bus_wdata(bus_wdata[i]),
      .bus_rdata(bus_rdata[i]), .irq(irq[i]), .busy(busy[i]), .waiting(waiting[i]));
  end

  // ---------------- network model ----------------
  logic [32:0] inq [N][$];    // {eof, word}, whole packets only
  logic [32:0] snk [N][$];    // local deliveries
  logic [32:0] cur [N][$];
  for (genvar i = 0; i < N; i++) begin : g_net
    assign out_ready[i] = 1'b1;
    always @(posedge clk) if (rst_n && out_valid[i] && out_ready[i]) begin
      cur[i].push_back({out_flit[i].eof, out_flit[i].data});
      if (out_flit[i].eof) begin
        hdr_t h;
        h = hdr_t'(cur[i][0][31:0]);
        if (int'(h.dst_node) == i && h.dst_port != P_MPE)
          while (cur[i].size() > 0) snk[i].push_back(cur[i].pop_front());
        else
          while (cur[i].size() > 0) inq[h.dst_node].push_back(cur[i].pop_front());
      end
    end
    initial begin
      in_valid[i] = 0; in_flit[i] = '0;
      forever begin
        @(negedge clk);
        if (inq[i].size() > 0) begin
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
          end while (!w[32]);
        end
      end
    end
  end

  // ---------------- bus ----------------
  task automatic wr(input int n, input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr[n] = a; bus_we[n] = 1; bus_wdata[n] = d;
    @(negedge clk); bus_we[n] = 0;
  endtask
  task automatic rd(input int n, input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr[n] = a; #1 d = bus_rdata[n];
  endtask

  // local data injection (as the DMA would send it)
  task automatic inject(input int n, input logic [31:0] d[]);
    logic [32:0] w[$];
    w.push_back({1'b0, mk_hdr(6'(n), P_MPE, 6'(n), P_DMA, MT_COLL_DATA, 8'd0)});
    w.push_back({1'b0, 32'd0});
    foreach (d[k]) w.push_back({k == d.size() - 1, d[k]});
    foreach (w[k]) inq[n].push_back(w[k]);
  endtask

  // ---------------- topology ----------------
  int par [N];
  int kids [N][$];
  task automatic topo(input int shape, input int root);
    for (int i = 0; i < N; i++) kids[i].delete();
    for (int v = 1; v < N; v++) begin
      int pv, i, p;
      case (shape)
        0: begin pv = v; for (int b = 4; b >= 0; b--) if (pv >= (1 << b)) begin pv = v - (1 << b); break; end end
        1: pv = v - 1;
        default: pv = 0;
      endcase
      i = (v + root) % N; p = (pv + root) % N;
      par[i] = p; kids[p].push_back(i);
    end
    par[root] = root;
    for (int i = 0; i < N; i++) begin
      wr(i, 12'h2, {9'd0, 7'(kids[i].size()), 7'd0, (i == root), 2'd0, 6'(par[i])});
      foreach (kids[i][k]) wr(i, 12'h100 + 12'(k), 32'(kids[i][k]));
      wr(i, 12'h3, mk_hdr(6'd0, 4'(P_DMA), 6'd0, 4'd0, MT_DMA_WRITE, 8'(i)));
      wr(i, 12'h4, 32'h1000 + 32'(i));
    end
  endtask

  function automatic logic [31:0] comb(input int aop, input logic [31:0] a, input logic [31:0] b);
    case (aop)
      0: return ref_add(a, b);
      1: return (b2r(a) >= b2r(b)) ? a : b;
      2: return a + b;
      default: return ($signed(a) >= $signed(b)) ? a : b;
    endcase
  endfunction

  function automatic logic [31:0] rval(input int aop);
    int v;
    v = $urandom_range(0, 2000) - 1000;
    return (aop < 2) ? r2b(real'(v)) : 32'(v);
  endfunction

  int n_ops_exp = 0;
  int ops_run = 0;
  int started;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  longint last_cycles;

  task automatic run(input int op, input int aop, input int root, input int len);
    logic [31:0] data [N][];
    logic [31:0] res [];
    logic [31:0] v;
    longint t0;
    for (int i = 0; i < N; i++) begin
      data[i] = new[len];
      for (int k = 0; k < len; k++) data[i][k] = rval(aop);
    end
    res = new[len];
    for (int k = 0; k < len; k++) begin
      res[k] = data[root][k];
      if (op >= 3) for (int i = 0; i < N; i++) if (i != root) res[k] = comb(aop, res[k], data[i][k]);
    end
    // start nodes in random order with random gaps
    started = 0;
    for (int i = 0; i < N; i++) begin
      automatic int ii = i;
      fork begin
        repeat ($urandom_range(0, 8)) @(negedge clk);
        wr(ii, 12'h0, {26'd0, 2'(aop), 1'b0, 3'(op)});
        if (op == 3 || op == 4 || (op == 2 && ii == root)) inject(ii, data[ii]);
        started++;
      end join_none
    end
    t0 = cyc;
    wait (started == N);
    for (int i = 0; i < N; i++) begin
      while (!irq[i]) @(negedge clk);
    end
    last_cycles = cyc - t0;
    $display("op %0d aop %0d len %0d: %0d cycles", op, aop, len, last_cycles);
    repeat (20) @(negedge clk);
    n_ops_exp++;
    for (int i = 0; i < N; i++) begin
      bit want;
      rd(i, 12'h1, v); checks++; if (v[1:0] != 2'b10) begin failures++; $display("status %0d %h", i, v); end
      rd(i, 12'h6, v); checks++; if (v != 32'(n_ops_exp)) failures++;
      wr(i, 12'h1, 32'h2);
      checks++; if (irq[i]) failures++;
      want = (op == 2 && i != root) || (op == 3 && i == root) || op == 4;
      checks++;
      if (!want) begin
        if (snk[i].size() != 0) begin failures++; $display("unexpected local at %0d", i); end
      end else if (snk[i].size() != len + 2) begin
        failures++; $display("op %0d node %0d local size %0d exp %0d", op, i, snk[i].size(), len + 2);
      end else begin
        logic [32:0] w;
        hdr_t h;
        w = snk[i].pop_front(); h = hdr_t'(w[31:0]);
        checks++;
        if (h.dst_port != P_DMA || h.tag != 8'(i) || h.src_port != P_MPE || h.mtype != MT_DMA_WRITE) begin
          failures++; $display("local hdr %h", w[31:0]);
        end
        w = snk[i].pop_front(); checks++; if (w[31:0] != 32'h1000 + 32'(i)) failures++;
        for (int k = 0; k < len; k++) begin
          w = snk[i].pop_front();
          checks++;
          if (w[31:0] != (op == 2 ? data[root][k] : res[k]) || w[32] != (k == len - 1)) begin
            failures++;
            if (failures < 40) $display("op %0d aop %0d root %0d node %0d word %0d/%0d got %h exp %h", op, aop, root, i, k, len, w[31:0], (op == 2 ? data[root][k] : res[k]));
          end
        end
      end
      snk[i].delete();
    end
    ops_run++;
  endtask

  initial begin
    logic [31:0] v;
    for (int i = 0; i < N; i++) begin bus_addr[i] = 0; bus_we[i] = 0; bus_wdata[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int shape = 0; shape < 3; shape++) begin
      int root;
      root = $urandom_range(0, N - 1);
      topo(shape, root);
      // barrier with one late node
      begin
        int late;
        late = $urandom_range(0, N - 1);
        for (int i = 0; i < N; i++) if (i != late) wr(i, 12'h0, 32'(OP_BARRIER));
        repeat (200) @(negedge clk);
        checks++;
        for (int i = 0; i < N; i++) if (irq[i]) begin failures++; $display("barrier left early %0d", i); break; end
        wr(late, 12'h0, 32'(OP_BARRIER));
        for (int i = 0; i < N; i++) while (!irq[i]) @(negedge clk);
        n_ops_exp++;
        for (int i = 0; i < N; i++) begin
          rd(i, 12'h6, v); checks++; if (v != 32'(n_ops_exp)) failures++;
          wr(i, 12'h1, 32'h2);
        end
      end
      run(2, 0, root, 8);
      run(2, 0, root, FD);
      if (shape != 0) begin
        checks++;
        if (last_cycles < longint'((N - 1) * FD)) begin
          failures++; $display("broadcast faster than store-and-forward allows: %0d", last_cycles);
        end
      end
      run(3, 0, root, FD);
      run(4, 0, root, FD);
      run(4, 3, root, 64);
    end
    checks++; if (ops_run != 15) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
