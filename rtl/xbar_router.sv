// xbar_router: the node's on-chip router, a packet-switched crossbar.
//
// NPORTS LocalLink-style ports (16 in the modelled node: six off-chip torus
// links, then DMA, MPE, source/sink, FFT and MACC cores). Each input has a
// small FIFO. When the head of an input FIFO is the first word of a packet,
// route_calc picks its output from the header; a free output grants one of
// the inputs asking for it in round-robin order and then stays connected to
// that input until the packet's last word (eof) has passed, so packets are
// never interleaved. A grant costs one cycle; after it the packet moves at one
// word per cycle when the output is ready.
// Register bus: 0x0 node ID (read/write, sets the routing origin and is
// exported on my_id), 0x1 packets routed (read only).
// The 16-port crossbar, the bus-set network ID and the torus routing follow
// the modelled system; the input buffering and round-robin policy are this
// design's choice. There are no virtual channels; route_calc's tie-break keeps
// the 4-ary rings free of cyclic waits without them.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of this module's checking assertions; no flop is reset synchronously.
module xbar_router
  import mpe_pkg::*;
#(
  parameter int unsigned NP         = NPORTS,
  parameter int unsigned IBUF_DEPTH = 4,
  parameter int unsigned K          = TORUS_K
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input side of every port
  input  flit_t [NP-1:0]       in_flit,
  input  logic  [NP-1:0]       in_valid,
  output logic  [NP-1:0]       in_ready,
  // output side of every port
  output flit_t [NP-1:0]       out_flit,
  output logic  [NP-1:0]       out_valid,
  input  logic  [NP-1:0]       out_ready,
  // register bus
  input  logic [11:0]          bus_addr,
  input  logic                 bus_we,
  input  logic [31:0]          bus_wdata,
  output logic [31:0]          bus_rdata,
  output logic [NODE_W-1:0]    my_id
);
  localparam int unsigned IW = $clog2(NP);

  flit_t [NP-1:0]     head;
  logic  [NP-1:0]     empty, full, pop;
  logic  [PORT_W-1:0] route [NP];

  for (genvar i = 0; i < NP; i++) begin : g_in
    logic [$clog2(IBUF_DEPTH+1)-1:0] cnt;
    fifo_sync #(.WIDTH($bits(flit_t)), .DEPTH(IBUF_DEPTH)) u_ibuf (
      .clk, .rst_n, .clear(1'b0),
      .push(in_valid[i] && !full[i]), .wr_data(in_flit[i]),
      .pop(pop[i]), .rd_data(head[i]), .empty(empty[i]), .full(full[i]), .count(cnt)
    );
    assign in_ready[i] = !full[i];
    route_calc #(.K(K)) u_route (.my_id(my_id), .hdr(head[i].data), .out_port(route[i]));
  end

  logic [NP-1:0]  in_bound;
  logic [IW-1:0]  out_owner [NP];
  logic [NP-1:0]  out_busy;
  logic [IW-1:0]  rr [NP];
  logic [31:0]    n_routed;

  // request matrix: req[o][i]
  logic [NP-1:0] req [NP];
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      for (int i = 0; i < NP; i++) begin
        req[o][i] = !empty[i] && head[i].sof && !in_bound[i] && (int'(route[i]) == o);
      end
    end
  end

  // grant selection, round robin from rr[o]
  logic [NP-1:0] gnt_any;
  logic [IW-1:0] gnt_idx [NP];
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      gnt_any[o] = 1'b0;
      gnt_idx[o] = '0;
      for (int k = 0; k < NP; k++) begin
        int i;
        i = (int'(rr[o]) + k) % NP;
        if (!gnt_any[o] && req[o][i]) begin
          gnt_any[o] = 1'b1;
          gnt_idx[o] = IW'(i);
        end
      end
    end
  end

  // data path
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out_flit[o]  = head[out_owner[o]];
      out_valid[o] = out_busy[o] && !empty[out_owner[o]];
    end
  end
  always_comb begin
    pop = '0;
    for (int o = 0; o < NP; o++)
      if (out_busy[o] && !empty[out_owner[o]] && out_ready[o]) pop[out_owner[o]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_bound <= '0;
      out_busy <= '0;
      n_routed <= '0;
      for (int o = 0; o < NP; o++) begin
        out_owner[o] <= '0;
        rr[o]        <= '0;
      end
    end else begin
      for (int o = 0; o < NP; o++) begin
        if (out_busy[o]) begin
          if (out_valid[o] && out_ready[o] && out_flit[o].eof) begin
            out_busy[o]            <= 1'b0;
            in_bound[out_owner[o]] <= 1'b0;
          end
        end else if (gnt_any[o]) begin
          out_busy[o]            <= 1'b1;
          out_owner[o]           <= gnt_idx[o];
          in_bound[gnt_idx[o]]   <= 1'b1;
          rr[o]                  <= IW'((int'(gnt_idx[o]) + 1) % NP);
        end
      end
      n_routed <= n_routed + 32'($countones(gnt_any & ~out_busy));
    end
  end

  // node ID register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) my_id <= '0;
    else if (bus_we && bus_addr == 12'h0) my_id <= bus_wdata[NODE_W-1:0];
  end
  always_comb begin
    unique case (bus_addr)
      12'h0:   bus_rdata = 32'(my_id);
      12'h1:   bus_rdata = n_routed;
      default: bus_rdata = '0;
    endcase
  end

  // A bound input and its output always agree.
  for (genvar o = 0; o < NP; o++) begin : g_chk
    a_owner_bound: assert property (@(posedge clk) disable iff (!rst_n)
      out_busy[o] |-> in_bound[out_owner[o]]);
  end
endmodule
