// mpe_node: one node of the message-passing cluster (one FPGA).
//
// A 16-port crossbar router joins the node's units and its six off-chip torus
// links (X+, X-, Y+, Y-, Z+, Z-, ports 0-5). On the remaining ports sit the
// DMA engine (6, point-to-point transfers to and from main memory), the
// Message Passing Engine (7, barrier/broadcast/reduce/allreduce), the
// source/sink test core (8), the FFT accelerator (9) and N_MACC
// multiply-accumulate cores (10 onward). Heterogeneous units exchange data
// directly through the router: the MPE can deliver a broadcast vector straight
// into a MACC core, and the FFT accelerator trades data with its partner
// node's accelerator without the processor.
// The processor reaches every unit over a simple register bus: a write takes
// effect at the clock edge where bus_we is high; bus_rdata returns the word
// at bus_addr one cycle after bus_re. Address bits [15:12] select the unit:
// 0 router, 1 DMA, 2 MPE, 3 source/sink, 4 monitor, 5 FFT registers,
// 6/7 FFT twiddle table real/imaginary, 8 MACC cores (bits [11:8] pick the
// core). Interrupt lines are brought out raw. The memory port is the DMA's.
// The off-chip links are LocalLink-style streams as the high-speed link
// cores would present them. The monitor counts MPE busy, MPE waiting, DMA
// sending, DMA receiving, FFT busy, any MACC busy, source busy, and cycles
// with a word leaving on a link.
// The node organisation follows the modelled system (router with bus-set
// network ID, DMA, MPE, test and monitor cores, accelerators on the router);
// the bus, the port numbering and N_MACC = 6 (what a 16-port router leaves
// after the other units; the hybrid experiment used 8) are this design's.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of the checking assertions in the instantiated submodules; no flop is reset synchronously.
module mpe_node
  import mpe_pkg::*;
#(
  parameter int unsigned N_MACC = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  // processor register bus
  input  logic [15:0]  bus_addr,
  input  logic         bus_we,
  input  logic         bus_re,
  input  logic [31:0]  bus_wdata,
  output logic [31:0]  bus_rdata,
  // off-chip links
  input  flit_t [5:0]  link_in_flit,
  input  logic  [5:0]  link_in_valid,
  output logic  [5:0]  link_in_ready,
  output flit_t [5:0]  link_out_flit,
  output logic  [5:0]  link_out_valid,
  input  logic  [5:0]  link_out_ready,
  // main memory (DMA)
  output logic         mem_req,
  output logic         mem_we,
  output logic [31:0]  mem_addr,
  output logic [31:0]  mem_wdata,
  input  logic         mem_gnt,
  input  logic         mem_rvalid,
  input  logic [31:0]  mem_rdata,
  // interrupts
  output logic         irq_dma,
  output logic         irq_mpe,
  output logic         irq_fft
);
  localparam int unsigned NP = 10 + N_MACC;

  flit_t [NP-1:0] r_in_flit, r_out_flit;
  logic  [NP-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  logic  [NODE_W-1:0] my_id;

  logic [3:0]  blk;
  logic [11:0] sub;
  assign blk = bus_addr[15:12];
  assign sub = bus_addr[11:0];

  logic [31:0] rd_router, rd_dma, rd_mpe, rd_src, rd_mon, rd_fft;
  logic [31:0] rd_macc [N_MACC];

  // links
  assign r_in_flit[5:0]   = link_in_flit;
  assign r_in_valid[5:0]  = link_in_valid;
  assign link_in_ready    = r_in_ready[5:0];
  assign link_out_flit    = r_out_flit[5:0];
  assign link_out_valid   = r_out_valid[5:0];
  assign r_out_ready[5:0] = link_out_ready;

  xbar_router #(.NP(NP)) u_router (
    .clk, .rst_n,
    .in_flit(r_in_flit), .in_valid(r_in_valid), .in_ready(r_in_ready),
    .out_flit(r_out_flit), .out_valid(r_out_valid), .out_ready(r_out_ready),
    .bus_addr(sub), .bus_we(bus_we && blk == 4'h0), .bus_wdata, .bus_rdata(rd_router),
    .my_id);

  logic dma_send_busy, dma_recv_busy;
  dma_engine u_dma (
    .clk, .rst_n, .my_id,
    .in_flit(r_out_flit[P_DMA]), .in_valid(r_out_valid[P_DMA]), .in_ready(r_out_ready[P_DMA]),
    .out_flit(r_in_flit[P_DMA]), .out_valid(r_in_valid[P_DMA]), .out_ready(r_in_ready[P_DMA]),
    .bus_addr(sub), .bus_we(bus_we && blk == 4'h1), .bus_wdata, .bus_rdata(rd_dma),
    .irq(irq_dma), .send_busy(dma_send_busy), .recv_busy(dma_recv_busy),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  logic mpe_busy, mpe_wait;
  mpe_core u_mpe (
    .clk, .rst_n, .my_id,
    .in_flit(r_out_flit[P_MPE]), .in_valid(r_out_valid[P_MPE]), .in_ready(r_out_ready[P_MPE]),
    .out_flit(r_in_flit[P_MPE]), .out_valid(r_in_valid[P_MPE]), .out_ready(r_in_ready[P_MPE]),
    .bus_addr(sub), .bus_we(bus_we && blk == 4'h2), .bus_wdata, .bus_rdata(rd_mpe),
    .irq(irq_mpe), .busy(mpe_busy), .waiting(mpe_wait));

  logic src_busy;
  src_sink u_src (
    .clk, .rst_n, .my_id,
    .in_flit(r_out_flit[P_SRC]), .in_valid(r_out_valid[P_SRC]), .in_ready(r_out_ready[P_SRC]),
    .out_flit(r_in_flit[P_SRC]), .out_valid(r_in_valid[P_SRC]), .out_ready(r_in_ready[P_SRC]),
    .bus_addr(sub), .bus_we(bus_we && blk == 4'h3), .bus_wdata, .bus_rdata(rd_src),
    .busy(src_busy));

  logic fft_busy;
  fft_io u_fft (
    .clk, .rst_n, .my_id,
    .in_flit(r_out_flit[P_FFT]), .in_valid(r_out_valid[P_FFT]), .in_ready(r_out_ready[P_FFT]),
    .out_flit(r_in_flit[P_FFT]), .out_valid(r_in_valid[P_FFT]), .out_ready(r_in_ready[P_FFT]),
    .bus_addr(sub), .bus_we,
    .bus_sel_reg(blk == 4'h5), .bus_sel_tre(blk == 4'h6), .bus_sel_tim(blk == 4'h7),
    .bus_wdata, .bus_rdata(rd_fft), .irq(irq_fft), .busy(fft_busy));

  logic [N_MACC-1:0] macc_busy;
  for (genvar i = 0; i < N_MACC; i++) begin : g_macc
    localparam logic [PORT_W-1:0] PN = PORT_W'(10 + i);
    macc_core #(.MY_PORT(PN)) u_macc (
      .clk, .rst_n, .my_id,
      .in_flit(r_out_flit[PN]), .in_valid(r_out_valid[PN]), .in_ready(r_out_ready[PN]),
      .out_flit(r_in_flit[PN]), .out_valid(r_in_valid[PN]), .out_ready(r_in_ready[PN]),
      .bus_addr({4'd0, sub[7:0]}), .bus_we(bus_we && blk == 4'h8 && int'(sub[11:8]) == i),
      .bus_wdata, .bus_rdata(rd_macc[i]), .busy(macc_busy[i]));
  end

  monitor #(.NEV(8)) u_mon (
    .clk, .rst_n,
    .ev({|(link_out_valid & link_out_ready), src_busy, |macc_busy, fft_busy,
         dma_recv_busy, dma_send_busy, mpe_wait, mpe_busy}),
    .bus_addr(sub), .bus_we(bus_we && blk == 4'h4), .bus_wdata, .bus_rdata(rd_mon));

  // registered read-back
  logic [31:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    unique case (blk)
      4'h0: rd_mux = rd_router;
      4'h1: rd_mux = rd_dma;
      4'h2: rd_mux = rd_mpe;
      4'h3: rd_mux = rd_src;
      4'h4: rd_mux = rd_mon;
      4'h5, 4'h6, 4'h7: rd_mux = rd_fft;
      4'h8: for (int i = 0; i < N_MACC; i++) if (int'(sub[11:8]) == i) rd_mux = rd_macc[i];
      default: ;
    endcase
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rdata <= '0;
    else if (bus_re) bus_rdata <= rd_mux;
  end
endmodule
