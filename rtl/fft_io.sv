// fft_io: FFT accelerator with its network I/O, for the inter-node stages of
// a parallel radix-2 decimation-in-frequency FFT.
//
// An N-point transform is spread over n = 2^NST nodes, each holding
// M = 2^LOG2M consecutive points (node of rank r holds x[r*M .. r*M+M-1]).
// Inter-node stage s (s = 0 .. NST-1) pairs rank r with rank r ^ (n >> (s+1)).
// The lower node of a pair keeps a + b, the upper keeps (a - b) * W, where a
// is the lower node's point, b the upper node's point and
// W = exp(-2*pi*i*k/N), k = ((r*M + m) mod span) << s, span = N >> (s+1).
// Per stage the FSM: sends READY(s) to the partner, waits for the partner's
// READY(s), sends its M local points (rotating the local FIFO so they stay),
// waits for the partner's M points in the remote FIFO, then streams both
// FIFOs and the twiddle table through fft_core, writing results back to the
// local FIFO. After the last stage the local FIFO is sent to the configured
// output destination (main memory through the DMA, or another core), and
// `irq` is raised. The intra-node stages are left to software.
// Local data arrives as MT_FFT_LOCAL packets, remote data as MT_FFT_REMOTE.
// Each complex point travels as two words, real then imaginary.
// Registers (reg select): 0 CTRL (bit0 start), 1 STATUS (bit0 busy, bit1
// done, write 1 to bit1 clears), 2 CFG ([3:0] LOG2M, [11:8] NST), 3 RANK,
// 4 BASE (node ID of rank 0; rank r is node BASE + r), 5 OUT_HDR, 6 OUT_AUX,
// 7 local points held. The twiddle table (W_N^k for k < N/2) is written by
// the processor through its own bus port (table selects, real and imaginary).
// The FFT core, the two FIFOs, the two-port twiddle table written from the bus
// and read by the core, the result feedback into the local FIFO and the
// exchange with the remote node follow the modelled design. The READY
// exchange before each stage, which keeps nodes that run ahead from filling
// a partner's remote FIFO with the data of a later stage, is this design's.
// in_ready is tied high: the READY exchange guarantees room in the remote
// FIFO before a partner sends, and assertions check that neither FIFO is
// pushed while full.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of this module's checking assertions; no flop is reset synchronously.
module fft_io
  import mpe_pkg::*;
#(
  parameter int unsigned FFT_DEPTH = 1024,
  parameter int unsigned TW_DEPTH  = 4096,
  parameter int unsigned ADD_LAT   = 4,
  parameter int unsigned MUL_LAT   = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] my_id,
  input  flit_t             in_flit,
  input  logic              in_valid,
  output logic              in_ready,
  output flit_t             out_flit,
  output logic              out_valid,
  input  logic              out_ready,
  input  logic [11:0]       bus_addr,
  input  logic              bus_we,
  input  logic              bus_sel_reg,
  input  logic              bus_sel_tre,
  input  logic              bus_sel_tim,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              irq,
  output logic              busy
);
  localparam int unsigned CW = $clog2(FFT_DEPTH + 1);
  localparam int unsigned TW = $clog2(TW_DEPTH);

  // configuration
  logic [3:0]        log2m, nst;
  logic [NODE_W-1:0] rank, base;
  logic [31:0]       out_hdr, out_aux;
  logic              done;
  logic [CW-1:0]     m_pts;
  assign m_pts = CW'(1) << log2m;

  // twiddle table, port A = bus, port B = core
  logic [31:0] tw_re [TW_DEPTH];
  logic [31:0] tw_im [TW_DEPTH];
  logic [TW-1:0] tw_addr;
  always_ff @(posedge clk) begin
    if (bus_we && bus_sel_tre) tw_re[bus_addr[TW-1:0]] <= bus_wdata;
    if (bus_we && bus_sel_tim) tw_im[bus_addr[TW-1:0]] <= bus_wdata;
  end

  // FIFOs
  logic          l_push, l_pop, l_empty, l_full, r_push, r_pop, r_empty, r_full;
  logic [63:0]   l_wdata, l_rdata, r_wdata, r_rdata;
  logic [CW-1:0] l_cnt, r_cnt;
  fifo_sync #(.WIDTH(64), .DEPTH(FFT_DEPTH)) u_local (
    .clk, .rst_n, .clear(1'b0), .push(l_push), .wr_data(l_wdata), .pop(l_pop),
    .rd_data(l_rdata), .empty(l_empty), .full(l_full), .count(l_cnt));
  fifo_sync #(.WIDTH(64), .DEPTH(FFT_DEPTH)) u_remote (
    .clk, .rst_n, .clear(1'b0), .push(r_push), .wr_data(r_wdata), .pop(r_pop),
    .rd_data(r_rdata), .empty(r_empty), .full(r_full), .count(r_cnt));

  // ---------------- receive ----------------
  typedef enum logic [1:0] {RX_H0, RX_H1, RX_RE, RX_IM} rx_e;
  rx_e         rxs;
  hdr_t        rx_hdr;
  logic [31:0] rx_re;
  logic [15:0] rdy_flag, rdy_clr;
  logic        rx_push_l, rx_push_r;
  assign in_ready  = 1'b1;
  assign rx_push_l = (rxs == RX_IM) && in_valid && rx_hdr.mtype == MT_FFT_LOCAL;
  assign rx_push_r = (rxs == RX_IM) && in_valid && rx_hdr.mtype == MT_FFT_REMOTE;
  assign r_push    = rx_push_r;
  assign r_wdata   = {rx_re, in_flit.data};

  logic [15:0] rdy_set;
  always_comb begin
    rdy_set = '0;
    if (rxs == RX_H1 && in_valid && rx_hdr.mtype == MT_READY) rdy_set[rx_hdr.tag[3:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxs <= RX_H0; rx_hdr <= '0; rx_re <= '0; rdy_flag <= '0;
    end else begin
      unique case (rxs)
        RX_H0: if (in_valid) begin rx_hdr <= hdr_t'(in_flit.data); rxs <= RX_H1; end
        RX_H1: if (in_valid) rxs <= in_flit.eof ? RX_H0 : RX_RE;
        RX_RE: if (in_valid) begin rx_re <= in_flit.data; rxs <= in_flit.eof ? RX_H0 : RX_IM; end
        default: if (in_valid) rxs <= in_flit.eof ? RX_H0 : RX_RE;
      endcase
      rdy_flag <= (rdy_flag & ~rdy_clr) | rdy_set;
    end
  end

  // ---------------- transmit ----------------
  typedef enum logic [1:0] {TX_IDLE, TX_H0, TX_H1, TX_PAY} tx_e;
  tx_e         txs;
  logic        tx_go, tx_data_n, tx_keep_n, tx_data, tx_keep, tx_half;
  logic [31:0] tx_h0_n, tx_h1_n, tx_h0, tx_h1;
  logic [CW-1:0] tx_cnt;
  logic        tx_done;
  logic        tx_pop;

  always_comb begin
    out_flit  = '0;
    out_valid = 1'b0;
    unique case (txs)
      TX_H0: begin out_valid = 1'b1; out_flit = '{data: tx_h0, sof: 1'b1, eof: 1'b0}; end
      TX_H1: begin out_valid = 1'b1; out_flit = '{data: tx_h1, sof: 1'b0, eof: !tx_data}; end
      TX_PAY: begin
        out_valid = !l_empty;
        out_flit  = '{data: tx_half ? l_rdata[31:0] : l_rdata[63:32], sof: 1'b0,
                      eof: tx_half && (tx_cnt == m_pts - 1'b1)};
      end
      default: ;
    endcase
  end
  assign tx_pop  = (txs == TX_PAY) && out_valid && out_ready && tx_half;
  assign tx_done = (txs == TX_H1 && out_ready && !tx_data) ||
                   (tx_pop && tx_cnt == m_pts - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      txs <= TX_IDLE; tx_h0 <= '0; tx_h1 <= '0; tx_data <= 1'b0; tx_keep <= 1'b0;
      tx_half <= 1'b0; tx_cnt <= '0;
    end else begin
      unique case (txs)
        TX_IDLE: if (tx_go) begin
          txs <= TX_H0; tx_h0 <= tx_h0_n; tx_h1 <= tx_h1_n; tx_data <= tx_data_n;
          tx_keep <= tx_keep_n; tx_half <= 1'b0; tx_cnt <= '0;
        end
        TX_H0: if (out_ready) txs <= TX_H1;
        TX_H1: if (out_ready) txs <= tx_data ? TX_PAY : TX_IDLE;
        default: if (out_valid && out_ready) begin
          tx_half <= !tx_half;
          if (tx_half) begin
            tx_cnt <= tx_cnt + 1'b1;
            if (tx_cnt == m_pts - 1'b1) txs <= TX_IDLE;
          end
        end
      endcase
    end
  end

  // ---------------- stage FSM ----------------
  typedef enum logic [2:0] {F_IDLE, F_WAITLOAD, F_RDY, F_SEND, F_WAITREM, F_COMP, F_DRAIN, F_DUMP} f_e;
  f_e            fs;
  logic [3:0]    s;
  logic [CW-1:0] m;
  logic          tx_wait;
  logic [$clog2(FFT_DEPTH + 2*ADD_LAT + MUL_LAT + 1)-1:0] inflight;

  logic [3:0]        bitpos;
  logic              upper;
  logic [NODE_W-1:0] partner;
  assign bitpos  = nst - 4'd1 - s;
  assign upper   = ((rank >> bitpos) & NODE_W'(1)) != 0;
  assign partner = base + (rank ^ (NODE_W'(1) << bitpos));

  // twiddle index k = ((rank*M + m) mod span) << s, span = 2^(log2m + nst - s - 1)
  logic [31:0] gidx, span;
  assign gidx    = (32'(rank) << log2m) | 32'(m);
  assign span    = 32'd1 << (32'(log2m) + 32'(nst) - 32'(s) - 32'd1);
  assign tw_addr = TW'((gidx & (span - 32'd1)) << s);

  logic        c_in, c_out;
  logic [63:0] c_y;
  fft_core #(.ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_core (
    .clk, .rst_n, .in_valid(c_in), .sub(upper), .use_mul(upper),
    .cplex_a(upper ? r_rdata : l_rdata), .cplex_b(upper ? l_rdata : r_rdata),
    .cplex_t({tw_re[tw_addr], tw_im[tw_addr]}), .out_valid(c_out), .y(c_y));

  hdr_t oh;
  assign oh = hdr_t'(out_hdr);

  always_comb begin
    tx_go = 1'b0; tx_h0_n = '0; tx_h1_n = '0; tx_data_n = 1'b0; tx_keep_n = 1'b1;
    rdy_clr = '0; c_in = 1'b0;
    unique case (fs)
      F_RDY: if (!tx_wait && txs == TX_IDLE) begin
        tx_go = 1'b1; tx_h0_n = mk_hdr(partner, P_FFT, my_id, P_FFT, MT_READY, 8'(s));
      end
      F_SEND: if (!tx_wait && txs == TX_IDLE && rdy_flag[s]) begin
        tx_go = 1'b1; tx_data_n = 1'b1; rdy_clr[s] = 1'b1;
        tx_h0_n = mk_hdr(partner, P_FFT, my_id, P_FFT, MT_FFT_REMOTE, 8'(s));
      end
      F_COMP: c_in = (m != m_pts) && !l_empty && !r_empty;
      F_DUMP: if (!tx_wait && txs == TX_IDLE) begin
        tx_go = 1'b1; tx_data_n = 1'b1; tx_keep_n = 1'b0;
        tx_h0_n = mk_hdr(oh.dst_node, oh.dst_port, my_id, P_FFT, oh.mtype, oh.tag);
        tx_h1_n = out_aux;
      end
      default: ;
    endcase
    // local FIFO: loading, rotating on send, feeding the core, taking results
    l_pop   = c_in || tx_pop;
    l_push  = rx_push_l || (tx_pop && tx_keep) || c_out;
    l_wdata = rx_push_l ? {rx_re, in_flit.data} : (c_out ? c_y : l_rdata);
    r_pop   = c_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs <= F_IDLE; s <= '0; m <= '0; tx_wait <= 1'b0; inflight <= '0; done <= 1'b0;
      log2m <= '0; nst <= '0; rank <= '0; base <= '0; out_hdr <= '0; out_aux <= '0;
    end else begin
      if (tx_go) tx_wait <= 1'b1;
      if (tx_done) tx_wait <= 1'b0;
      inflight <= inflight + $bits(inflight)'(c_in) - $bits(inflight)'(c_out);
      if (bus_we && bus_sel_reg) begin
        unique case (bus_addr)
          12'h1: if (bus_wdata[1]) done <= 1'b0;
          12'h2: begin log2m <= bus_wdata[3:0]; nst <= bus_wdata[11:8]; end
          12'h3: rank    <= bus_wdata[NODE_W-1:0];
          12'h4: base    <= bus_wdata[NODE_W-1:0];
          12'h5: out_hdr <= bus_wdata;
          12'h6: out_aux <= bus_wdata;
          default: ;
        endcase
      end
      unique case (fs)
        F_IDLE: if (bus_we && bus_sel_reg && bus_addr == 12'h0 && bus_wdata[0]) begin
          fs <= F_WAITLOAD; s <= '0; done <= 1'b0;
        end
        F_WAITLOAD: if (l_cnt == m_pts) fs <= (nst == 0) ? F_DUMP : F_RDY;
        F_RDY:      if (tx_done) fs <= F_SEND;
        F_SEND:     if (tx_done) fs <= F_WAITREM;
        F_WAITREM:  if (r_cnt == m_pts) begin fs <= F_COMP; m <= '0; end
        F_COMP: begin
          if (c_in) m <= m + 1'b1;
          if (m == m_pts) fs <= F_DRAIN;
        end
        F_DRAIN: if (inflight == 0) begin
          s  <= s + 1'b1;
          fs <= (s + 1'b1 == nst) ? F_DUMP : F_RDY;
        end
        F_DUMP: if (tx_done) begin fs <= F_IDLE; done <= 1'b1; end
        default: fs <= F_IDLE;
      endcase
    end
  end

  assign busy = (fs != F_IDLE);
  assign irq  = done;

  always_comb begin
    bus_rdata = '0;
    if (bus_sel_reg) begin
      unique case (bus_addr)
        12'h1: bus_rdata = {30'd0, done, busy};
        12'h2: bus_rdata = {20'd0, nst, 4'd0, log2m};
        12'h3: bus_rdata = 32'(rank);
        12'h4: bus_rdata = 32'(base);
        12'h5: bus_rdata = out_hdr;
        12'h6: bus_rdata = out_aux;
        12'h7: bus_rdata = 32'(l_cnt);
        default: ;
      endcase
    end else if (bus_sel_tre) bus_rdata = tw_re[bus_addr[TW-1:0]];
    else if (bus_sel_tim) bus_rdata = tw_im[bus_addr[TW-1:0]];
  end

  a_rx_local_room:  assert property (@(posedge clk) disable iff (!rst_n) rx_push_l |-> !l_full);
  a_rx_remote_room: assert property (@(posedge clk) disable iff (!rst_n) rx_push_r |-> !r_full);
endmodule
