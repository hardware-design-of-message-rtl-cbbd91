// mpe_core: the Message Passing Engine, collective operations in hardware.
//
// The processor writes this node's place in a communication tree (parent,
// root flag, list of children: any tree, e.g. binomial, linear or star) and
// then starts one operation through CTRL. The engine exchanges messages with
// the MPEs of its parent and children through the router and raises `irq`
// when its part of the operation is complete.
//   barrier   : wait for a BAR_UP from every child; a non-root node then sends
//               BAR_UP to its parent and waits for BAR_DOWN; then BAR_DOWN is
//               sent to every child and the operation ends.
//   broadcast : the root takes its data from a COLL_DATA packet (normally sent
//               by the local DMA) into the FIFO. A non-root node sends READY
//               to its parent and receives the parent's COLL_DATA packet into
//               the FIFO. The data then goes to each child once that child's
//               READY has arrived, and (non-root) to the local destination.
//   reduce    : every node loads its local data, then for each child in turn
//               sends READY and combines the child's packet word by word with
//               the FIFO contents through reduce_alu, writing results back to
//               the FIFO's tail. A non-root node sends the result to its parent
//               after the parent's READY; the root delivers it locally.
//   allreduce : reduce, then broadcast of the result from the root, with every
//               node delivering the result locally.
// READY/BAR_UP/BAR_DOWN messages are taken in at any time and kept as flags or
// counts, so they may arrive before they are needed. Data is sent to several
// destinations by rotating the FIFO (each word popped is pushed back); the
// FIFO is cleared when an operation ends. The data word moves at one word per
// cycle; a message carries at most FIFO_DEPTH words, longer messages being
// split by software.
// Registers: 0x0 CTRL (write: bits[2:0] op, bits[5:4] alu op), 0x1 STATUS
// (bit0 busy, bit1 done; write 1 to bit1 clears), 0x2 TOPO ([5:0] parent,
// [8] root, [22:16] number of children), 0x3 LOCAL_HDR (dst port [25:22],
// message type [11:8], tag [7:0] of local delivery), 0x4 LOCAL_AUX,
// 0x5 length of the last message, 0x6 operations completed,
// 0x100+i child i.
// Barrier, broadcast, reduce, the parent/child handshake, the FIFO buffer of
// 4096 words, the hardware ALU, interrupt notification and software-written
// topologies follow the modelled design; message formats, the handshake
// direction for each operation and the register map are this design's.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of this module's checking assertions; no flop is reset synchronously.
module mpe_core
  import mpe_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 4096,
  parameter int unsigned MAX_CHILDREN = 64,
  parameter int unsigned ALU_LAT      = 4
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
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              irq,
  output logic              busy,
  output logic              waiting
);
  localparam int unsigned CW = $clog2(MAX_CHILDREN + 1);
  localparam int unsigned LW = $clog2(FIFO_DEPTH + 1);

  // ---------------- configuration ----------------
  logic [NODE_W-1:0] parent;
  logic              is_root;
  logic [CW-1:0]     nchild;
  logic [NODE_W-1:0] child [MAX_CHILDREN];
  logic [31:0]       local_hdr, local_aux;
  coll_op_e          op;
  alu_op_e           aop;
  logic              done;
  logic [31:0]       n_ops;
  logic [LW-1:0]     len;

  // ---------------- FIFO ----------------
  logic          f_push, f_pop, f_clear, f_empty, f_full;
  logic [31:0]   f_wdata, f_rdata;
  logic [LW-1:0] f_cnt;
  fifo_sync #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(f_clear), .push(f_push), .wr_data(f_wdata),
    .pop(f_pop), .rd_data(f_rdata), .empty(f_empty), .full(f_full), .count(f_cnt)
  );

  // ---------------- ALU ----------------
  logic        alu_in_v, alu_out_v;
  logic [31:0] alu_y;
  logic [$clog2(ALU_LAT+2)-1:0] alu_inflight;
  reduce_alu #(.LAT(ALU_LAT)) u_alu (
    .clk, .rst_n, .in_valid(alu_in_v), .op(aop), .a(f_rdata), .b(in_flit.data),
    .out_valid(alu_out_v), .y(alu_y)
  );

  // ---------------- receive ----------------
  typedef enum logic [1:0] {RX_H0, RX_H1, RX_PAY} rx_e;
  rx_e  rxs;
  hdr_t rx_hdr;
  logic d_ready;                 // FSM takes a payload word
  logic d_valid;
  assign d_valid = (rxs == RX_PAY) && in_valid;
  assign in_ready = (rxs == RX_PAY) ? d_ready : 1'b1;

  logic              ctl_evt;
  mtype_e            ctl_type;
  logic [NODE_W-1:0] ctl_src;
  assign ctl_evt  = (rxs == RX_H1) && in_valid && (rx_hdr.mtype != MT_COLL_DATA);
  assign ctl_type = rx_hdr.mtype;
  assign ctl_src  = rx_hdr.src_node;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxs <= RX_H0; rx_hdr <= '0;
    end else begin
      unique case (rxs)
        RX_H0: if (in_valid) begin rx_hdr <= hdr_t'(in_flit.data); rxs <= RX_H1; end
        RX_H1: if (in_valid) begin
          if (rx_hdr.mtype == MT_COLL_DATA && !in_flit.eof) rxs <= RX_PAY;
          else rxs <= RX_H0;
        end
        default: if (in_valid && in_ready && in_flit.eof) rxs <= RX_H0;
      endcase
    end
  end

  // ---------------- transmit ----------------
  typedef enum logic [1:0] {TX_IDLE, TX_H0, TX_H1, TX_PAY} tx_e;
  tx_e           txs;
  logic          tx_go, tx_done;
  logic [31:0]   tx_h0_n, tx_h1_n, tx_h0, tx_h1;
  logic          tx_data_n, tx_keep_n, tx_data, tx_keep;
  logic [LW-1:0] tx_cnt;

  always_comb begin
    out_flit  = '0;
    out_valid = 1'b0;
    unique case (txs)
      TX_H0:  begin out_valid = 1'b1; out_flit = '{data: tx_h0, sof: 1'b1, eof: 1'b0}; end
      TX_H1:  begin out_valid = 1'b1; out_flit = '{data: tx_h1, sof: 1'b0, eof: !tx_data}; end
      TX_PAY: begin
        out_valid = !f_empty;
        out_flit  = '{data: f_rdata, sof: 1'b0, eof: (tx_cnt == len - 1'b1)};
      end
      default: ;
    endcase
  end
  assign tx_done = (txs == TX_H1 && out_ready && !tx_data) ||
                   (txs == TX_PAY && out_valid && out_ready && tx_cnt == len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      txs <= TX_IDLE; tx_h0 <= '0; tx_h1 <= '0; tx_data <= 1'b0; tx_keep <= 1'b0; tx_cnt <= '0;
    end else begin
      unique case (txs)
        TX_IDLE: if (tx_go) begin
          txs <= TX_H0; tx_h0 <= tx_h0_n; tx_h1 <= tx_h1_n;
          tx_data <= tx_data_n; tx_keep <= tx_keep_n; tx_cnt <= '0;
        end
        TX_H0: if (out_ready) txs <= TX_H1;
        TX_H1: if (out_ready) txs <= tx_data ? TX_PAY : TX_IDLE;
        default: if (out_valid && out_ready) begin
          tx_cnt <= tx_cnt + 1'b1;
          if (tx_cnt == len - 1'b1) txs <= TX_IDLE;
        end
      endcase
    end
  end

  // ---------------- handshake flags ----------------
  logic [MAX_CHILDREN-1:0] child_rdy, child_rdy_clr;
  logic                    parent_rdy, parent_rdy_clr;
  logic [CW-1:0]           bar_cnt;
  logic                    bar_dec;
  logic                    bar_down, bar_down_clr;

  logic [MAX_CHILDREN-1:0] set_c;
  always_comb begin
    set_c = '0;
    if (ctl_evt && ctl_type == MT_READY)
      for (int i = 0; i < MAX_CHILDREN; i++)
        if (CW'(i) < nchild && child[i] == ctl_src) set_c[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      child_rdy <= '0; parent_rdy <= 1'b0; bar_cnt <= '0; bar_down <= 1'b0;
    end else begin
      child_rdy  <= (child_rdy & ~child_rdy_clr) | set_c;
      parent_rdy <= (parent_rdy && !parent_rdy_clr) ||
                    (ctl_evt && ctl_type == MT_READY && !is_root && ctl_src == parent);
      bar_cnt    <= bar_cnt + CW'(ctl_evt && ctl_type == MT_BAR_UP) - (bar_dec ? nchild : '0);
      bar_down   <= (bar_down && !bar_down_clr) || (ctl_evt && ctl_type == MT_BAR_DOWN);
    end
  end

  // ---------------- main FSM ----------------
  typedef enum logic [3:0] {
    M_IDLE, M_LOAD, M_BAR_WAIT, M_BAR_UP, M_BAR_WAITDN, M_BAR_DOWN,
    M_BC_READY, M_BC_RECV, M_BC_SEND, M_RD_READY, M_RD_COMB, M_RD_DRAIN,
    M_RD_UP, M_LOCAL, M_DONE
  } m_e;
  m_e            ms;
  logic [CW-1:0] ch;
  logic          tx_wait;     // a packet of this state has been handed to TX

  logic [NODE_W-1:0] cur_child;
  assign cur_child = child[ch[$clog2(MAX_CHILDREN)-1:0]];

  hdr_t lh;
  assign lh = hdr_t'(local_hdr);

  always_comb begin
    tx_go = 1'b0; tx_h0_n = '0; tx_h1_n = '0; tx_data_n = 1'b0; tx_keep_n = 1'b1;
    d_ready = 1'b0; f_push = 1'b0; f_pop = 1'b0; f_wdata = in_flit.data; f_clear = 1'b0;
    alu_in_v = 1'b0;
    child_rdy_clr = '0; parent_rdy_clr = 1'b0; bar_dec = 1'b0; bar_down_clr = 1'b0;
    unique case (ms)
      M_LOAD, M_BC_RECV: begin
        d_ready = !f_full;
        f_push  = d_valid && !f_full;
      end
      M_BAR_WAIT: bar_dec = (bar_cnt >= nchild);
      M_BAR_UP: if (!tx_wait && txs == TX_IDLE) begin
        tx_go = 1'b1; tx_h0_n = mk_hdr(parent, P_MPE, my_id, P_MPE, MT_BAR_UP, 8'd0);
      end
      M_BAR_WAITDN: bar_down_clr = bar_down;
      M_BAR_DOWN: if (ch < nchild && !tx_wait && txs == TX_IDLE) begin
        tx_go = 1'b1; tx_h0_n = mk_hdr(cur_child, P_MPE, my_id, P_MPE, MT_BAR_DOWN, 8'd0);
      end
      M_BC_READY: if (!tx_wait && txs == TX_IDLE) begin
        tx_go = 1'b1; tx_h0_n = mk_hdr(parent, P_MPE, my_id, P_MPE, MT_READY, 8'd0);
      end
      M_BC_SEND: if (ch < nchild && !tx_wait && txs == TX_IDLE && child_rdy[ch[$clog2(MAX_CHILDREN)-1:0]]) begin
        tx_go = 1'b1; tx_data_n = 1'b1;
        tx_h0_n = mk_hdr(cur_child, P_MPE, my_id, P_MPE, MT_COLL_DATA, 8'd0);
        child_rdy_clr[ch[$clog2(MAX_CHILDREN)-1:0]] = 1'b1;
      end
      M_RD_READY: if (ch < nchild && !tx_wait && txs == TX_IDLE) begin
        tx_go = 1'b1; tx_h0_n = mk_hdr(cur_child, P_MPE, my_id, P_MPE, MT_READY, 8'd0);
      end
      M_RD_COMB: begin
        d_ready  = !f_empty;
        alu_in_v = d_valid && !f_empty;
        f_pop    = alu_in_v;
      end
      M_RD_UP: if (!is_root && !tx_wait && txs == TX_IDLE && parent_rdy) begin
        tx_go = 1'b1; tx_data_n = 1'b1; tx_keep_n = 1'b0; parent_rdy_clr = 1'b1;
        tx_h0_n = mk_hdr(parent, P_MPE, my_id, P_MPE, MT_COLL_DATA, 8'd0);
      end
      M_LOCAL: if (!tx_wait && txs == TX_IDLE) begin
        tx_go = 1'b1; tx_data_n = 1'b1;
        tx_h0_n = mk_hdr(my_id, lh.dst_port, my_id, P_MPE, lh.mtype, lh.tag);
        tx_h1_n = local_aux;
      end
      M_DONE: f_clear = 1'b1;
      default: ;
    endcase
    // transmit pops the FIFO and, when keeping, pushes the word back
    if (txs == TX_PAY && out_valid && out_ready) begin
      f_pop = 1'b1;
      if (tx_keep) begin f_push = 1'b1; f_wdata = f_rdata; end
    end
    if (alu_out_v) begin f_push = 1'b1; f_wdata = alu_y; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ms <= M_IDLE; ch <= '0; tx_wait <= 1'b0; op <= OP_NONE; aop <= ALU_FADD;
      done <= 1'b0; n_ops <= '0; len <= '0; alu_inflight <= '0;
    end else begin
      alu_inflight <= alu_inflight + $bits(alu_inflight)'(alu_in_v) - $bits(alu_inflight)'(alu_out_v);
      if (tx_go) tx_wait <= 1'b1;
      if (tx_done) tx_wait <= 1'b0;
      if (bus_we && bus_addr == 12'h1 && bus_wdata[1]) done <= 1'b0;
      unique case (ms)
        M_IDLE: if (bus_we && bus_addr == 12'h0 && bus_wdata[2:0] != 3'd0) begin
          op  <= coll_op_e'(bus_wdata[2:0]);
          aop <= alu_op_e'(bus_wdata[5:4]);
          ch  <= '0;
          len <= '0;
          done <= 1'b0;
          unique case (coll_op_e'(bus_wdata[2:0]))
            OP_BARRIER: ms <= M_BAR_WAIT;
            OP_BCAST:   ms <= is_root ? M_LOAD : M_BC_READY;
            default:    ms <= M_LOAD;
          endcase
        end
        M_LOAD: if (d_valid && d_ready) begin
          len <= len + 1'b1;
          if (in_flit.eof) begin
            ch <= '0;
            ms <= (op == OP_BCAST) ? M_BC_SEND : M_RD_READY;
          end
        end
        M_BAR_WAIT: if (bar_cnt >= nchild) ms <= is_root ? M_BAR_DOWN : M_BAR_UP;
        M_BAR_UP: if (tx_done) ms <= M_BAR_WAITDN;
        M_BAR_WAITDN: if (bar_down) begin ch <= '0; ms <= M_BAR_DOWN; end
        M_BAR_DOWN: begin
          if (ch >= nchild) ms <= M_DONE;
          else if (tx_done) ch <= ch + 1'b1;
        end
        M_BC_READY: if (tx_done) begin ms <= M_BC_RECV; len <= '0; end
        M_BC_RECV: if (d_valid && d_ready) begin
          len <= len + 1'b1;
          if (in_flit.eof) begin ch <= '0; ms <= M_BC_SEND; end
        end
        M_BC_SEND: begin
          if (ch >= nchild) ms <= (!is_root || op == OP_ALLREDUCE) ? M_LOCAL : M_DONE;
          else if (tx_done) ch <= ch + 1'b1;
        end
        M_RD_READY: begin
          if (ch >= nchild) ms <= M_RD_UP;
          else if (tx_done) ms <= M_RD_COMB;
        end
        M_RD_COMB: if (d_valid && d_ready && in_flit.eof) ms <= M_RD_DRAIN;
        M_RD_DRAIN: if (alu_inflight == 0 && !alu_out_v) begin
          ch <= ch + 1'b1; ms <= M_RD_READY;
        end
        M_RD_UP: begin
          if (is_root) begin
            ch <= '0;
            ms <= (op == OP_ALLREDUCE) ? M_BC_SEND : M_LOCAL;
          end else if (tx_done) begin
            ms <= (op == OP_ALLREDUCE) ? M_BC_READY : M_DONE;
          end
        end
        M_LOCAL: if (tx_done) ms <= M_DONE;
        M_DONE: begin
          ms <= M_IDLE; done <= 1'b1; n_ops <= n_ops + 1;
        end
        default: ms <= M_IDLE;
      endcase
    end
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      parent <= '0; is_root <= 1'b1; nchild <= '0; local_hdr <= '0; local_aux <= '0;
      for (int i = 0; i < MAX_CHILDREN; i++) child[i] <= '0;
    end else if (bus_we) begin
      if (bus_addr == 12'h2) begin
        parent  <= bus_wdata[NODE_W-1:0];
        is_root <= bus_wdata[8];
        nchild  <= CW'(bus_wdata[22:16]);
      end
      if (bus_addr == 12'h3) local_hdr <= bus_wdata;
      if (bus_addr == 12'h4) local_aux <= bus_wdata;
      if (bus_addr[11:8] == 4'h1 && int'(bus_addr[7:0]) < MAX_CHILDREN)
        child[bus_addr[$clog2(MAX_CHILDREN)-1:0]] <= bus_wdata[NODE_W-1:0];
    end
  end

  always_comb begin
    bus_rdata = '0;
    unique case (bus_addr)
      12'h1: bus_rdata = {30'd0, done, busy};
      12'h2: bus_rdata = {9'd0, 7'(nchild), 7'd0, is_root, 2'd0, parent};
      12'h3: bus_rdata = local_hdr;
      12'h4: bus_rdata = local_aux;
      12'h5: bus_rdata = 32'(len);
      12'h6: bus_rdata = n_ops;
      default: if (bus_addr[11:8] == 4'h1 && int'(bus_addr[7:0]) < MAX_CHILDREN)
        bus_rdata = 32'(child[bus_addr[$clog2(MAX_CHILDREN)-1:0]]);
    endcase
  end

  assign busy = (ms != M_IDLE);
  assign irq  = done;
  assign waiting = (ms == M_BAR_WAIT && bar_cnt < nchild) ||
                   (ms == M_BAR_WAITDN && !bar_down) ||
                   ((ms == M_LOAD || ms == M_BC_RECV || ms == M_RD_COMB) && !d_valid) ||
                   (ms == M_BC_SEND && ch < nchild && txs == TX_IDLE && !tx_wait &&
                    !child_rdy[ch[$clog2(MAX_CHILDREN)-1:0]]) ||
                   (ms == M_RD_UP && !is_root && txs == TX_IDLE && !tx_wait && !parent_rdy);

  // FIFO never overflows while rotating or combining
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (f_push && !f_pop) |-> !f_full);
endmodule
