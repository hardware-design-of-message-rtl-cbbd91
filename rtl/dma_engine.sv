// dma_engine: point-to-point DMA between main memory and the network.
//
// Send: the processor writes the source word address, the length in words,
// the destination header (node, port, message type, tag) and the auxiliary
// word, then sets CTRL.go. The engine reads the words from memory, keeping at
// most OBUF_DEPTH words in flight or buffered, and emits one packet
// H0, H1, payload. Receive: a packet arriving at the DMA port has its payload
// written to memory starting at the word address in H1; at its end the
// receive-done flag is set. Either done flag raises `irq` until the processor
// clears it. Memory writes of an arriving packet take priority over reads for
// an outgoing one.
// Registers (word offsets): 0 SRC_ADDR, 1 LEN, 2 DST_HDR (source fields are
// filled in by the engine), 3 DST_AUX, 4 CTRL (bit0 go), 5 STATUS (bit0 send
// busy, bit1 send done, bit2 receive done; write 1 to clear a done bit),
// 6 words of the last received packet, 7 header of the last received packet.
// Memory port: a request is taken in the cycle mem_gnt is high; read data
// returns in order with mem_rvalid, any number of cycles later.
// That the processor passes address and length, the DMA fetches, packetises
// and sends, and that the receiver interrupts the processor follows the
// modelled system; the register map and memory handshake are this design's.
// mem_wdata is the accepted flit's data word wired straight through: a payload
// word is written to memory in the same cycle it is taken from the router.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of this module's checking assertions; no flop is reset synchronously.
module dma_engine
  import mpe_pkg::*;
#(
  parameter int unsigned OBUF_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] my_id,
  // from router
  input  flit_t             in_flit,
  input  logic              in_valid,
  output logic              in_ready,
  // to router
  output flit_t             out_flit,
  output logic              out_valid,
  input  logic              out_ready,
  // register bus
  input  logic [11:0]       bus_addr,
  input  logic              bus_we,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              irq,
  output logic              send_busy,
  output logic              recv_busy,
  // memory port
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata
);
  localparam int unsigned CW = $clog2(OBUF_DEPTH + 1);

  logic [31:0] r_src, r_len, r_hdr, r_aux;
  logic        send_done, recv_done;
  logic [31:0] recv_words, recv_hdr;

  typedef enum logic [1:0] {S_IDLE, S_H0, S_H1, S_PAY} sstate_e;
  typedef enum logic [1:0] {R_H0, R_H1, R_PAY} rstate_e;
  sstate_e sst;
  rstate_e rst;

  logic [31:0] rd_issued, sent;
  logic [CW-1:0] outstanding;
  logic [31:0] wr_ptr;

  // output buffer for read data
  logic [31:0]   ob_data;
  logic          ob_empty, ob_full, ob_pop;
  logic [CW-1:0] ob_cnt;
  fifo_sync #(.WIDTH(32), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk, .rst_n, .clear(1'b0), .push(mem_rvalid), .wr_data(mem_rdata),
    .pop(ob_pop), .rd_data(ob_data), .empty(ob_empty), .full(ob_full), .count(ob_cnt)
  );

  // memory arbitration: receive writes first
  logic wr_req, rd_req;
  assign wr_req    = (rst == R_PAY) && in_valid;
  assign rd_req    = (sst != S_IDLE) && (rd_issued != r_len) &&
                     ((32'(ob_cnt) + 32'(outstanding)) < OBUF_DEPTH);
  assign mem_req   = wr_req || rd_req;
  assign mem_we    = wr_req;
  assign mem_addr  = wr_req ? wr_ptr : (r_src + rd_issued);
  assign mem_wdata = in_flit.data;

  logic rd_take;
  assign rd_take = rd_req && !wr_req && mem_gnt;

  // receive side
  always_comb begin
    unique case (rst)
      R_H0, R_H1: in_ready = 1'b1;
      default:    in_ready = wr_req && mem_gnt;
    endcase
  end

  // send side
  hdr_t hsend;
  always_comb begin
    hsend          = hdr_t'(r_hdr);
    hsend.src_node = my_id;
    hsend.src_port = P_DMA;
    out_flit  = '0;
    out_valid = 1'b0;
    ob_pop    = 1'b0;
    unique case (sst)
      S_H0: begin
        out_valid = 1'b1;
        out_flit  = '{data: hsend, sof: 1'b1, eof: 1'b0};
      end
      S_H1: begin
        out_valid = 1'b1;
        out_flit  = '{data: r_aux, sof: 1'b0, eof: (r_len == 0)};
      end
      S_PAY: begin
        out_valid = !ob_empty;
        out_flit  = '{data: ob_data, sof: 1'b0, eof: (sent == r_len - 1)};
        ob_pop    = out_valid && out_ready;
      end
      default: ;
    endcase
  end

  assign send_busy = (sst != S_IDLE);
  assign recv_busy = (rst != R_H0);
  assign irq       = send_done || recv_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_src <= '0; r_len <= '0; r_hdr <= '0; r_aux <= '0;
      sst <= S_IDLE; rst <= R_H0;
      rd_issued <= '0; sent <= '0; outstanding <= '0; wr_ptr <= '0;
      send_done <= 1'b0; recv_done <= 1'b0; recv_words <= '0; recv_hdr <= '0;
    end else begin
      // bus writes
      if (bus_we) begin
        unique case (bus_addr)
          12'h0: r_src <= bus_wdata;
          12'h1: r_len <= bus_wdata;
          12'h2: r_hdr <= bus_wdata;
          12'h3: r_aux <= bus_wdata;
          12'h4: if (bus_wdata[0] && sst == S_IDLE) begin
                   sst <= S_H0; rd_issued <= '0; sent <= '0;
                 end
          12'h5: begin
                   if (bus_wdata[1]) send_done <= 1'b0;
                   if (bus_wdata[2]) recv_done <= 1'b0;
                 end
          default: ;
        endcase
      end
      // outstanding reads
      outstanding <= outstanding + CW'(rd_take) - CW'(mem_rvalid);
      if (rd_take) rd_issued <= rd_issued + 1;
      // send FSM
      unique case (sst)
        S_H0: if (out_ready) sst <= S_H1;
        S_H1: if (out_ready) begin
          if (r_len == 0) begin sst <= S_IDLE; send_done <= 1'b1; end
          else sst <= S_PAY;
        end
        S_PAY: if (out_valid && out_ready) begin
          sent <= sent + 1;
          if (sent == r_len - 1) begin sst <= S_IDLE; send_done <= 1'b1; end
        end
        default: ;
      endcase
      // receive FSM
      unique case (rst)
        R_H0: if (in_valid) begin
          recv_hdr <= in_flit.data; recv_words <= '0; rst <= R_H1;
        end
        R_H1: if (in_valid) begin
          wr_ptr <= in_flit.data;
          if (in_flit.eof) begin rst <= R_H0; recv_done <= 1'b1; end
          else rst <= R_PAY;
        end
        default: if (in_valid && in_ready) begin
          wr_ptr     <= wr_ptr + 1;
          recv_words <= recv_words + 1;
          if (in_flit.eof) begin rst <= R_H0; recv_done <= 1'b1; end
        end
      endcase
    end
  end

  always_comb begin
    unique case (bus_addr)
      12'h0:   bus_rdata = r_src;
      12'h1:   bus_rdata = r_len;
      12'h2:   bus_rdata = r_hdr;
      12'h3:   bus_rdata = r_aux;
      12'h5:   bus_rdata = {29'd0, recv_done, send_done, send_busy};
      12'h6:   bus_rdata = recv_words;
      12'h7:   bus_rdata = recv_hdr;
      default: bus_rdata = '0;
    endcase
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> !ob_full);
endmodule
