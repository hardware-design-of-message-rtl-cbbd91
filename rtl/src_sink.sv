// src_sink: source/sink test core on a router port.
//
// Source: under processor control it sends one packet to any node/port, the
// payload being LEN words seed, seed+1, seed+2, ... at up to one word per
// cycle. Sink: it accepts every packet sent to it, at one word per cycle, and
// counts packets and payload words and sums the payload (modulo 2^32), so a
// test can check what arrived.
// Registers: 0 DST_HDR, 1 DST_AUX, 2 LEN, 3 SEED, 4 CTRL (bit0 go),
// 5 STATUS (bit0 source busy, bit1 source done; write 1 to bit1 clears),
// 6 packets received (write clears all sink counters), 7 words received,
// 8 payload sum, 9 header of the last received packet.
// A core that shares the engines' stream interface and, controlled by the
// processor, sends and receives data streams follows the modelled system; the
// counting pattern and registers are this design's.
module src_sink
  import mpe_pkg::*;
(
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
  output logic              busy
);
  logic [31:0] r_hdr, r_aux, r_len, r_seed;
  logic        src_done;
  typedef enum logic [1:0] {S_IDLE, S_H0, S_H1, S_PAY} s_e;
  s_e          ss;
  logic [31:0] k;

  logic [31:0] n_pkts, n_words, sum, last_hdr;
  typedef enum logic [1:0] {R_H0, R_H1, R_PAY} r_e;
  r_e rs;

  hdr_t h;
  always_comb begin
    h          = hdr_t'(r_hdr);
    h.src_node = my_id;
    h.src_port = P_SRC;
    out_valid  = (ss != S_IDLE);
    unique case (ss)
      S_H0:    out_flit = '{data: h,          sof: 1'b1, eof: 1'b0};
      S_H1:    out_flit = '{data: r_aux,      sof: 1'b0, eof: (r_len == 0)};
      default: out_flit = '{data: r_seed + k, sof: 1'b0, eof: (k == r_len - 1)};
    endcase
  end
  assign in_ready = 1'b1;
  assign busy     = (ss != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_hdr <= '0; r_aux <= '0; r_len <= '0; r_seed <= '0; src_done <= 1'b0;
      ss <= S_IDLE; k <= '0;
      n_pkts <= '0; n_words <= '0; sum <= '0; last_hdr <= '0; rs <= R_H0;
    end else begin
      if (bus_we) begin
        unique case (bus_addr)
          12'h0: r_hdr  <= bus_wdata;
          12'h1: r_aux  <= bus_wdata;
          12'h2: r_len  <= bus_wdata;
          12'h3: r_seed <= bus_wdata;
          12'h4: if (bus_wdata[0] && ss == S_IDLE) begin ss <= S_H0; k <= '0; end
          12'h5: if (bus_wdata[1]) src_done <= 1'b0;
          default: ;
        endcase
      end
      if (out_valid && out_ready) begin
        unique case (ss)
          S_H0: ss <= S_H1;
          S_H1: if (r_len == 0) begin ss <= S_IDLE; src_done <= 1'b1; end
                else ss <= S_PAY;
          default: begin
            k <= k + 1;
            if (k == r_len - 1) begin ss <= S_IDLE; src_done <= 1'b1; end
          end
        endcase
      end
      // sink
      if (bus_we && bus_addr == 12'h6) begin
        n_pkts <= '0; n_words <= '0; sum <= '0;
      end else if (in_valid) begin
        unique case (rs)
          R_H0: begin last_hdr <= in_flit.data; rs <= R_H1; end
          R_H1: if (in_flit.eof) begin rs <= R_H0; n_pkts <= n_pkts + 1; end
                else rs <= R_PAY;
          default: begin
            n_words <= n_words + 1;
            sum     <= sum + in_flit.data;
            if (in_flit.eof) begin rs <= R_H0; n_pkts <= n_pkts + 1; end
          end
        endcase
      end
    end
  end

  always_comb begin
    unique case (bus_addr)
      12'h0:   bus_rdata = r_hdr;
      12'h1:   bus_rdata = r_aux;
      12'h2:   bus_rdata = r_len;
      12'h3:   bus_rdata = r_seed;
      12'h5:   bus_rdata = {30'd0, src_done, busy};
      12'h6:   bus_rdata = n_pkts;
      12'h7:   bus_rdata = n_words;
      12'h8:   bus_rdata = sum;
      12'h9:   bus_rdata = last_hdr;
      default: bus_rdata = '0;
    endcase
  end
endmodule
