// macc_core: floating-point vector-vector multiply-accumulate core.
//
// Computes C = A * B for a block of rows of A. Vector B arrives in an
// MT_MACC_VEC packet and is stored in the vector FIFO (its length L is the
// number of payload words). Rows of A then arrive, row after row, in an
// MT_MACC_ROWS packet. Each word of A is multiplied (fp32_mul) with the word
// at the head of the vector FIFO, which is popped and pushed back so the
// vector is ready again for the next row. Products are accumulated by fp32_add
// into a register bank of ADD_LAT+1 partial sums used in turn, so the adder's
// pipeline delay never stalls the stream. After the last word of a row the
// input is held while the pipeline drains and the partial sums are added
// together (about (ADD_LAT+1) * ADD_LAT cycles); the row result goes into a
// result FIFO. At the end of the rows packet all results are sent in one
// packet to the destination set in OUT_HDR/OUT_AUX.
// Registers: 0 OUT_HDR, 1 OUT_AUX, 2 STATUS (bit0 busy), 3 vector length,
// 4 rows computed since reset.
// One vector FIFO with push-back, one multiplier, one adder and a register
// bank that buffers results against the adder's pipeline delay follow the
// modelled core; the packet types, the result packet and the final summing
// of the partial sums are this design's.
// Lint note: rst_n is reported as used both asynchronously and synchronously. The synchronous use is the 'disable iff (!rst_n)' of this module's checking assertions; no flop is reset synchronously.
module macc_core
  import mpe_pkg::*;
#(
  parameter int unsigned VEC_DEPTH = 4096,
  parameter int unsigned RES_DEPTH = 256,
  parameter int unsigned ADD_LAT   = 4,
  parameter int unsigned MUL_LAT   = 3,
  parameter logic [PORT_W-1:0] MY_PORT = P_MACC0
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
  output logic              busy
);
  localparam int unsigned NSLOT = ADD_LAT + 1;
  localparam int unsigned SW    = $clog2(NSLOT);
  localparam int unsigned VW    = $clog2(VEC_DEPTH + 1);
  localparam int unsigned RW    = $clog2(RES_DEPTH + 1);

  logic [31:0] out_hdr, out_aux, n_rows;
  logic [VW-1:0] vlen;

  // vector FIFO
  logic          v_push, v_pop, v_clear, v_empty, v_full;
  logic [31:0]   v_wdata, v_rdata;
  logic [VW-1:0] v_cnt;
  fifo_sync #(.WIDTH(32), .DEPTH(VEC_DEPTH)) u_vec (
    .clk, .rst_n, .clear(v_clear), .push(v_push), .wr_data(v_wdata), .pop(v_pop),
    .rd_data(v_rdata), .empty(v_empty), .full(v_full), .count(v_cnt));

  // result FIFO
  logic          q_push, q_pop, q_empty, q_full;
  logic [31:0]   q_wdata, q_rdata;
  logic [RW-1:0] q_cnt;
  fifo_sync #(.WIDTH(32), .DEPTH(RES_DEPTH)) u_res (
    .clk, .rst_n, .clear(1'b0), .push(q_push), .wr_data(q_wdata), .pop(q_pop),
    .rd_data(q_rdata), .empty(q_empty), .full(q_full), .count(q_cnt));

  // receive / control FSM
  typedef enum logic [3:0] {R_H0, R_H1, R_VEC, R_ROWS, R_DRAIN, R_SUM_ISSUE, R_SUM_WAIT,
                            R_STORE, R_SEND_H0, R_SEND_H1, R_SEND_PAY} r_e;
  r_e            rs;
  hdr_t          rx_hdr;
  logic [VW-1:0] e;          // element index within the row
  logic          last_pkt;   // the row being finished ended the packet
  logic [SW-1:0] sp, sj;     // slot pointer / summing index
  logic [31:0]   bank [NSLOT];
  logic [31:0]   acc;
  logic [RW-1:0] n_send, sent;

  // multiplier and adder
  logic        m_in, m_out, a_in, a_out;
  logic [31:0] m_y, a_y, a_a, a_b;
  logic [0:0]  m_tag;
  logic [SW-1:0] a_tag_in, a_tag_out;
  logic [$clog2(MUL_LAT + ADD_LAT + 2)-1:0] inflight;
  logic        sum_mode;

  fp32_mul #(.LAT(MUL_LAT)) u_mul (.clk, .rst_n, .in_valid(m_in), .a(in_flit.data), .b(v_rdata),
                                   .in_tag(1'b0), .out_valid(m_out), .y(m_y), .out_tag(m_tag));
  fp32_add #(.LAT(ADD_LAT), .TAG_W(SW)) u_add (.clk, .rst_n, .in_valid(a_in), .a(a_a), .b(a_b), .sub(1'b0),
                                   .in_tag(a_tag_in), .out_valid(a_out), .y(a_y), .out_tag(a_tag_out));

  assign sum_mode = (rs == R_SUM_ISSUE) || (rs == R_SUM_WAIT);
  always_comb begin
    // accumulate mode: product + bank[sp]; summing mode: acc + bank[sj]
    a_in     = sum_mode ? (rs == R_SUM_ISSUE) : m_out;
    a_a      = sum_mode ? acc : m_y;
    a_b      = sum_mode ? bank[sj] : bank[sp];
    a_tag_in = sum_mode ? sj : sp;
  end

  assign in_ready = (rs == R_H0) || (rs == R_H1) || (rs == R_VEC && !v_full) ||
                    (rs == R_ROWS && !v_empty);
  assign m_in     = (rs == R_ROWS) && in_valid && !v_empty;
  assign v_clear  = (rs == R_H1) && in_valid && rx_hdr.mtype == MT_MACC_VEC;
  assign v_push   = ((rs == R_VEC) && in_valid && !v_full) || m_in;
  assign v_wdata  = (rs == R_VEC) ? in_flit.data : v_rdata;
  assign v_pop    = m_in;
  assign q_push   = (rs == R_STORE);
  assign q_wdata  = acc;

  // transmit
  hdr_t oh;
  always_comb begin
    oh          = hdr_t'(out_hdr);
    oh.src_node = my_id;
    oh.src_port = MY_PORT;
    out_flit    = '0;
    out_valid   = 1'b0;
    q_pop       = 1'b0;
    unique case (rs)
      R_SEND_H0: begin out_valid = 1'b1; out_flit = '{data: oh, sof: 1'b1, eof: 1'b0}; end
      R_SEND_H1: begin out_valid = 1'b1; out_flit = '{data: out_aux, sof: 1'b0, eof: (n_send == 0)}; end
      R_SEND_PAY: begin
        out_valid = !q_empty;
        out_flit  = '{data: q_rdata, sof: 1'b0, eof: (sent == n_send - 1'b1)};
        q_pop     = out_valid && out_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_H0; rx_hdr <= '0; e <= '0; last_pkt <= 1'b0; sp <= '0; sj <= '0; acc <= '0;
      inflight <= '0; vlen <= '0; n_rows <= '0; n_send <= '0; sent <= '0;
      out_hdr <= '0; out_aux <= '0;
      for (int i = 0; i < NSLOT; i++) bank[i] <= '0;
    end else begin
      if (bus_we && bus_addr == 12'h0) out_hdr <= bus_wdata;
      if (bus_we && bus_addr == 12'h1) out_aux <= bus_wdata;
      inflight <= inflight + $bits(inflight)'(m_in) - $bits(inflight)'(a_out && !sum_mode);
      if (m_out) sp <= (sp == SW'(NSLOT - 1)) ? '0 : sp + 1'b1;
      if (a_out && !sum_mode) bank[a_tag_out] <= a_y;
      unique case (rs)
        R_H0: if (in_valid) begin rx_hdr <= hdr_t'(in_flit.data); rs <= R_H1; end
        R_H1: if (in_valid) begin
          if (in_flit.eof) rs <= R_H0;
          else if (rx_hdr.mtype == MT_MACC_VEC) begin rs <= R_VEC; vlen <= '0; end
          else begin rs <= R_ROWS; e <= '0; end
        end
        R_VEC: if (in_valid && !v_full) begin
          vlen <= vlen + 1'b1;
          if (in_flit.eof) rs <= R_H0;
        end
        R_ROWS: if (m_in) begin
          if (e == vlen - 1'b1) begin
            e <= '0; last_pkt <= in_flit.eof; rs <= R_DRAIN;
          end else begin
            e <= e + 1'b1;
          end
        end
        R_DRAIN: if (inflight == 0 && !m_out && !a_out) begin
          acc <= bank[0]; sj <= SW'(1); rs <= R_SUM_ISSUE;
        end
        R_SUM_ISSUE: rs <= R_SUM_WAIT;
        R_SUM_WAIT: if (a_out) begin
          acc <= a_y;
          if (sj == SW'(NSLOT - 1)) rs <= R_STORE;
          else begin sj <= sj + 1'b1; rs <= R_SUM_ISSUE; end
        end
        R_STORE: begin
          n_rows <= n_rows + 1;
          sp     <= '0;
          for (int i = 0; i < NSLOT; i++) bank[i] <= '0;
          if (last_pkt) begin rs <= R_SEND_H0; n_send <= q_cnt + 1'b1; sent <= '0; end
          else rs <= R_ROWS;
        end
        R_SEND_H0: if (out_ready) rs <= R_SEND_H1;
        R_SEND_H1: if (out_ready) rs <= (n_send == 0) ? R_H0 : R_SEND_PAY;
        R_SEND_PAY: if (out_valid && out_ready) begin
          sent <= sent + 1'b1;
          if (sent == n_send - 1'b1) rs <= R_H0;
        end
        default: rs <= R_H0;
      endcase
    end
  end

  assign busy = (rs != R_H0);

  always_comb begin
    unique case (bus_addr)
      12'h0:   bus_rdata = out_hdr;
      12'h1:   bus_rdata = out_aux;
      12'h2:   bus_rdata = {31'd0, busy};
      12'h3:   bus_rdata = 32'(vlen);
      12'h4:   bus_rdata = n_rows;
      default: bus_rdata = '0;
    endcase
  end

  a_res_room: assert property (@(posedge clk) disable iff (!rst_n) q_push |-> !q_full);
endmodule
