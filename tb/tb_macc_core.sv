// tb_macc_core: one MACC core is loaded with a vector B and then given rows
// of a matrix A in row packets (several rows per packet, several packets per
// vector, with input gaps and output back-pressure). Each result packet must
// carry the programmed header and auxiliary word and one word per row, equal
// to the dot product of that row with B: exactly, for small integer values
// (every partial sum is then exact in single precision), and within a
// rounding tolerance for random real values. Within a row the core must take
// one word per cycle when words are offered every cycle. Vector reloads
// (including one of the full vector depth) and the status registers are
// checked too.
module tb_macc_core;
  import mpe_pkg::*;
  import tb_fp_pkg::*;
  localparam int VD = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  flit_t in_flit, out_flit;
  logic in_valid, in_ready, out_valid, out_ready, busy;
  logic [11:0] bus_addr = 0;
  logic bus_we = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  int checks = 0, failures = 0;
  bit gaps = 1;

  macc_core #(.VEC_DEPTH(VD), .RES_DEPTH(16), .ADD_LAT(4), .MUL_LAT(3), .MY_PORT(4'(P_MACC0)))
    dut (.clk, .rst_n, .my_id(6'd5), .in_flit, .in_valid, .in_ready, .out_flit, .out_valid,
         .out_ready, .bus_addr, .bus_we, .bus_wdata, .bus_rdata, .busy);

  logic [32:0] outq [$];
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && out_valid && out_ready) outq.push_back({out_flit.eof, out_flit.data});

  // a word inside a row (not the first of a row) that is not taken in the
  // cycle it is offered counts as a stall; row_len = 0 turns this off
  int row_stalls = 0, row_len = 0;
  logic [31:0] sbuf [$];

  task automatic send();
    foreach (sbuf[k]) begin
      @(negedge clk);
      in_valid = 1;
      in_flit = '{data: sbuf[k], sof: (k == 0), eof: (k == sbuf.size() - 1)};
      @(posedge clk);
      if (!in_ready && row_len > 0 && k > 2 && (k - 2) % row_len != 0) row_stalls++;
      while (!in_ready) @(posedge clk);
      @(negedge clk) in_valid = 0;
      if (gaps && $urandom_range(0, 5) == 0) @(negedge clk);
    end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_we = 1; bus_wdata = d;
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; #1 d = bus_rdata;
  endtask

  logic [31:0] vec [];
  int total_rows = 0;

  task automatic load_vec(input int len, input bit ints);
    vec = new[len];
    sbuf.delete();
    sbuf.push_back(mk_hdr(6'd5, 4'(P_MACC0), 6'd1, 4'(P_MPE), MT_MACC_VEC, 8'd0));
    sbuf.push_back(32'd0);
    for (int k = 0; k < len; k++) begin
      vec[k] = ints ? r2b(real'($urandom_range(0, 20)) - 10.0) : rnd_float(124, 129);
      sbuf.push_back(vec[k]);
    end
    row_len = 0;
    send();
  endtask

  task automatic rows(input int nr, input bit ints);
    real exp_r [];
    real mag [];
    logic [32:0] o;
    int len;
    logic [31:0] v;
    len = vec.size();
    exp_r = new[nr]; mag = new[nr];
    sbuf.delete();
    sbuf.push_back(mk_hdr(6'd5, 4'(P_MACC0), 6'd1, 4'(P_MPE), MT_MACC_ROWS, 8'd0));
    sbuf.push_back(32'd0);
    for (int r = 0; r < nr; r++) begin
      exp_r[r] = 0.0; mag[r] = 0.0;
      for (int k = 0; k < len; k++) begin
        logic [31:0] a;
        real p;
        a = ints ? r2b(real'($urandom_range(0, 20)) - 10.0) : rnd_float(124, 129);
        sbuf.push_back(a);
        p = b2r(a) * b2r(vec[k]);
        exp_r[r] += p;
        mag[r] += (p < 0) ? -p : p;
      end
    end
    row_len = len;
    send();
    wait (outq.size() == nr + 2);
    @(negedge clk);
    o = outq.pop_front(); checks++;
    if (o[31:0] != mk_hdr(6'd0, 4'(P_DMA), 6'd5, 4'(P_MACC0), MT_DMA_WRITE, 8'd7)) begin
      failures++; $display("result hdr %h", o[31:0]);
    end
    o = outq.pop_front(); checks++; if (o[31:0] != 32'h2000 + 32'(total_rows)) failures++;
    for (int r = 0; r < nr; r++) begin
      real y, d;
      o = outq.pop_front();
      y = b2r(o[31:0]);
      d = y - exp_r[r]; if (d < 0) d = -d;
      checks++;
      if ((ints && y != exp_r[r]) || (!ints && d > 1e-5 * (mag[r] + 1e-30)) || o[32] != (r == nr - 1)) begin
        failures++; $display("row %0d got %f exp %f", r, y, exp_r[r]);
      end
    end
    total_rows += nr;
    rd(12'h4, v); checks++; if (v != 32'(total_rows)) failures++;
    rd(12'h3, v); checks++; if (v != 32'(len)) failures++;
  endtask

  initial begin
    in_valid = 0; in_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(12'h0, mk_hdr(6'd0, 4'(P_DMA), 6'd0, 4'd0, MT_DMA_WRITE, 8'd7));
    for (int t = 0; t < 12; t++) begin
      bit ints;
      ints = (t % 2 == 0);
      wr(12'h1, 32'h2000 + 32'(total_rows));
      if (t % 3 == 0) load_vec((t == 6) ? VD : $urandom_range(1, VD), ints);
      else begin
        // same vector, fresh values of the same kind
        logic [31:0] v [];
        v = vec;
        foreach (v[k]) v[k] = ints ? r2b(real'($urandom_range(0, 20)) - 10.0) : rnd_float(124, 129);
        sbuf.delete();
        sbuf.push_back(mk_hdr(6'd5, 4'(P_MACC0), 6'd1, 4'(P_MPE), MT_MACC_VEC, 8'd0));
        sbuf.push_back(32'd0);
        foreach (v[k]) sbuf.push_back(v[k]);
        row_len = 0;
        send();
        vec = v;
      end
      gaps = (t % 4 == 0);
      rows($urandom_range(1, 8), ints);
    end
    // inside a row the core takes one word per cycle
    checks++; if (row_stalls != 0) begin failures++; $display("stalls in rows %0d", row_stalls); end
    begin
      logic [31:0] v;
      rd(12'h2, v); checks++; if (v[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
