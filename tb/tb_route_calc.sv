// tb_route_calc: every (source node, destination node) pair of the 4-ary
// 3-cube plus random local ports; the chosen output is compared with an
// independently written dimension-order rule, and following the chosen hops
// from source must reach the destination within 6 hops (the torus diameter).
module tb_route_calc;
  import mpe_pkg::*;
  logic [NODE_W-1:0] my_id;
  logic [WORD_W-1:0] hdr;
  logic [PORT_W-1:0] out_port;
  int checks = 0, failures = 0;

  route_calc #(.K(4)) dut (.my_id, .hdr, .out_port);

  function automatic int ref_port(int src, int dst, int lp);
    for (int d = 0; d < 3; d++) begin
      int s, t, f;
      s = (src >> (2*d)) & 3; t = (dst >> (2*d)) & 3;
      f = (t - s + 4) % 4;
      if (f != 0) return (f < 2 || (f == 2 && (s & 1) == 0)) ? 2*d : 2*d + 1;
    end
    return lp;
  endfunction
  function automatic int step(int id, int p);
    int d, c;
    d = p / 2;
    c = (id >> (2*d)) & 3;
    c = (p % 2 == 0) ? (c + 1) % 4 : (c + 3) % 4;
    return (id & ~(3 << (2*d))) | (c << (2*d));
  endfunction

  initial begin
    for (int s = 0; s < 64; s++) begin
      for (int t = 0; t < 64; t++) begin
        int lp, cur, hops;
        lp = $urandom_range(6, 15);
        my_id = NODE_W'(s);
        hdr = mk_hdr(NODE_W'(t), PORT_W'(lp), 6'd0, 4'd0, MT_STREAM, 8'd0);
        #1;
        checks++;
        if (int'(out_port) != ref_port(s, t, lp)) begin
          failures++;
          if (failures < 5) $display("src %0d dst %0d got %0d exp %0d", s, t, out_port, ref_port(s, t, lp));
        end
        // walk the route
        cur = s; hops = 0;
        while (cur != t && hops < 8) begin
          my_id = NODE_W'(cur); #1;
          cur = step(cur, int'(out_port));
          hops++;
        end
        checks++;
        if (cur != t || hops > 6) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
