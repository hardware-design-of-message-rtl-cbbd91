// route_calc: routing module of the on-chip router.
//
// Given the router's own node ID and the header word of a packet, selects the
// crossbar output. A packet for this node leaves on its dst_port. Any other
// packet is routed in dimension order (X, then Y, then Z) around the K-ary
// 3-cube torus, taking the shorter way round each ring: X+ when the forward
// distance is below K/2, X- when it is above (likewise for Y and Z). When both
// ways are equally long (distance K/2) a node with an even coordinate sends
// the packet the + way and a node with an odd coordinate the - way. With K = 4
// this keeps the links of every ring free of a cyclic wait: the only packets
// that cross two links of one ring start at an even node going + or at an odd
// node going -, so no chain of held links can close around the ring, and the
// wormhole network cannot deadlock without virtual channels. (For K > 4 this
// argument no longer holds.) Purely combinational. The torus shape and its six
// ports per node follow the modelled cluster; dimension-order routing is one
// of the algorithms named for it, and the parity tie-break is this design's.
module route_calc
  import mpe_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic [NODE_W-1:0] my_id,
  input  logic [WORD_W-1:0] hdr,
  output logic [PORT_W-1:0] out_port
);
  localparam int unsigned DW = $clog2(K);

  hdr_t h;
  assign h = hdr_t'(hdr);

  function automatic logic [DW-1:0] coord(input logic [NODE_W-1:0] id, input int d);
    return DW'(id >> (d * DW));
  endfunction

  always_comb begin
    logic [DW-1:0] fwd;
    out_port = h.dst_port;
    for (int d = 2; d >= 0; d--) begin
      fwd = coord(h.dst_node, d) - coord(my_id, d);
      if (fwd != 0) begin
        if (int'(fwd) < int'(K / 2))      out_port = PORT_W'(2 * d);
        else if (int'(fwd) > int'(K / 2)) out_port = PORT_W'(2 * d + 1);
        else out_port = coord(my_id, d)[0] ? PORT_W'(2 * d + 1) : PORT_W'(2 * d);
      end
    end
  end
endmodule
