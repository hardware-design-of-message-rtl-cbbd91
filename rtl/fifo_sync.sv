// fifo_sync: synchronous first-word-fall-through FIFO.
//
// Used as the MPE's data buffer (4096 words in the modelled system), as the
// vector-B store of the MACC core and as the local/remote buffers of the FFT
// I/O. The storage is a plain array written on push; the head word is read
// from the array combinationally (rd_data is valid whenever !empty), so a
// push and a pop may happen in the same cycle, also when the FIFO is full
// (the word written replaces the one leaving, which is what rotating a full
// buffer needs). Pushing when full without a pop, or popping when empty, is
// ignored. `count` holds the number of stored words.
// The FWFT read style is this design's choice; the depth default follows the
// 4096-word collective buffer.
module fifo_sync #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_push = push && (!full || pop);
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= nxt(wp);
      if (do_pop)  rp <= nxt(rp);
      count <= count + ($bits(count))'(do_push) - ($bits(count))'(do_pop);
    end
  end
endmodule
