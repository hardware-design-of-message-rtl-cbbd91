// monitor: hardware cycle counters for measuring operations.
//
// One 32-bit counter per event input counts the clock cycles in which that
// input is high (for example "MPE busy", "MPE waiting for another node",
// "DMA sending"), plus a free-running cycle counter. Writing CTRL bit0 clears
// every counter; CTRL bit1 (set at reset) enables counting.
// Registers: 0 CTRL, 1 cycle counter, 0x10+i counter of event i.
// A collection of counters of the clock cycles of various operations follows
// the modelled system; which signals are counted is chosen where the monitor
// is instantiated.
module monitor #(
  parameter int unsigned NEV = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NEV-1:0] ev,
  input  logic [11:0]    bus_addr,
  input  logic           bus_we,
  input  logic [31:0]    bus_wdata,
  output logic [31:0]    bus_rdata
);
  logic [31:0] cnt [NEV];
  logic [31:0] cyc;
  logic        en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en  <= 1'b1;
      cyc <= '0;
      for (int i = 0; i < NEV; i++) cnt[i] <= '0;
    end else if (bus_we && bus_addr == 12'h0) begin
      en <= bus_wdata[1];
      if (bus_wdata[0]) begin
        cyc <= '0;
        for (int i = 0; i < NEV; i++) cnt[i] <= '0;
      end
    end else if (en) begin
      cyc <= cyc + 1;
      for (int i = 0; i < NEV; i++) if (ev[i]) cnt[i] <= cnt[i] + 1;
    end
  end

  always_comb begin
    bus_rdata = '0;
    if (bus_addr == 12'h0) bus_rdata = {30'd0, en, 1'b0};
    else if (bus_addr == 12'h1) bus_rdata = cyc;
    else if (bus_addr[11:4] == 8'h1)
      for (int i = 0; i < NEV; i++) if (int'(bus_addr[3:0]) == i) bus_rdata = cnt[i];
  end
endmodule
