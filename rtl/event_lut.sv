// event_lut: the event look-up table, the ROM/EPROM realisation of the controller.
//
// One word per input event, addressed directly by the two 4-bit input codes
// {greasiness, dirtiness}, so the 8 address lines span 256 words of which the 121 events
// with both codes in 0..10 are used. Each word holds the 4-bit and the 8-bit defuzzified
// time. The write port is how the table is programmed; the read port is registered, so the
// answer appears one clock after the address (the access time of the memory). The table and
// its contents follow the method; direct 256-word addressing and the registered read are
// this design's choices.
module event_lut
  import flc_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  flc_out_t          wdata,
  input  logic [ADDR_W-1:0] raddr,
  output flc_out_t          rdata
);

  flc_out_t mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
