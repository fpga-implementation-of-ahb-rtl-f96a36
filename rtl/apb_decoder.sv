// apb_decoder: APB slave select decoder and read-data multiplexer.
//
// The APB side of the bridge serves six peripherals, each enabled from the
// address. The decoder takes the bridge's single PSEL and the APB address,
// and raises the select of the one slave whose address slot matches:
//   slot = paddr[SLOT_LSB +: SLOT_BITS]
// Slots 0 .. NUM_SLAVES-1 select slave 0 .. NUM_SLAVES-1; any higher slot
// selects nothing (hit_o low), so such a transfer goes to no slave and a
// read from it returns zero. The read data of the selected slave is
// multiplexed onto prdata_o.
//
// Six slaves and selection by address follow the source design. The slot
// position (4 KiB per slave with SLOT_LSB = 12), the zero read data of an
// empty slot and the mux are this design's own choices.
//
// Purely combinational; no clock.
module apb_decoder #(
  parameter int unsigned ADDR_WIDTH = 32,
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned NUM_SLAVES = 6,
  parameter int unsigned SLOT_LSB   = 12
) (
  input  logic [ADDR_WIDTH-1:0]                 paddr_i,
  input  logic                                  psel_i,
  output logic [NUM_SLAVES-1:0]                 psel_o,
  input  logic [NUM_SLAVES-1:0][DATA_WIDTH-1:0] prdata_i,
  output logic [DATA_WIDTH-1:0]                 prdata_o,
  output logic                                  hit_o
);

  localparam int unsigned SLOT_BITS = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1;

  logic [SLOT_BITS-1:0] slot;

  assign slot  = paddr_i[SLOT_LSB +: SLOT_BITS];
  assign hit_o = (32'(slot) < NUM_SLAVES);

  always_comb begin
    psel_o   = '0;
    prdata_o = '0;
    for (int unsigned s = 0; s < NUM_SLAVES; s++) begin
      if (32'(slot) == s) begin
        psel_o[s] = psel_i;
        prdata_o  = prdata_i[s];
      end
    end
  end

endmodule
