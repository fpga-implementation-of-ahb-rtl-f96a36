// ahb2apb: AHB to APB bridge with six address-selected APB slaves.
//
// Joins the high-performance AHB system bus (processor, DMA, memories) to
// the low-power APB peripheral bus (UART, timer, keypad, PIO and the like).
// To the AHB it is one slave, selected by the system's AHB decoder through
// hsel_apb_i. Every AHB read or write to it is carried out as one APB
// transfer, SETUP then ENABLE, on the slave picked by the address:
//
//   AHB --> ahb2apb_ctrl --(paddr, psel, penable, pwrite, pwdata)--> APB
//              ^                         |
//              |                    apb_decoder --> psel_o[5:0]
//              +---- prdata <-- (mux of prdata_i[5:0])
//
// Timing (see ahb2apb_ctrl): a read holds the AHB data phase for 2 cycles,
// a write for 3; HREADY is high in the APB ENABLE cycle, where the next
// address phase can be taken. Slave s occupies address slot s of 4 KiB
// (paddr[14:12] = s); slots 6 and 7 are empty and read as zero.
//
// The six APB slaves, the AHB masters and the AHB address decoder are
// outside this module; their buses are the ports. The overall structure
// (an AHB side and an APB side joined by a controller, six slaves enabled
// by address) follows the source design; the cycle-level behaviour and
// address map are this design's own choices.
//
// Reset is asynchronous, active low (hresetn).
module ahb2apb #(
  parameter int unsigned ADDR_WIDTH = 32,
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned NUM_SLAVES = 6,
  parameter int unsigned SLOT_LSB   = 12
) (
  input  logic                                  hclk,
  input  logic                                  hresetn,
  // AHB slave side
  input  logic                                  hsel_apb_i,
  input  logic [ADDR_WIDTH-1:0]                 haddr_i,
  input  logic                                  hwrite_i,
  input  logic [1:0]                            htrans_i,
  input  logic                                  hready_i,
  input  logic [DATA_WIDTH-1:0]                 hwdata_i,
  output logic [DATA_WIDTH-1:0]                 hrdata_o,
  output logic                                  hready_o,
  output logic [1:0]                            hresp_o,
  // APB master side, shared by all slaves
  output logic [ADDR_WIDTH-1:0]                 paddr_o,
  output logic                                  pwrite_o,
  output logic                                  penable_o,
  output logic [DATA_WIDTH-1:0]                 pwdata_o,
  // APB per-slave select and read data
  output logic [NUM_SLAVES-1:0]                 psel_o,
  input  logic [NUM_SLAVES-1:0][DATA_WIDTH-1:0] prdata_i
);

  logic                  psel;
  logic [DATA_WIDTH-1:0] prdata;
  logic                  hit;

  ahb2apb_ctrl #(
    .ADDR_WIDTH (ADDR_WIDTH),
    .DATA_WIDTH (DATA_WIDTH)
  ) u_ctrl (
    .hclk      (hclk),
    .hresetn   (hresetn),
    .hsel_i    (hsel_apb_i),
    .haddr_i   (haddr_i),
    .hwrite_i  (hwrite_i),
    .htrans_i  (htrans_i),
    .hready_i  (hready_i),
    .hwdata_i  (hwdata_i),
    .hrdata_o  (hrdata_o),
    .hready_o  (hready_o),
    .hresp_o   (hresp_o),
    .paddr_o   (paddr_o),
    .pwrite_o  (pwrite_o),
    .psel_o    (psel),
    .penable_o (penable_o),
    .pwdata_o  (pwdata_o),
    .prdata_i  (prdata)
  );

  apb_decoder #(
    .ADDR_WIDTH (ADDR_WIDTH),
    .DATA_WIDTH (DATA_WIDTH),
    .NUM_SLAVES (NUM_SLAVES),
    .SLOT_LSB   (SLOT_LSB)
  ) u_dec (
    .paddr_i  (paddr_o),
    .psel_i   (psel),
    .psel_o   (psel_o),
    .prdata_i (prdata_i),
    .prdata_o (prdata),
    .hit_o    (hit)
  );

  // An access to an empty slot still completes on the AHB side; no slave
  // sees it. hit is only used by this check.
  a_one_slave: assert property (@(posedge hclk) disable iff (!hresetn)
    $onehot0(psel_o) && (!psel || !hit || psel_o != '0));

endmodule
