// amba_pkg: types and encodings shared by the AHB to APB bridge.
//
// Holds the AMBA 2.0 AHB transfer-type (HTRANS) and response (HRESP)
// encodings and the state encoding of the bridge controller. The bus
// encodings are the standard AMBA 2.0 ones; the controller states are this
// design's own choice of how to sequence an APB transfer (see
// ahb2apb_ctrl.sv).
package amba_pkg;

  // AHB transfer type, driven by the master on HTRANS[1:0].
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // AHB slave response, driven on HRESP[1:0].
  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Bridge controller states.
  //   ST_IDLE   : no APB transfer; HREADY high, ready for an address phase.
  //   ST_WWAIT  : write data phase, first cycle; HWDATA is captured.
  //   ST_SETUP  : APB SETUP phase (PSEL high, PENABLE low).
  //   ST_ENABLE : APB ENABLE phase (PSEL and PENABLE high); the AHB data
  //               phase completes at the end of this cycle.
  typedef enum logic [1:0] {
    ST_IDLE   = 2'b00,
    ST_WWAIT  = 2'b01,
    ST_SETUP  = 2'b10,
    ST_ENABLE = 2'b11
  } bridge_state_e;

endpackage
