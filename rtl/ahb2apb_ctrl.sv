// ahb2apb_ctrl: the controller of the AHB to APB bridge.
//
// On the AHB side it is a slave; on the APB side it is the single APB
// master. Every AHB transfer addressed to the bridge becomes one APB
// transfer: a SETUP cycle (PSEL high, PENABLE low) followed by an ENABLE
// cycle (PSEL and PENABLE high). The AHB data phase is stretched with
// HREADY low until the APB ENABLE cycle, so each AHB transfer finishes in
// the same cycle as its APB transfer.
//
// Timing, counted in AHB data-phase cycles (the cycle after the address
// phase is the first):
//   read : SETUP, ENABLE                   -> 2 cycles, 1 wait state
//   write: WWAIT (HWDATA captured), SETUP,
//          ENABLE                          -> 3 cycles, 2 wait states
// A write needs the extra cycle because AHB delivers write data one cycle
// after the address, while APB wants PWDATA valid from its SETUP cycle.
// HREADY is high in the ENABLE cycle, so the next address phase can be
// accepted there and transfers follow each other without idle cycles.
// Read data is passed from PRDATA to HRDATA without a register, so the read
// path is combinational from the APB slave to the AHB master.
//
// An address phase is accepted when HSEL, HREADY (the bus-wide ready seen
// by all slaves) and HTRANS = NONSEQ or SEQ are all present. IDLE and BUSY
// transfers get a zero-wait OKAY response. HRESP is always OKAY: AMBA 2.0
// APB slaves cannot signal errors. Bursts are handled one beat at a time.
//
// The bridge having an AHB slave side, an APB master side and a controller
// joining them is the structure of the source design; the state sequence,
// the wait-state counts and the unregistered read path are this design's
// own choices, since no cycle-level behaviour is given for them.
//
// Interface: AHB slave signals with _i/_o suffixes, APB master signals with
// a single PSEL (apb_decoder expands it to one select per slave).
// Reset is asynchronous, active low (hresetn).
module ahb2apb_ctrl
  import amba_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 32,
  parameter int unsigned DATA_WIDTH = 32
) (
  input  logic                  hclk,
  input  logic                  hresetn,
  // AHB slave side
  input  logic                  hsel_i,
  input  logic [ADDR_WIDTH-1:0] haddr_i,
  input  logic                  hwrite_i,
  input  logic [1:0]            htrans_i,
  input  logic                  hready_i,
  input  logic [DATA_WIDTH-1:0] hwdata_i,
  output logic [DATA_WIDTH-1:0] hrdata_o,
  output logic                  hready_o,
  output logic [1:0]            hresp_o,
  // APB master side
  output logic [ADDR_WIDTH-1:0] paddr_o,
  output logic                  pwrite_o,
  output logic                  psel_o,
  output logic                  penable_o,
  output logic [DATA_WIDTH-1:0] pwdata_o,
  input  logic [DATA_WIDTH-1:0] prdata_i
);

  bridge_state_e         state_q, state_d;
  logic [ADDR_WIDTH-1:0] addr_q;
  logic                  write_q;
  logic [DATA_WIDTH-1:0] wdata_q;
  logic                  accept;

  // A new address phase can only be taken while this slave is not
  // stretching a data phase, i.e. in ST_IDLE or ST_ENABLE.
  assign accept = hsel_i && hready_i && htrans_i[1] &&
                  (state_q == ST_IDLE || state_q == ST_ENABLE);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE:   if (accept) state_d = hwrite_i ? ST_WWAIT : ST_SETUP;
      ST_WWAIT:  state_d = ST_SETUP;
      ST_SETUP:  state_d = ST_ENABLE;
      ST_ENABLE: begin
        if (accept) state_d = hwrite_i ? ST_WWAIT : ST_SETUP;
        else        state_d = ST_IDLE;
      end
      default:   state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state_q <= ST_IDLE;
      addr_q  <= '0;
      write_q <= 1'b0;
      wdata_q <= '0;
    end else begin
      state_q <= state_d;
      if (accept) begin
        addr_q  <= haddr_i;
        write_q <= hwrite_i;
      end
      if (state_q == ST_WWAIT) wdata_q <= hwdata_i;
    end
  end

  // AHB outputs
  assign hready_o = (state_q == ST_IDLE) || (state_q == ST_ENABLE);
  assign hresp_o  = HRESP_OKAY;
  assign hrdata_o = (state_q == ST_ENABLE && !write_q) ? prdata_i : '0;

  // APB outputs
  assign paddr_o   = addr_q;
  assign pwrite_o  = write_q;
  assign pwdata_o  = wdata_q;
  assign psel_o    = (state_q == ST_SETUP) || (state_q == ST_ENABLE);
  assign penable_o = (state_q == ST_ENABLE);

  // APB protocol rules: ENABLE always follows SETUP with the address,
  // direction and write data held; PENABLE never comes without PSEL.
  a_setup_then_enable: assert property (@(posedge hclk) disable iff (!hresetn)
    (psel_o && !penable_o) |=> (psel_o && penable_o && $stable(paddr_o) &&
                                $stable(pwrite_o) && $stable(pwdata_o)));
  a_enable_needs_sel: assert property (@(posedge hclk) disable iff (!hresetn)
    penable_o |-> psel_o);
  a_enable_one_cycle: assert property (@(posedge hclk) disable iff (!hresetn)
    penable_o |=> !penable_o);

endmodule
