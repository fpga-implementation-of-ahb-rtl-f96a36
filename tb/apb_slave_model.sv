// apb_slave_model: behavioural APB slave used by the bridge testbench.
//
// The peripherals behind the bridge are not specified beyond their being
// enabled by address, so each is stood in for by a 16-word register file at
// paddr[5:2]. Word i of slave SLAVE_ID resets to
//   32'h5A00_0000 | (SLAVE_ID << 8) | i
// so the testbench can predict every read. A write lands at the end of the
// ENABLE cycle; read data is driven combinationally from the addressed word.
// It also checks the AMBA 2.0 APB rules it sees: ENABLE comes only after a
// one-cycle SETUP with the same address, direction and write data. Rule
// violations and completed transfers are counted in proto_errors and xfers.
module apb_slave_model #(
  parameter int unsigned SLAVE_ID   = 0,
  parameter int unsigned ADDR_WIDTH = 32,
  parameter int unsigned DATA_WIDTH = 32
) (
  input  logic                  pclk,
  input  logic                  presetn,
  input  logic                  psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [ADDR_WIDTH-1:0] paddr,
  input  logic [DATA_WIDTH-1:0] pwdata,
  output logic [DATA_WIDTH-1:0] prdata
);

  logic [DATA_WIDTH-1:0] mem [16];
  int xfers;
  int proto_errors;

  logic                  in_setup;
  logic [ADDR_WIDTH-1:0] setup_addr;
  logic                  setup_write;
  logic [DATA_WIDTH-1:0] setup_wdata;

  assign prdata = mem[paddr[5:2]];

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      for (int i = 0; i < 16; i++)
        mem[i] <= DATA_WIDTH'(32'h5A00_0000 | (SLAVE_ID << 8) | i);
      xfers        <= 0;
      proto_errors <= 0;
      in_setup     <= 1'b0;
      setup_addr   <= '0;
      setup_write  <= 1'b0;
      setup_wdata  <= '0;
    end else begin
      in_setup    <= psel && !penable;
      setup_addr  <= paddr;
      setup_write <= pwrite;
      setup_wdata <= pwdata;
      if (psel && penable) begin
        if (!in_setup || paddr != setup_addr || pwrite != setup_write ||
            (pwrite && pwdata != setup_wdata))
          proto_errors <= proto_errors + 1;
        xfers <= xfers + 1;
        if (pwrite) mem[paddr[5:2]] <= pwdata;
      end else if (in_setup) begin
        proto_errors <= proto_errors + 1;   // SETUP not followed by ENABLE
      end
    end
  end

endmodule
