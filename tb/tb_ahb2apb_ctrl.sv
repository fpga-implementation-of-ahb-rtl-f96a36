// tb_ahb2apb_ctrl: self-checking test of the bridge controller.
//
// A task-driven AHB master issues single transfers and one back-to-back
// pair; a 16-word APB register file in this testbench answers on the APB
// side. Checked against values worked out here:
//   - write data reaches the APB slave and reads return it;
//   - a read holds the AHB data phase for exactly 2 cycles, a write for 3;
//   - every APB transfer is one SETUP cycle then one ENABLE cycle, with
//     address, direction and data as the AHB master gave them;
//   - an address phase with HREADY low, HSEL low, or HTRANS IDLE/BUSY
//     starts no APB transfer;
//   - HRESP is OKAY throughout.
// Inputs change on the falling clock edge; outputs are sampled just after.
module tb_ahb2apb_ctrl;
  import amba_pkg::*;

  localparam int unsigned AW = 32;
  localparam int unsigned DW = 32;

  logic          hclk = 1'b0;
  logic          hresetn;
  logic          hsel;
  logic [AW-1:0] haddr;
  logic          hwrite;
  logic [1:0]    htrans;
  logic          hready_in;
  logic [DW-1:0] hwdata;
  logic [DW-1:0] hrdata;
  logic          hready_out;
  logic [1:0]    hresp;
  logic [AW-1:0] paddr;
  logic          pwrite;
  logic          psel;
  logic          penable;
  logic [DW-1:0] pwdata;
  logic [DW-1:0] prdata;

  int checks = 0;
  int failures = 0;
  int apb_xfers = 0;
  int cycle = 0;

  logic [DW-1:0] apb_mem [16];
  logic [DW-1:0] ref_mem [16];

  ahb2apb_ctrl #(.ADDR_WIDTH(AW), .DATA_WIDTH(DW)) dut (
    .hclk (hclk), .hresetn (hresetn),
    .hsel_i (hsel), .haddr_i (haddr), .hwrite_i (hwrite), .htrans_i (htrans),
    .hready_i (hready_in), .hwdata_i (hwdata), .hrdata_o (hrdata),
    .hready_o (hready_out), .hresp_o (hresp),
    .paddr_o (paddr), .pwrite_o (pwrite), .psel_o (psel), .penable_o (penable),
    .pwdata_o (pwdata), .prdata_i (prdata)
  );

  always #5 hclk = ~hclk;

  // APB register file: 16 words at paddr[5:2].
  assign prdata = apb_mem[paddr[5:2]];
  always_ff @(posedge hclk) begin
    cycle <= cycle + 1;
    if (psel && penable) begin
      apb_xfers <= apb_xfers + 1;
      if (pwrite) apb_mem[paddr[5:2]] <= pwdata;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  // APB protocol monitor, independent of the controller's own assertions.
  logic          prev_setup = 1'b0;
  logic [AW-1:0] prev_addr;
  logic          prev_write;
  always @(negedge hclk) if (hresetn) begin
    if (prev_setup) begin
      check(psel && penable, "ENABLE follows SETUP");
      check(paddr == prev_addr && pwrite == prev_write, "APB address held into ENABLE");
    end else begin
      check(!(psel && penable), "ENABLE only after SETUP");
    end
    check(hresp == HRESP_OKAY, "HRESP OKAY");
    prev_setup = psel && !penable;
    prev_addr  = paddr;
    prev_write = pwrite;
  end

  task automatic idle_bus();
    hsel = 1'b0; htrans = HTRANS_IDLE; hwrite = 1'b0; haddr = '0;
  endtask

  // Address phase on this falling edge; returns after the rising edge that
  // samples it. The bridge must be ready (HREADY high) at that edge.
  task automatic addr_phase(input bit wr, input logic [AW-1:0] a);
    hsel = 1'b1; haddr = a; hwrite = wr; htrans = HTRANS_NONSEQ;
    #1;
    check(hready_out, "bridge ready for address phase");
    @(posedge hclk);
    #1;
  endtask

  // Data phase: drive hwdata, wait for HREADY, return cycles and read data.
  // The next address phase (if any) is already on the bus.
  task automatic data_phase(input logic [DW-1:0] wd, output logic [DW-1:0] rd,
                            output int cycles);
    bit rdy;
    cycles = 0;
    do begin
      @(negedge hclk);
      hwdata = wd;
      #1;
      cycles++;
      rdy = hready_out;
      rd  = hrdata;
      @(posedge hclk);
      #1;
    end while (!rdy && cycles < 20);
  endtask

  task automatic single(input bit wr, input logic [3:0] idx, input logic [DW-1:0] wd);
    logic [DW-1:0] rd;
    int cyc;
    int n_start;
    @(negedge hclk);
    n_start = apb_xfers;
    addr_phase(wr, {24'h000100, 2'b00, idx, 2'b00});
    idle_bus();
    data_phase(wd, rd, cyc);
    if (wr) begin
      ref_mem[idx] = wd;
      check(cyc == 3, $sformatf("write data phase 3 cycles, got %0d", cyc));
    end else begin
      check(cyc == 2, $sformatf("read data phase 2 cycles, got %0d", cyc));
      check(rd == ref_mem[idx], $sformatf("read data %h expected %h", rd, ref_mem[idx]));
    end
    #1;
    check(apb_xfers == n_start + 1, "one APB transfer per AHB transfer");
  endtask

  initial begin
    repeat (5000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] rd;
    int cyc;
    int n_start;
    for (int i = 0; i < 16; i++) begin
      apb_mem[i] = 32'hA5000000 + i;
      ref_mem[i] = 32'hA5000000 + i;
    end
    hresetn = 1'b0; hready_in = 1'b1; hwdata = '0;
    idle_bus();
    repeat (3) @(posedge hclk);
    @(negedge hclk) hresetn = 1'b1;
    #1;
    check(!psel && !penable && hready_out, "reset state");

    // Single writes and reads.
    for (int i = 0; i < 16; i++) single(1'b1, 4'(i), $urandom);
    for (int i = 0; i < 16; i++) single(1'b0, 4'(i), '0);
    for (int i = 0; i < 100; i++) single(1'($urandom), 4'($urandom), $urandom);

    // Back to back: write index 3, then read index 3 whose address phase
    // waits on the bus during the write's data phase.
    @(negedge hclk);
    n_start = apb_xfers;
    addr_phase(1'b1, 32'h0000_100C);
    hsel = 1'b1; haddr = 32'h0000_100C; hwrite = 1'b0; htrans = HTRANS_NONSEQ;
    data_phase(32'h1234_5678, rd, cyc);
    check(cyc == 3, "back-to-back write 3 cycles");
    ref_mem[3] = 32'h1234_5678;
    idle_bus();
    data_phase('0, rd, cyc);
    check(cyc == 2, "back-to-back read 2 cycles");
    check(rd == 32'h1234_5678, "back-to-back read returns written data");
    #1;
    check(apb_xfers == n_start + 2, "two APB transfers back to back");

    // HREADY low from another slave: the address phase must not be taken.
    @(negedge hclk);
    n_start = apb_xfers;
    hsel = 1'b1; haddr = 32'h0000_1010; hwrite = 1'b1; htrans = HTRANS_NONSEQ;
    hready_in = 1'b0;
    repeat (3) begin
      @(negedge hclk);
      #1;
      check(!psel && hready_out, "no transfer while HREADY low");
    end
    idle_bus();
    hready_in = 1'b1;

    // HTRANS IDLE and BUSY, and HSEL low, start nothing.
    @(negedge hclk);
    hsel = 1'b1; haddr = 32'h0000_1014; hwrite = 1'b1; htrans = HTRANS_IDLE;
    @(negedge hclk);
    htrans = HTRANS_BUSY;
    @(negedge hclk);
    hsel = 1'b0; htrans = HTRANS_NONSEQ;
    @(negedge hclk);
    idle_bus();
    repeat (3) @(negedge hclk);
    check(apb_xfers == n_start, "IDLE, BUSY, HREADY low and HSEL low start no APB transfer");

    // The register file still holds what was written.
    for (int i = 0; i < 16; i++) single(1'b0, 4'(i), '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
