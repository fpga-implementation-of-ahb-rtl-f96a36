// tb_ahb2apb: end-to-end test of the AHB to APB bridge at its default size.
//
// A pipelined AHB master in this testbench runs a random mix of traffic
// through the bridge to six APB register-file slaves (apb_slave_model):
// single reads and writes, 4-beat incrementing bursts (NONSEQ then SEQ),
// BUSY cycles inside bursts, IDLE cycles with and without HSEL, and
// transfers to another AHB slave that inserts 0-2 wait states, during which
// the bridge's own pending address phase must wait (HREADY low). Addresses
// cover all eight 4 KiB slots; slots 6 and 7 have no slave.
// After the random phase every word of every slave is read back.
//
// Checked against a reference model kept here:
//   - every read returns the last value written (or the reset value), and
//     zero from an empty slot;
//   - each APB transfer selects exactly the slave of its slot, with the
//     address, direction and write data of the AHB transfer;
//   - a read holds the AHB data phase for 2 cycles, a write for 3;
//   - HRESP is OKAY, and the slave models see no APB rule violation;
//   - every mechanism above happened at least once (counted at the end).
// The bus HREADY is the bridge's HREADYOUT in a data phase it owns and the
// other slave's ready otherwise, as an AHB slave multiplexer would give.
module tb_ahb2apb;
  import amba_pkg::*;

  localparam int unsigned AW = 32;
  localparam int unsigned DW = 32;
  localparam int unsigned NS = 6;
  localparam int RANDOM_CYCLES = 4000;

  logic                  hclk = 1'b0;
  logic                  hresetn;
  logic                  hsel;
  logic [AW-1:0]         haddr;
  logic                  hwrite;
  logic [1:0]            htrans;
  logic                  hready_bus;
  logic [DW-1:0]         hwdata;
  logic [DW-1:0]         hrdata;
  logic                  hready_out;
  logic [1:0]            hresp;
  logic [AW-1:0]         paddr;
  logic                  pwrite;
  logic                  penable;
  logic [DW-1:0]         pwdata;
  logic [NS-1:0]         psel;
  logic [NS-1:0][DW-1:0] prdata;

  ahb2apb dut (
    .hclk (hclk), .hresetn (hresetn),
    .hsel_apb_i (hsel), .haddr_i (haddr), .hwrite_i (hwrite), .htrans_i (htrans),
    .hready_i (hready_bus), .hwdata_i (hwdata), .hrdata_o (hrdata),
    .hready_o (hready_out), .hresp_o (hresp),
    .paddr_o (paddr), .pwrite_o (pwrite), .penable_o (penable), .pwdata_o (pwdata),
    .psel_o (psel), .prdata_i (prdata)
  );

  for (genvar s = 0; s < NS; s++) begin : g_slv
    apb_slave_model #(.SLAVE_ID(s), .ADDR_WIDTH(AW), .DATA_WIDTH(DW)) u_slv (
      .pclk (hclk), .presetn (hresetn), .psel (psel[s]), .penable (penable),
      .pwrite (pwrite), .paddr (paddr), .pwdata (pwdata), .prdata (prdata[s])
    );
  end

  always #5 hclk = ~hclk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  // ---------------- reference model ----------------
  logic [DW-1:0] ref_mem [8][16];

  function automatic logic [DW-1:0] ref_read(input logic [AW-1:0] a);
    return ref_mem[a[14:12]][a[5:2]];
  endfunction

  // ---------------- mechanism counters ----------------
  int n_write, n_read, n_b2b, n_holdoff, n_other, n_idle_sel, n_busy, n_seq;
  int n_unmapped, n_apb;
  int n_slave [NS];

  // ---------------- AHB master ----------------
  logic          dp_hsel;     // data phase belongs to the bridge
  logic          dp_valid;    // ... and is a NONSEQ/SEQ transfer
  logic          dp_write;
  logic [AW-1:0] dp_addr;
  logic [DW-1:0] dp_wdata;
  int            dp_cycles;
  int            other_wait;
  int            burst_left;
  logic          burst_write;
  logic          readback;
  int            rb_index;
  logic          done;

  assign hready_bus = dp_hsel ? hready_out : (other_wait == 0);

  function automatic logic [AW-1:0] make_addr(input int slot, input int idx);
    logic [AW-1:0] a;
    a = {16'h4000, 1'b0, 3'(slot), 6'($urandom), 4'(idx), 2'b00};
    return a;
  endfunction

  always @(posedge hclk) begin
    cycle <= cycle + 1;
    if (!hresetn) begin
      hsel <= 1'b0; haddr <= '0; hwrite <= 1'b0; htrans <= HTRANS_IDLE; hwdata <= '0;
      dp_hsel <= 1'b0; dp_valid <= 1'b0; dp_write <= 1'b0; dp_addr <= '0; dp_wdata <= '0;
      dp_cycles <= 0; other_wait <= 0; burst_left <= 0; burst_write <= 1'b0;
      readback <= 1'b0; rb_index <= 0; done <= 1'b0;
    end else if (hready_bus) begin
      // 1. complete the current data phase
      if (dp_valid) begin
        check(hresp == HRESP_OKAY, "HRESP OKAY");
        if (dp_write) begin
          check(dp_cycles + 1 == 3, $sformatf("write data phase %0d cycles, expected 3", dp_cycles + 1));
          if (dp_addr[14:12] < NS) ref_mem[dp_addr[14:12]][dp_addr[5:2]] = dp_wdata;
          n_write++;
        end else begin
          check(dp_cycles + 1 == 2, $sformatf("read data phase %0d cycles, expected 2", dp_cycles + 1));
          check(hrdata == ref_read(dp_addr),
                $sformatf("read %h from %h, expected %h", hrdata, dp_addr, ref_read(dp_addr)));
          n_read++;
        end
        if (dp_addr[14:12] >= NS) n_unmapped++;
        if (hsel && htrans[1]) n_b2b++;
      end
      // 2. the address phase moves into its data phase
      dp_hsel   <= hsel;
      dp_valid  <= hsel && htrans[1];
      dp_write  <= hwrite;
      dp_addr   <= haddr;
      dp_cycles <= 0;
      if (hsel && htrans[1] && hwrite) begin
        logic [DW-1:0] wd;
        wd = $urandom;
        hwdata   <= wd;
        dp_wdata <= wd;
      end else begin
        hwdata <= $urandom;
      end
      other_wait <= (!hsel && htrans[1]) ? int'($urandom % 3) : 0;
      if (!hsel && htrans[1]) n_other++;
      if (hsel && htrans == HTRANS_IDLE) n_idle_sel++;
      if (hsel && htrans == HTRANS_BUSY) n_busy++;
      if (hsel && htrans == HTRANS_SEQ) n_seq++;
      // 3. next address phase
      if (readback) begin
        if (rb_index < 8 * 16) begin
          hsel <= 1'b1; hwrite <= 1'b0; htrans <= HTRANS_NONSEQ;
          haddr <= make_addr(rb_index / 16, rb_index % 16);
          rb_index <= rb_index + 1;
        end else begin
          hsel <= 1'b0; htrans <= HTRANS_IDLE;
          done <= 1'b1;
        end
      end else if (cycle >= RANDOM_CYCLES && burst_left == 0) begin
        readback <= 1'b1;
        hsel <= 1'b0; htrans <= HTRANS_IDLE;
      end else if (burst_left > 0) begin
        if ($urandom % 100 < 15) begin
          htrans <= HTRANS_BUSY;   // address of the next beat stays on the bus
          hsel   <= 1'b1;
          if (htrans != HTRANS_BUSY)
            haddr <= {haddr[AW-1:6], haddr[5:2] + 4'd1, 2'b00};
        end else begin
          hsel <= 1'b1; hwrite <= burst_write; htrans <= HTRANS_SEQ;
          if (htrans != HTRANS_BUSY)
            haddr <= {haddr[AW-1:6], haddr[5:2] + 4'd1, 2'b00};
          burst_left <= burst_left - 1;
        end
      end else begin
        int r;
        r = int'($urandom % 100);
        if (r < 10) begin
          hsel <= 1'b1; htrans <= HTRANS_IDLE;
        end else if (r < 15) begin
          hsel <= 1'b0; htrans <= HTRANS_IDLE;
        end else if (r < 30) begin
          hsel <= 1'b0; htrans <= HTRANS_NONSEQ; hwrite <= 1'($urandom);
          haddr <= 32'h2000_0000 | ($urandom & 32'hFFC);
        end else begin
          logic w;
          w = 1'($urandom);
          hsel <= 1'b1; htrans <= HTRANS_NONSEQ; hwrite <= w;
          haddr <= make_addr(int'($urandom % 8), int'($urandom % 16));
          if ($urandom % 4 == 0) begin
            burst_left  <= 3;
            burst_write <= w;
          end
        end
      end
    end else begin
      dp_cycles <= dp_cycles + 1;
      if (other_wait > 0) other_wait <= other_wait - 1;
      if (!dp_hsel && hsel && htrans[1]) n_holdoff++;
    end
  end

  // ---------------- APB monitor ----------------
  always @(posedge hclk) if (hresetn && penable) begin
    logic [2:0] slot;
    logic [NS-1:0] exp_sel;
    slot = paddr[14:12];
    exp_sel = '0;
    if (slot < NS) exp_sel[slot] = 1'b1;
    n_apb++;
    check(psel == exp_sel, $sformatf("psel %b for slot %0d", psel, slot));
    check(dp_valid && paddr == dp_addr && pwrite == dp_write,
          "APB address and direction are those of the AHB transfer");
    if (pwrite) check(pwdata == dp_wdata, "APB write data is the AHB write data");
    if (slot < NS) n_slave[slot]++;
  end

  initial begin
    repeat (RANDOM_CYCLES + 2000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xfers;
    for (int s = 0; s < 8; s++)
      for (int i = 0; i < 16; i++)
        ref_mem[s][i] = (s < NS) ? (32'h5A00_0000 | (s << 8) | i) : '0;
    hresetn = 1'b0;
    repeat (3) @(posedge hclk);
    @(negedge hclk) hresetn = 1'b1;
    wait (done);
    repeat (5) @(posedge hclk);
    #1;
    xfers = 0;
    check(g_slv[0].u_slv.proto_errors == 0, "slave 0 APB rules");
    check(g_slv[1].u_slv.proto_errors == 0, "slave 1 APB rules");
    check(g_slv[2].u_slv.proto_errors == 0, "slave 2 APB rules");
    check(g_slv[3].u_slv.proto_errors == 0, "slave 3 APB rules");
    check(g_slv[4].u_slv.proto_errors == 0, "slave 4 APB rules");
    check(g_slv[5].u_slv.proto_errors == 0, "slave 5 APB rules");
    xfers = g_slv[0].u_slv.xfers + g_slv[1].u_slv.xfers + g_slv[2].u_slv.xfers +
            g_slv[3].u_slv.xfers + g_slv[4].u_slv.xfers + g_slv[5].u_slv.xfers;
    check(xfers == n_write + n_read - n_unmapped, "slaves saw every mapped transfer once");
    check(n_apb == n_write + n_read, "one APB transfer per AHB transfer");
    $display("writes=%0d reads=%0d back_to_back=%0d held_by_hready=%0d other_slave=%0d",
             n_write, n_read, n_b2b, n_holdoff, n_other);
    $display("idle_with_hsel=%0d busy=%0d seq_beats=%0d unmapped=%0d apb=%0d",
             n_idle_sel, n_busy, n_seq, n_unmapped, n_apb);
    check(n_write > 0, "a write happened");
    check(n_read > 0, "a read happened");
    check(n_b2b > 0, "a back-to-back transfer happened");
    check(n_holdoff > 0, "an address phase was held by HREADY low");
    check(n_other > 0, "a transfer to another slave happened");
    check(n_idle_sel > 0, "an IDLE transfer to the bridge happened");
    check(n_busy > 0, "a BUSY cycle happened");
    check(n_seq > 0, "a SEQ burst beat happened");
    check(n_unmapped > 0, "an empty-slot access happened");
    for (int s = 0; s < NS; s++) check(n_slave[s] > 0, $sformatf("slave %0d was selected", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
