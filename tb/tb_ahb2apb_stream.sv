// tb_ahb2apb_stream: streaming throughput test of the bridge.
//
// The master keeps a transfer on the bus every cycle: HSEL high, HTRANS
// NONSEQ, and the bridge's HREADY input tied high, as in a setup where the
// bridge is the only AHB slave. The master advances to the next address
// whenever the bridge's hready_o is high. First a stream of 60 writes of
// incrementing data walks over all six slaves, then a stream of 60 reads
// returns it. Checked against values computed here:
//   - write data reaches the right slave, reads return it;
//   - the write stream completes one transfer every 3 cycles and the read
//     stream one every 2 (no idle cycles between transfers);
//   - hready_o is high for exactly one cycle per transfer while streaming.
module tb_ahb2apb_stream;
  import amba_pkg::*;

  localparam int unsigned AW = 32;
  localparam int unsigned DW = 32;
  localparam int unsigned NS = 6;
  localparam int N = 60;

  logic                  hclk = 1'b0;
  logic                  hresetn;
  logic                  hsel;
  logic [AW-1:0]         haddr;
  logic                  hwrite;
  logic [1:0]            htrans;
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
    .hready_i (1'b1), .hwdata_i (hwdata), .hrdata_o (hrdata),
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Transfer k goes to slave k % 6, word (k / 6) % 16.
  function automatic logic [AW-1:0] addr_of(input int k);
    return {16'h4000, 1'b0, 3'(k % NS), 6'b0, 4'((k / NS) % 16), 2'b00};
  endfunction

  function automatic logic [DW-1:0] data_of(input int k);
    return DW'(k + 1);
  endfunction

  // Streams N transfers; returns the number of data-phase cycles, counted
  // from the rising edge that takes the first address phase up to and
  // including the cycle in which the last transfer completes. Returns just
  // after that last completing edge.
  task automatic stream(input bit wr, output int cycles);
    int issued;
    int done;
    int high_run;
    issued = 0; done = 0; cycles = 0; high_run = 0;
    @(negedge hclk);
    hsel = 1'b1; hwrite = wr; htrans = HTRANS_NONSEQ; haddr = addr_of(0);
    issued = 1;
    while (done < N && cycles < 10 * N) begin
      @(posedge hclk);
      #1;
      cycles++;
      // the rising edge just passed ended a data phase if hready_out was
      // high before it; track that with the value sampled at the negedge
      @(negedge hclk);
      if (hready_out) begin
        // data phase of transfer 'done' completes at the next rising edge
        if (cycles > 1) begin
          if (!wr) check(hrdata == data_of(done),
                         $sformatf("stream read %0d: %h expected %h", done, hrdata, data_of(done)));
          done++;
          high_run++;
        end
        if (issued < N) begin
          haddr = addr_of(issued);
          issued++;
        end else begin
          hsel = 1'b0; htrans = HTRANS_IDLE;
        end
      end else begin
        high_run = 0;
      end
      if (wr) hwdata = data_of(done);
      check(high_run <= 1, "hready_o high for one cycle per transfer");
    end
    @(posedge hclk);
    #1;
  endtask

  initial begin
    repeat (2000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    hresetn = 1'b0; hsel = 1'b0; htrans = HTRANS_IDLE; hwrite = 1'b0;
    haddr = '0; hwdata = '0;
    repeat (3) @(posedge hclk);
    @(negedge hclk) hresetn = 1'b1;

    stream(1'b1, cyc);
    $display("write stream: %0d transfers in %0d cycles", N, cyc);
    check(cyc == 3 * N, $sformatf("write stream %0d cycles, expected %0d", cyc, 3 * N));
    for (int k = 0; k < N; k++) begin
      int s;
      s = k % NS;
      // slave memories are only reachable by constant index
      case (s)
        0: check(g_slv[0].u_slv.mem[(k / NS) % 16] == data_of(k), "write reached slave 0");
        1: check(g_slv[1].u_slv.mem[(k / NS) % 16] == data_of(k), "write reached slave 1");
        2: check(g_slv[2].u_slv.mem[(k / NS) % 16] == data_of(k), "write reached slave 2");
        3: check(g_slv[3].u_slv.mem[(k / NS) % 16] == data_of(k), "write reached slave 3");
        4: check(g_slv[4].u_slv.mem[(k / NS) % 16] == data_of(k), "write reached slave 4");
        default: check(g_slv[5].u_slv.mem[(k / NS) % 16] == data_of(k), "write reached slave 5");
      endcase
    end

    repeat (3) @(negedge hclk);
    stream(1'b0, cyc);
    $display("read stream: %0d transfers in %0d cycles", N, cyc);
    check(cyc == 2 * N, $sformatf("read stream %0d cycles, expected %0d", cyc, 2 * N));

    check(g_slv[0].u_slv.proto_errors + g_slv[1].u_slv.proto_errors +
          g_slv[2].u_slv.proto_errors + g_slv[3].u_slv.proto_errors +
          g_slv[4].u_slv.proto_errors + g_slv[5].u_slv.proto_errors == 0, "APB rules");
    check(hresp == HRESP_OKAY, "HRESP OKAY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
