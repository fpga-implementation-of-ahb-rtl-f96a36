// tb_apb_decoder: self-checking test of the APB slave decoder.
//
// Sweeps every address slot (0..7) with random address bits around it and
// with PSEL both low and high, and checks the one-hot slave selects, the
// hit flag and the read-data multiplexer against values computed here from
// the address map: slot = paddr[14:12], slots 0..5 map to slaves 0..5.
module tb_apb_decoder;

  localparam int unsigned AW = 32;
  localparam int unsigned DW = 32;
  localparam int unsigned NS = 6;

  logic [AW-1:0]         paddr;
  logic                  psel;
  logic [NS-1:0]         psel_o;
  logic [NS-1:0][DW-1:0] prdata;
  logic [DW-1:0]         prdata_o;
  logic                  hit;

  int checks = 0;
  int failures = 0;

  apb_decoder #(.ADDR_WIDTH(AW), .DATA_WIDTH(DW), .NUM_SLAVES(NS), .SLOT_LSB(12)) dut (
    .paddr_i (paddr), .psel_i (psel), .psel_o (psel_o),
    .prdata_i (prdata), .prdata_o (prdata_o), .hit_o (hit)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: paddr=%h psel=%b psel_o=%b hit=%b prdata_o=%h",
               what, paddr, psel, psel_o, hit, prdata_o);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int s = 0; s < NS; s++) prdata[s] = $urandom;
      for (int slot = 0; slot < 8; slot++) begin
        for (int sel = 0; sel < 2; sel++) begin
          logic [NS-1:0] exp_sel;
          logic [DW-1:0] exp_rd;
          paddr = $urandom;
          paddr[14:12] = 3'(slot);
          psel = sel[0];
          #1;
          exp_sel = '0;
          exp_rd  = '0;
          if (slot < NS) begin
            exp_sel[slot] = psel;
            exp_rd = prdata[slot];
          end
          check(psel_o == exp_sel, "slave select");
          check(hit == (slot < NS), "hit flag");
          check(prdata_o == exp_rd, "read data mux");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
