// Testbench of wdata_mux: HMASTER changes at random with HREADY random; the
// output must carry the write data of the master that was on HMASTER at the
// last rising edge with HREADY high (zero for no master), i.e. the data
// phase follows the address phase by one completed phase.
module tb_wdata_mux;
  import ahb_arb_pkg::*;

  logic clk = 1'b0, rstn = 1'b0, hready;
  logic [3:0] hmaster, owner;
  logic [31:0] m_wdata [3];
  logic [31:0] s_wdata, exp;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  wdata_mux dut (.hclk(clk), .hresetn(rstn), .hmaster(hmaster), .hready(hready),
                 .m_wdata(m_wdata), .s_wdata(s_wdata));

  initial begin
    hmaster = 4'd2; hready = 1'b1; owner = '0;
    for (int i = 0; i < 3; i++) m_wdata[i] = $urandom;
    @(posedge clk); #1;
    checks++; if (s_wdata !== 32'h0) failures++;   // reset: no data-phase owner
    rstn = 1'b1;
    repeat (3000) begin
      @(posedge clk);
      if (hready) owner = hmaster;
      #1;
      hmaster = 4'($urandom_range(4));
      hready  = ($urandom_range(3) != 0);
      for (int i = 0; i < 3; i++) m_wdata[i] = $urandom;
      #1;
      exp = (owner >= 1 && owner <= 3) ? m_wdata[owner-1] : 32'h0;
      checks++;
      if (s_wdata !== exp) begin
        failures++;
        $display("FAIL owner=%0d got %h expected %h", owner, s_wdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
