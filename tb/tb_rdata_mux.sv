// Testbench of rdata_mux: random slave selects, transfer types, slave data
// and slave ready. The data-phase owner is the slave selected at the last
// rising edge with HREADY high while HTRANS was NONSEQ or SEQ; HRDATA and
// HREADY must come from it, or be 0 and 1 when there is none.
module tb_rdata_mux;
  logic clk = 1'b0, rstn = 1'b0;
  logic [3:0] hsel, readyout, owner;
  logic [1:0] htrans;
  logic [31:0] s_rdata [4];
  logic [31:0] hrdata;
  logic hready;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  rdata_mux dut (.hclk(clk), .hresetn(rstn), .hsel(hsel), .htrans(htrans), .s_rdata(s_rdata),
                 .s_readyout(readyout), .hrdata(hrdata), .hready(hready));

  initial begin
    bit exp_ready;
    logic [31:0] exp_data;
    hsel = 4'b0001; htrans = 2'b10; readyout = '1; owner = '0;
    for (int i = 0; i < 4; i++) s_rdata[i] = $urandom;
    @(posedge clk); #1;
    checks++; if (!(hready && hrdata == 0)) failures++;
    rstn = 1'b1;
    repeat (3000) begin
      @(posedge clk);
      if (hready) owner = htrans[1] ? hsel : 4'b0000;
      #1;
      hsel     = 4'(1 << $urandom_range(3));
      htrans   = 2'($urandom_range(3));
      readyout = 4'($urandom_range(15));
      for (int i = 0; i < 4; i++) s_rdata[i] = $urandom;
      #1;
      exp_ready = 1'b1; exp_data = '0;
      for (int i = 0; i < 4; i++) if (owner[i]) begin exp_ready = readyout[i]; exp_data = s_rdata[i]; end
      checks++;
      if (hready !== exp_ready || hrdata !== exp_data) begin
        failures++;
        $display("FAIL owner=%b got %b/%h", owner, hready, hrdata);
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
