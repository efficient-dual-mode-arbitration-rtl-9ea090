// Testbench of ahb_decoder: for random addresses the select must be one-hot
// and name slave HADDR[31:30] + 1.
module tb_ahb_decoder;
  logic [31:0] haddr;
  logic [3:0]  hsel;
  int checks = 0, failures = 0;

  ahb_decoder dut (.haddr(haddr), .hsel(hsel));

  initial begin
    repeat (4000) begin
      haddr = $urandom;
      #1;
      checks++;
      if (hsel !== 4'(1 << haddr[31:30])) begin
        failures++;
        $display("FAIL haddr=%h hsel=%b", haddr, hsel);
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
