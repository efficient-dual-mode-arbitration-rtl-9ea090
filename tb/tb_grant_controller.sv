// Testbench of grant_controller: random grant sets from the two arbiters
// (each one-hot with its master number, either or both present) and a
// check that the outputs carry the granting arbiter's set one edge later,
// round robin first, and clear on reset.
module tb_grant_controller;
  import ahb_arb_pkg::*;

  logic clk = 1'b0, rstn = 1'b0;
  logic [2:0] gfp, grr, hgrant, exp_g;
  logic [3:0] mfp, mrr, hmaster, exp_m;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  grant_controller dut (
    .hclk(clk), .hresetn(rstn), .grant_fp(gfp), .hmaster_fp(mfp), .grant_rr(grr),
    .hmaster_rr(mrr), .hgrant(hgrant), .hmaster(hmaster));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: got %b/%0d expected %b/%0d", what, hgrant, hmaster, exp_g, exp_m);
    end
  endtask

  initial begin
    int f, r;
    gfp = '0; grr = '0; mfp = '0; mrr = '0;
    repeat (2) @(posedge clk);
    #1; check(hgrant == 0 && hmaster == 0, "reset");
    rstn = 1'b1;
    repeat (2000) begin
      f = $urandom_range(3);
      r = ($urandom_range(3) == 0) ? int'($urandom_range(3)) : 0;
      gfp = (f == 0) ? 3'b000 : 3'(1 << (f - 1)); mfp = 4'(f);
      grr = (r == 0) ? 3'b000 : 3'(1 << (r - 1)); mrr = 4'(r);
      exp_g = (r != 0) ? grr : gfp;
      exp_m = (r != 0) ? 4'(r) : 4'(f);
      @(posedge clk); #1;
      check(hgrant == exp_g && hmaster == exp_m, "registered selection");
      gfp = 3'b001; mfp = 4'd1; grr = '0; mrr = '0;
      #1; check(hgrant == exp_g && hmaster == exp_m, "held until the next edge");
    end
    rstn = 1'b0; @(posedge clk); #1;
    check(hgrant == 0 && hmaster == 0, "synchronous reset");
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
