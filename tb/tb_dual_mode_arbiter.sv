// Testbench of dual_mode_arbiter.
// Directed part: in fixed priority mode a request is granted three rising
// edges after it is raised (request register, state register, grant
// register), M1 wins over M3; a mode change during a burst leaves the burst
// alone and the other scheme takes over after it; in round robin mode the
// grant waits for the priority counter. Random part: three master models
// issue bursts while arbiter_mode flips at random; HGRANT1..3 and HMASTER are
// compared every cycle with a behavioural reference model of both schemes,
// the interlock and the grant register.
module tb_dual_mode_arbiter;
  import ahb_arb_pkg::*;

  logic clk = 1'b0, rstn = 1'b0, mode;
  logic [2:0] req, d_req, b_req, grant;
  logic [2:0][1:0] trans, d_trans;
  logic [3:0] hmaster;
  logic directed;
  ahb_ctrl_t b_ctrl [3];
  logic [31:0] b_wdata [3];
  int unsigned bursts [3], beats [3], rchk [3], errs [3], waits [3];
  int fp_m, rr_m, out_m, prio [3];
  int checks = 0, failures = 0, switches = 0, switch_in_burst = 0;

  always #5 clk = !clk;

  assign req   = directed ? d_req : b_req;
  assign trans = directed ? d_trans : {b_ctrl[2].htrans, b_ctrl[1].htrans, b_ctrl[0].htrans};

  dual_mode_arbiter dut (
    .HCLK(clk), .HRESETn(rstn), .HBUSREQ1(req[0]), .HBUSREQ2(req[1]), .HBUSREQ3(req[2]),
    .HTRANS_M1(trans[0]), .HTRANS_M2(trans[1]), .HTRANS_M3(trans[2]), .arbiter_mode(mode),
    .HGRANT1(grant[0]), .HGRANT2(grant[1]), .HGRANT3(grant[2]), .HMASTER(hmaster));

  for (genvar i = 0; i < 3; i++) begin : g_m
    ahb_master_bfm #(.ID(i+1), .CHECK_DATA(1'b0)) bfm (
      .hclk(clk), .hresetn(rstn), .start_ok(!directed), .req_pct(40), .grant(grant[i]),
      .hready(1'b1), .hrdata(32'h0), .busreq(b_req[i]), .ctrl(b_ctrl[i]), .wdata(b_wdata[i]),
      .bursts(bursts[i]), .beats(beats[i]), .reads_checked(rchk[i]), .errors(errs[i]),
      .wait_cycles(waits[i]));
  end

  ref_arbiters #(.REGISTERED(1'b1)) ref_m (
    .clk(clk), .rstn(rstn), .fp_en_in(1'b0), .rr_en_in(1'b0), .mode(mode), .req(req),
    .trans(trans), .fp_master(fp_m), .rr_master(rr_m), .out_master(out_m), .prio(prio));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s: grant=%b hmaster=%0d ref=%0d", $time, what, grant, hmaster, out_m);
    end
  endtask

  function automatic logic [2:0] onehot(input int m);
    return (m == 0) ? 3'b000 : 3'(1 << (m - 1));
  endfunction

  task automatic step(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    directed = 1'b1; mode = 1'b0; d_req = '0; d_trans = '0;
    step(3); rstn = 1'b1; step(2);
    // fixed priority: M3 and M1 together, M1 first, three edges
    d_req = 3'b101; d_trans = {HTRANS_NONSEQ, HTRANS_IDLE, HTRANS_NONSEQ};
    step(2); check(grant == 0, "not before the third edge");
    step(1); check(grant == 3'b001 && hmaster == 4'd1, "M1 after three edges");
    // switch to round robin in the middle of M1's burst
    mode = 1'b1; d_trans[0] = HTRANS_SEQ;
    step(4); check(grant == 3'b001, "burst survives the mode change");
    d_trans[0] = HTRANS_IDLE; d_req[0] = 1'b0;
    // M3's counter is already 11: round robin hands the bus to it
    step(3); check(grant == 3'b100 && hmaster == 4'd3, "round robin takes over");
    d_trans[2] = HTRANS_IDLE; d_req[2] = 1'b0;
    step(3); check(grant == 0 && hmaster == 0, "released");
    // round robin: a fresh request waits for its counter (1 + 3 edges, + grant register)
    d_req = 3'b010; d_trans[1] = HTRANS_NONSEQ;
    step(4); check(grant == 0, "counter still climbing");
    step(1); check(grant == 3'b010 && hmaster == 4'd2, "M2 granted in round robin");
    d_req = '0; d_trans = '0; step(4);
    // random bursts with random mode changes
    rstn = 1'b0; step(2); rstn = 1'b1; directed = 1'b0;
    repeat (8000) begin
      step(1);
      check(grant == onehot(out_m) && hmaster == 4'(out_m), "matches reference");
      if ($urandom_range(59) == 0) begin
        mode = !mode;
        switches++;
        if (hmaster != 0) switch_in_burst++;
      end
    end
    for (int i = 0; i < 3; i++) begin
      check(errs[i] == 0, $sformatf("M%0d burst kept", i + 1));
      check(bursts[i] > 50, $sformatf("M%0d served", i + 1));
    end
    check(switches > 20, "mode changes");
    check(switch_in_burst > 5, "mode changes during a burst");
    $display("bursts M1=%0d M2=%0d M3=%0d switches=%0d in burst=%0d",
             bursts[0], bursts[1], bursts[2], switches, switch_in_burst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
