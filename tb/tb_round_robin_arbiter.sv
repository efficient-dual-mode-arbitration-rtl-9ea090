// Testbench of round_robin_arbiter.
// Directed part: a lone requester is granted once its counter has climbed
// to 11 (four rising edges after the request), the served master's counter
// drops to 00, three masters that keep requesting are served in turn
// M1, M2, M3, M1, ... with direct hand-over, no new service while disabled.
// Random part: three master models issue bursts and grant, master number and
// counters are compared every cycle with a behavioural reference model.
module tb_round_robin_arbiter;
  import ahb_arb_pkg::*;

  logic clk = 1'b0, rstn = 1'b0, en;
  logic [2:0] req, d_req, b_req, grant;
  logic [2:0][1:0] trans, d_trans, pcnt;
  logic [3:0] hmaster;
  logic idle, directed;
  int unsigned pct;
  ahb_ctrl_t b_ctrl [3];
  logic [31:0] b_wdata [3];
  int unsigned bursts [3], beats [3], rchk [3], errs [3], waits [3];
  int fp_m, rr_m, out_m, prio [3];
  int checks = 0, failures = 0;
  int handovers = 0;
  int unsigned b0 [3];
  logic [3:0] hm_q;

  always #5 clk = !clk;

  assign req   = directed ? d_req : b_req;
  assign trans = directed ? d_trans : {b_ctrl[2].htrans, b_ctrl[1].htrans, b_ctrl[0].htrans};

  round_robin_arbiter dut (
    .hclk(clk), .hresetn(rstn), .enable(en), .hbusreq(req), .htrans(trans),
    .hgrant(grant), .hmaster(hmaster), .idle(idle), .priority_cnt(pcnt));

  for (genvar i = 0; i < 3; i++) begin : g_m
    ahb_master_bfm #(.ID(i+1), .CHECK_DATA(1'b0)) bfm (
      .hclk(clk), .hresetn(rstn), .start_ok(!directed), .req_pct(pct), .grant(grant[i]),
      .hready(1'b1), .hrdata(32'h0), .busreq(b_req[i]), .ctrl(b_ctrl[i]), .wdata(b_wdata[i]),
      .bursts(bursts[i]), .beats(beats[i]), .reads_checked(rchk[i]), .errors(errs[i]),
      .wait_cycles(waits[i]));
  end

  ref_arbiters #(.REGISTERED(1'b0)) ref_m (
    .clk(clk), .rstn(rstn), .fp_en_in(1'b0), .rr_en_in(en), .mode(1'b1), .req(req),
    .trans(trans), .fp_master(fp_m), .rr_master(rr_m), .out_master(out_m), .prio(prio));

  // direct hand-overs from one master to another
  always @(posedge clk) begin
    hm_q <= hmaster;
    if (rstn && hmaster != 0 && hm_q != 0 && hmaster != hm_q) handovers++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s: grant=%b hmaster=%0d cnt=%b", $time, what, grant, hmaster, pcnt);
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
    directed = 1'b1; en = 1'b1; d_req = '0; d_trans = '0; pct = 0;
    step(3); rstn = 1'b1; step(2);
    check(grant == 3'b000 && pcnt == '0, "reset");
    // M1 alone: counter climbs 01, 10, 11; granted after the fourth edge
    d_req = 3'b001; d_trans[0] = HTRANS_NONSEQ;
    step(1); check(grant == 0 && pcnt[0] == 2'b00, "edge 1");
    step(1); check(grant == 0 && pcnt[0] == 2'b01 && !idle, "edge 2");
    step(1); check(grant == 0 && pcnt[0] == 2'b10, "edge 3");
    step(1); check(grant == 3'b001 && hmaster == 4'd1 && pcnt[0] == 2'b11, "M1 granted at 11");
    // M2 and M3 request while M1 bursts; M1 keeps the bus
    d_req = 3'b111; d_trans = {HTRANS_NONSEQ, HTRANS_NONSEQ, HTRANS_SEQ};
    step(4); check(grant == 3'b001 && pcnt[1] == 2'b11 && pcnt[2] == 2'b11, "M1 keeps, others due");
    // M1 ends and requests again at once: hand-over straight to M2, M1's counter to 00
    d_trans[0] = HTRANS_IDLE;
    step(1); check(grant == 3'b010 && hmaster == 4'd2 && pcnt[0] == 2'b00, "hand-over to M2");
    d_trans[0] = HTRANS_NONSEQ;
    d_trans[1] = HTRANS_IDLE; step(1); check(grant == 3'b100 && hmaster == 4'd3, "then M3");
    d_trans[1] = HTRANS_NONSEQ;
    step(1); check(pcnt[0] == 2'b10 && grant == 3'b100, "M1 climbing");
    step(1); check(pcnt[0] == 2'b11 && grant == 3'b100, "M1 due again");
    d_trans[2] = HTRANS_IDLE; step(1); check(grant == 3'b001, "then M1 again");
    d_req = '0; d_trans = '0;
    step(3); check(grant == 0 && idle, "all released");
    // disabled: no new service
    en = 1'b0; d_req = 3'b100; d_trans[2] = HTRANS_NONSEQ;
    for (int k = 0; k < 6; k++) begin step(1); check(grant == 3'b000, "disabled"); end
    en = 1'b1; step(2); check(grant == 3'b100, "enabled again, already due");
    d_req = '0; d_trans = '0; step(3);
    // random bursts against the reference model, light then heavy load
    rstn = 1'b0; step(2); rstn = 1'b1; directed = 1'b0; handovers = 0;
    for (int ph = 0; ph < 2; ph++) begin
      pct = (ph == 0) ? 20 : 100;
      b0  = bursts;
      repeat (3000) begin
        step(1);
        check(grant == onehot(rr_m) && hmaster == 4'(rr_m), "matches reference");
        for (int i = 0; i < 3; i++) check(pcnt[i] == 2'(prio[i]), "counter matches reference");
      end
    end
    for (int i = 0; i < 3; i++) check(errs[i] == 0, $sformatf("M%0d burst kept", i + 1));
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        check(bursts[i] - b0[i] + 2 >= bursts[j] - b0[j], "fair share under full load");
    check(handovers > 10, "direct hand-overs seen");
    $display("bursts M1=%0d M2=%0d M3=%0d handovers=%0d", bursts[0], bursts[1], bursts[2], handovers);
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
