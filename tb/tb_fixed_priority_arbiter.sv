// Testbench of fixed_priority_arbiter.
// Directed part: grant latency (two rising edges from a request), priority
// M1 > M2 > M3, a granted burst is not cut by a higher-priority request,
// return through IDLE, no grant while disabled. Random part: three master
// models issue bursts and the grant is compared every cycle with a
// behavioural reference model.
module tb_fixed_priority_arbiter;
  import ahb_arb_pkg::*;

  logic clk = 1'b0, rstn = 1'b0, en;
  logic [2:0] req, d_req, b_req, grant;
  logic [2:0][1:0] trans, d_trans;
  logic [3:0] hmaster;
  logic idle, directed;
  ahb_ctrl_t b_ctrl [3];
  logic [31:0] b_wdata [3];
  int unsigned bursts [3], beats [3], rchk [3], errs [3], waits [3];
  int fp_m, rr_m, out_m, prio [3];
  int checks = 0, failures = 0, cycles = 0;

  always #5 clk = !clk;
  always @(posedge clk) cycles <= cycles + 1;

  assign req   = directed ? d_req : b_req;
  assign trans = directed ? d_trans : {b_ctrl[2].htrans, b_ctrl[1].htrans, b_ctrl[0].htrans};

  fixed_priority_arbiter dut (
    .hclk(clk), .hresetn(rstn), .enable(en), .hbusreq(req), .htrans(trans),
    .hgrant(grant), .hmaster(hmaster), .idle(idle));

  for (genvar i = 0; i < 3; i++) begin : g_m
    ahb_master_bfm #(.ID(i+1), .CHECK_DATA(1'b0)) bfm (
      .hclk(clk), .hresetn(rstn), .start_ok(!directed), .req_pct(30), .grant(grant[i]),
      .hready(1'b1), .hrdata(32'h0), .busreq(b_req[i]), .ctrl(b_ctrl[i]), .wdata(b_wdata[i]),
      .bursts(bursts[i]), .beats(beats[i]), .reads_checked(rchk[i]), .errors(errs[i]),
      .wait_cycles(waits[i]));
  end

  ref_arbiters #(.REGISTERED(1'b0)) ref_m (
    .clk(clk), .rstn(rstn), .fp_en_in(en), .rr_en_in(1'b0), .mode(1'b0), .req(req),
    .trans(trans), .fp_master(fp_m), .rr_master(rr_m), .out_master(out_m), .prio(prio));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s: grant=%b hmaster=%0d", $time, what, grant, hmaster);
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
    directed = 1'b1; en = 1'b1; d_req = '0; d_trans = '0;
    step(3); rstn = 1'b1; step(2);
    check(grant == 3'b000 && hmaster == 0 && idle, "idle after reset");
    // M2 alone: granted after exactly two rising edges
    d_req = 3'b010; d_trans[1] = HTRANS_NONSEQ;
    step(1); check(grant == 3'b000, "no grant after one edge");
    step(1); check(grant == 3'b010 && hmaster == 4'd2, "M2 granted after two edges");
    // M1 requests while M2 bursts: M2 keeps the bus
    d_req[0] = 1'b1; d_trans[0] = HTRANS_NONSEQ; d_trans[1] = HTRANS_SEQ;
    for (int k = 0; k < 5; k++) begin step(1); check(grant == 3'b010, "M2 keeps bus"); end
    d_trans[1] = HTRANS_BUSY; step(1); check(grant == 3'b010, "BUSY keeps bus");
    d_trans[1] = HTRANS_IDLE; d_req[1] = 1'b0;
    step(1); check(grant == 3'b000 && idle, "back to IDLE");
    step(1); check(grant == 3'b001 && hmaster == 4'd1, "M1 next");
    // all three pending when M1 ends: M2 beats M3
    d_req = 3'b111; d_trans = {HTRANS_NONSEQ, HTRANS_NONSEQ, HTRANS_IDLE}; d_req[0] = 1'b0;
    step(1); check(grant == 3'b000, "M1 released");
    step(1); check(grant == 3'b010, "M2 before M3");
    d_trans[1] = HTRANS_IDLE; d_req[1] = 1'b0;
    step(2); check(grant == 3'b100 && hmaster == 4'd3, "M3 last");
    d_trans[2] = HTRANS_IDLE; d_req[2] = 1'b0;
    // disabled: no new service
    en = 1'b0; d_req = 3'b001; d_trans[0] = HTRANS_NONSEQ;
    for (int k = 0; k < 5; k++) begin step(1); check(grant == 3'b000, "disabled"); end
    en = 1'b1; step(2); check(grant == 3'b001, "enabled again");
    d_req = '0; d_trans = '0; step(3);
    // random bursts against the reference model
    rstn = 1'b0; step(2); rstn = 1'b1; directed = 1'b0;
    repeat (4000) begin
      step(1);
      check(grant == onehot(fp_m) && hmaster == 4'(fp_m), "matches reference");
      check(idle == (hmaster == 0), "idle flag");
    end
    for (int i = 0; i < 3; i++) begin
      check(bursts[i] > 20, $sformatf("M%0d served", i + 1));
      check(errs[i] == 0, $sformatf("M%0d burst kept", i + 1));
    end
    $display("bursts M1=%0d M2=%0d M3=%0d", bursts[0], bursts[1], bursts[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
