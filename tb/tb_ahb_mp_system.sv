// End-to-end testbench of ahb_mp_system at its default parameters (32-bit
// data, four slaves).
// Three master models issue random read and write bursts to four memory
// slaves with random wait states while arbiter_mode flips now and then. Each
// master checks every read against what it wrote, and reports a grant lost
// inside a burst. The testbench checks every cycle that at most one grant is
// high and that it agrees with HMASTER, that the bus carries the address of
// the master named by HMASTER, and at the end that every transfer reached a
// slave. It counts how often each mechanism of the design occurred and fails
// if one never did: fixed priority choosing among several requesters, a
// higher-priority master held off by a burst in progress, round robin hand-over
// straight from one master to another, a mode change during a burst, BUSY
// cycles inside a burst, and slave wait states.
module tb_ahb_mp_system;
  import ahb_arb_pkg::*;

  localparam int CYCLES = 20000;

  logic clk = 1'b0, rstn = 1'b0, mode = 1'b0, stop = 1'b0;
  logic [2:0] busreq, grant;
  ahb_ctrl_t m_ctrl [3];
  logic [31:0] m_wdata [3];
  logic [3:0] hmaster, hm_q, s_sel, readyout;
  logic [31:0] hrdata, s_wdata;
  logic [31:0] s_rdata [4];
  logic hready;
  ahb_ctrl_t s_ctrl;
  int unsigned bursts [3], beats [3], rchk [3], errs [3], waits [3], xfers [4];
  int checks = 0, failures = 0;
  int n_fp_choice = 0, n_fp_hold = 0, n_rr_handover = 0, n_switch_burst = 0;
  int n_busy = 0, n_wait = 0, n_rr_grants = 0, n_fp_grants = 0;

  always #5 clk = !clk;

  ahb_mp_system dut (
    .HCLK(clk), .HRESETn(rstn), .arbiter_mode(mode),
    .m_busreq(busreq), .m_ctrl(m_ctrl), .m_wdata(m_wdata), .m_grant(grant),
    .hmaster(hmaster), .hrdata(hrdata), .hready(hready),
    .s_sel(s_sel), .s_ctrl(s_ctrl), .s_wdata(s_wdata), .s_rdata(s_rdata), .s_readyout(readyout));

  for (genvar i = 0; i < 3; i++) begin : g_m
    ahb_master_bfm #(.ID(i+1), .CHECK_DATA(1'b1)) bfm (
      .hclk(clk), .hresetn(rstn), .start_ok(!stop), .req_pct(35), .grant(grant[i]),
      .hready(hready), .hrdata(hrdata), .busreq(busreq[i]), .ctrl(m_ctrl[i]), .wdata(m_wdata[i]),
      .bursts(bursts[i]), .beats(beats[i]), .reads_checked(rchk[i]), .errors(errs[i]),
      .wait_cycles(waits[i]));
  end

  for (genvar s = 0; s < 4; s++) begin : g_s
    ahb_slave_mem #(.MAX_WAIT(2)) mem (
      .hclk(clk), .hresetn(rstn), .hsel(s_sel[s]), .ctrl(s_ctrl), .hready(hready),
      .hwdata(s_wdata), .hrdata(s_rdata[s]), .hreadyout(readyout[s]), .transfers(xfers[s]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s: grant=%b hmaster=%0d", $time, what, grant, hmaster);
    end
  endtask

  // per-cycle checks and mechanism counters
  always @(negedge clk) if (rstn) begin
    check($onehot0(grant), "at most one grant");
    check((hmaster == 0) ? grant == 0 : grant == 3'(1 << (hmaster - 1)), "HMASTER agrees");
    check((hmaster == 0) ? s_ctrl.htrans == HTRANS_IDLE : s_ctrl == m_ctrl[hmaster-1],
          "bus carries the owner's address");
    if (!hready) n_wait++;
    if (s_ctrl.htrans == HTRANS_BUSY) n_busy++;
    if (hmaster != 0 && hm_q != hmaster) begin
      if (mode) n_rr_grants++; else n_fp_grants++;
      if (hm_q != 0 && mode) n_rr_handover++;
    end
    if (!mode && hmaster == 4'd1 && hm_q == 0 && busreq[2:1] != 0) n_fp_choice++;
    if (!mode && hmaster > 1 && busreq[hmaster-2]) n_fp_hold++;
  end
  always @(posedge clk) hm_q <= hmaster;

  initial begin
    int total_beats, total_xfers;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    repeat (CYCLES) begin
      @(posedge clk); #2;
      if ($urandom_range(149) == 0) begin
        mode = !mode;
        if (hmaster != 0) n_switch_burst++;
      end
    end
    // let the masters finish and stop
    stop = 1'b1;
    repeat (200) @(posedge clk);
    total_beats = 0; total_xfers = 0;
    for (int i = 0; i < 3; i++) begin
      total_beats += beats[i];
      check(errs[i] == 0, $sformatf("M%0d: reads correct, bursts kept", i + 1));
      check(rchk[i] > 100, $sformatf("M%0d: reads checked", i + 1));
      check(busreq[i] == 1'b0, $sformatf("M%0d: finished", i + 1));
    end
    for (int s = 0; s < 4; s++) begin
      total_xfers += xfers[s];
      check(xfers[s] > 100, $sformatf("slave %0d used", s + 1));
    end
    check(total_beats == total_xfers, "every transfer reached a slave");
    check(n_fp_grants > 0 && n_rr_grants > 0, "both schemes granted");
    check(n_fp_choice > 0, "fixed priority chose among requesters");
    check(n_fp_hold > 0, "burst held a higher-priority master off");
    check(n_rr_handover > 0, "round robin direct hand-over");
    check(n_switch_burst > 0, "mode change during a burst");
    check(n_busy > 0, "BUSY cycles");
    check(n_wait > 0, "wait states");
    $display("bursts M1=%0d M2=%0d M3=%0d beats=%0d reads checked=%0d",
             bursts[0], bursts[1], bursts[2], total_beats, rchk[0] + rchk[1] + rchk[2]);
    $display("fp grants=%0d rr grants=%0d fp choice=%0d fp hold=%0d rr hand-over=%0d switch in burst=%0d busy=%0d wait=%0d",
             n_fp_grants, n_rr_grants, n_fp_choice, n_fp_hold, n_rr_handover, n_switch_burst, n_busy, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
