// Request-order sweep of dual_mode_arbiter: the three masters ask for the
// bus alone, in pairs and all three, simultaneously or one cycle apart in
// every order (each request rising at a rising edge), in fixed priority mode and in round robin mode, starting from
// reset each time. Each master makes one 3-transfer burst when granted.
// Expected service order, worked out from the two schemes' rules:
//   fixed priority: the first to ask is served first, then the rest by
//     number (M1 before M2 before M3); asking together, by number.
//   round robin: the first to ask is served first; after each service the
//     next is the first waiting master in the order M1 -> M2 -> M3 -> M1
//     after the one just served; asking together, M1's side starts.
// The testbench also checks that every master is served exactly once, that
// no burst loses its grant, and the hand-over time: when a burst's last
// transfer is on the bus in cycle c, the next master's first transfer is on
// the bus in cycle c+4 in fixed priority mode and c+3 in round robin mode.
module tb_request_orders;
  import ahb_arb_pkg::*;

  logic clk = 1'b0, rstn = 1'b0, mode = 1'b0;
  logic [2:0] req, grant, done, want;
  logic [2:0][1:0] trans;
  logic [3:0] hmaster, hm_q;
  int beats_left [3];
  int order [$];
  int checks = 0, failures = 0, scenarios = 0;
  int cyc = 0, last_cycle = -1;   // cycle of the latest final transfer
  int gap_fp = 0, gap_rr = 0;     // hand-overs measured

  always #5 clk = !clk;

  dual_mode_arbiter dut (
    .HCLK(clk), .HRESETn(rstn), .HBUSREQ1(req[0]), .HBUSREQ2(req[1]), .HBUSREQ3(req[2]),
    .HTRANS_M1(trans[0]), .HTRANS_M2(trans[1]), .HTRANS_M3(trans[2]), .arbiter_mode(mode),
    .HGRANT1(grant[0]), .HGRANT2(grant[1]), .HGRANT3(grant[2]), .HMASTER(hmaster));

  // the three masters: one burst of three transfers each
  // cycle n lies between rising edges n and n+1
  always @(posedge clk) begin
    cyc <= cyc + 1;
    hm_q <= hmaster;
    if (rstn && hmaster != 0 && hm_q != hmaster) begin
      order.push_back(int'(hmaster));
      // sampled before this edge's update: hmaster changed one edge earlier,
      // so the new owner's first transfer is in cycle cyc-1
      if (last_cycle >= 0 && order.size() > 1) begin
        checks++;
        if (cyc - 1 - last_cycle != (mode ? 3 : 4)) begin
          failures++;
          $display("FAIL mode=%0d hand-over: last transfer cycle %0d, next owner from cycle %0d",
                   mode, last_cycle, cyc - 1);
        end
        if (mode) gap_rr++; else gap_fp++;
      end
    end
    for (int i = 0; i < 3; i++)
      if (!rstn) begin
        req[i] <= 1'b0; trans[i] <= HTRANS_IDLE; done[i] <= 1'b0;
      end else if (want[i] && !req[i] && !done[i]) begin
        beats_left[i] = 3;
        req[i]   <= 1'b1;
        trans[i] <= HTRANS_NONSEQ;
      end else if (req[i] && grant[i]) begin
        beats_left[i] = beats_left[i] - 1;
        trans[i] <= HTRANS_SEQ;
        if (beats_left[i] == 0) begin
          last_cycle = cyc - 1;
          req[i]   <= 1'b0;
          trans[i] <= HTRANS_IDLE;
          done[i]  <= 1'b1;
        end
      end else if (done[i] == 1'b0 && trans[i] == HTRANS_SEQ && !grant[i]) begin
        failures++;
        $display("FAIL M%0d lost the grant inside its burst", i + 1);
      end
  end

  task automatic ask(input int m);
    want[m-1] = 1'b1;
  endtask

  task automatic run(input bit md, input int seq [$], input bit together);
    int exp [$];
    int waiting [$];
    int prev;
    scenarios++;
    rstn = 1'b0; mode = md; order.delete(); want = '0; last_cycle = -1;
    repeat (2) @(posedge clk);
    rstn = 1'b1;
    @(negedge clk);
    foreach (seq[k]) begin
      ask(seq[k]);
      if (!together) @(negedge clk);
    end
    repeat (60) @(posedge clk);
    // expected order
    if (together) begin
      waiting = seq;
      waiting.sort();
      exp.push_back(waiting.pop_front());
    end else begin
      exp.push_back(seq[0]);
      waiting = seq;
      void'(waiting.pop_front());
      waiting.sort();
    end
    while (waiting.size() != 0) begin
      if (!md) begin
        exp.push_back(waiting.pop_front());
      end else begin
        prev = exp[$];
        for (int k = 1; k <= 3; k++) begin
          int cand;
          int idx [$];
          cand = ((prev - 1 + k) % 3) + 1;
          idx  = waiting.find_first_index(x) with (x == cand);
          if (idx.size() != 0) begin
            exp.push_back(cand);
            waiting.delete(idx[0]);
            break;
          end
        end
      end
    end
    checks++;
    if (order != exp) begin
      failures++;
      $display("FAIL mode=%0d asked=%p together=%0d served=%p expected=%p", md, seq, together, order, exp);
    end
    checks++;
    if (req != 0 || hmaster != 0) begin
      failures++;
      $display("FAIL mode=%0d asked=%p: not finished", md, seq);
    end
  endtask

  initial begin
    int perms [6][3] = '{'{1,2,3}, '{1,3,2}, '{2,1,3}, '{2,3,1}, '{3,1,2}, '{3,2,1}};
    int s [$];
    want = '0;
    for (int md = 0; md < 2; md++) begin
      for (int a = 1; a <= 3; a++) begin
        s = '{a}; run(md[0], s, 1'b0);
      end
      for (int a = 1; a <= 3; a++)
        for (int b = 1; b <= 3; b++)
          if (a != b) begin
            s = '{a, b}; run(md[0], s, 1'b0);
            if (a < b) run(md[0], s, 1'b1);
          end
      for (int p = 0; p < 6; p++) begin
        s = '{perms[p][0], perms[p][1], perms[p][2]}; run(md[0], s, 1'b0);
      end
      s = '{1, 2, 3}; run(md[0], s, 1'b1);
    end
    $display("scenarios=%0d hand-overs timed: fixed %0d, round robin %0d", scenarios, gap_fp, gap_rr);
    checks++;
    if (gap_fp == 0 || gap_rr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
