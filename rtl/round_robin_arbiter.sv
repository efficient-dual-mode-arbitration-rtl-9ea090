// Round robin arbiter for three AHB masters, built on priority counters.
//
// A four-state machine, IDLE (00), M1_RR (01), M2_RR (10), M3_RR (11), plus
// one 2-bit priority counter per master. As in the design's round robin
// state diagram, the requests are registered first (hbusreq_a), a master in
// its state is granted only when its priority counter is 11, the machine stays
// with a granted master while that master's HTRANS is not IDLE, and it moves
// straight from one master state to another whose master requests with a
// counter of 11, or back to IDLE when HTRANS is IDLE and nobody else is due.
// A served master's counter drops to the bottom (00) and the counters of the
// masters that wait climb, so every requester reaches 11 in turn.
//
// Design choices of this implementation (the diagram does not fix them):
//  * A counter climbs by one per cycle while its master requests and is not
//    being served, and stops at 11; it is cleared when its master's service
//    ends (the machine leaves that master's state after granting it).
//  * From IDLE the machine goes to a requester whose counter is 11, else to
//    any requester; ties are broken in the cyclic order M1 -> M2 -> M3 -> M1,
//    starting after the master served last. The same order picks the next
//    master when several are due on leaving a master state.
//  * In a master state whose counter is not yet 11 the machine waits there
//    while that master still requests and its HTRANS is not IDLE, unless
//    another requester is due.
//  * 'enable' (arbiter_mode == 1 and the fixed priority arbiter idle, formed
//    by the parent) only gates starting a new service; a granted burst is
//    always finished.
//  * Reset is synchronous, active low, and clears every register.
//
// Timing: hgrant/hmaster are decoded from the state and counter registers.
// A lone requester whose counter starts at 00 and whose request is high at
// rising edge k is granted after edge k+3: its registered request counts the
// counter to 01, 10, 11 on edges k+1..k+3 while the state leaves IDLE at k+1.
module round_robin_arbiter
  import ahb_arb_pkg::*;
(
  input  logic                              hclk,
  input  logic                              hresetn,
  input  logic                              enable,
  input  logic [NUM_MASTERS-1:0]            hbusreq,   // bit 0 = HBUSREQ1
  input  logic [NUM_MASTERS-1:0][1:0]       htrans,    // [0] = HTRANS_M1
  output logic [NUM_MASTERS-1:0]            hgrant,    // hgrant1_RR..hgrant3_RR
  output logic [HMASTER_W-1:0]              hmaster,   // hmaster_RR
  output logic                              idle,
  output logic [NUM_MASTERS-1:0][1:0]       priority_cnt  // M1_priority..M3_priority
);

  logic [NUM_MASTERS-1:0]      hbusreq_a;
  logic [NUM_MASTERS-1:0][1:0] prio, prio_next;
  arb_state_e                  state, next_state, last_q;

  logic [NUM_MASTERS-1:0] due;        // requesting with counter 11
  logic [NUM_MASTERS-1:0] due_other;  // due, current master excluded
  logic [1:0]             cur;        // index of the current master state
  logic                   granted;

  always_comb begin
    for (int i = 0; i < NUM_MASTERS; i++) due[i] = hbusreq_a[i] && (prio[i] == 2'b11);
    cur       = 2'(state) - 2'd1;
    granted   = (state != ST_IDLE) && (prio[cur] == 2'b11);
    due_other = due;
    if (state != ST_IDLE) due_other[cur] = 1'b0;
  end

  always_comb begin
    next_state = state;
    if (state == ST_IDLE) begin
      if (enable && (|hbusreq_a))
        next_state = (|due) ? rr_pick(due, last_q) : rr_pick(hbusreq_a, last_q);
    end else if (granted && htrans[cur] != HTRANS_IDLE) begin
      next_state = state;
    end else if (enable && (|due_other)) begin
      next_state = rr_pick(due_other, state);
    end else if (!granted && enable && hbusreq_a[cur] && htrans[cur] != HTRANS_IDLE) begin
      next_state = state;
    end else begin
      next_state = ST_IDLE;
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_MASTERS; i++) begin
      prio_next[i] = prio[i];
      if (granted && cur == 2'(i) && next_state != state)
        prio_next[i] = 2'b00;
      else if (hbusreq_a[i] && prio[i] != 2'b11)
        prio_next[i] = prio[i] + 2'b01;
    end
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      hbusreq_a <= '0;
      state     <= ST_IDLE;
      last_q    <= ST_IDLE;
      prio      <= '0;
    end else begin
      hbusreq_a <= hbusreq;
      state     <= next_state;
      prio      <= prio_next;
      if (granted) last_q <= state;
    end
  end

  always_comb begin
    hgrant = '0;
    if (granted) hgrant[cur] = 1'b1;
  end

  assign hmaster      = granted ? HMASTER_W'(state) : '0;
  assign idle         = (state == ST_IDLE);
  assign priority_cnt = prio;

endmodule
