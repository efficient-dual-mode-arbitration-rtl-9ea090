// Fixed priority arbiter for three AHB masters.
//
// A four-state machine, IDLE (00), M1_FP (01), M2_FP (10), M3_FP (11). The
// bus requests are first registered (hbusreq_a). From IDLE the machine goes to
// M1_FP when M1 requests, else to M2_FP when M2 requests, else to M3_FP when
// M3 requests: M1 has the highest priority and M3 the lowest. In a master
// state it stays while that master's HTRANS is not IDLE (BUSY, NONSEQ or SEQ)
// and returns to IDLE when it is IDLE, so a burst in progress is never cut
// short by a request of higher priority. These states, their codes and the
// transition conditions are those of the fixed priority state diagram of the
// design.
//
// Design choices of this implementation: 'enable' (arbiter_mode == 0 and the
// round robin arbiter idle, formed by the parent) only gates leaving IDLE, so
// a burst granted before a mode change is finished; the grant and master
// number are decoded from the state register (Moore outputs) and the parent
// registers them once more. Reset is synchronous and active low and clears all
// registers.
//
// Timing: a request high at rising edge k is in hbusreq_a after k, the state
// changes at k+1 and hgrant/hmaster follow the state in the same cycle.
module fixed_priority_arbiter
  import ahb_arb_pkg::*;
(
  input  logic                              hclk,
  input  logic                              hresetn,
  input  logic                              enable,
  input  logic [NUM_MASTERS-1:0]            hbusreq,   // bit 0 = HBUSREQ1
  input  logic [NUM_MASTERS-1:0][1:0]       htrans,    // [0] = HTRANS_M1
  output logic [NUM_MASTERS-1:0]            hgrant,    // hgrant1_FP..hgrant3_FP
  output logic [HMASTER_W-1:0]              hmaster,   // hmaster_FP
  output logic                              idle
);

  logic [NUM_MASTERS-1:0] hbusreq_a;
  arb_state_e             state, next_state;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      hbusreq_a <= '0;
      state     <= ST_IDLE;
    end else begin
      hbusreq_a <= hbusreq;
      state     <= next_state;
    end
  end

  always_comb begin
    next_state = state;
    unique case (state)
      ST_IDLE: begin
        if (enable) begin
          if      (hbusreq_a[0]) next_state = ST_M1;
          else if (hbusreq_a[1]) next_state = ST_M2;
          else if (hbusreq_a[2]) next_state = ST_M3;
        end
      end
      ST_M1: if (htrans[0] == HTRANS_IDLE) next_state = ST_IDLE;
      ST_M2: if (htrans[1] == HTRANS_IDLE) next_state = ST_IDLE;
      ST_M3: if (htrans[2] == HTRANS_IDLE) next_state = ST_IDLE;
    endcase
  end

  always_comb begin
    hgrant = '0;
    if (state != ST_IDLE) hgrant[2'(state) - 2'd1] = 1'b1;
  end

  assign hmaster = HMASTER_W'(state);
  assign idle    = (state == ST_IDLE);

endmodule
