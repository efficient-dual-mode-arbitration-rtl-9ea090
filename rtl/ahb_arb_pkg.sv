// Shared types and constants of the three-master AHB system with a dual mode
// arbiter.
//
// The transfer-type codes are the AHB ones (IDLE 00, BUSY 01, NONSEQ 10,
// SEQ 11). The arbiter state codes are those of the two arbitration state
// machines: IDLE 00, M1 01, M2 10, M3 11. They are chosen so that the state
// code of a master state equals the master number, which is also the value the
// arbiter puts on HMASTER[3:0] (0000 when no master is granted).
// The address/control bundle carries the AHB address-phase signals of one
// master; its field widths (32-bit address, 3-bit HSIZE and HBURST, 4-bit
// HPROT) are the AHB ones.
package ahb_arb_pkg;

  localparam int unsigned NUM_MASTERS = 3;   // M1, M2, M3
  localparam int unsigned HMASTER_W   = 4;   // HMASTER[3:0]
  localparam int unsigned ADDR_W      = 32;  // HADDR[31:0]

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    ST_IDLE = 2'b00,
    ST_M1   = 2'b01,
    ST_M2   = 2'b10,
    ST_M3   = 2'b11
  } arb_state_e;

  // Address and control of one AHB address phase.
  typedef struct packed {
    logic [1:0]        htrans;
    logic [ADDR_W-1:0] haddr;
    logic              hwrite;
    logic [2:0]        hsize;
    logic [2:0]        hburst;
    logic [3:0]        hprot;
  } ahb_ctrl_t;

  // First master, in the cyclic order M1 -> M2 -> M3 -> M1, that comes after
  // master 'after' (ST_IDLE is taken as "after M3", so the search starts at
  // M1) and whose bit in 'cand' is set. ST_IDLE when no bit is set.
  function automatic arb_state_e rr_pick(input logic [NUM_MASTERS-1:0] cand,
                                         input arb_state_e after);
    logic [1:0] m;
    arb_state_e pick;
    m    = (after == ST_IDLE) ? 2'd3 : 2'(after);
    pick = ST_IDLE;
    for (int k = 0; k < NUM_MASTERS; k++) begin
      m = (m == 2'd3) ? 2'd1 : m + 2'd1;
      if (pick == ST_IDLE && cand[m - 2'd1]) pick = arb_state_e'(m);
    end
    return pick;
  endfunction

endpackage
