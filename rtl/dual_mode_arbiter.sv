// Dual mode AHB arbiter for three masters M1, M2, M3.
//
// One arbiter holding two schemes: with arbiter_mode = 0 the fixed priority
// arbiter (M1 > M2 > M3) decides, with arbiter_mode = 1 the round robin
// arbiter decides, and the grant controller turns the decision of the active
// one into HGRANT1..3 and HMASTER[3:0]. The split into these three sub-blocks,
// the port names and the meaning of arbiter_mode are the design's; the bit is
// meant to come from a firmware-written control register outside this block.
//
// A mode change takes effect without losing a burst (this implementation's
// interlock): the fixed priority arbiter may start a new service only when
// arbiter_mode is 0 and the round robin arbiter is in IDLE, the round robin
// arbiter only when arbiter_mode is 1 and the fixed priority arbiter is in
// IDLE. A master already granted keeps the bus until its HTRANS returns to
// IDLE, whatever the mode.
//
// Interface: HBUSREQx and HTRANS_Mx from each master; HGRANTx to each master;
// HMASTER = 1, 2, 3 for the granted master, 0 when none (with three masters
// HMASTER[3:2] are always 0; the 4-bit width is the AHB one). HREADY is not looked
// at: a master holds HTRANS at a non-IDLE value through wait states.
// Timing: all ports are sampled on the rising edge of HCLK; reset (HRESETn
// low) is synchronous. In fixed priority mode a request that is high at rising
// edge k is granted (HGRANT and HMASTER change) after edge k+2.
module dual_mode_arbiter
  import ahb_arb_pkg::*;
(
  input  logic                 HCLK,
  input  logic                 HRESETn,
  input  logic                 HBUSREQ1,
  input  logic                 HBUSREQ2,
  input  logic                 HBUSREQ3,
  input  logic [1:0]           HTRANS_M1,
  input  logic [1:0]           HTRANS_M2,
  input  logic [1:0]           HTRANS_M3,
  input  logic                 arbiter_mode,
  output logic                 HGRANT1,
  output logic                 HGRANT2,
  output logic                 HGRANT3,
  output logic [HMASTER_W-1:0] HMASTER
);

  logic [NUM_MASTERS-1:0]      hbusreq;
  logic [NUM_MASTERS-1:0][1:0] htrans;
  logic [NUM_MASTERS-1:0]      hgrant_fp, hgrant_rr, hgrant;
  logic [HMASTER_W-1:0]        hmaster_fp, hmaster_rr;
  logic                        fp_idle, rr_idle;
  logic [NUM_MASTERS-1:0][1:0] rr_priority;

  assign hbusreq = {HBUSREQ3, HBUSREQ2, HBUSREQ1};
  assign htrans  = {HTRANS_M3, HTRANS_M2, HTRANS_M1};

  fixed_priority_arbiter u_fixed (
    .hclk    (HCLK),
    .hresetn (HRESETn),
    .enable  (!arbiter_mode && rr_idle),
    .hbusreq (hbusreq),
    .htrans  (htrans),
    .hgrant  (hgrant_fp),
    .hmaster (hmaster_fp),
    .idle    (fp_idle)
  );

  round_robin_arbiter u_round_robin (
    .hclk         (HCLK),
    .hresetn      (HRESETn),
    .enable       (arbiter_mode && fp_idle),
    .hbusreq      (hbusreq),
    .htrans       (htrans),
    .hgrant       (hgrant_rr),
    .hmaster      (hmaster_rr),
    .idle         (rr_idle),
    .priority_cnt (rr_priority)
  );

  grant_controller u_grant_ctrl (
    .hclk       (HCLK),
    .hresetn    (HRESETn),
    .grant_fp   (hgrant_fp),
    .hmaster_fp (hmaster_fp),
    .grant_rr   (hgrant_rr),
    .hmaster_rr (hmaster_rr),
    .hgrant     (hgrant),
    .hmaster    (HMASTER)
  );

  assign {HGRANT3, HGRANT2, HGRANT1} = hgrant;

  // The two schemes never serve at the same time.
  assert property (@(posedge HCLK) disable iff (!HRESETn) fp_idle || rr_idle);

endmodule
