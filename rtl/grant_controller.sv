// Grant controller of the dual mode arbiter.
//
// Takes the grants and master numbers of the fixed priority and the round
// robin arbiter, passes on those of the arbiter that is granting, and samples
// them with HCLK once more before they leave the arbiter as HGRANT1..3 and
// HMASTER[3:0]; that second sampling of the state machines' grants is the
// design's. The parent lets only one arbiter leave IDLE at a time, so at most
// one of the two sets is non-zero; should both be, the round robin set wins.
// Which set is passed, and that the choice is made from the grants rather
// than from arbiter_mode, are this implementation's choices.
//
// Timing: outputs change one rising edge after the inputs. Reset is
// synchronous and active low and clears all grants and HMASTER to 0000.
module grant_controller
  import ahb_arb_pkg::*;
(
  input  logic                   hclk,
  input  logic                   hresetn,
  input  logic [NUM_MASTERS-1:0] grant_fp,
  input  logic [HMASTER_W-1:0]   hmaster_fp,
  input  logic [NUM_MASTERS-1:0] grant_rr,
  input  logic [HMASTER_W-1:0]   hmaster_rr,
  output logic [NUM_MASTERS-1:0] hgrant,
  output logic [HMASTER_W-1:0]   hmaster
);

  logic [NUM_MASTERS-1:0] grant_sel;
  logic [HMASTER_W-1:0]   hmaster_sel;

  always_comb begin
    if (|grant_rr) begin
      grant_sel   = grant_rr;
      hmaster_sel = hmaster_rr;
    end else begin
      grant_sel   = grant_fp;
      hmaster_sel = hmaster_fp;
    end
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      hgrant  <= '0;
      hmaster <= '0;
    end else begin
      hgrant  <= grant_sel;
      hmaster <= hmaster_sel;
    end
  end

  // At most one master holds the bus.
  assert property (@(posedge hclk) disable iff (!hresetn) $onehot0(hgrant));

endmodule
