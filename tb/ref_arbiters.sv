// Reference model of both arbitration schemes for the testbenches, written
// as plain behavioural code from the rules of the two state diagrams:
//  fixed priority: registered requests; from idle take the lowest-numbered
//    requester; keep a master while its HTRANS is not IDLE.
//  round robin: registered requests, one 2-bit counter per master that climbs
//    to 3 while its master requests unserved and drops to 0 when its service
//    ends; a master is granted in its turn only with counter 3.
// Both give the grant as a master number 0..3 (0 = none). With REGISTERED set
// the model adds the grant controller's extra register stage and the mode
// interlock of the dual mode arbiter.
module ref_arbiters #(
  parameter bit REGISTERED = 1'b0
) (
  input  logic       clk,
  input  logic       rstn,
  input  logic       fp_en_in,      // used when REGISTERED = 0
  input  logic       rr_en_in,      // used when REGISTERED = 0
  input  logic       mode,          // used when REGISTERED = 1
  input  logic [2:0] req,
  input  logic [5:0] trans,         // {HTRANS_M3, HTRANS_M2, HTRANS_M1}
  output int         fp_master,     // model of hmaster_FP
  output int         rr_master,     // model of hmaster_RR
  output int         out_master,    // model of HMASTER (REGISTERED = 1)
  output int         prio [3]
);

  int fp_st, rr_st, last;
  bit [2:0] fp_ra, rr_ra;
  bit fp_en, rr_en;

  function automatic bit busy(input int m);
    return trans[2*(m-1) +: 2] != 2'b00;
  endfunction

  // next master after 'after' in the order 1,2,3,1 whose bit in c is set
  function automatic int next_after(input bit [2:0] c, input int after);
    int m;
    m = (after == 0) ? 3 : after;
    for (int k = 0; k < 3; k++) begin
      m = (m % 3) + 1;
      if (c[m-1]) return m;
    end
    return 0;
  endfunction

  always_comb begin
    fp_en = REGISTERED ? (!mode && rr_st == 0) : fp_en_in;
    rr_en = REGISTERED ? ( mode && fp_st == 0) : rr_en_in;
  end

  assign fp_master = fp_st;
  assign rr_master = (rr_st != 0 && prio[rr_st-1] == 3) ? rr_st : 0;

  always @(posedge clk) begin
    int n_fp, n_rr;
    bit [2:0] due, oth;
    bit g;
    if (!rstn) begin
      fp_st = 0; rr_st = 0; last = 0; fp_ra = 0; rr_ra = 0;
      for (int i = 0; i < 3; i++) prio[i] = 0;
      out_master <= 0;
    end else begin
      // fixed priority
      n_fp = fp_st;
      if (fp_st == 0) begin
        if (fp_en) n_fp = fp_ra[0] ? 1 : fp_ra[1] ? 2 : fp_ra[2] ? 3 : 0;
      end else if (!busy(fp_st)) n_fp = 0;
      // round robin
      for (int i = 0; i < 3; i++) due[i] = rr_ra[i] && prio[i] == 3;
      g = rr_st != 0 && prio[rr_st-1] == 3;
      oth = due;
      if (rr_st != 0) oth[rr_st-1] = 0;
      out_master <= g ? rr_st : fp_st;
      if (rr_st == 0) n_rr = !rr_en ? 0 : (due != 0) ? next_after(due, last) : next_after(rr_ra, last);
      else if (g && busy(rr_st)) n_rr = rr_st;
      else if (rr_en && oth != 0) n_rr = next_after(oth, rr_st);
      else if (!g && rr_en && rr_ra[rr_st-1] && busy(rr_st)) n_rr = rr_st;
      else n_rr = 0;
      for (int i = 0; i < 3; i++) begin
        if (g && rr_st == i+1 && n_rr != rr_st) prio[i] = 0;
        else if (rr_ra[i] && prio[i] < 3) prio[i] = prio[i] + 1;
      end
      if (g) last = rr_st;
      fp_st = n_fp; rr_st = n_rr;
      fp_ra = req; rr_ra = req;
    end
  end

endmodule
