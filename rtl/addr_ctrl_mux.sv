// Address and control multiplexor of the AHB interconnect.
//
// Forwards the address-phase signals (HTRANS, HADDR, HWRITE, HSIZE, HBURST,
// HPROT) of the master named by HMASTER to all slaves; the design places this
// multiplexor after the masters and steers it with the arbiter's HMASTER.
// When HMASTER names no master (0000, or a number above N_MASTERS) the bus
// carries an IDLE transfer with all other fields zero: that default is this
// implementation's choice. HMASTER = n selects master n (index n-1).
//
// Purely combinational.
module addr_ctrl_mux
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N_MASTERS = NUM_MASTERS
) (
  input  logic [HMASTER_W-1:0]  hmaster,
  input  ahb_ctrl_t             m_ctrl [N_MASTERS],
  output ahb_ctrl_t             s_ctrl
);

  always_comb begin
    s_ctrl = '0;
    for (int i = 0; i < N_MASTERS; i++)
      if (hmaster == HMASTER_W'(i + 1)) s_ctrl = m_ctrl[i];
  end

endmodule
