// Write data multiplexor of the AHB interconnect.
//
// In AHB the write data of a transfer follows its address by one phase, so
// this multiplexor is steered not by HMASTER itself but by a copy of it taken
// at the end of each completed address phase (rising edge with HREADY high).
// HWDATA of that master goes to all slaves; when the data phase belongs to no
// master the output is zero. The design names this multiplexor; the delayed
// select, the zero default and the synchronous active-low reset are this
// implementation's, following AHB practice.
//
// Timing: the select changes on the rising edge of HCLK when hready is high;
// the data path itself is combinational.
module wdata_mux
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N_MASTERS = NUM_MASTERS,
  parameter int unsigned DATA_W    = 32
) (
  input  logic                 hclk,
  input  logic                 hresetn,
  input  logic [HMASTER_W-1:0] hmaster,
  input  logic                 hready,
  input  logic [DATA_W-1:0]    m_wdata [N_MASTERS],
  output logic [DATA_W-1:0]    s_wdata
);

  logic [HMASTER_W-1:0] data_master;

  always_ff @(posedge hclk) begin
    if (!hresetn)    data_master <= '0;
    else if (hready) data_master <= hmaster;
  end

  always_comb begin
    s_wdata = '0;
    for (int i = 0; i < N_MASTERS; i++)
      if (data_master == HMASTER_W'(i + 1)) s_wdata = m_wdata[i];
  end

endmodule
