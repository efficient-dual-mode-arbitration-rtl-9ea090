// Read data multiplexor of the AHB interconnect.
//
// Returns HRDATA and HREADYOUT of the slave that owns the current data phase
// to all masters as HRDATA and HREADY. The slave is remembered from the
// address phase: at each rising edge with HREADY high the decoder's select is
// stored if the bus carries a NONSEQ or SEQ transfer, and cleared otherwise.
// With no slave in the data phase the bus is ready and reads zero. The design
// names this multiplexor; the registered select, the defaults and the
// synchronous active-low reset are this implementation's, following AHB
// practice.
module rdata_mux
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4,
  parameter int unsigned DATA_W   = 32
) (
  input  logic                hclk,
  input  logic                hresetn,
  input  logic [N_SLAVES-1:0] hsel,
  input  logic [1:0]          htrans,
  input  logic [DATA_W-1:0]   s_rdata [N_SLAVES],
  input  logic [N_SLAVES-1:0] s_readyout,
  output logic [DATA_W-1:0]   hrdata,
  output logic                hready
);

  logic [N_SLAVES-1:0] data_sel;

  always_ff @(posedge hclk) begin
    if (!hresetn)    data_sel <= '0;
    else if (hready) data_sel <= htrans[1] ? hsel : '0;
  end

  always_comb begin
    hrdata = '0;
    hready = 1'b1;
    for (int i = 0; i < N_SLAVES; i++)
      if (data_sel[i]) begin
        hrdata = s_rdata[i];
        hready = s_readyout[i];
      end
  end

endmodule
