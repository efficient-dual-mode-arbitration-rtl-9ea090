// Address decoder of the AHB interconnect.
//
// Drives exactly one slave select from the bus address. The design names the
// decoder and shows four slaves; the address map is this implementation's
// choice: the address space is cut into N_SLAVES equal regions by the top
// log2(N_SLAVES) address bits, so with the default of four slaves HADDR[31:30]
// = 00, 01, 10, 11 selects slave 1, 2, 3, 4.
//
// Purely combinational; hsel bit i selects slave i+1.
module ahb_decoder
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4
) (
  input  logic [ADDR_W-1:0]   haddr,
  output logic [N_SLAVES-1:0] hsel
);

  localparam int unsigned SEL_W = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;

  logic [SEL_W-1:0] region;

  assign region = haddr[ADDR_W-1 -: SEL_W];

  always_comb begin
    hsel = '0;
    for (int i = 0; i < N_SLAVES; i++)
      if (region == SEL_W'(i)) hsel[i] = 1'b1;
  end

endmodule
