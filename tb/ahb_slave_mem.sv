// Behavioural AHB slave for the testbenches: a sparse word memory that
// answers every NONSEQ/SEQ transfer addressed to it, with a random number of
// wait states (0 to MAX_WAIT) in each data phase. Reads of a word never
// written return 0. Words are indexed by address bits [13:2].
module ahb_slave_mem
  import ahb_arb_pkg::*;
#(
  parameter int unsigned MAX_WAIT = 2
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hsel,
  input  ahb_ctrl_t   ctrl,
  input  logic        hready,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  output int unsigned transfers
);

  logic [31:0] mem [int unsigned];
  logic        dp_valid, dp_write;
  logic [11:0] dp_idx;
  int unsigned waits;

  always_comb begin
    hreadyout = !(dp_valid && waits != 0);
    hrdata    = (dp_valid && !dp_write && mem.exists(32'(dp_idx))) ? mem[32'(dp_idx)] : 32'h0;
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      dp_valid <= 1'b0; dp_write <= 1'b0; dp_idx <= '0; waits <= 0; transfers <= 0;
    end else if (dp_valid && waits != 0) begin
      waits <= waits - 1;
    end else begin
      if (dp_valid && dp_write) mem[32'(dp_idx)] = hwdata;
      if (hready && hsel && ctrl.htrans[1]) begin
        dp_valid  <= 1'b1;
        dp_write  <= ctrl.hwrite;
        dp_idx    <= ctrl.haddr[13:2];
        waits     <= $urandom_range(MAX_WAIT);
        transfers <= transfers + 1;
      end else if (hready) begin
        dp_valid <= 1'b0;
      end
    end
  end

endmodule
