// Three-master AHB bus with a dual mode arbiter.
//
// Three bus masters (processors, DMA engines) share one AHB bus to four
// slaves. The dual mode arbiter decides which master owns the bus, by fixed
// priority (arbiter_mode = 0, M1 > M2 > M3) or by round robin
// (arbiter_mode = 1), and names it on HMASTER. HMASTER steers the address and
// control multiplexor; a delayed copy of it steers the write data
// multiplexor; the decoder selects a slave from the bus address and the read
// data multiplexor returns that slave's data and ready signal. This is the
// interconnect the design draws around its arbiter: three masters, four
// slaves, 32-bit address and data.
//
// Ports: per master its request, its address/control bundle (ahb_ctrl_t) and
// its write data in, its grant out; shared HMASTER, HRDATA and HREADY out. Per
// slave its select out, its read data and HREADYOUT in; the address/control
// bundle and write data go to all slaves. Index 0 is M1 / slave 1.
//
// Protocol of this implementation: a master that wants the bus raises its
// request and presents its first transfer (NONSEQ) on its own outputs while it
// waits. Its transfers are on the bus in every cycle in which its grant is
// high; it holds HTRANS non-IDLE for the whole burst (wait states included)
// and then drives IDLE and drops its request for at least two cycles, which
// ends its ownership. The arbiter does not look at HREADY, HBURST, HLOCK or
// split responses. All logic runs on the rising edge of HCLK with a
// synchronous active-low reset.
module ahb_mp_system
  import ahb_arb_pkg::*;
#(
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned N_SLAVES = 4
) (
  input  logic                   HCLK,
  input  logic                   HRESETn,
  input  logic                   arbiter_mode,
  // masters
  input  logic [NUM_MASTERS-1:0] m_busreq,
  input  ahb_ctrl_t              m_ctrl   [NUM_MASTERS],
  input  logic [DATA_W-1:0]      m_wdata  [NUM_MASTERS],
  output logic [NUM_MASTERS-1:0] m_grant,
  output logic [HMASTER_W-1:0]   hmaster,
  output logic [DATA_W-1:0]      hrdata,
  output logic                   hready,
  // slaves
  output logic [N_SLAVES-1:0]    s_sel,
  output ahb_ctrl_t              s_ctrl,
  output logic [DATA_W-1:0]      s_wdata,
  input  logic [DATA_W-1:0]      s_rdata  [N_SLAVES],
  input  logic [N_SLAVES-1:0]    s_readyout
);

  dual_mode_arbiter u_arbiter (
    .HCLK         (HCLK),
    .HRESETn      (HRESETn),
    .HBUSREQ1     (m_busreq[0]),
    .HBUSREQ2     (m_busreq[1]),
    .HBUSREQ3     (m_busreq[2]),
    .HTRANS_M1    (m_ctrl[0].htrans),
    .HTRANS_M2    (m_ctrl[1].htrans),
    .HTRANS_M3    (m_ctrl[2].htrans),
    .arbiter_mode (arbiter_mode),
    .HGRANT1      (m_grant[0]),
    .HGRANT2      (m_grant[1]),
    .HGRANT3      (m_grant[2]),
    .HMASTER      (hmaster)
  );

  addr_ctrl_mux #(.N_MASTERS(NUM_MASTERS)) u_addr_mux (
    .hmaster (hmaster),
    .m_ctrl  (m_ctrl),
    .s_ctrl  (s_ctrl)
  );

  wdata_mux #(.N_MASTERS(NUM_MASTERS), .DATA_W(DATA_W)) u_wdata_mux (
    .hclk    (HCLK),
    .hresetn (HRESETn),
    .hmaster (hmaster),
    .hready  (hready),
    .m_wdata (m_wdata),
    .s_wdata (s_wdata)
  );

  ahb_decoder #(.N_SLAVES(N_SLAVES)) u_decoder (
    .haddr (s_ctrl.haddr),
    .hsel  (s_sel)
  );

  rdata_mux #(.N_SLAVES(N_SLAVES), .DATA_W(DATA_W)) u_rdata_mux (
    .hclk       (HCLK),
    .hresetn    (HRESETn),
    .hsel       (s_sel),
    .htrans     (s_ctrl.htrans),
    .s_rdata    (s_rdata),
    .s_readyout (s_readyout),
    .hrdata     (hrdata),
    .hready     (hready)
  );

  // HMASTER and the grants always agree.
  assert property (@(posedge HCLK) disable iff (!HRESETn)
                   (hmaster == '0) ? (m_grant == '0)
                                   : (m_grant == NUM_MASTERS'(1 << (hmaster - 1))));

endmodule
