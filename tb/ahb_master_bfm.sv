// Bus functional model of one AHB master for the testbenches.
//
// Issues random incrementing bursts of 1 to MAX_BEATS word transfers, reads
// or writes, to random slaves. To get the bus it raises busreq and presents
// its first transfer (NONSEQ) while it waits; a transfer is on the bus in
// every cycle in which 'grant' is high and is accepted at the rising edge
// where hready is high. Inside a burst it may insert BUSY cycles. After the
// last transfer it drives IDLE and keeps busreq low for at least two cycles.
//
// Addresses: slave region in bits [31:30], master ID in bits [13:12], word
// offset in bits [5:2], so no two masters touch the same word. Write data is
// a function of the address and a running count; the model remembers what
// it wrote and, with CHECK_DATA set, checks every read against it (0 for a
// word it never wrote). It also reports a grant lost inside a burst.
module ahb_master_bfm
  import ahb_arb_pkg::*;
#(
  parameter int unsigned ID         = 1,
  parameter int unsigned MAX_BEATS  = 4,
  parameter bit          CHECK_DATA = 1'b1
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        start_ok,    // may begin a new burst
  input  int unsigned req_pct,     // chance per idle cycle to begin, in percent
  input  logic        grant,
  input  logic        hready,
  input  logic [31:0] hrdata,
  output logic        busreq,
  output ahb_ctrl_t   ctrl,
  output logic [31:0] wdata,
  output int unsigned bursts,      // bursts finished
  output int unsigned beats,       // transfers accepted
  output int unsigned reads_checked,
  output int unsigned errors,
  output int unsigned wait_cycles  // cycles with busreq high and no grant
);

  typedef enum logic [1:0] {B_OFF, B_WAIT, B_BURST} bstate_e;

  bstate_e     st;
  int unsigned left, gap, wr_count;
  logic        dp_valid, dp_write;
  logic [31:0] dp_addr, dp_data;
  logic [31:0] shadow [int unsigned];

  function automatic logic [31:0] pick_addr();
    logic [31:0] a;
    a        = '0;
    a[31:30] = 2'($urandom_range(3));
    a[13:12] = 2'(ID);
    a[5:2]   = 4'($urandom_range(15 - MAX_BEATS));
    return a;
  endfunction

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      st <= B_OFF; busreq <= 1'b0; ctrl <= '0; wdata <= '0;
      left <= 0; gap <= 2; wr_count <= 0;
      dp_valid <= 1'b0; dp_write <= 1'b0; dp_addr <= '0; dp_data <= '0;
      bursts <= 0; beats <= 0; reads_checked <= 0; errors <= 0; wait_cycles <= 0;
    end else begin
      if (busreq && !grant) wait_cycles <= wait_cycles + 1;
      // data phase completes
      if (hready && dp_valid && !dp_write && CHECK_DATA) begin
        reads_checked <= reads_checked + 1;
        if (hrdata !== (shadow.exists(dp_addr) ? shadow[dp_addr] : 32'h0)) begin
          errors <= errors + 1;
          $display("M%0d read error @%h: got %h", ID, dp_addr, hrdata);
        end
      end
      if (hready) dp_valid <= 1'b0;
      unique case (st)
        B_OFF: begin
          ctrl.htrans <= HTRANS_IDLE;
          if (gap != 0) gap <= gap - 1;
          else if (start_ok && $urandom_range(99) < req_pct) begin
            st          <= B_WAIT;
            busreq      <= 1'b1;
            left        <= 1 + $urandom_range(MAX_BEATS - 1);
            ctrl.haddr  <= pick_addr();
            ctrl.hwrite <= 1'($urandom_range(1));
            ctrl.htrans <= HTRANS_NONSEQ;
            ctrl.hsize  <= 3'b010;
            ctrl.hburst <= 3'b001;
            ctrl.hprot  <= 4'b0011;
          end
        end
        default: begin
          if (grant && st == B_BURST && ctrl.htrans == HTRANS_BUSY) begin
            ctrl.htrans <= HTRANS_SEQ;
          end else if (grant && hready) begin
            // this transfer was on the bus and is accepted
            beats    <= beats + 1;
            dp_valid <= 1'b1;
            dp_write <= ctrl.hwrite;
            dp_addr  <= ctrl.haddr;
            if (ctrl.hwrite) begin
              wdata                 <= {4'(ID), 4'h0, 8'(wr_count), ctrl.haddr[15:0]};
              shadow[ctrl.haddr]     = {4'(ID), 4'h0, 8'(wr_count), ctrl.haddr[15:0]};
              wr_count              <= wr_count + 1;
            end
            if (left == 1) begin
              st          <= B_OFF;
              busreq      <= 1'b0;
              gap         <= 2;
              ctrl.htrans <= HTRANS_IDLE;
              bursts      <= bursts + 1;
            end else begin
              st          <= B_BURST;
              left        <= left - 1;
              ctrl.haddr  <= ctrl.haddr + 32'd4;
              ctrl.htrans <= ($urandom_range(7) == 0) ? HTRANS_BUSY : HTRANS_SEQ;
            end
          end else if (!grant && st == B_BURST) begin
            errors <= errors + 1;
            $display("M%0d lost the grant inside a burst", ID);
          end
        end
      endcase
    end
  end

endmodule
