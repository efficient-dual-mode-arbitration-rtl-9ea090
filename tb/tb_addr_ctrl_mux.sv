// Testbench of addr_ctrl_mux: random address/control bundles on the three
// master inputs and every HMASTER value 0..15; the output must be the bundle
// of master HMASTER, or an all-zero IDLE bundle when HMASTER names no master.
module tb_addr_ctrl_mux;
  import ahb_arb_pkg::*;

  logic [3:0] hmaster;
  ahb_ctrl_t m_ctrl [3];
  ahb_ctrl_t s_ctrl, exp;
  int checks = 0, failures = 0;

  addr_ctrl_mux dut (.hmaster(hmaster), .m_ctrl(m_ctrl), .s_ctrl(s_ctrl));

  initial begin
    repeat (500) begin
      for (int i = 0; i < 3; i++) begin
        m_ctrl[i]        = '0;
        m_ctrl[i].htrans = 2'($urandom_range(3));
        m_ctrl[i].haddr  = $urandom;
        m_ctrl[i].hwrite = 1'($urandom_range(1));
        m_ctrl[i].hsize  = 3'($urandom_range(7));
        m_ctrl[i].hburst = 3'($urandom_range(7));
        m_ctrl[i].hprot  = 4'($urandom_range(15));
      end
      for (int m = 0; m < 16; m++) begin
        hmaster = 4'(m);
        exp = (m >= 1 && m <= 3) ? m_ctrl[m-1] : '0;
        #1;
        checks++;
        if (s_ctrl !== exp) begin
          failures++;
          $display("FAIL hmaster=%0d got %h expected %h", m, s_ctrl, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
