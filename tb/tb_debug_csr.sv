// tb_debug_csr: random software CSR accesses and commit-unit writes against
// a field-level model of the debug registers. Checked each cycle: read data
// of dcsr (field positions of the RISC-V debug specification: xdebugver=4 in
// bits 31:28, ebreakm bit 15, cause bits 8:6, prv bits 1:0), dpc,
// dscratch0/1 and the debug-mode flag; that the debug-only registers are
// illegal outside debug mode and ignore writes there; that unknown
// addresses miss.
module tb_debug_csr;
  import debug_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0, we = 0;
  logic [11:0] addr = '0;
  logic [63:0] wdata = '0, rdata, dpc;
  logic hit, illegal, dm, ebreakm;
  logic [31:0] dcsr;
  logic c_dm_we = 0, c_dm_wd = 0, c_dpc_we = 0, c_csr_wr = 0;
  logic [63:0] c_dpc = '0;
  logic [2:0] c_cause = '0;
  logic [1:0] c_prv = '0;
  // model
  logic m_dm = 0, m_ebm = 0, m_ebs = 0, m_ebu = 0, m_step = 0;
  logic [63:0] m_dpc = 0, m_s0 = 0, m_s1 = 0;
  logic [2:0] m_cause = 0;
  logic [1:0] m_prv = 2'd3;
  int checks = 0, failures = 0, n_illegal = 0, n_write = 0;
  logic [11:0] addrs[6] = '{CSR_DCSR, CSR_DPC, CSR_DSCRATCH0, CSR_DSCRATCH1, CSR_DM, 12'h300};

  debug_csr dut (.clk_i(clk), .rst_ni(rst_n), .csr_valid_i(valid), .csr_addr_i(addr),
                 .csr_we_i(we), .csr_wdata_i(wdata), .csr_rdata_o(rdata), .csr_hit_o(hit),
                 .csr_illegal_o(illegal), .dbg_dm_we_i(c_dm_we), .dbg_dm_wdata_i(c_dm_wd),
                 .dbg_dpc_we_i(c_dpc_we), .dbg_dpc_wdata_i(c_dpc), .debug_csr_write_i(c_csr_wr),
                 .dbg_cause_i(c_cause), .dbg_prv_i(c_prv), .dm_o(dm), .dpc_o(dpc),
                 .ebreakm_o(ebreakm), .dcsr_o(dcsr));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t addr=%h", what, $time, addr); end
  endtask

  function automatic logic [31:0] model_dcsr();
    logic [31:0] d;
    d = '0;
    d[31:28] = 4'd4;
    d[15] = m_ebm; d[13] = m_ebs; d[12] = m_ebu;
    d[10] = 1'b1; d[9] = 1'b1;
    d[8:6] = m_cause;
    d[4] = 1'b1;
    d[2] = m_step;
    d[1:0] = m_prv;
    return d;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic dbg_reg, ok;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      valid = $urandom_range(0, 1);
      we    = $urandom_range(0, 1);
      addr  = addrs[$urandom_range(0, 5)];
      wdata = {$urandom, $urandom};
      c_dm_we  = $urandom_range(0, 7) == 0;
      c_dm_wd  = $urandom_range(0, 1);
      c_dpc_we = $urandom_range(0, 7) == 0;
      c_dpc    = {$urandom, $urandom};
      c_csr_wr = $urandom_range(0, 7) == 0;
      c_cause  = 3'($urandom);
      c_prv    = 2'($urandom);
      #1;
      dbg_reg = addr inside {CSR_DCSR, CSR_DPC, CSR_DSCRATCH0, CSR_DSCRATCH1};
      check(hit == (dbg_reg || addr == CSR_DM), "address decode");
      check(illegal == (valid && dbg_reg && !m_dm), "debug registers only in debug mode");
      check(dm == m_dm && dpc == m_dpc && ebreakm == m_ebm, "state outputs");
      check(dcsr == model_dcsr(), "dcsr layout");
      case (addr)
        CSR_DCSR:      check(rdata == 64'(model_dcsr()), "read dcsr");
        CSR_DPC:       check(rdata == m_dpc, "read dpc");
        CSR_DSCRATCH0: check(rdata == m_s0, "read dscratch0");
        CSR_DSCRATCH1: check(rdata == m_s1, "read dscratch1");
        CSR_DM:        check(rdata == 64'(m_dm), "read dm");
        default:       check(rdata == 0, "miss reads zero");
      endcase
      if (illegal) n_illegal++;
      ok = valid && we && (addr == CSR_DM || (dbg_reg && m_dm));
      // model update: software first, commit unit last (it has priority)
      if (ok) begin
        n_write++;
        case (addr)
          CSR_DCSR: begin
            m_ebm = wdata[15]; m_ebs = wdata[13]; m_ebu = wdata[12];
            m_step = wdata[2]; m_prv = wdata[1:0];
          end
          CSR_DPC:       m_dpc = wdata;
          CSR_DSCRATCH0: m_s0 = wdata;
          CSR_DSCRATCH1: m_s1 = wdata;
          CSR_DM:        m_dm = wdata[0];
          default: ;
        endcase
      end
      if (c_dm_we)  m_dm = c_dm_wd;
      if (c_dpc_we) m_dpc = c_dpc;
      if (c_csr_wr) begin m_cause = c_cause; m_prv = c_prv; end
    end
    check(n_illegal > 0 && n_write > 0, "legal and illegal accesses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
