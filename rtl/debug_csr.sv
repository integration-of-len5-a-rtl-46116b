// debug_csr: debug-mode control and status registers of the core.
//
// Holds the custom dm flag (1 = debug mode), DPC, DCSR and DSCRATCH0/1.
// Software access (csr_valid_i with address, write enable and data; reads
// are combinational) to DPC, DCSR and DSCRATCH0/1 is legal only in debug
// mode, otherwise csr_illegal_o is raised and nothing is written; dm is
// always accessible. csr_hit_o tells whether the address belongs here.
// DCSR fields: xdebugver = 4, stepie = 0, stopcount = 1, stoptime = 1 and
// mprven = 1 are hard-wired; ebreakm/s/u, step and prv are writable by
// software; cause and nmip are read-only and change only when the commit
// unit asserts debug_csr_write_i, which writes cause and prv and clears nmip.
// The commit unit also sets or clears dm (dbg_dm_we_i) and writes DPC
// (dbg_dpc_we_i); these take precedence over a software write in the same
// cycle. All writes take effect at the next rising clock edge.
// Field set and access rules follow the document and the RISC-V debug
// specification; the dm address is this design's choice.
module debug_csr
  import debug_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  // software access
  input  logic            csr_valid_i,
  input  logic [11:0]     csr_addr_i,
  input  logic            csr_we_i,
  input  logic [XLEN-1:0] csr_wdata_i,
  output logic [XLEN-1:0] csr_rdata_o,
  output logic            csr_hit_o,
  output logic            csr_illegal_o,
  // commit-unit access
  input  logic            dbg_dm_we_i,
  input  logic            dbg_dm_wdata_i,
  input  logic            dbg_dpc_we_i,
  input  logic [XLEN-1:0] dbg_dpc_wdata_i,
  input  logic            debug_csr_write_i,
  input  logic [2:0]      dbg_cause_i,
  input  logic [1:0]      dbg_prv_i,
  // state
  output logic            dm_o,
  output logic [XLEN-1:0] dpc_o,
  output logic            ebreakm_o,
  output logic [31:0]     dcsr_o
);
  logic            dm_q;
  logic [XLEN-1:0] dpc_q, dscratch0_q, dscratch1_q;
  logic            ebreakm_q, ebreaks_q, ebreaku_q, step_q, nmip_q;
  logic [2:0]      cause_q;
  logic [1:0]      prv_q;
  logic            dbg_only, sw_we;

  assign dcsr_o = {4'd4, 12'd0, ebreakm_q, 1'b0, ebreaks_q, ebreaku_q,
                   1'b0 /*stepie*/, 1'b1 /*stopcount*/, 1'b1 /*stoptime*/,
                   cause_q, 1'b0, 1'b1 /*mprven*/, nmip_q, step_q, prv_q};

  always_comb begin
    csr_hit_o   = 1'b1;
    dbg_only    = 1'b1;
    csr_rdata_o = '0;
    unique case (csr_addr_i)
      CSR_DCSR:      csr_rdata_o = XLEN'(dcsr_o);
      CSR_DPC:       csr_rdata_o = dpc_q;
      CSR_DSCRATCH0: csr_rdata_o = dscratch0_q;
      CSR_DSCRATCH1: csr_rdata_o = dscratch1_q;
      CSR_DM: begin
        csr_rdata_o = XLEN'(dm_q);
        dbg_only    = 1'b0;
      end
      default: begin
        csr_hit_o = 1'b0;
        dbg_only  = 1'b0;
      end
    endcase
  end

  assign csr_illegal_o = csr_valid_i && dbg_only && !dm_q;
  assign sw_we         = csr_valid_i && csr_we_i && csr_hit_o && !csr_illegal_o;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      dm_q        <= 1'b0;
      dpc_q       <= '0;
      dscratch0_q <= '0;
      dscratch1_q <= '0;
      ebreakm_q   <= 1'b0;
      ebreaks_q   <= 1'b0;
      ebreaku_q   <= 1'b0;
      step_q      <= 1'b0;
      nmip_q      <= 1'b0;
      cause_q     <= '0;
      prv_q       <= PRV_M;
    end else begin
      if (sw_we) begin
        unique case (csr_addr_i)
          CSR_DCSR: begin
            ebreakm_q <= csr_wdata_i[15];
            ebreaks_q <= csr_wdata_i[13];
            ebreaku_q <= csr_wdata_i[12];
            step_q    <= csr_wdata_i[2];
            prv_q     <= csr_wdata_i[1:0];
          end
          CSR_DPC:       dpc_q       <= csr_wdata_i;
          CSR_DSCRATCH0: dscratch0_q <= csr_wdata_i;
          CSR_DSCRATCH1: dscratch1_q <= csr_wdata_i;
          CSR_DM:        dm_q        <= csr_wdata_i[0];
          default: ;
        endcase
      end
      if (dbg_dm_we_i)  dm_q  <= dbg_dm_wdata_i;
      if (dbg_dpc_we_i) dpc_q <= dbg_dpc_wdata_i;
      if (debug_csr_write_i) begin
        cause_q <= dbg_cause_i;
        prv_q   <= dbg_prv_i;
        nmip_q  <= 1'b0;
      end
    end
  end

  assign dm_o      = dm_q;
  assign dpc_o     = dpc_q;
  assign ebreakm_o = ebreakm_q;
endmodule
