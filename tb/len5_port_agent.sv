// len5_port_agent: testbench stand-in for the core side of the bridge.
// Drives the instruction, load and store ports with random traffic and
// checks every answer in order:
//  * fetches (one in flight, rready dropped at random) from 0x0000_xxxx,
//    checked against tb_mem_pkg::init_word and the tag;
//  * loads of every size from 0x0001_xxxx, a region nothing writes, checked
//    word by word, lane by lane, with tag and error flag;
//  * stores of every size to 0x0002_0xxx; a byte-level reference image
//    (ref_img) is updated at each grant for the enclosing testbench to hold
//    against its memory.
// About one access in twenty goes to the error region (top nibble F).
// The counters below are read by the enclosing testbench; done goes high
// when all N_* accesses have been answered.
module len5_port_agent
  import bridge_pkg::*;
  import tb_mem_pkg::*;
#(
  parameter int unsigned TAG_W   = 4,
  parameter int          N_FETCH = 300,
  parameter int          N_LOAD  = 300,
  parameter int          N_STORE = 300
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  output logic                 done_o,
  // instruction port
  output logic                 instr_req_o,
  input  logic                 instr_gnt_i,
  output logic [63:0]          instr_addr_o,
  output logic [TAG_W-1:0]     instr_tag_o,
  output logic                 instr_rready_o,
  input  logic                 instr_rvalid_i,
  input  logic [31:0]          instr_rdata_i,
  input  logic [TAG_W-1:0]     instr_tag_i,
  input  logic                 instr_except_i,
  // load port
  output logic                 ld_req_o,
  input  logic                 ld_gnt_i,
  output logic [63:0]          ld_addr_o,
  output logic [7:0]           ld_be_o,
  output logic [TAG_W-1:0]     ld_tag_o,
  input  logic                 ld_rvalid_i,
  input  logic [63:0]          ld_rdata_i,
  input  logic [TAG_W-1:0]     ld_tag_i,
  input  logic                 ld_except_i,
  // store port
  output logic                 st_req_o,
  input  logic                 st_gnt_i,
  output logic [63:0]          st_addr_o,
  output logic [7:0]           st_be_o,
  output logic [63:0]          st_wdata_o,
  output logic [TAG_W-1:0]     st_tag_o,
  input  logic                 st_rvalid_i,
  input  logic [TAG_W-1:0]     st_tag_i,
  input  logic                 st_except_i
);
  typedef struct { logic [31:0] addr; logic [7:0] be; logic [TAG_W-1:0] tag; } acc_t;

  int checks = 0, failures = 0;
  int n_fetch = 0, n_load = 0, n_store = 0;
  int n_rready_stall = 0, n_dword_ld = 0, n_dword_st = 0, n_narrow = 0;
  int n_err = 0, n_misaligned = 0;
  int if_issued = 0, ld_issued = 0, st_issued = 0;
  acc_t if_q[$], ld_q[$], st_q[$];
  logic [31:0] ref_img [logic [29:0]];
  logic [7:0]  bes[4] = '{8'hFF, 8'h0F, 8'h03, 8'h01};

  initial begin
    instr_req_o = 0; instr_addr_o = '0; instr_tag_o = '0; instr_rready_o = 1;
    ld_req_o = 0; ld_addr_o = '0; ld_be_o = 8'hFF; ld_tag_o = '0;
    st_req_o = 0; st_addr_o = '0; st_be_o = 8'hFF; st_wdata_o = '0; st_tag_o = '0;
  end

  assign done_o = (n_fetch == N_FETCH) && (n_load == N_LOAD) && (n_store == N_STORE);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic logic [31:0] rand_addr(input logic [31:0] base, input logic [31:0] mask,
                                            input logic [7:0] b);
    logic [31:0] a;
    a = base | ($urandom & mask);
    if ($urandom_range(0, 19) == 0) a[31:28] = 4'hF;
    if (b == 8'hFF || b == 8'h0F) a[1:0] = 2'b00;
    else if (b == 8'h03) a[0] = 1'b0;
    return a;
  endfunction

  task automatic ref_write(input logic [31:0] a, input logic [63:0] d, input int nbytes);
    for (int k = 0; k < nbytes; k++) begin
      logic [31:0] ba, w;
      ba = a + k;
      w  = ref_img.exists(ba[31:2]) ? ref_img[ba[31:2]] : init_word(ba);
      w[ba[1:0]*8 +: 8] = d[k*8 +: 8];
      ref_img[ba[31:2]] = w;
    end
  endtask

  // new requests are raised on the falling edge and held until granted
  always @(negedge clk_i) begin
    if (rst_ni) begin
      instr_rready_o = $urandom_range(0, 3) != 0;
      if (!instr_req_o && if_q.size() == 0 && if_issued < N_FETCH && $urandom_range(0, 1) != 0) begin
        instr_addr_o = {32'h0, rand_addr(32'h0000_0000, 32'h0000_FFFC, 8'h0F)};
        instr_tag_o  = TAG_W'(if_issued);
        instr_req_o  = 1'b1;
        if_issued++;
      end
      if (!ld_req_o && ld_issued < N_LOAD && $urandom_range(0, 2) != 0) begin
        ld_be_o   = bes[$urandom_range(0, 3)];
        ld_addr_o = {32'h0, rand_addr(32'h0001_0000, 32'h0000_FFFF, ld_be_o)};
        ld_tag_o  = TAG_W'(ld_issued);
        ld_req_o  = 1'b1;
        ld_issued++;
      end
      if (!st_req_o && st_issued < N_STORE && $urandom_range(0, 2) != 0) begin
        st_be_o    = bes[$urandom_range(0, 3)];
        st_addr_o  = {32'h0, rand_addr(32'h0002_0000, 32'h0000_03FF, st_be_o)};
        st_wdata_o = {$urandom, $urandom};
        st_tag_o   = TAG_W'(st_issued);
        st_req_o   = 1'b1;
        st_issued++;
      end
    end
  end

  always @(posedge clk_i) begin
    acc_t e;
    logic err;
    logic [31:0] lo, hi;
    if (rst_ni) begin
      // ---- fetch
      if (instr_req_o && instr_gnt_i) begin
        if_q.push_back('{instr_addr_o[31:0], 8'h0F, instr_tag_o});
        instr_req_o <= 1'b0;
      end
      if (instr_rvalid_i && !instr_rready_o) n_rready_stall++;
      if (instr_rvalid_i && instr_rready_o) begin
        check(if_q.size() != 0, "instruction with nothing outstanding");
        if (if_q.size() != 0) begin
          e = if_q.pop_front();
          check(instr_tag_i == e.tag, "fetch tag");
          check(instr_except_i == is_err_addr(e.addr), "fetch error flag");
          if (!instr_except_i) check(instr_rdata_i == init_word(e.addr), "instruction word");
          else n_err++;
          n_fetch++;
        end
      end
      // ---- load
      if (ld_req_o && ld_gnt_i) begin
        ld_q.push_back('{ld_addr_o[31:0], ld_be_o, ld_tag_o});
        if (ld_be_o == 8'hFF) begin
          n_dword_ld++;
          if (ld_addr_o[2]) n_misaligned++;
        end else n_narrow++;
        ld_req_o <= 1'b0;
      end
      if (ld_rvalid_i) begin
        check(ld_q.size() != 0, "load data with nothing outstanding");
        if (ld_q.size() != 0) begin
          e = ld_q.pop_front();
          check(ld_tag_i == e.tag, "load tag");
          err = is_err_addr(e.addr) || (e.be == 8'hFF && is_err_addr(e.addr + 4));
          check(ld_except_i == err, "load error flag");
          if (err) n_err++;
          else begin
            lo = init_word(e.addr);
            hi = init_word(e.addr + 4);
            case (e.be)
              8'hFF:   check(ld_rdata_i == {hi, lo}, "double word load");
              8'h0F:   check(ld_rdata_i[31:0] == lo, "word load");
              8'h03:   check(ld_rdata_i[15:0] == lo[e.addr[1:0]*8 +: 16], "half word load");
              default: check(ld_rdata_i[7:0] == lo[e.addr[1:0]*8 +: 8], "byte load");
            endcase
          end
          n_load++;
        end
      end
      // ---- store
      if (st_req_o && st_gnt_i) begin
        st_q.push_back('{st_addr_o[31:0], st_be_o, st_tag_o});
        if (st_be_o == 8'hFF) begin
          n_dword_st++;
          if (!is_err_addr(st_addr_o[31:0]))     ref_write(st_addr_o[31:0], st_wdata_o, 4);
          if (!is_err_addr(st_addr_o[31:0] + 4)) ref_write(st_addr_o[31:0] + 4, st_wdata_o >> 32, 4);
        end else begin
          n_narrow++;
          if (!is_err_addr(st_addr_o[31:0]))
            ref_write(st_addr_o[31:0], st_wdata_o, st_be_o == 8'h0F ? 4 : (st_be_o == 8'h03 ? 2 : 1));
        end
        st_req_o <= 1'b0;
      end
      if (st_rvalid_i) begin
        check(st_q.size() != 0, "store acknowledge with nothing outstanding");
        if (st_q.size() != 0) begin
          e = st_q.pop_front();
          check(st_tag_i == e.tag, "store tag");
          err = is_err_addr(e.addr) || (e.be == 8'hFF && is_err_addr(e.addr + 4));
          check(st_except_i == err, "store error flag");
          if (err) n_err++;
          n_store++;
        end
      end
    end
  end
endmodule
