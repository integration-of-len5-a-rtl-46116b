// tb_mem_pkg: helpers shared by the testbenches that use obi_mem_model.
// init_word gives the content of a memory word that was never written, so
// a testbench can compute expected load data without preloading anything:
// a multiplicative hash of the word address.
package tb_mem_pkg;
  function automatic logic [31:0] init_word(input logic [31:0] byte_addr);
    logic [31:0] w;
    w = {2'b00, byte_addr[31:2]};
    return (w * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // Addresses with the top nibble set to F answer with an error
  function automatic logic is_err_addr(input logic [31:0] byte_addr);
    return byte_addr[31:28] == 4'hF;
  endfunction
endpackage
