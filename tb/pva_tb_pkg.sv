// pva_tb_pkg: helpers shared by the PVA testbenches.
//
// init_word gives the content of a memory word that was never written, as a
// function of its global word address, so that the SDRAM models and the
// testbenches' reference memories agree without loading any data. Mixing
// constants are arbitrary odd numbers.
package pva_tb_pkg;
  function automatic logic [31:0] init_word(logic [31:0] addr);
    return (addr * 32'h9E37_79B1) ^ 32'h5A5A_C3C3;
  endfunction
endpackage
