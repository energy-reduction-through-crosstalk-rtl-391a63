// tb_ref_pkg: reference model of the 32-bit FPC link code (52 wires) for
// the testbenches, written independently of the RTL: the FPC 4-5
// sub-channel equations, ten sub-channels sharing their boundary bit, then
// bits 30 and 31 on the last two wires.
package tb_ref_pkg;
  localparam int FPC_CW = 52;

  function automatic logic [4:0] fpc_sub(logic [3:0] d);
    logic [4:0] c;
    c[0] = d[0];
    c[1] = (d[0] & d[1]) | (d[2] & d[1]) | (d[1] & !d[3]) | (d[0] & d[2] & !d[3]);
    c[2] = (d[2] & !d[3]) | (d[1] & d[2]) | (!d[0] & d[2]) | (d[1] & !d[0] & !d[3]);
    c[3] = (d[2] & d[3]) | (!d[0] & d[2]) | (d[2] & d[1]) | (d[1] & d[3] & !d[0]);
    c[4] = d[3];
    return c;
  endfunction

  function automatic logic [FPC_CW-1:0] fpc_enc32(logic [31:0] d);
    logic [FPC_CW-1:0] c;
    for (int k = 0; k < 10; k++) c[5*k +: 5] = fpc_sub(d[3*k +: 4]);
    c[50] = d[30];
    c[51] = d[31];
    return c;
  endfunction
endpackage
