// cac_pkg: the three crosstalk avoidance codes (CACs) used on the NoC links.
//
// Each code works on a narrow sub-channel; wide flits are split into
// sub-channels whose codewords are placed side by side on the link.
//   FOC 4-5  forbidden overlap code: no 010 -> 101 (or 101 -> 010) change on
//            any three adjacent wires; sub-channels abut without shields.
//   FTC 3-4  forbidden transition code: no two adjacent wires switch in
//            opposite directions; one grounded shield wire separates
//            neighbouring sub-channels.
//   FPC 4-5  forbidden pattern code: no codeword holds 010 or 101; the MSB of
//            each sub-channel is repeated as the LSB of the next, so the two
//            equal wires at a boundary can never form a forbidden pattern.
// The sub-channel encoders are the sum-of-products equations given for each
// code. The decoders are not given as equations, so each sub-channel decoder
// here searches the (8 or 16 entry) code book for the matching codeword; a
// word that is not a codeword decodes to 0.
//
// Flit widths that are not a whole number of sub-channels end in a narrower
// tail (a design choice): FTC codes the last 1-2 bits with the 3-4 code with
// its unused inputs at 0 and drops the constant top wire; FPC codes the last
// bits the same way and keeps only the wires needed to tell the values apart.
// With the 32-bit flit this gives the (40,32) FOC, (53,32) FTC and (52,32) FPC
// codes.
package cac_pkg;

  typedef enum logic [1:0] {
    CAC_FOC = 2'd0,
    CAC_FTC = 2'd1,
    CAC_FPC = 2'd2
  } cac_scheme_e;

  // ---------------------------------------------------------------- widths
  function automatic int foc_code_w(int data_w);
    return (data_w / 4) * 5;
  endfunction

  // FTC: full 3-bit sub-channels, a shield after every one but the last
  // full one, and a shield plus 3 wires for a 1- or 2-bit tail.
  function automatic int ftc_code_w(int data_w);
    int nf, r;
    nf = data_w / 3;
    r  = data_w % 3;
    return 4 * nf + (nf - 1) + ((r != 0) ? 4 : 0);
  endfunction

  // FPC: sub-channel k covers data bits 3k+3..3k (bit 3k shared with the
  // sub-channel below); a tail of 1 or 2 further bits takes 2 or 4 wires.
  function automatic int fpc_code_w(int data_w);
    int ns, r;
    ns = (data_w - 1) / 3;
    r  = (data_w - 1) % 3;
    return 5 * ns + ((r == 0) ? 0 : (r == 1) ? 2 : 4);
  endfunction

  function automatic int code_w(cac_scheme_e s, int data_w);
    case (s)
      CAC_FOC: return foc_code_w(data_w);
      CAC_FTC: return ftc_code_w(data_w);
      default: return fpc_code_w(data_w);
    endcase
  endfunction

  // First link wire that depends only on data bits at and above data bit
  // `bit_pos`. bit_pos must start a sub-channel (a multiple of 4 for FOC, of
  // 3 for FTC and FPC). Used to find the coded packet id on the link.
  function automatic int code_lsb_of_bit(cac_scheme_e s, int bit_pos);
    case (s)
      CAC_FOC: return (bit_pos / 4) * 5;
      default: return (bit_pos / 3) * 5;
    endcase
  endfunction

  // ---------------------------------------------------- sub-channel codes
  function automatic logic [4:0] foc45_enc(logic [3:0] d);
    logic [4:0] c;
    c[0] = d[1] | (d[2] & ~d[3]);
    c[1] = d[2] & ~d[3];
    c[2] = d[0];
    c[3] = d[2] & d[3];
    c[4] = (d[1] & d[2]) | d[3];
    return c;
  endfunction

  function automatic logic [3:0] ftc34_enc(logic [2:0] d);
    logic [3:0] c;
    c[0] = d[1] | (d[2] & ~d[0]);
    c[1] = (d[0] & d[1] & d[2]) | (~d[0] & ~d[1] & d[2]);
    c[2] = d[0] | d[2];
    c[3] = (d[0] & d[2]) | (d[1] & d[2]);
    return c;
  endfunction

  function automatic logic [4:0] fpc45_enc(logic [3:0] d);
    logic [4:0] c;
    c[0] = d[0];
    c[1] = (d[0] & d[1]) | (d[2] & d[1]) | (d[1] & ~d[3]) | (d[0] & d[2] & ~d[3]);
    c[2] = (d[2] & ~d[3]) | (d[1] & d[2]) | (~d[0] & d[2]) | (d[1] & ~d[0] & ~d[3]);
    c[3] = (d[2] & d[3]) | (~d[0] & d[2]) | (d[2] & d[1]) | (d[1] & d[3] & ~d[0]);
    c[4] = d[3];
    return c;
  endfunction

  function automatic logic [3:0] foc45_dec(logic [4:0] c);
    logic [3:0] d;
    d = '0;
    for (int v = 0; v < 16; v++)
      if (foc45_enc(4'(v)) == c) d = 4'(v);
    return d;
  endfunction

  function automatic logic [2:0] ftc34_dec(logic [3:0] c);
    logic [2:0] d;
    d = '0;
    for (int v = 0; v < 8; v++)
      if (ftc34_enc(3'(v)) == c) d = 3'(v);
    return d;
  endfunction

  function automatic logic [3:0] fpc45_dec(logic [4:0] c);
    logic [3:0] d;
    d = '0;
    for (int v = 0; v < 16; v++)
      if (fpc45_enc(4'(v)) == c) d = 4'(v);
    return d;
  endfunction

  // FPC tail of three new bits above a shared bit: the top wire (always 0)
  // is dropped, four wires remain.
  function automatic logic [2:0] fpc_tail3_dec(logic [3:0] c, logic shared);
    logic [2:0] d;
    d = '0;
    for (int v = 0; v < 8; v++)
      if (fpc45_enc({1'b0, 3'(v)})[3:0] == c && 1'(v) == shared) d = 3'(v);
    return d;
  endfunction

endpackage
