// tb_foc_codec: self-checking test of foc_encoder and foc_decoder (32-bit
// flit, 40 wires). The expected codewords come from a reference written
// here: the printed code table rows, and the FOC sub-channel equations
// re-typed per bit. Checks: the table rows, encoder against reference on
// random flits, decoder round trip on the reference codeword, and the
// forbidden-overlap rule (no 010 <-> 101 on any three adjacent wires)
// between consecutive link words.
module tb_foc_codec;
  localparam int DW = 32, CW = 40;
  logic [DW-1:0] data, dec_out;
  logic [CW-1:0] code, code_in;
  int checks = 0, failures = 0;

  foc_encoder u_enc (.data(data), .code(code));
  foc_decoder u_dec (.code(code_in), .data(dec_out));

  function automatic logic [CW-1:0] ref_enc(logic [DW-1:0] d);
    logic [CW-1:0] c;
    for (int k = 0; k < 8; k++) begin
      logic a0, a1, a2, a3;
      {a3, a2, a1, a0} = d[4*k +: 4];
      c[5*k+0] = a1 | (a2 & !a3);
      c[5*k+1] = a2 & !a3;
      c[5*k+2] = a0;
      c[5*k+3] = a2 & a3;
      c[5*k+4] = (a1 & a2) | a3;
    end
    return c;
  endfunction

  function automatic bit overlap_violation(logic [CW-1:0] a, logic [CW-1:0] b);
    for (int i = 0; i + 2 < CW; i++)
      if ((a[i +: 3] == 3'b010 && b[i +: 3] == 3'b101) ||
          (a[i +: 3] == 3'b101 && b[i +: 3] == 3'b010)) return 1'b1;
    return 1'b0;
  endfunction

  // published FOC 4-5 truth table: d3..d0 -> c4..c0 for data 0..7
  logic [4:0] table1 [8] = '{5'b00000, 5'b00100, 5'b00001, 5'b00101,
                             5'b00011, 5'b00111, 5'b10011, 5'b10111};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [CW-1:0] prev;
    for (int v = 0; v < 8; v++) begin
      data = DW'(v); code_in = '0; #1;
      check(code == CW'(table1[v]), $sformatf("table row %0d: %b", v, code[4:0]));
    end
    prev = '0;
    for (int n = 0; n < 3000; n++) begin
      data = $urandom;
      if (n % 7 == 0) data = {8{data[3:0]}};
      code_in = ref_enc(data);
      #1;
      check(code == ref_enc(data), $sformatf("encode %h: %h", data, code));
      check(dec_out == data, $sformatf("decode %h: %h", data, dec_out));
      check(!overlap_violation(prev, code), $sformatf("FO violation %h -> %h", prev, code));
      prev = code;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
