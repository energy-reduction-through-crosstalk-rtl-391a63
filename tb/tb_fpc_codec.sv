// tb_fpc_codec: self-checking test of fpc_encoder and fpc_decoder (32-bit
// flit, 52 wires). The reference encoder is written here from the FPC 4-5
// equations with the shared boundary bit and the 2-wire tail. Checks: the
// printed code table rows, encoder against reference, decoder round trip,
// and the forbidden-pattern rule (no 010 or 101 anywhere on the link).
module tb_fpc_codec;
  localparam int DW = 32, CW = 52;
  logic [DW-1:0] data, dec_out;
  logic [CW-1:0] code, code_in;
  int checks = 0, failures = 0;

  fpc_encoder u_enc (.data(data), .code(code));
  fpc_decoder u_dec (.code(code_in), .data(dec_out));

  function automatic logic [4:0] sub(logic [3:0] d);
    logic [4:0] c;
    c[0] = d[0];
    c[1] = (d[0] & d[1]) | (d[2] & d[1]) | (d[1] & !d[3]) | (d[0] & d[2] & !d[3]);
    c[2] = (d[2] & !d[3]) | (d[1] & d[2]) | (!d[0] & d[2]) | (d[1] & !d[0] & !d[3]);
    c[3] = (d[2] & d[3]) | (!d[0] & d[2]) | (d[2] & d[1]) | (d[1] & d[3] & !d[0]);
    c[4] = d[3];
    return c;
  endfunction

  function automatic logic [CW-1:0] ref_enc(logic [DW-1:0] d);
    logic [CW-1:0] c;
    for (int k = 0; k < 10; k++) c[5*k +: 5] = sub(d[3*k +: 4]);
    c[50] = d[30];
    c[51] = d[31];
    return c;
  endfunction

  function automatic bit pattern_violation(logic [CW-1:0] a);
    for (int i = 0; i + 2 < CW; i++)
      if (a[i +: 3] == 3'b010 || a[i +: 3] == 3'b101) return 1'b1;
    return 1'b0;
  endfunction

  logic [4:0] table3 [8] = '{5'b00000, 5'b00001, 5'b00110, 5'b00011,
                             5'b01100, 5'b00111, 5'b01110, 5'b01111};

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
    for (int v = 0; v < 8; v++) begin
      data = DW'(v); code_in = '0; #1;
      check(code == CW'(table3[v]), $sformatf("table row %0d: %b", v, code[4:0]));
    end
    for (int n = 0; n < 3000; n++) begin
      data = $urandom;
      code_in = ref_enc(data);
      #1;
      check(code == ref_enc(data), $sformatf("encode %h: %h", data, code));
      check(dec_out == data, $sformatf("decode %h: %h", data, dec_out));
      check(!pattern_violation(code), $sformatf("FP violation %h", code));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
