// tb_ftc_codec: self-checking test of ftc_encoder and ftc_decoder (32-bit
// flit, 53 wires). The reference encoder is written here from the FTC 3-4
// equations, the shield layout (one grounded wire between sub-channels) and
// the 2-bit tail. Checks: the printed code table rows, encoder against
// reference, decoder round trip, shields at 0, and the forbidden-transition
// rule (no two adjacent wires switching in opposite directions) between
// consecutive link words.
module tb_ftc_codec;
  localparam int DW = 32, CW = 53;
  logic [DW-1:0] data, dec_out;
  logic [CW-1:0] code, code_in;
  int checks = 0, failures = 0;

  ftc_encoder u_enc (.data(data), .code(code));
  ftc_decoder u_dec (.code(code_in), .data(dec_out));

  function automatic logic [3:0] sub(logic [2:0] d);
    logic [3:0] c;
    c[0] = d[1] | (d[2] & !d[0]);
    c[1] = (d[0] & d[1] & d[2]) | (!d[0] & !d[1] & d[2]);
    c[2] = d[0] | d[2];
    c[3] = (d[0] & d[2]) | (d[1] & d[2]);
    return c;
  endfunction

  function automatic logic [CW-1:0] ref_enc(logic [DW-1:0] d);
    logic [CW-1:0] c;
    logic [3:0] t;
    c = '0;
    for (int k = 0; k < 10; k++) c[5*k +: 4] = sub(d[3*k +: 3]);
    t = sub({1'b0, d[31:30]});
    c[52:50] = t[2:0];
    return c;
  endfunction

  function automatic bit transition_violation(logic [CW-1:0] a, logic [CW-1:0] b);
    for (int i = 0; i + 1 < CW; i++)
      if ((a[i +: 2] == 2'b01 && b[i +: 2] == 2'b10) ||
          (a[i +: 2] == 2'b10 && b[i +: 2] == 2'b01)) return 1'b1;
    return 1'b0;
  endfunction

  logic [3:0] table2 [8] = '{4'b0000, 4'b0100, 4'b0001, 4'b0101,
                             4'b0111, 4'b1100, 4'b1101, 4'b1111};

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
      check(code == CW'(table2[v]), $sformatf("table row %0d: %b", v, code[3:0]));
    end
    prev = '0;
    for (int n = 0; n < 3000; n++) begin
      data = $urandom;
      code_in = ref_enc(data);
      #1;
      check(code == ref_enc(data), $sformatf("encode %h: %h", data, code));
      check(dec_out == data, $sformatf("decode %h: %h", data, dec_out));
      check(!transition_violation(prev, code), $sformatf("FT violation %h -> %h", prev, code));
      for (int k = 0; k < 10; k++) check(code[5*k+4] == 1'b0, "shield");
      prev = code;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
