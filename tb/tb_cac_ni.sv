// tb_cac_ni: self-checking test of the network interface (FPC code).
// Transmit: random flits offered with random gaps and a switch that
// randomly refuses; every flit must reach the switch side exactly once, in
// order, as its reference FPC codeword, one edge after it is accepted, and
// the link word must not change while refused. Receive: reference
// codewords of random flits must come out decoded, with ready passed back.
module tb_cac_ni;
  timeunit 1ns;
  timeprecision 1ps;
  import noc_pkg::*;
  import tb_ref_pkg::*;
  localparam int CW = FPC_CW;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic tx_valid, tx_ready, rx_valid, rx_ready, sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;
  logic [FLIT_W-1:0] tx_flit, rx_flit;
  logic [CW-1:0] sw_in_code, sw_out_code;
  int checks = 0, failures = 0;
  logic [FLIT_W-1:0] sent [$];

  cac_ni dut (.clk, .rst_n, .tx_valid, .tx_flit, .tx_ready, .rx_valid, .rx_flit, .rx_ready,
              .sw_in_valid, .sw_in_code, .sw_in_ready, .sw_out_valid, .sw_out_code, .sw_out_ready);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got = 0, n_sent = 0;
    logic [CW-1:0] held;
    bit was_stalled = 0;
    tx_valid = 0; tx_flit = '0; sw_in_ready = 0; sw_out_valid = 0; sw_out_code = '0; rx_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [FLIT_W-1:0] d;
      @(negedge clk);
      // receive path, combinational
      d = $urandom;
      sw_out_code  = fpc_enc32(d);
      sw_out_valid = $urandom_range(0, 1);
      rx_ready     = $urandom_range(0, 1);
      #1;
      check(rx_flit == d, "decoded flit");
      check(rx_valid == sw_out_valid && sw_out_ready == rx_ready, "receive handshake");
      // transmit path
      if (was_stalled) check(sw_in_valid && sw_in_code == held, "link word held while refused");
      if (!(tx_valid && !tx_ready)) begin
        tx_valid = ($urandom_range(0, 3) != 0);
        tx_flit  = $urandom;
      end
      sw_in_ready = ($urandom_range(0, 2) != 0);
      #1;
      @(posedge clk);
      was_stalled = sw_in_valid && !sw_in_ready;
      held = sw_in_code;
      if (sw_in_valid && sw_in_ready) begin
        check(sent.size() > 0 && sw_in_code == fpc_enc32(sent[0]), "coded flit on local link");
        if (sent.size() > 0) void'(sent.pop_front());
        got++;
      end
      if (tx_valid && tx_ready) begin sent.push_back(tx_flit); n_sent++; end
    end
    check(got > 1000 && n_sent - got <= 1, $sformatf("sent %0d delivered %0d", n_sent, got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
