// tb_rr_arbiter: self-checking test of the 5-way round-robin arbiter.
// A model pointer is kept here; each cycle the grant must be the first
// requester at or after it (one-hot, zero when nobody asks), and with all
// five requesting continuously every requester must be granted once in
// every five consecutive accepted grants.
module tb_rr_arbiter;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] req, grant;
  logic [2:0] grant_idx;
  logic accept;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .accept, .grant, .grant_idx);

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
    int cnt [N];
    req = '0; accept = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [N-1:0] e;
      @(negedge clk);
      req    = (n < 2000) ? N'($urandom) : '1;
      accept = (n < 2000) ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (n == 2000) for (int i = 0; i < N; i++) cnt[i] = 0;
      e = '0;
      for (int k = N - 1; k >= 0; k--) if (req[(ptr + k) % N]) begin e = '0; e[(ptr + k) % N] = 1'b1; end
      #1;
      check(grant == e, $sformatf("req %b ptr %0d grant %b expected %b", req, ptr, grant, e));
      if (|e) check(grant_idx == 3'($clog2(e)), "grant index");
      if (n >= 2000) begin
        for (int i = 0; i < N; i++) if (grant[i]) cnt[i]++;
        if ((n - 2000) % N == N - 1)
          for (int i = 0; i < N; i++) check(cnt[i] == (n - 1999) / N, "fair share");
      end
      @(posedge clk);
      if (accept && |e) ptr = ($clog2(e) + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
