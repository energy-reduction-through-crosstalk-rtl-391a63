// tb_cac_noc_mesh: end-to-end test of the coded mesh at its default size
// (8 x 8 cores, FPC code, 2-flit buffers, 16-flit messages).
//
// Phase 1, latency: one message from node 0 to node 63 on an idle network.
// Its header must arrive 1 + 3 * (hops + 1) cycles after injection (NI
// register, then buffer write, grant and output register in each of the
// hops + 1 switches), and its 15 payload flits on the 15 cycles after that,
// one per cycle, as the codec adds no pipeline stage.
// Phase 2, traffic: every core sends NPKT messages of 1 header + 15 payload
// flits to uniformly random destinations (itself included) while receivers
// randomly withhold rx_ready. Each payload word is a function of source,
// pktid and position, so every delivered flit is checked without a
// reference model: right destination, contiguous packet, matching pktid,
// expected data, and every message delivered exactly once.
// Phase 3, coded-pktid check: node 5 sends a message whose first payload
// flit carries a foreign pktid; the source switch must drop exactly that
// flit and deliver the rest.
// Link monitor: every word a switch output drives must be an FPC codeword
// (no 010 or 101 on the wires).
// Mechanism counters (each must be non-zero): header flits switched through
// the decode/route/encode path, payload flits switched while still coded,
// output contention (two headers wanting one output in the same cycle),
// link backpressure (word held while the next buffer is full), receiver
// backpressure, and the pktid-mismatch drop.
module tb_cac_noc_mesh;
  timeunit 1ns;
  timeprecision 1ps;
  import cac_pkg::*;
  import noc_pkg::*;

  localparam int MX = 8, MY = 8, N = MX * MY;
  localparam int NPKT = 6;
  localparam int PAYLOADS = 15;
  localparam int CW = code_w(CAC_FPC, FLIT_W);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]              tx_valid, tx_ready, rx_valid, rx_ready;
  logic [N-1:0][FLIT_W-1:0]  tx_flit, rx_flit;
  logic [N-1:0][NPORTS-1:0]  ev_header, ev_payload, ev_pktid_drop;

  cac_noc_mesh dut (
    .clk, .rst_n, .tx_valid, .tx_flit, .tx_ready, .rx_valid, .rx_flit, .rx_ready,
    .ev_header, .ev_payload, .ev_pktid_drop
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] payload_word(int src, int pktid, int k);
    logic [31:0] h;
    h = 32'(src) * 32'h9E3779B1 ^ 32'(pktid) * 32'h85EBCA77 ^ 32'(k + 1) * 32'hC2B2AE3D;
    return h[31:8];
  endfunction

  function automatic logic [FLIT_W-1:0] mk_header(int pktid, int cnt, int src, int dst);
    header_t h;
    h.pktid      = PKTID_W'(pktid);
    h.flit_count = FCNT_W'(cnt);
    h.addr_len   = ALEN_W'(ADDR_W);
    h.src        = ADDR_W'(src);
    h.dst        = ADDR_W'(dst);
    return FLIT_W'(h);
  endfunction

  function automatic int hops(int a, int b);
    int ax = a % MX, ay = a / MX, bx = b % MX, by = b / MX;
    return (ax > bx ? ax - bx : bx - ax) + (ay > by ? ay - by : by - ay);
  endfunction

  // -------------------------------------------------------------- sources
  logic [FLIT_W-1:0] txq [N][$];
  bit                inj_throttle = 1'b0;
  bit                rx_throttle  = 1'b0;
  int                expected_msgs [N];   // per destination
  int                pktid_next [N];

  always_comb
    for (int n = 0; n < N; n++) begin
      tx_valid[n] = (txq[n].size() > 0);
      tx_flit[n]  = (txq[n].size() > 0) ? txq[n][0] : '0;
    end

  // ------------------------------------------------------------ receivers
  int  rx_state_rem [N];
  int  rx_src [N], rx_pktid [N], rx_k [N];
  int  msgs_received = 0, flits_received = 0;
  int  seen [N][N];            // messages from src to dst
  longint first_hdr_cycle = -1, last_pay_cycle = -1;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    for (int n = 0; n < N; n++) begin
      if (rst_n && tx_valid[n] && tx_ready[n]) void'(txq[n].pop_front());
      rx_ready[n] <= rx_throttle ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (rst_n && rx_valid[n] && rx_ready[n]) begin
        flits_received++;
        if (rx_state_rem[n] == 0) begin
          header_t h;
          h = header_t'(rx_flit[n]);
          check(int'(h.dst) == n, $sformatf("header for %0d delivered at %0d", h.dst, n));
          check(h.addr_len == ALEN_W'(ADDR_W), "addr_len field");
          rx_src[n]       = int'(h.src);
          rx_pktid[n]     = int'(h.pktid);
          rx_k[n]         = 0;
          rx_state_rem[n] = int'(h.flit_count);
          if (first_hdr_cycle < 0) first_hdr_cycle = cycle;
          if (h.flit_count == 0) begin
            msgs_received++;
            seen[rx_src[n]][n]++;
          end
        end else begin
          payload_t p;
          p = payload_t'(rx_flit[n]);
          check(int'(p.pktid) == rx_pktid[n], $sformatf("pktid at %0d: %0d vs %0d", n, p.pktid, rx_pktid[n]));
          check(p.data == payload_word(rx_src[n], rx_pktid[n], rx_k[n]),
                $sformatf("payload %0d of %0d->%0d", rx_k[n], rx_src[n], n));
          rx_k[n]++;
          rx_state_rem[n]--;
          last_pay_cycle = cycle;
          if (rx_state_rem[n] == 0) begin
            msgs_received++;
            seen[rx_src[n]][n]++;
          end
        end
      end
    end
  end

  // ------------------------------------------------- mechanism counters
  longint n_hdr = 0, n_pay = 0, n_drop = 0, n_contend = 0, n_link_stall = 0, n_rx_stall = 0;
  longint n_bad_code = 0;

  function automatic bit fpc_ok(logic [CW-1:0] w);
    for (int i = 0; i + 2 < CW; i++)
      if (w[i +: 3] == 3'b010 || w[i +: 3] == 3'b101) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      n_hdr  += $countones(ev_header[n]);
      n_pay  += $countones(ev_payload[n]);
      n_drop += $countones(ev_pktid_drop[n]);
      if (rx_valid[n] && !rx_ready[n]) n_rx_stall++;
      for (int p = 1; p < NPORTS; p++) begin
        if (dut.out_valid[n][p] && !dut.out_ready[n][p]) n_link_stall++;
        if (!fpc_ok(dut.out_code[n][p])) n_bad_code++;
      end
    end
  end

  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      always @(posedge clk) if (rst_n)
        for (int o = 0; o < NPORTS; o++)
          if ($countones(dut.g_y[y].g_x[x].u_sw.req[o]) > 1) n_contend++;
    end
  end

  task automatic send_msg(int src, int dst, int cnt, int pktid);
    txq[src].push_back(mk_header(pktid, cnt, src, dst));
    for (int k = 0; k < cnt; k++)
      txq[src].push_back({PKTID_W'(pktid), payload_word(src, pktid, k)});
    expected_msgs[dst]++;
  endtask

  // Wait until every queue is empty and no packet is half delivered, or
  // until no flit has been delivered for 1000 cycles (a stuck network).
  task automatic wait_drained(int max_cycles);
    int c = 0, idle = 0, last = flits_received;
    while (c < max_cycles && idle < 1000) begin
      bit busy = 1'b0;
      @(posedge clk);
      c++;
      idle = (flits_received == last) ? idle + 1 : 0;
      last = flits_received;
      for (int n = 0; n < N; n++) if (txq[n].size() > 0 || rx_state_rem[n] != 0) busy = 1'b1;
      if (!busy && c > 200) break;
    end
  endtask

  initial begin
    int total_expected;
    longint t0;
    for (int n = 0; n < N; n++) begin
      rx_state_rem[n] = 0; expected_msgs[n] = 0; pktid_next[n] = 1;
      for (int m = 0; m < N; m++) seen[n][m] = 0;
    end
    rx_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- phase 1: unloaded latency and one flit per cycle
    @(negedge clk);
    t0 = cycle;
    send_msg(0, N - 1, PAYLOADS, 0);
    wait_drained(2000);
    check(first_hdr_cycle - t0 == longint'(1 + 3 * (hops(0, N - 1) + 1)),
          $sformatf("header latency %0d, expected %0d", first_hdr_cycle - t0, 1 + 3 * (hops(0, N - 1) + 1)));
    check(last_pay_cycle - first_hdr_cycle == PAYLOADS,
          $sformatf("payload train took %0d cycles", last_pay_cycle - first_hdr_cycle));
    $display("unloaded: header after %0d cycles over %0d hops, last payload %0d cycles later",
             first_hdr_cycle - t0, hops(0, N - 1), last_pay_cycle - first_hdr_cycle);

    // ---- phase 2: uniform random traffic with receiver backpressure
    rx_throttle = 1'b1;
    for (int m = 0; m < NPKT; m++)
      for (int s = 0; s < N; s++) begin
        send_msg(s, $urandom_range(0, N - 1), PAYLOADS, pktid_next[s]);
        pktid_next[s] = (pktid_next[s] + 1) % 256;
      end
    wait_drained(150000);
    rx_throttle = 1'b0;

    // ---- phase 3: a payload flit with a foreign pktid is dropped
    txq[5].push_back(mk_header(77, 2, 5, 42));
    txq[5].push_back({PKTID_W'(78), payload_word(5, 77, 0)});   // stray flit
    txq[5].push_back({PKTID_W'(77), payload_word(5, 77, 0)});
    txq[5].push_back({PKTID_W'(77), payload_word(5, 77, 1)});
    expected_msgs[42]++;
    wait_drained(2000);

    total_expected = 0;
    for (int n = 0; n < N; n++) total_expected += expected_msgs[n];
    check(msgs_received == total_expected,
          $sformatf("messages received %0d of %0d", msgs_received, total_expected));
    for (int n = 0; n < N; n++) begin
      int got;
      got = 0;
      for (int s = 0; s < N; s++) got += seen[s][n];
      check(got == expected_msgs[n], $sformatf("node %0d got %0d of %0d messages", n, got, expected_msgs[n]));
      check(rx_state_rem[n] == 0, $sformatf("node %0d stuck inside a packet", n));
    end
    check(n_drop == 1, $sformatf("pktid drops %0d, expected 1", n_drop));
    check(n_bad_code == 0, $sformatf("%0d link words broke the FPC rule", n_bad_code));

    $display("headers switched %0d, payload flits switched coded %0d, contention %0d, link stalls %0d, rx stalls %0d, pktid drops %0d",
             n_hdr, n_pay, n_contend, n_link_stall, n_rx_stall, n_drop);
    check(n_hdr > 0, "no header switched");
    check(n_pay > 0, "no payload bypass");
    check(n_contend > 0, "no output contention");
    check(n_link_stall > 0, "no link backpressure");
    check(n_rx_stall > 0, "no receiver backpressure");
    check(n_drop > 0, "no pktid drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
