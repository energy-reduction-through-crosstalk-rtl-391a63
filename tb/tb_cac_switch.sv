// tb_cac_switch: self-checking test of one cac_switch (FPC code) placed at
// node 9 (x = 1, y = 1) of an 8 x 8 mesh, so all five outputs are reachable.
//
// Directed part:
//  * latency: a header written into the West buffer appears on the East
//    link 3 clock edges later, re-encoded (equal to the reference FPC
//    codeword of the header); its payload flits follow 2 edges after they
//    are written once the packet streams (checked on the last one), one
//    per cycle.
//  * payload bypass: payload flits are sent with arbitrary data wires (not
//    FPC codewords) behind a correctly coded pktid; they must come out bit
//    for bit unchanged, which a decode/re-encode would not do.
//  * coded pktid: a payload flit whose coded pktid differs from its
//    header's is dropped and flagged, and the packet completes with the
//    next matching flit.
// Random part: all five inputs send packets of 0..5 payload flits to random
// destinations while the outputs see random backpressure. Every output must
// deliver whole packets, each input's packets in order per output, each
// word equal to the word sent (headers re-encoded to the same codeword).
module tb_cac_switch;
  timeunit 1ns;
  timeprecision 1ps;
  import cac_pkg::*;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  localparam int CW = FPC_CW;
  localparam int ME = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0]          in_valid, in_ready, out_valid, out_ready;
  logic [NPORTS-1:0][CW-1:0]  in_code, out_code;
  logic [NPORTS-1:0]          ev_header, ev_payload, ev_pktid_drop;

  cac_switch #(.SCHEME(CAC_FPC), .MESH_X(8), .MESH_Y(8), .MY_ADDR(ME), .BUF_DEPTH(2)) dut (
    .clk, .rst_n, .in_valid, .in_code, .in_ready, .out_valid, .out_code, .out_ready,
    .ev_header, .ev_payload, .ev_pktid_drop
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic port_e xy(int dst);
    int cx = ME % 8, cy = ME / 8, dx = dst % 8, dy = dst / 8;
    if (dx > cx) return P_EAST;
    if (dx < cx) return P_WEST;
    if (dy > cy) return P_SOUTH;
    if (dy < cy) return P_NORTH;
    return P_LOCAL;
  endfunction

  function automatic logic [CW-1:0] hdr_code(int pktid, int cnt, int src, int dst);
    header_t h;
    h = '{pktid: PKTID_W'(pktid), flit_count: FCNT_W'(cnt), addr_len: ALEN_W'(6),
          src: ADDR_W'(src), dst: ADDR_W'(dst)};
    return fpc_enc32(FLIT_W'(h));
  endfunction

  // A payload word: correct coded pktid on wires 51..40, anything below.
  function automatic logic [CW-1:0] pay_code(int pktid);
    logic [CW-1:0] c, p;
    p = fpc_enc32({PKTID_W'(pktid), 24'h0});
    c = {$urandom, $urandom};
    c[CW-1:40] = p[CW-1:40];
    return c;
  endfunction

  // ---------------------------------------------------------- stimulus
  typedef logic [CW-1:0] word_q_t[$];
  word_q_t inq [NPORTS];                    // words each input still has to send
  word_q_t expq [NPORTS][NPORTS];           // [in][out] packets' words in order
  int      exp_len [NPORTS][NPORTS][$];     // [in][out] packet lengths
  bit      rand_ready = 1'b0;

  always_comb
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i] = rst_n && (inq[i].size() > 0);
      in_code[i]  = (inq[i].size() > 0) ? inq[i][0] : '0;
    end

  // ---------------------------------------------------------- checking
  int out_from [NPORTS];     // input whose packet is on output o, -1 if none
  int out_left [NPORTS];
  int t_in_hdr = -1, t_in_pay = -1, t_out_hdr = -1, t_out_pay = -1, t_out_last = -1;
  int n_hdr = 0, n_pay = 0, n_drop = 0, n_contend = 0, n_stall = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPORTS; i++)
      if (in_valid[i] && in_ready[i]) void'(inq[i].pop_front());
    for (int o = 0; o < NPORTS; o++) begin
      if ($countones(dut.req[o]) > 1) n_contend++;
      if (out_valid[o] && !out_ready[o]) n_stall++;
      if (out_valid[o] && out_ready[o]) begin
        if (out_from[o] < 0) begin
          // a header: find the input whose next packet to o it is
          int src = -1;
          for (int i = 0; i < NPORTS; i++)
            if (expq[i][o].size() > 0 && expq[i][o][0] == out_code[o]) src = i;
          check(src >= 0, $sformatf("unexpected header on output %0d", o));
          if (src >= 0) begin
            void'(expq[src][o].pop_front());
            out_left[o] = exp_len[src][o].pop_front();
            if (out_left[o] > 0) out_from[o] = src;
          end
        end else begin
          check(expq[out_from[o]][o].size() > 0 && expq[out_from[o]][o][0] == out_code[o],
                $sformatf("payload on output %0d differs", o));
          void'(expq[out_from[o]][o].pop_front());
          out_left[o]--;
          if (out_left[o] == 0) out_from[o] = -1;
        end
      end
    end
    n_hdr  += $countones(ev_header);
    n_pay  += $countones(ev_payload);
    n_drop += $countones(ev_pktid_drop);
  end

  always_ff @(posedge clk) out_ready <= rand_ready ? NPORTS'($urandom) | NPORTS'($urandom) : '1;

  task automatic send_pkt(int i, int pktid, int cnt, int dst, int stray_at = -1);
    port_e o = xy(dst);
    inq[i].push_back(hdr_code(pktid, cnt, i, dst));
    expq[i][o].push_back(hdr_code(pktid, cnt, i, dst));
    exp_len[i][o].push_back(cnt);
    for (int k = 0; k < cnt; k++) begin
      logic [CW-1:0] w;
      if (k == stray_at) inq[i].push_back(pay_code(pktid ^ 8'h5a));
      w = pay_code(pktid);
      inq[i].push_back(w);
      expq[i][o].push_back(w);
    end
  endtask

  function automatic bit all_done();
    for (int i = 0; i < NPORTS; i++) begin
      if (inq[i].size() > 0) return 1'b0;
      for (int o = 0; o < NPORTS; o++) if (expq[i][o].size() > 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    for (int o = 0; o < NPORTS; o++) begin out_from[o] = -1; out_left[o] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---- latency, one packet West -> East with 4 payload flits
    @(negedge clk);
    send_pkt(P_WEST, 3, 4, 12);
    fork
      begin
        int seen_pay = 0;
        for (int c = 0; c < 40; c++) begin
          @(posedge clk);
          if (in_valid[P_WEST] && in_ready[P_WEST]) begin
            if (t_in_hdr < 0) t_in_hdr = cycle; else t_in_pay = cycle;  // last payload
          end
          if (out_valid[P_EAST] && out_ready[P_EAST]) begin
            if (t_out_hdr < 0) begin
              t_out_hdr = cycle;
              check(out_code[P_EAST] == hdr_code(3, 4, P_WEST, 12), "re-encoded header word");
            end else begin
              if (t_out_pay < 0) t_out_pay = cycle;
              seen_pay++;
              check(cycle == t_out_pay + seen_pay - 1, "payload flits one per cycle");
              t_out_last = cycle;
            end
          end
        end
      end
    join
    check(t_out_hdr - t_in_hdr == 3, $sformatf("header latency %0d", t_out_hdr - t_in_hdr));
    check(t_out_last - t_in_pay == 2, $sformatf("payload latency %0d", t_out_last - t_in_pay));

    // ---- coded pktid mismatch: stray flit between payloads 1 and 2
    send_pkt(P_NORTH, 40, 3, 9, 1);
    repeat (30) @(posedge clk);
    check(n_drop == 1, $sformatf("drops %0d", n_drop));
    check(all_done(), "pktid packet not delivered");

    // ---- contention: all inputs to the local port at once, zero-length packets too
    for (int i = 0; i < NPORTS; i++) send_pkt(i, 100 + i, i, ME);
    repeat (60) @(posedge clk);
    check(all_done(), "contention packets not delivered");

    // ---- random traffic with backpressure
    rand_ready = 1'b1;
    for (int n = 0; n < 400; n++)
      send_pkt($urandom_range(0, NPORTS - 1), $urandom_range(0, 255), $urandom_range(0, 5),
               $urandom_range(0, 63));
    for (int c = 0; c < 20000 && !all_done(); c++) @(posedge clk);
    rand_ready = 1'b0;
    repeat (10) @(posedge clk);
    check(all_done(), "random traffic not drained");
    for (int o = 0; o < NPORTS; o++) check(out_from[o] == -1, "output left inside a packet");

    $display("headers %0d payloads %0d drops %0d contention %0d stalls %0d",
             n_hdr, n_pay, n_drop, n_contend, n_stall);
    check(n_contend > 0, "no contention seen");
    check(n_stall > 0, "no backpressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
