// tb_noc_schemes: the mesh with the two other link codes, on a 4 x 4 mesh
// to keep the run short. One network uses FOC (40-wire links), one FTC
// (53-wire links). Each core sends random 16-flit messages to random
// destinations; every delivered flit is checked (destination, pktid,
// payload word as a function of source, pktid and position), all messages
// must arrive, and every word on every inter-switch link must keep the
// code's rule relative to the word before it: FOC no 010 <-> 101 on three
// adjacent wires, FTC no two adjacent wires switching in opposite
// directions.
module tb_noc_schemes;
  timeunit 1ns;
  timeprecision 1ps;
  import cac_pkg::*;
  import noc_pkg::*;

  localparam int MX = 4, MY = 4, N = MX * MY, NPKT = 8, PAY = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
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

  // ------------------------------------------------------------ two meshes
  localparam int NET = 2;  // 0: FOC, 1: FTC
  logic [NET-1:0][N-1:0]             tx_valid, tx_ready, rx_valid, rx_ready;
  logic [NET-1:0][N-1:0][FLIT_W-1:0] tx_flit, rx_flit;
  logic [NET-1:0][N-1:0][NPORTS-1:0] ev_h, ev_p, ev_d;

  cac_noc_mesh #(.SCHEME(CAC_FOC), .MESH_X(MX), .MESH_Y(MY)) u_foc (
    .clk, .rst_n, .tx_valid(tx_valid[0]), .tx_flit(tx_flit[0]), .tx_ready(tx_ready[0]),
    .rx_valid(rx_valid[0]), .rx_flit(rx_flit[0]), .rx_ready(rx_ready[0]),
    .ev_header(ev_h[0]), .ev_payload(ev_p[0]), .ev_pktid_drop(ev_d[0]));
  cac_noc_mesh #(.SCHEME(CAC_FTC), .MESH_X(MX), .MESH_Y(MY)) u_ftc (
    .clk, .rst_n, .tx_valid(tx_valid[1]), .tx_flit(tx_flit[1]), .tx_ready(tx_ready[1]),
    .rx_valid(rx_valid[1]), .rx_flit(rx_flit[1]), .rx_ready(rx_ready[1]),
    .ev_header(ev_h[1]), .ev_payload(ev_p[1]), .ev_pktid_drop(ev_d[1]));

  // ---------------------------------------------------- link rule monitors
  localparam int CWF = code_w(CAC_FOC, FLIT_W), CWT = code_w(CAC_FTC, FLIT_W);
  logic [N-1:0][NPORTS-1:0][CWF-1:0] foc_prev;
  logic [N-1:0][NPORTS-1:0][CWT-1:0] ftc_prev;
  int bad_foc = 0, bad_ftc = 0;
  longint n_words = 0, n_pay = 0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++)
      for (int p = 0; p < NPORTS; p++) begin
        logic [CWF-1:0] a, b;
        logic [CWT-1:0] c, d;
        a = foc_prev[n][p]; b = u_foc.out_code[n][p];
        for (int i = 0; i + 2 < CWF; i++)
          if ((a[i +: 3] == 3'b010 && b[i +: 3] == 3'b101) ||
              (a[i +: 3] == 3'b101 && b[i +: 3] == 3'b010)) bad_foc++;
        c = ftc_prev[n][p]; d = u_ftc.out_code[n][p];
        for (int i = 0; i + 1 < CWT; i++)
          if ((c[i +: 2] == 2'b01 && d[i +: 2] == 2'b10) ||
              (c[i +: 2] == 2'b10 && d[i +: 2] == 2'b01)) bad_ftc++;
        foc_prev[n][p] <= b;
        ftc_prev[n][p] <= d;
        if (u_foc.out_valid[n][p] && u_foc.out_ready[n][p]) n_words++;
      end
    for (int k = 0; k < NET; k++)
      for (int n = 0; n < N; n++) n_pay += $countones(ev_p[k][n]);
  end

  // ---------------------------------------------------- sources and sinks
  logic [FLIT_W-1:0] txq [NET][N][$];
  int rem [NET][N], src_of [NET][N], pid [NET][N], kk [NET][N];
  int sent_msgs [NET], got_msgs [NET];

  always_comb
    for (int k = 0; k < NET; k++)
      for (int n = 0; n < N; n++) begin
        tx_valid[k][n] = rst_n && (txq[k][n].size() > 0);
        tx_flit[k][n]  = (txq[k][n].size() > 0) ? txq[k][n][0] : '0;
      end

  always @(posedge clk) if (rst_n)
    for (int k = 0; k < NET; k++)
      for (int n = 0; n < N; n++) begin
        if (tx_valid[k][n] && tx_ready[k][n]) void'(txq[k][n].pop_front());
        rx_ready[k][n] <= ($urandom_range(0, 4) != 0);
        if (rx_valid[k][n] && rx_ready[k][n]) begin
          if (rem[k][n] == 0) begin
            header_t h;
            h = header_t'(rx_flit[k][n]);
            check(int'(h.dst) == n, $sformatf("net %0d: header for %0d at %0d", k, h.dst, n));
            src_of[k][n] = int'(h.src); pid[k][n] = int'(h.pktid); kk[k][n] = 0;
            rem[k][n] = int'(h.flit_count);
          end else begin
            payload_t p;
            p = payload_t'(rx_flit[k][n]);
            check(int'(p.pktid) == pid[k][n] &&
                  p.data == payload_word(src_of[k][n], pid[k][n], kk[k][n]),
                  $sformatf("net %0d: payload %0d at %0d", k, kk[k][n], n));
            kk[k][n]++;
            rem[k][n]--;
            if (rem[k][n] == 0) got_msgs[k]++;
          end
        end
      end

  initial begin
    for (int k = 0; k < NET; k++) begin
      sent_msgs[k] = 0; got_msgs[k] = 0;
      for (int n = 0; n < N; n++) rem[k][n] = 0;
    end
    rx_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NPKT; m++)
      for (int s = 0; s < N; s++)
        for (int k = 0; k < NET; k++) begin
          header_t h;
          int d = $urandom_range(0, N - 1);
          int id = (s * NPKT + m) % 256;
          h = '{pktid: PKTID_W'(id), flit_count: FCNT_W'(PAY), addr_len: ALEN_W'(ADDR_W),
                src: ADDR_W'(s), dst: ADDR_W'(d)};
          txq[k][s].push_back(FLIT_W'(h));
          for (int j = 0; j < PAY; j++) txq[k][s].push_back({PKTID_W'(id), payload_word(s, id, j)});
          sent_msgs[k]++;
        end
    for (int c = 0; c < 50000; c++) begin
      @(posedge clk);
      if (got_msgs[0] == sent_msgs[0] && got_msgs[1] == sent_msgs[1]) break;
    end
    repeat (20) @(posedge clk);
    for (int k = 0; k < NET; k++)
      check(got_msgs[k] == sent_msgs[k], $sformatf("net %0d delivered %0d of %0d", k, got_msgs[k], sent_msgs[k]));
    check(bad_foc == 0, $sformatf("%0d FOC overlap violations", bad_foc));
    check(bad_ftc == 0, $sformatf("%0d FTC transition violations", bad_ftc));
    check(n_words > 0 && n_pay > 0, "no traffic seen");
    $display("link words %0d, payload bypasses %0d", n_words, n_pay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
