// rr_arbiter: round-robin arbiter for one switch output. Among the asserted
// req bits it grants the first one at or after the rotating priority
// pointer; when `accept` is high the pointer moves just past the granted
// requester, so every requester is served within N grants. grant is
// one-hot (or zero) and combinational from req. The round-robin policy is
// this design's choice; the output arbitration stage itself is named, not
// described.
module rr_arbiter #(
  parameter int N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] grant,
  output logic [$clog2(N)-1:0] grant_idx
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] ptr;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int k = N - 1; k >= 0; k--) begin
      int idx;
      idx = (int'(ptr) + k) % N;
      if (req[idx]) begin
        grant     = '0;
        grant[idx] = 1'b1;
        grant_idx = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                ptr <= '0;
    else if (accept && |grant) ptr <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
