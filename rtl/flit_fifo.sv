// flit_fifo: input buffer of a switch port, DEPTH flits deep (two flits in
// the evaluated configuration). It stores link words as they arrive, still
// CAC-coded. Write side: wr_valid/wr_ready, where wr_ready is simply "not
// full" and comes from a register, so it does not depend combinationally on
// the read side. Read side: rd_valid shows the oldest word on rd_data, and
// rd_pop removes it. A push and a pop may happen in the same cycle. The
// handshake and the pointer structure are this design's choice.
module flit_fifo #(
  parameter int WIDTH = 52,
  parameter int DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_ready,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  input  logic             rd_pop
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [PW:0]      count;
  logic             push, pop;

  assign wr_ready = (count != (PW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rd_ptr];
  assign push     = wr_valid && wr_ready;
  assign pop      = rd_pop && rd_valid;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end

  always_ff @(posedge clk)
    if (push) mem[wr_ptr] <= wr_data;

  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> rd_valid)
    else $error("flit_fifo: pop while empty");
endmodule
