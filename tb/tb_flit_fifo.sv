// tb_flit_fifo: self-checking test of the 2-deep input buffer. Random
// pushes and pops are compared with a queue model: order and data, the
// full flag (wr_ready low exactly when two words are held), the empty flag,
// and simultaneous push and pop. The buffer must accept a word and show it
// at its head one edge later.
module tb_flit_fifo;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int W = 52, D = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_valid, wr_ready, rd_valid, rd_pop;
  logic [W-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_valid, .wr_data, .wr_ready,
                                        .rd_valid, .rd_data, .rd_pop);

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
    wr_valid = 0; rd_pop = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      check(rd_valid == (model.size() > 0), "empty flag");
      check(wr_ready == (model.size() < D), "full flag");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      wr_valid = ($urandom_range(0, 2) != 0);
      wr_data  = {$urandom, $urandom};
      rd_pop   = rd_valid && ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (rd_pop) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
