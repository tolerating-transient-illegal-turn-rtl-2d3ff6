// tb_odt_input_buffer: random writes and reads (never writing a full buffer,
// as credit flow control guarantees) against a queue model; checks the front
// flit, empty and full every cycle.
module tb_odt_input_buffer;
  import odt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full;
  flit_t wr_flit, front;
  flit_t q[$];
  int checks = 0, failures = 0, n_full = 0;

  odt_input_buffer #(.DEPTH(4)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_flit(wr_flit),
    .rd_en(rd_en), .front(front), .empty(empty), .full(full)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 4)) begin
        failures++; $display("FAIL flags size=%0d empty=%0d full=%0d", q.size(), empty, full);
      end
      if (q.size() != 0) begin
        checks++;
        if (front != q[0]) begin failures++; $display("FAIL front"); end
      end
      n_full += full;
      rd_en = (q.size() != 0) && ($urandom_range(0, 99) < 45);
      wr_en = (q.size() < 4 || rd_en) && ($urandom_range(0, 99) < 55);
      wr_flit = flit_t'({$urandom, $urandom});
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_flit);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
