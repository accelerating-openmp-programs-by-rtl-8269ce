// tb_ring_buffer: fills, overfills, drains and streams a 4-entry ring
// buffer, comparing with a queue model.
module tb_ring_buffer;
  localparam int DEPTH = 4, W = 32;
  logic clk = 0, rst_n;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [2:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0;

  ring_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic w, input logic r);
    automatic logic [W-1:0] d = $urandom;
    wr_en = w; rd_en = r; wr_data = d;
    #1;
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || int'(count) != q.size()) begin
      failures++; if (failures < 4) $display("flags: count=%0d model=%0d t=%0t", count, q.size(), $time);
    end
    if (r && q.size() > 0) begin
      checks++;
      if (rd_data != q[0]) begin failures++; $display("rd %h exp %h", rd_data, q[0]); end
    end
    @(posedge clk);
    // a write into a full buffer is ignored even if a read frees a slot
    begin
      automatic bit wr_ok = w && (q.size() < DEPTH);
      if (r && q.size() > 0) void'(q.pop_front());
      if (wr_ok) q.push_back(d);
    end
    #1;
  endtask

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0; wr_data = '0;
    @(posedge clk); @(posedge clk); rst_n = 1; #1;
    for (int i = 0; i < 6; i++) step(1, 0);      // overfill: two writes ignored
    checks++; if (!full) failures++;
    step(1, 1);                                   // full: read and write together
    for (int i = 0; i < 6; i++) step(0, 1);      // drain and underflow
    checks++; if (!empty) failures++;
    for (int i = 0; i < 200; i++) step($urandom_range(0, 1), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
