// tb_mem_module: stores and loads through one memory module, checks the
// one-cycle response, the response hold and ageing while the backward
// network refuses it, and the refusal of new packets meanwhile.
module tb_mem_module;
  import bn_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n;
  pkt_t req;
  logic req_fail, resp_fail;
  resp_t resp;
  logic [31:0] model [D];
  bit written [D];
  int checks = 0, failures = 0;

  mem_module #(.MEM_DEPTH(D), .MOD_ID(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pkt_t mk(logic we, int a, int src, logic [31:0] d);
    automatic pkt_t p = '0;
    p.valid = 1; p.we = we; p.iaddr = IADDR_W'(a); p.src = MOD_W'(src); p.wdata = d; p.module_id = 3;
    return p;
  endfunction

  initial begin
    rst_n = 0; req = '0; resp_fail = 0;
    @(posedge clk); @(posedge clk); rst_n = 1; #1;
    checks++; if (resp.valid) failures++;
    for (int i = 0; i < 400; i++) begin
      automatic int a = $urandom_range(0, D - 1);
      automatic logic we = !written[a] || ($urandom_range(0, 1) == 1);
      automatic logic [31:0] d = $urandom;
      automatic int src = $urandom_range(0, 15);
      req = mk(we, a, src, d);
      #1; checks++; if (req_fail) failures++;
      @(posedge clk); #1;
      req = '0;
      checks++;
      if (!resp.valid || resp.src != MOD_W'(src) || resp.module_id != MOD_W'(3) || resp.we != we ||
          resp.rdata != (we ? d : model[a]) || resp.age != '0) begin
        failures++; $display("resp mismatch at %0d", i);
      end
      if (we) begin model[a] = d; written[a] = 1; end
      // sometimes the backward network refuses the response for a while
      if ($urandom_range(0, 3) == 0) begin
        automatic int n = $urandom_range(1, 4);
        automatic resp_t held = resp;
        for (int k = 0; k < n; k++) begin
          resp_fail = 1; req = mk(1, a, 0, 32'hdead_beef);
          #1; checks++; if (!req_fail) begin failures++; $display("no refusal"); end
          @(posedge clk); #1;
          checks++;
          if (!resp.valid || resp.rdata != held.rdata || resp.age != age_t'(k + 1)) begin failures++; $display("hold: v=%0d age=%0d k=%0d", resp.valid, resp.age, k); end
        end
        resp_fail = 0; req = '0;
      end
      @(posedge clk); #1;
      checks++; if (resp.valid) begin failures++; $display("stale"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
