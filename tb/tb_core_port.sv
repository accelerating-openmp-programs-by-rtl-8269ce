// tb_core_port: plays the network around one core port (core 5 of 16):
// checks the packet built from a request (hash, R/W, source, data), that
// a request goes out in the cycle it is made, that a failed packet is
// repeated the next cycle with a higher age while the core stalls, and
// that the response completes the reference.
module tb_core_port;
  import bn_pkg::*;
  localparam int N = 16, D = 64, ID = 5;
  logic clk = 0, rst_n;
  hash_key_t key;
  logic req_valid, req_we, req_ready, stall, resp_valid, net_fail;
  logic [LADDR_W-1:0] req_addr;
  logic [DATA_W-1:0] req_wdata, resp_rdata;
  pkt_t net_pkt;
  resp_t net_resp;
  int checks = 0, failures = 0;

  core_port #(.N_CORES(N), .MEM_DEPTH(D), .CORE_ID(ID)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_mod(int a);
    automatic int ia = (a >> 4) & (D - 1);
    automatic int m = a & (N - 1);
    automatic int masked = ia & int'(key.mask);
    m ^= masked & 15; m ^= (masked >> 4) & 15;
    return m ^ (int'(key.offset) & 15);
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    net_fail = 0; net_resp = '0; key = '0;
    key.mask = IADDR_W'(16'h2d); key.offset = MOD_W'(9);
    @(posedge clk); @(posedge clk); rst_n = 1; #1;
    for (int t = 0; t < 300; t++) begin
      automatic int a = $urandom_range(0, N * D - 1);
      automatic int nfail = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 5) : 0;
      automatic int wait_c = $urandom_range(0, 3);
      automatic logic we = $urandom_range(0, 1);
      automatic logic [31:0] d = $urandom;
      chk("ready when idle", req_ready && !stall);
      req_valid = 1; req_we = we; req_addr = LADDR_W'(a); req_wdata = d;
      #1;
      chk("packet same cycle", net_pkt.valid && net_pkt.we == we && net_pkt.src == ID &&
          int'(net_pkt.module_id) == exp_mod(a) && int'(net_pkt.iaddr) == ((a >> 4) & (D - 1)) &&
          net_pkt.age == 0 && (!we || net_pkt.wdata == d));
      net_fail = (nfail > 0);
      @(posedge clk); #1;
      req_valid = 0;
      for (int k = 0; k < nfail; k++) begin
        chk("repeat with age", stall && net_pkt.valid && net_pkt.age == age_t'(k + 1) &&
            int'(net_pkt.module_id) == exp_mod(a));
        net_fail = (k < nfail - 1);
        @(posedge clk); #1;
      end
      net_fail = 0;
      for (int k = 0; k < wait_c; k++) begin
        chk("waiting", stall && !net_pkt.valid && !resp_valid);
        @(posedge clk); #1;
      end
      net_resp = '0; net_resp.valid = 1; net_resp.src = ID; net_resp.rdata = ~d; #1;
      chk("response", resp_valid && resp_rdata == ~d);
      @(posedge clk); #1;
      net_resp = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
