// tb_bn_forward: an 8-core forward network under random traffic. The
// testbench plays the cores (repeating a failed packet with a higher age)
// and the modules (sometimes refusing a packet). Every packet carries a
// unique tag; the test checks that each arrives exactly once, on the row of
// its module, that a lone packet crosses the network in the cycle it is
// sent, and that collisions, parking, drops, three-way collisions and
// packets leaving an intermediate register all occur.
module tb_bn_forward;
  import bn_pkg::*;
  localparam int N = 8, PER_CORE = 300;
  logic clk = 0, rst_n;
  pkt_t core_pkt [N], mod_pkt [N];
  logic core_fail [N], mod_fail [N];
  logic ev_collide, ev_park, ev_drop, ev_triple, ev_ireg_out;
  int checks = 0, failures = 0;
  int n_col = 0, n_park = 0, n_drop = 0, n_tri = 0, n_iro = 0;
  pkt_t cur [N];
  int sent [N];
  bit in_net [N*PER_CORE];
  bit done_tag [N*PER_CORE];
  int delivered = 0;

  bn_forward #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pkt_t mk(int src, int dst, int tag);
    automatic pkt_t p = '0;
    p.valid = 1; p.src = MOD_W'(src); p.module_id = MOD_W'(dst); p.wdata = 32'(tag);
    p.we = tag[0]; p.iaddr = IADDR_W'(tag);
    return p;
  endfunction

  initial begin
    rst_n = 0;
    foreach (core_pkt[i]) begin core_pkt[i] = '0; mod_fail[i] = 0; cur[i] = '0; sent[i] = 0; end
    @(posedge clk); @(posedge clk); rst_n = 1; #1;

    // a lone packet from core 2 to module 5 arrives in the same cycle
    core_pkt[2] = mk(2, 5, 0); #1;
    checks++;
    if (!(mod_pkt[5] == core_pkt[2]) || core_fail[2]) begin failures++; $display("lone packet"); end
    for (int m = 0; m < N; m++) if (m != 5 && mod_pkt[m].valid) failures++;
    @(posedge clk); #1;
    core_pkt[2] = '0;

    while (delivered < N * PER_CORE - 1) begin
      // cores offer packets
      for (int c = 0; c < N; c++) begin
        if (!cur[c].valid && sent[c] < PER_CORE) begin
          automatic int tag = c * PER_CORE + sent[c];
          if (tag == 2 * PER_CORE) tag = -1;          // tag 0 of core 2 used above
          if (tag >= 0 && $urandom_range(0, 3) != 0) begin
            // hot spots: half of the traffic goes to module 0 or 1
            automatic int dst = ($urandom_range(0, 1) == 1) ? $urandom_range(0, 1) : $urandom_range(0, N - 1);
            cur[c] = mk(c, dst, tag);
            sent[c]++;
          end else if (tag < 0) sent[c]++;
        end
        core_pkt[c] = cur[c];
      end
      foreach (mod_fail[m]) mod_fail[m] = ($urandom_range(0, 9) == 0);
      #1;
      n_col += ev_collide; n_park += ev_park; n_drop += ev_drop; n_tri += ev_triple; n_iro += ev_ireg_out;
      for (int m = 0; m < N; m++)
        if (mod_pkt[m].valid && !mod_fail[m]) begin
          automatic int tag = int'(mod_pkt[m].wdata);
          checks++;
          if (int'(mod_pkt[m].module_id) != m || done_tag[tag] ||
              !(in_net[tag] || (cur[mod_pkt[m].src].valid && int'(cur[mod_pkt[m].src].wdata) == tag))) begin
            failures++; $display("bad delivery tag %0d row %0d", tag, m);
          end
          done_tag[tag] = 1; in_net[tag] = 0; delivered++;
        end
      for (int c = 0; c < N; c++)
        if (cur[c].valid) begin
          if (core_fail[c]) cur[c].age = age_inc(cur[c].age);
          else begin
            if (!done_tag[int'(cur[c].wdata)]) in_net[int'(cur[c].wdata)] = 1;
            cur[c] = '0;
          end
        end
      @(posedge clk); #1;
    end
    foreach (core_pkt[i]) core_pkt[i] = '0;
    foreach (mod_fail[i]) mod_fail[i] = 0;
    repeat (4) @(posedge clk);
    for (int t = 0; t < N * PER_CORE; t++) begin
      checks++;
      if (t != 2 * PER_CORE && !done_tag[t]) begin failures++; $display("lost tag %0d", t); end
    end
    $display("events: collide=%0d park=%0d drop=%0d triple=%0d ireg_out=%0d", n_col, n_park, n_drop, n_tri, n_iro);
    checks += 5;
    if (n_col == 0) failures++;
    if (n_park == 0) failures++;
    if (n_drop == 0) failures++;
    if (n_tri == 0) failures++;
    if (n_iro == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
