// tb_bn_backward: an 8-module backward network. The testbench plays the
// modules, which hold a refused response and offer it again with a higher
// age. Each response carries a unique tag; the test checks that it arrives
// exactly once at the core it names, that a lone response crosses in one
// cycle, and that collisions occur.
module tb_bn_backward;
  import bn_pkg::*;
  localparam int N = 8, PER_MOD = 300;
  resp_t mod_resp [N], core_resp [N];
  logic mod_fail [N];
  logic ev_collide;
  int checks = 0, failures = 0, n_col = 0, delivered = 0;
  resp_t cur [N];
  int sent [N];
  bit done_tag [N*PER_MOD];

  bn_backward #(.N(N)) dut (.*);

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic resp_t mk(int m, int dst, int tag);
    automatic resp_t r = '0;
    r.valid = 1; r.module_id = MOD_W'(m); r.src = MOD_W'(dst); r.rdata = 32'(tag);
    return r;
  endfunction

  initial begin
    foreach (mod_resp[i]) begin mod_resp[i] = '0; cur[i] = '0; sent[i] = 0; end
    #1;
    mod_resp[6] = mk(6, 1, 0); #1;
    checks++;
    if (!(core_resp[1] == mod_resp[6]) || mod_fail[6]) failures++;
    mod_resp[6] = '0;
    sent[0] = 0;
    while (delivered < N * PER_MOD) begin
      for (int m = 0; m < N; m++) begin
        if (!cur[m].valid && sent[m] < PER_MOD && $urandom_range(0, 4) != 0) begin
          automatic int dst = ($urandom_range(0, 1) == 1) ? 3 : $urandom_range(0, N - 1);
          cur[m] = mk(m, dst, m * PER_MOD + sent[m]);
          sent[m]++;
        end
        mod_resp[m] = cur[m];
      end
      #1;
      n_col += ev_collide;
      for (int c = 0; c < N; c++)
        if (core_resp[c].valid) begin
          automatic int tag = int'(core_resp[c].rdata);
          checks++;
          if (int'(core_resp[c].src) != c || done_tag[tag] ||
              !(cur[core_resp[c].module_id].valid && int'(cur[core_resp[c].module_id].rdata) == tag)) begin
            failures++; $display("bad delivery %0d", tag);
          end
          done_tag[tag] = 1; delivered++;
        end
      for (int m = 0; m < N; m++)
        if (cur[m].valid) begin
          checks++;
          if (mod_fail[m] == done_tag[int'(cur[m].rdata)]) begin failures++; $display("fail flag wrong m=%0d", m); end
          if (mod_fail[m]) cur[m].age = age_inc(cur[m].age);
          else cur[m] = '0;
        end
      #9;
    end
    $display("events: collide=%0d", n_col);
    checks++; if (n_col == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
