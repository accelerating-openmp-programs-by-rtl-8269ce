// tb_shared_mem_system: end-to-end test of the shared memory system at 16
// cores x 64 words. The testbench plays the cores:
//   1. a lone store and load, checking the one-cycle answer;
//   2. a hash key is loaded, then every core runs random loads and stores
//      on addresses it owns, checked against a reference memory;
//   3. all cores load one hot address at once, checked against the model;
//   4. the ring buffer's two ports pass a few words.
// It counts how often each network mechanism happened (collision, parking,
// drop to core, three-way collision, packet leaving an intermediate
// register, module busy, backward collision, stalled core) and fails any
// that never did.
module tb_shared_mem_system;
  import bn_pkg::*;
  localparam int N = 16, D = 64, OPS = 200;
  localparam int SPACE = N * D;
  localparam int RBD = 16;

  logic clk = 0, rst_n;
  logic hash_key_we;
  hash_key_t hash_key_in;
  logic core_req_valid [N], core_req_we [N], core_req_ready [N], core_stall [N], core_resp_valid [N];
  logic [LADDR_W-1:0] core_req_addr [N];
  logic [DATA_W-1:0] core_req_wdata [N], core_resp_rdata [N];
  logic rb_wr_en, rb_full, rb_rd_en, rb_empty;
  logic [DATA_W-1:0] rb_wr_data, rb_rd_data;
  logic [$clog2(RBD+1)-1:0] rb_count;
  logic ev_collide, ev_park, ev_drop, ev_triple, ev_ireg_out, ev_mod_busy, ev_bwd_collide;

  shared_mem_system #(.N_CORES(N), .MEM_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_col = 0, n_park = 0, n_drop = 0, n_tri = 0, n_iro = 0, n_busy = 0, n_bcol = 0, n_stall = 0;
  logic [31:0] model [SPACE];
  bit written [SPACE];
  int owner [SPACE];
  // per-core state of the core model
  bit pend [N];
  bit pend_we [N];
  int pend_a [N];
  int left [N];
  int cycles;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic count_events();
    n_col += ev_collide; n_park += ev_park; n_drop += ev_drop; n_tri += ev_triple;
    n_iro += ev_ireg_out; n_busy += ev_mod_busy; n_bcol += ev_bwd_collide;
    for (int c = 0; c < N; c++) n_stall += core_stall[c];
  endtask

  // one cycle of the core models: issue, then observe; hot >= 0 makes
  // every core load that address
  task automatic run_cycle(int hot);
    for (int c = 0; c < N; c++) begin
      core_req_valid[c] = 0;
      if (!pend[c] && left[c] > 0 && (hot >= 0 || $urandom_range(0, 2) != 0)) begin
        automatic int a;
        automatic logic we;
        if (hot >= 0) begin a = hot; we = 0; end
        else begin
          do a = $urandom_range(0, SPACE - 1); while (owner[a] != c);
          we = !written[a] || ($urandom_range(0, 1) == 1);
        end
        core_req_valid[c] = 1; core_req_we[c] = we;
        core_req_addr[c] = LADDR_W'(a); core_req_wdata[c] = $urandom;
        pend[c] = 1; pend_we[c] = we; pend_a[c] = a; left[c]--;
        chk("ready when idle", core_req_ready[c]);
      end
    end
    #1;
    count_events();
    for (int c = 0; c < N; c++) begin
      if (core_resp_valid[c]) begin
        chk("response only when pending", pend[c] && !core_req_valid[c]);
        if (!pend_we[c]) chk("load data", core_resp_rdata[c] == model[pend_a[c]]);
        pend[c] = 0;
      end
      if (core_req_valid[c] && core_req_we[c]) begin
        model[pend_a[c]] = core_req_wdata[c]; written[pend_a[c]] = 1;
      end
    end
    @(posedge clk); #1;
    cycles++;
  endtask

  function automatic bit busy_any();
    for (int c = 0; c < N; c++) if (pend[c] || left[c] > 0) return 1;
    return 0;
  endfunction

  initial begin
    rst_n = 0; hash_key_we = 0; hash_key_in = '0;
    rb_wr_en = 0; rb_rd_en = 0; rb_wr_data = '0;
    for (int c = 0; c < N; c++) begin
      core_req_valid[c] = 0; core_req_we[c] = 0; core_req_addr[c] = '0; core_req_wdata[c] = '0;
      pend[c] = 0; left[c] = 0;
    end
    for (int a = 0; a < SPACE; a++) owner[a] = $urandom_range(0, N - 1);
    repeat (3) @(posedge clk);
    rst_n = 1; #1;

    // 1: lone store then load from core 3, answered in the next cycle
    core_req_valid[3] = 1; core_req_we[3] = 1; core_req_addr[3] = LADDR_W'(77); core_req_wdata[3] = 32'hcafe_0001;
    #1; chk("lone store taken", core_req_ready[3]);
    @(posedge clk); #1; core_req_valid[3] = 0; #1;
    chk("store acknowledged next cycle", core_resp_valid[3] && core_stall[3]);
    @(posedge clk); #1;
    core_req_valid[3] = 1; core_req_we[3] = 0;
    @(posedge clk); #1; core_req_valid[3] = 0; #1;
    chk("load answered next cycle", core_resp_valid[3] && core_resp_rdata[3] == 32'hcafe_0001);
    model[77] = 32'hcafe_0001; written[77] = 1;
    @(posedge clk); #1;
    chk("idle again", core_req_ready[3] && !core_stall[3]);

    // 2: select another hash function, then random owned traffic
    hash_key_in.mask = IADDR_W'($urandom); hash_key_in.offset = MOD_W'($urandom);
    hash_key_we = 1; @(posedge clk); #1; hash_key_we = 0;
    // words written under the old function are no longer where the new one
    // looks: start the model afresh
    for (int a = 0; a < SPACE; a++) written[a] = 0;
    for (int c = 0; c < N; c++) left[c] = OPS;
    cycles = 0;
    while (busy_any()) run_cycle(-1);
    $display("random phase: %0d references in %0d cycles", N * OPS, cycles);

    // 3: every core loads the same word, 4 times each
    begin
      automatic int hot = 0;
      while (!written[hot]) hot++;
      for (int c = 0; c < N; c++) left[c] = 4;
      cycles = 0;
      while (busy_any()) run_cycle(hot);
      $display("hot spot: %0d loads in %0d cycles", N * 4, cycles);
    end

    // 4: ring buffer
    for (int i = 0; i < 3; i++) begin
      rb_wr_en = 1; rb_wr_data = 32'(100 + i); @(posedge clk); #1;
    end
    rb_wr_en = 0; #1;
    chk("rb count", rb_count == 3 && !rb_empty);
    for (int i = 0; i < 3; i++) begin
      chk("rb data", rb_rd_data == 32'(100 + i));
      rb_rd_en = 1; @(posedge clk); #1;
    end
    rb_rd_en = 0; #1;
    chk("rb empty", rb_empty);

    $display("events: collide=%0d park=%0d drop=%0d triple=%0d ireg_out=%0d mod_busy=%0d bwd_collide=%0d stall=%0d",
             n_col, n_park, n_drop, n_tri, n_iro, n_busy, n_bcol, n_stall);
    chk("collision seen", n_col > 0);
    chk("parking seen", n_park > 0);
    chk("drop to core seen", n_drop > 0);
    chk("three-way collision seen", n_tri > 0);
    chk("intermediate register forwarding seen", n_iro > 0);
    chk("module busy seen", n_busy > 0);
    chk("backward collision seen", n_bcol > 0);
    chk("stall seen", n_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
