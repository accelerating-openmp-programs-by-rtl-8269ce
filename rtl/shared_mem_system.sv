// shared_mem_system: a true shared memory for N_CORES cores, with no caches.
//
// The shared address space is split over N_CORES memory modules. Every core
// reaches every module through a butterfly network (BN) that is one
// combinational circuit, so an uncontended load or store reaches its module
// in the cycle it is issued and is answered in the next. Contention is kept
// low by rehashing addresses onto modules (hash_unit in each core_port,
// with a function selected by hash_key before a program runs), and resolved
// in the network switches: losers are parked in a switch's intermediate
// register or dropped back to their core, which repeats them with a higher
// priority. Responses return through a backward butterfly (bn_backward). A
// two-port ring buffer sits beside the memory system with both ports
// brought out.
//
// The cores (32-bit soft processors with private stack and instruction
// memory) are outside this module: each core's memory port is a set of
// top-level ports. The interrupt bus is not included.
//
// Interface per core: req_valid/we/addr/wdata in; req_ready, stall,
// resp_valid, resp_rdata out. A request is taken when req_valid and
// req_ready are both high. hash_key_we loads hash_key_in (reset: key zero,
// which maps the low address bits straight to the module number). The ev_*
// outputs pulse when a mechanism occurs anywhere in the networks.
module shared_mem_system
  import bn_pkg::*;
#(
  parameter int N_CORES   = 1024,
  parameter int MEM_DEPTH = 512,
  parameter int RB_DEPTH  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // hash function selection
  input  logic               hash_key_we,
  input  hash_key_t          hash_key_in,
  // core memory ports
  input  logic               core_req_valid [N_CORES],
  input  logic               core_req_we    [N_CORES],
  input  logic [LADDR_W-1:0] core_req_addr  [N_CORES],
  input  logic [DATA_W-1:0]  core_req_wdata [N_CORES],
  output logic               core_req_ready [N_CORES],
  output logic               core_stall     [N_CORES],
  output logic               core_resp_valid[N_CORES],
  output logic [DATA_W-1:0]  core_resp_rdata[N_CORES],
  // ring buffer
  input  logic               rb_wr_en,
  input  logic [DATA_W-1:0]  rb_wr_data,
  output logic               rb_full,
  input  logic               rb_rd_en,
  output logic [DATA_W-1:0]  rb_rd_data,
  output logic               rb_empty,
  output logic [$clog2(RB_DEPTH+1)-1:0] rb_count,
  // network events
  output logic               ev_collide,
  output logic               ev_park,
  output logic               ev_drop,
  output logic               ev_triple,
  output logic               ev_ireg_out,
  output logic               ev_mod_busy,
  output logic               ev_bwd_collide
);
  hash_key_t key_q;
  pkt_t  core_pkt  [N_CORES];
  logic  core_fail [N_CORES];
  pkt_t  mod_pkt   [N_CORES];
  logic  mod_fail  [N_CORES];
  resp_t mod_resp  [N_CORES];
  logic  mod_rfail [N_CORES];
  resp_t core_resp [N_CORES];
  logic [N_CORES-1:0] busy;

  always_ff @(posedge clk) begin
    if (!rst_n)           key_q <= '0;
    else if (hash_key_we) key_q <= hash_key_in;
  end

  for (genvar i = 0; i < N_CORES; i++) begin : g_node
    core_port #(.N_CORES(N_CORES), .MEM_DEPTH(MEM_DEPTH), .CORE_ID(i)) u_port (
      .clk, .rst_n, .key(key_q),
      .req_valid (core_req_valid[i]),
      .req_we    (core_req_we[i]),
      .req_addr  (core_req_addr[i]),
      .req_wdata (core_req_wdata[i]),
      .req_ready (core_req_ready[i]),
      .stall     (core_stall[i]),
      .resp_valid(core_resp_valid[i]),
      .resp_rdata(core_resp_rdata[i]),
      .net_pkt   (core_pkt[i]),
      .net_fail  (core_fail[i]),
      .net_resp  (core_resp[i])
    );
    mem_module #(.MEM_DEPTH(MEM_DEPTH), .MOD_ID(i)) u_mem (
      .clk, .rst_n,
      .req      (mod_pkt[i]),
      .req_fail (mod_fail[i]),
      .resp     (mod_resp[i]),
      .resp_fail(mod_rfail[i])
    );
    assign busy[i] = mod_fail[i];
  end

  bn_forward #(.N(N_CORES)) u_fwd (
    .clk, .rst_n,
    .core_pkt, .core_fail, .mod_pkt, .mod_fail,
    .ev_collide, .ev_park, .ev_drop, .ev_triple, .ev_ireg_out
  );

  bn_backward #(.N(N_CORES)) u_bwd (
    .mod_resp, .mod_fail(mod_rfail), .core_resp, .ev_collide(ev_bwd_collide)
  );

  assign ev_mod_busy = |busy;

  ring_buffer #(.DEPTH(RB_DEPTH), .W(DATA_W)) u_rb (
    .clk, .rst_n,
    .wr_en(rb_wr_en), .wr_data(rb_wr_data), .full(rb_full),
    .rd_en(rb_rd_en), .rd_data(rb_rd_data), .empty(rb_empty), .count(rb_count)
  );
endmodule
