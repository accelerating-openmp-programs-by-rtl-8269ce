// core_port: the memory port of one core.
//
// A core's load or store becomes a packet: the address is rehashed
// (hash_unit) into module and internal address, and the R/W bit, the
// priority (age 0 plus this core's number) and the store data are added.
// The packet enters the forward network in the same cycle the core presents
// the request, so the port adds no cycle. If the network fails it back, the
// core stays blocked and the port repeats the packet the next cycle with
// its age raised; once it is not failed back it has reached its module or
// waits in a switch's intermediate register, and the port waits for the
// response from the backward network. The core is blocked (stall) from
// the cycle after the request until the response arrives.
//
// States: IDLE (ready for a request), SEND (repeating a failed packet),
// WAIT (packet in the network). Uncontended, a request in cycle t is
// answered with resp_valid in cycle t+1.
module core_port
  import bn_pkg::*;
#(
  parameter int N_CORES   = 1024,
  parameter int MEM_DEPTH = 512,
  parameter int CORE_ID   = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  hash_key_t          key,
  // core side
  input  logic               req_valid,
  input  logic               req_we,
  input  logic [LADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0]  req_wdata,
  output logic               req_ready,
  output logic               stall,
  output logic               resp_valid,
  output logic [DATA_W-1:0]  resp_rdata,
  // network side
  output pkt_t               net_pkt,
  input  logic               net_fail,
  input  resp_t              net_resp
);
  typedef enum logic [1:0] {IDLE, SEND, WAIT} state_t;
  state_t state;
  pkt_t   held, fresh;
  logic [MOD_W-1:0]   h_mod;
  logic [IADDR_W-1:0] h_iaddr;

  hash_unit #(.N_MOD(N_CORES), .MEM_DEPTH(MEM_DEPTH)) u_hash (
    .laddr(req_addr), .key, .module_o(h_mod), .iaddr_o(h_iaddr)
  );

  always_comb begin
    fresh           = '0;
    fresh.valid     = req_valid;
    fresh.we        = req_we;
    fresh.module_id = h_mod;
    fresh.iaddr     = h_iaddr;
    fresh.age       = '0;
    fresh.src       = MOD_W'(CORE_ID);
    fresh.wdata     = req_wdata;
  end

  assign req_ready  = (state == IDLE);
  assign stall      = (state != IDLE);
  assign net_pkt    = (state == IDLE) ? fresh : (state == SEND) ? held : '0;
  assign resp_valid = (state == WAIT) && net_resp.valid;
  assign resp_rdata = net_resp.rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      held  <= '0;
    end else begin
      unique case (state)
        IDLE: if (req_valid) begin
          held     <= fresh;
          held.age <= net_fail ? age_inc(fresh.age) : fresh.age;
          state    <= net_fail ? SEND : WAIT;
        end
        SEND: begin
          if (net_fail) held.age <= age_inc(held.age);
          else          state    <= WAIT;
        end
        WAIT: if (net_resp.valid) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // A response only comes back for an outstanding reference.
  always_ff @(posedge clk)
    if (rst_n) assert (!net_resp.valid || state == WAIT)
      else $error("core_port %0d: response with nothing outstanding", CORE_ID);
endmodule
