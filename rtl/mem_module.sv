// mem_module: one of the N memory modules that together form the shared
// address space.
//
// It takes at most one packet per cycle, the one the forward network
// delivers on its row. A store writes the word; a load reads it. Either way
// a response (load data, or an acknowledge for a store) is registered and
// offered to the backward network from the next cycle on. While a response
// is still waiting because the backward network refused it, the module
// refuses new packets (req_fail), and the forward network fails them back
// to their cores, which repeat them. A waiting response gains age each cycle
// so that it wins in the end. The response register and the refusal rule
// are this design's choice; the source only says the modules hold the
// shared address space.
//
// Timing: a packet delivered in cycle t is answered in cycle t+1 when the
// backward network is free. The array is not reset; a load of a word never
// written returns whatever it holds.
module mem_module
  import bn_pkg::*;
#(
  parameter int MEM_DEPTH = 512,
  parameter int MOD_ID    = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pkt_t  req,
  output logic  req_fail,
  output resp_t resp,
  input  logic  resp_fail
);
  localparam int IW = $clog2(MEM_DEPTH);

  logic [DATA_W-1:0] mem [MEM_DEPTH];
  resp_t rsp_q;
  logic  free, accept;
  logic [IW-1:0] a;

  assign a        = req.iaddr[IW-1:0];
  assign free     = !rsp_q.valid || !resp_fail;
  assign accept   = req.valid && free;
  assign req_fail = req.valid && !free;
  assign resp     = rsp_q;

  always_ff @(posedge clk) begin
    if (accept && req.we) mem[a] <= req.wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_q <= '0;
    end else if (accept) begin
      rsp_q.valid     <= 1'b1;
      rsp_q.we        <= req.we;
      rsp_q.src       <= req.src;
      rsp_q.module_id <= MOD_W'(MOD_ID);
      rsp_q.age       <= '0;
      rsp_q.rdata     <= req.we ? req.wdata : mem[a];
    end else if (rsp_q.valid && resp_fail) begin
      rsp_q.age <= age_inc(rsp_q.age);
    end else begin
      rsp_q.valid <= 1'b0;
    end
  end
endmodule
