// bn_pkg: types and constants shared by the butterfly-network shared memory.
//
// A memory reference travels as a packet carrying the R/W bit, the target
// memory module, the internal address inside that module and a priority. The
// priority is "time + source": an age that grows every cycle the packet is
// dropped or held back, and the issuing core's number as the tie-break (the
// lower number wins a tie). Besides those four fields the packet carries the
// store data and the source core, which the backward network needs to route
// the response home; both are this design's additions.
//
// Field widths are fixed here for the largest configuration (1024 cores,
// 10-bit core/module numbers); smaller configurations use the low bits.
package bn_pkg;

  localparam int MAX_K    = 10;   // log2 of the largest core count
  localparam int MOD_W    = MAX_K;
  localparam int IADDR_W  = 16;   // widest internal address a module may have
  localparam int LADDR_W  = MOD_W + IADDR_W; // logical word address from a core
  localparam int DATA_W   = 32;   // 32-bit cores
  localparam int AGE_W    = 8;

  typedef logic [AGE_W-1:0] age_t;

  // Request packet on a forward-network link.
  typedef struct packed {
    logic                valid;
    logic                we;        // R/W bit: 1 = store
    logic [MOD_W-1:0]    module_id; // destination memory module
    logic [IADDR_W-1:0]  iaddr;     // internal address in the module
    age_t                age;       // time part of the priority
    logic [MOD_W-1:0]    src;       // issuing core: source part of the priority
    logic [DATA_W-1:0]   wdata;
  } pkt_t;

  // Response on a backward-network link.
  typedef struct packed {
    logic                valid;
    logic                we;        // response to a store (acknowledge only)
    logic [MOD_W-1:0]    src;       // destination core
    logic [MOD_W-1:0]    module_id; // answering module: tie-break
    age_t                age;
    logic [DATA_W-1:0]   rdata;
  } resp_t;

  // Selection of one function from the hash family.
  typedef struct packed {
    logic [IADDR_W-1:0]  mask;
    logic [MOD_W-1:0]    offset;
  } hash_key_t;

  // Forward priority: older wins, then the lower source number.
  function automatic logic pkt_beats(pkt_t a, pkt_t b);
    return (a.age > b.age) || ((a.age == b.age) && (a.src < b.src));
  endfunction

  // Backward priority: older wins, then the lower module number.
  function automatic logic resp_beats(resp_t a, resp_t b);
    return (a.age > b.age) || ((a.age == b.age) && (a.module_id < b.module_id));
  endfunction

  function automatic age_t age_inc(age_t a);
    return (a == '1) ? a : a + age_t'(1);
  endfunction

endpackage
