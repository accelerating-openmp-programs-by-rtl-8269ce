// hash_unit: rehashes a core's logical word address onto (memory module,
// internal address).
//
// The shared address space is spread over N_MOD memory modules. Rehashing
// spreads references that would otherwise pile onto one module. The
// function is picked from a family by a key loaded before a program runs,
// and it is one level of XOR gates, so it adds no clock cycle to a load or
// store.
//
// How it works: the low K = log2(N_MOD) address bits name a module, the
// next log2(MEM_DEPTH) bits are the internal address, which passes through
// unchanged. The module number is XORed with a fold of the masked internal
// address (internal bit j goes to module bit j mod K) and with the key's
// offset. Because the internal address is kept, the mapping is a bijection
// for every key, so no two addresses share a location. The family chosen
// (mask, offset) is this design's own: the source only says a small family
// that costs no latency is used.
//
// Interface: purely combinational; laddr and key in, module_o and iaddr_o out.
module hash_unit
  import bn_pkg::*;
#(
  parameter int N_MOD     = 1024,
  parameter int MEM_DEPTH = 512
) (
  input  logic [LADDR_W-1:0] laddr,
  input  hash_key_t          key,
  output logic [MOD_W-1:0]   module_o,
  output logic [IADDR_W-1:0] iaddr_o
);
  localparam int K  = $clog2(N_MOD);
  localparam int IW = $clog2(MEM_DEPTH);

  initial begin
    assert (N_MOD >= 2 && N_MOD <= (1 << MAX_K)) else $error("N_MOD out of range");
    assert (IW <= IADDR_W) else $error("MEM_DEPTH too large");
  end

  logic [IADDR_W-1:0] iaddr;
  logic [K-1:0]       fold;

  always_comb begin
    iaddr = '0;
    iaddr[IW-1:0] = laddr[K +: IW];
    fold = '0;
    for (int j = 0; j < IW; j++)
      fold[j % K] ^= iaddr[j] & key.mask[j];
    module_o = '0;
    module_o[K-1:0] = laddr[K-1:0] ^ fold ^ key.offset[K-1:0];
    iaddr_o = iaddr;
  end
endmodule
