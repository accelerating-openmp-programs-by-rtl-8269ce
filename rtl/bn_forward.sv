// bn_forward: the forward butterfly network (BN) from the N core ports to
// the N memory modules, built as one combinational circuit.
//
// K = log2(N) levels of N/2 bn_switch instances. Links are numbered by row
// 0..N-1. Level l routes on destination bit b = K-1-l (most significant
// first): its switch j joins the two rows that differ only in bit b and
// sends each packet to the row whose bit b equals the packet's module bit b.
// After K levels a packet sits on the row of its module, so core c enters
// on row c and module m listens on row m; every core-module pair has one
// path. An uncontended packet crosses all levels in the cycle it is issued.
// A packet that loses at a switch is parked in that switch's intermediate
// register or, failing that, dropped; the failing signal runs back along
// the same rows to the core (core_fail). A module that cannot accept a
// packet this cycle raises mod_fail, which fails the packet the same way.
//
// Interface: core_pkt/core_fail per core, mod_pkt/mod_fail per module, and
// OR-reduced event flags of all switches. Clocked only through the switch
// registers; active-low synchronous reset.
module bn_forward
  import bn_pkg::*;
#(
  parameter int N = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t core_pkt  [N],
  output logic core_fail [N],
  output pkt_t mod_pkt   [N],
  input  logic mod_fail  [N],
  output logic ev_collide,
  output logic ev_park,
  output logic ev_drop,
  output logic ev_triple,
  output logic ev_ireg_out
);
  localparam int K  = $clog2(N);
  localparam int NS = K * (N / 2);

  initial assert (N >= 2 && N == (1 << K) && K <= MAX_K) else $error("N must be a power of two, 2..1024");

  logic [NS-1:0] e_col, e_park, e_drop, e_tri, e_iro;

  for (genvar r = 0; r < N; r++) begin : g_ends
    assign mod_pkt[r] = g_level[K-1].nxt[r];
    assign core_fail[r] = g_level[0].fin[r];
  end

  for (genvar l = 0; l < K; l++) begin : g_level
    localparam int B = K - 1 - l;
    pkt_t nxt [N];   // rows leaving this level
    logic fin [N];   // failing signal into this level, per row
    for (genvar j = 0; j < N / 2; j++) begin : g_sw
      localparam int R0 = ((j >> B) << (B + 1)) | (j & ((1 << B) - 1));
      localparam int R1 = R0 | (1 << B);
      pkt_t sw_in [2];
      pkt_t sw_out [2];
      logic sw_in_fail [2];
      logic sw_out_fail [2];
      if (l == 0) begin : g_first
        assign sw_in[0] = core_pkt[R0];
        assign sw_in[1] = core_pkt[R1];
      end else begin : g_mid
        assign sw_in[0] = g_level[l-1].nxt[R0];
        assign sw_in[1] = g_level[l-1].nxt[R1];
      end
      if (l == K - 1) begin : g_last
        assign sw_out_fail[0] = mod_fail[R0];
        assign sw_out_fail[1] = mod_fail[R1];
      end else begin : g_inner
        assign sw_out_fail[0] = g_level[l+1].fin[R0];
        assign sw_out_fail[1] = g_level[l+1].fin[R1];
      end
      assign nxt[R0] = sw_out[0];
      assign nxt[R1] = sw_out[1];
      assign fin[R0] = sw_in_fail[0];
      assign fin[R1] = sw_in_fail[1];
      bn_switch #(.BIT(B)) u_sw (
        .clk, .rst_n,
        .in_pkt(sw_in), .in_fail(sw_in_fail),
        .out_pkt(sw_out), .out_fail(sw_out_fail),
        .ev_collide (e_col [l*(N/2)+j]),
        .ev_park    (e_park[l*(N/2)+j]),
        .ev_drop    (e_drop[l*(N/2)+j]),
        .ev_triple  (e_tri [l*(N/2)+j]),
        .ev_ireg_out(e_iro [l*(N/2)+j])
      );
    end
  end

  assign ev_collide  = |e_col;
  assign ev_park     = |e_park;
  assign ev_drop     = |e_drop;
  assign ev_triple   = |e_tri;
  assign ev_ireg_out = |e_iro;
endmodule
