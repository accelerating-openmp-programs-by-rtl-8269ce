// bn_backward: the backward butterfly network from the N memory modules to
// the N cores.
//
// Same topology as bn_forward, mirrored: module m puts its response on row
// m, level l routes on bit b = K-1-l of the response's destination core, and
// after K levels the response sits on its core's row. It is combinational;
// a response that loses a collision is refused (mod_fail) and its module
// offers it again next cycle. Cores always take a response, so nothing is
// refused at the core end.
//
// Interface: mod_resp/mod_fail per module, core_resp per core, ev_collide
// when any backward switch saw two responses want one output.
module bn_backward
  import bn_pkg::*;
#(
  parameter int N = 1024
) (
  input  resp_t mod_resp  [N],
  output logic  mod_fail  [N],
  output resp_t core_resp [N],
  output logic  ev_collide
);
  localparam int K  = $clog2(N);
  localparam int NS = K * (N / 2);

  initial assert (N >= 2 && N == (1 << K) && K <= MAX_K) else $error("N must be a power of two, 2..1024");

  logic [NS-1:0] e_col;

  for (genvar r = 0; r < N; r++) begin : g_ends
    assign core_resp[r] = g_level[K-1].nxt[r];
    assign mod_fail[r] = g_level[0].fin[r];
  end

  for (genvar l = 0; l < K; l++) begin : g_level
    localparam int B = K - 1 - l;
    resp_t nxt [N];   // rows leaving this level
    logic fin [N];   // failing signal into this level, per row
    for (genvar j = 0; j < N / 2; j++) begin : g_sw
      localparam int R0 = ((j >> B) << (B + 1)) | (j & ((1 << B) - 1));
      localparam int R1 = R0 | (1 << B);
      resp_t sw_in [2];
      resp_t sw_out [2];
      logic  sw_in_fail [2];
      logic  sw_out_fail [2];
      if (l == 0) begin : g_first
        assign sw_in[0] = mod_resp[R0];
        assign sw_in[1] = mod_resp[R1];
      end else begin : g_mid
        assign sw_in[0] = g_level[l-1].nxt[R0];
        assign sw_in[1] = g_level[l-1].nxt[R1];
      end
      if (l == K - 1) begin : g_last
        assign sw_out_fail[0] = 1'b0;
        assign sw_out_fail[1] = 1'b0;
      end else begin : g_inner
        assign sw_out_fail[0] = g_level[l+1].fin[R0];
        assign sw_out_fail[1] = g_level[l+1].fin[R1];
      end
      assign nxt[R0] = sw_out[0];
      assign nxt[R1] = sw_out[1];
      assign fin[R0] = sw_in_fail[0];
      assign fin[R1] = sw_in_fail[1];
      bn_bswitch #(.BIT(B)) u_sw (
        .in_resp(sw_in), .in_fail(sw_in_fail),
        .out_resp(sw_out), .out_fail(sw_out_fail),
        .ev_collide(e_col[l*(N/2)+j])
      );
    end
  end

  assign ev_collide = |e_col;
endmodule
