// bn_bswitch: one 2x2 switch of the backward butterfly network, which
// carries responses from the memory modules back to the cores.
//
// A response asks for output src[BIT]. If both inputs want the same output
// the one with the higher priority (bn_pkg::resp_beats: older, then lower
// module number) goes on; the other is refused and in_fail tells its module,
// which keeps the response and offers it again next cycle with a higher age.
// in_fail also reports a response refused further on (out_fail). The switch
// has no register: its collision handling is this design's choice, as the
// source names the backward network but does not detail its switches.
//
// Timing: purely combinational.
module bn_bswitch
  import bn_pkg::*;
#(
  parameter int BIT = 0
) (
  input  resp_t in_resp  [2],
  output logic  in_fail  [2],
  output resp_t out_resp [2],
  input  logic  out_fail [2],
  output logic  ev_collide
);
  logic dir [2];
  logic win1 [2];                 // per output: input 1 wins it
  logic granted [2];

  always_comb begin
    for (int i = 0; i < 2; i++) dir[i] = in_resp[i].src[BIT];
    for (int o = 0; o < 2; o++) begin
      logic w0, w1;
      w0 = in_resp[0].valid && (dir[0] == o[0]);
      w1 = in_resp[1].valid && (dir[1] == o[0]);
      win1[o] = w1 && (!w0 || resp_beats(in_resp[1], in_resp[0]));
      out_resp[o] = win1[o] ? in_resp[1] : (w0 ? in_resp[0] : '0);
    end
    ev_collide = in_resp[0].valid && in_resp[1].valid && (dir[0] == dir[1]);
  end

  always_comb begin
    granted[0] = in_resp[0].valid && !win1[dir[0]];
    granted[1] = in_resp[1].valid &&  win1[dir[1]];
    for (int i = 0; i < 2; i++)
      in_fail[i] = in_resp[i].valid && (!granted[i] || out_fail[dir[i]]);
  end
endmodule
