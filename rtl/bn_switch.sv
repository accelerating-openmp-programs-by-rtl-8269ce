// bn_switch: one 2x2 switch S(i,j) of the forward butterfly network, with an
// intermediate register.
//
// Each cycle up to three packets compete for the two outputs: the two that
// enter and the one held in the intermediate register. A packet asks for
// output module_id[BIT]. For each output the packet with the highest
// time+source priority wins (bn_pkg::pkt_beats). Losers are handled as the
// source describes:
//   - a register packet that does not get through stays in the register;
//   - otherwise the best losing entering packet is parked in the register
//     and continues from this switch next cycle, freeing the links behind it;
//   - any other loser is dropped back to its core, which repeats it.
// A packet that waits in the register, is parked, or is dropped gains age,
// so it is stronger next time and nothing starves.
//
// The network is one combinational circuit. Packets move forward through
// out_pkt in the same cycle; the failing signal moves backward: in_fail[i]
// tells the previous stage that the packet it sent on input i went back to
// its core, either dropped here or failed further on (out_fail). A packet
// that leaves the register and then fails further on stays in the register,
// since its path to the core no longer exists; then no entering packet can
// park here in that cycle. That last rule is this design's choice.
//
// Timing: combinational from in_pkt/ireg to out_pkt and from out_fail to
// in_fail; the register updates on the rising clock edge; active-low
// synchronous reset empties it.
module bn_switch
  import bn_pkg::*;
#(
  parameter int BIT = 0           // destination bit this switch routes on
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t in_pkt   [2],
  output logic in_fail  [2],
  output pkt_t out_pkt  [2],
  input  logic out_fail [2],
  // event flags for statistics and tests
  output logic ev_collide,        // two or more packets wanted one output
  output logic ev_park,           // an entering packet was parked
  output logic ev_drop,           // an entering packet was dropped to its core
  output logic ev_triple,         // a drop while the register was occupied
  output logic ev_ireg_out        // the register packet went on
);
  pkt_t ireg;
  pkt_t cand [3];
  logic dir  [3];
  int   win  [2];                 // winning candidate per output, -1 = none
  logic granted [3], delivered [3], lost [3], dropped [3];
  logic keep;
  int   park;                     // entering packet to park, -1 = none
  int   nwant [2];

  // Forward half: arbitration and the packets that go on.
  always_comb begin
    cand[0] = in_pkt[0];
    cand[1] = in_pkt[1];
    cand[2] = ireg;
    for (int c = 0; c < 3; c++) dir[c] = cand[c].module_id[BIT];

    for (int o = 0; o < 2; o++) begin
      win[o]   = -1;
      nwant[o] = 0;
      for (int c = 0; c < 3; c++)
        if (cand[c].valid && (dir[c] == o[0])) begin
          nwant[o]++;
          if (win[o] < 0) win[o] = c;
          else if (pkt_beats(cand[c], cand[win[o]])) win[o] = c;
        end
    end

    for (int o = 0; o < 2; o++) begin
      out_pkt[o] = '0;
      if (win[o] >= 0) out_pkt[o] = cand[win[o]];
    end

    for (int c = 0; c < 3; c++) granted[c] = cand[c].valid && (win[dir[c]] == c);
    ev_collide = (nwant[0] > 1) || (nwant[1] > 1);
  end

  // Backward half: resolve who stays, parks or drops once the rest of the
  // network has reported through out_fail.
  always_comb begin
    for (int c = 0; c < 3; c++) begin
      delivered[c] = granted[c] && !out_fail[dir[c]];
      lost[c]      = cand[c].valid && !granted[c];
    end

    keep = ireg.valid && !delivered[2];
    park = -1;
    if (!keep) begin
      if (lost[0] && lost[1]) park = pkt_beats(cand[1], cand[0]) ? 1 : 0;
      else if (lost[0])       park = 0;
      else if (lost[1])       park = 1;
    end

    for (int i = 0; i < 2; i++) begin
      dropped[i] = lost[i] && (park != i);
      in_fail[i] = cand[i].valid && (dropped[i] || (granted[i] && out_fail[dir[i]]));
    end
    dropped[2] = 1'b0;

    ev_park     = (park >= 0);
    ev_drop     = dropped[0] || dropped[1];
    ev_triple   = ireg.valid && (dropped[0] || dropped[1]);
    ev_ireg_out = delivered[2];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ireg <= '0;
    end else if (keep) begin
      ireg.age <= age_inc(ireg.age);
    end else if (park >= 0) begin
      ireg     <= cand[park];
      ireg.age <= age_inc(cand[park].age);
    end else begin
      ireg.valid <= 1'b0;
    end
  end

  // A packet never leaves on the wrong output.
  always_comb begin
    if (rst_n) begin
      assert (!out_pkt[0].valid || out_pkt[0].module_id[BIT] == 1'b0);
      assert (!out_pkt[1].valid || out_pkt[1].module_id[BIT] == 1'b1);
    end
  end
endmodule
