// tb_bn_switch: directed cases for one forward switch (routing bit 1):
// pass-through, two-way collision with parking, the parked packet leaving
// next cycle, the three-way collision (one on, one kept, one dropped), a
// failure reported from downstream, and a register packet that fails
// downstream and stays.
module tb_bn_switch;
  import bn_pkg::*;
  logic clk = 0, rst_n;
  pkt_t in_pkt [2], out_pkt [2];
  logic in_fail [2], out_fail [2];
  logic ev_collide, ev_park, ev_drop, ev_triple, ev_ireg_out;
  int checks = 0, failures = 0;

  bn_switch #(.BIT(1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pkt_t mk(int dst, int src, int age);
    automatic pkt_t p = '0;
    p.valid = 1; p.module_id = MOD_W'(dst); p.src = MOD_W'(src); p.age = age_t'(age);
    p.wdata = 32'(src * 1000 + dst);
    return p;
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle_inputs();
    in_pkt[0] = '0; in_pkt[1] = '0; out_fail[0] = 0; out_fail[1] = 0;
  endtask

  initial begin
    rst_n = 0; idle_inputs();
    @(posedge clk); @(posedge clk); rst_n = 1; #1;

    // 1: both inputs go through on different outputs, crossed
    in_pkt[0] = mk(2, 0, 0); in_pkt[1] = mk(1, 1, 0); #1;
    chk("cross out1", out_pkt[1] == in_pkt[0]);
    chk("cross out0", out_pkt[0] == in_pkt[1]);
    chk("cross no fail", !in_fail[0] && !in_fail[1] && !ev_collide);
    @(posedge clk); #1;

    // 2: collision on output 0; input 1 is older, input 0 parks
    in_pkt[0] = mk(0, 0, 1); in_pkt[1] = mk(1, 5, 3); #1;
    chk("col winner", out_pkt[0] == in_pkt[1] && !out_pkt[1].valid);
    chk("col no fail (parked)", !in_fail[0] && !in_fail[1] && ev_park && ev_collide && !ev_drop);
    @(posedge clk); #1; idle_inputs(); #1;
    // 3: parked packet leaves from the switch, one age older
    chk("ireg out", out_pkt[0].valid && out_pkt[0].src == 0 && out_pkt[0].age == 2 && ev_ireg_out);
    @(posedge clk); #1;
    chk("ireg empty", !out_pkt[0].valid && !out_pkt[1].valid);

    // 4: equal ages: the lower source wins, the other parks
    in_pkt[0] = mk(3, 6, 0); in_pkt[1] = mk(2, 4, 0); #1;
    chk("tie to lower src", out_pkt[1].src == 4 && ev_park);
    @(posedge clk); #1;
    // 5: three-way collision: register (age 1) beats new age-0 packets,
    //    the better entering one parks, the other is dropped
    in_pkt[0] = mk(2, 9, 0); in_pkt[1] = mk(3, 8, 0); #1;
    chk("3way reg wins", out_pkt[1].src == 6 && out_pkt[1].age == 1);
    chk("3way drop", in_fail[0] && !in_fail[1] && ev_triple && ev_drop && ev_park);
    @(posedge clk); #1; idle_inputs(); #1;
    chk("3way parked src8", out_pkt[1].src == 8 && out_pkt[1].age == 1);
    @(posedge clk); #1;

    // 6: a failure from downstream goes back to the input that sent it
    in_pkt[0] = mk(0, 1, 0); out_fail[0] = 1; #1;
    chk("downstream fail", in_fail[0] && !ev_park);
    @(posedge clk); #1; idle_inputs(); #1;
    chk("nothing parked", !out_pkt[0].valid && !out_pkt[1].valid);

    // 7: register packet fails downstream and stays; a loser is then dropped
    in_pkt[0] = mk(2, 1, 0); in_pkt[1] = mk(2, 2, 0); #1;   // src 2 parks
    @(posedge clk); #1; idle_inputs();
    out_fail[1] = 1; #1;
    chk("reg offered", out_pkt[1].src == 2);
    @(posedge clk); #1; idle_inputs(); #1;
    chk("reg kept, aged", out_pkt[1].src == 2 && out_pkt[1].age == 2);
    in_pkt[0] = mk(0, 7, 9); in_pkt[1] = mk(2, 3, 0); out_fail[1] = 1; #1;
    chk("reg kept: loser src3 dropped", in_fail[1] && !in_fail[0] && out_pkt[0].src == 7);
    @(posedge clk); #1; idle_inputs(); #1;
    chk("reg still src2", out_pkt[1].src == 2 && out_pkt[1].age == 3);
    @(posedge clk); #1;
    chk("reg drained", !out_pkt[1].valid);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
