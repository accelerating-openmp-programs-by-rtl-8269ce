// tb_hash_unit: checks the address rehash against an independently written
// slice-fold reference, and checks that every key gives a one-to-one
// mapping of the whole address space (16 modules x 64 words).
module tb_hash_unit;
  import bn_pkg::*;
  localparam int N = 16, D = 64, K = 4, IW = 6;
  logic [LADDR_W-1:0] laddr;
  hash_key_t key;
  logic [MOD_W-1:0] mod_o;
  logic [IADDR_W-1:0] ia_o;
  int checks = 0, failures = 0;
  bit seen [N*D];

  hash_unit #(.N_MOD(N), .MEM_DEPTH(D)) dut (.laddr, .key, .module_o(mod_o), .iaddr_o(ia_o));

  function automatic int ref_mod(int a, hash_key_t k);
    automatic int ia = (a >> K) & (D - 1);
    automatic int m  = a & (N - 1);
    automatic int masked = ia & int'(k.mask);
    for (int s = 0; s < IW; s += K) m ^= (masked >> s) & (N - 1);
    return m ^ (int'(k.offset) & (N - 1));
  endfunction

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6; t++) begin
      key = '0;
      if (t > 0) begin
        key.mask   = IADDR_W'($urandom);
        key.offset = MOD_W'($urandom);
      end
      foreach (seen[i]) seen[i] = 0;
      for (int a = 0; a < N * D; a++) begin
        laddr = LADDR_W'(a);
        #1;
        checks++;
        if (int'(mod_o) != ref_mod(a, key) || int'(ia_o) != ((a >> K) & (D - 1))) begin
          failures++;
          if (failures < 5) $display("mismatch a=%0d mod=%0d exp=%0d", a, mod_o, ref_mod(a, key));
        end
        checks++;
        if (seen[int'(ia_o) * N + int'(mod_o)]) failures++;
        seen[int'(ia_o) * N + int'(mod_o)] = 1;
      end
    end
    // a zero key maps the low address bits straight to the module
    key = '0; laddr = LADDR_W'(16'h2a7); #1;
    checks++; if (mod_o != MOD_W'(7) || ia_o != IADDR_W'(16'h2a)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
