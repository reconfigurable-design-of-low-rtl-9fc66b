// tb_keccak_round: self-checking test of one MKDH permutation round.
//
// Random states go through the round with each of the 24 round constants of the package
// and are compared with the reference round (whose constants come from the LFSR of the
// specification). Chaining 24 rounds on the all-zero state must give the published
// Keccak-f[1600] first lane F1258F7940E1DDE7.
module tb_keccak_round;
  import hcp_pkg::*;
  import hcp_ref_pkg::*;

  logic [1599:0] s_in, s_out;
  logic [63:0]   rc;
  int checks = 0, failures = 0;

  keccak_round dut (.s_in(s_in), .rc(rc), .s_out(s_out));

  function automatic kstate_t unpack(logic [1599:0] v);
    kstate_t s;
    for (int i = 0; i < 25; i++) s[i] = v[64*i +: 64];
    return s;
  endfunction

  function automatic logic [1599:0] pack(kstate_t s);
    logic [1599:0] v;
    for (int i = 0; i < 25; i++) v[64*i +: 64] = s[i];
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1599:0] v, exp;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 50; i++) v[32*i +: 32] = $urandom;
      s_in = v; rc = KECCAK_RC[n % 24];
      #1;
      exp = pack(keccak_round_ref(unpack(v), n % 24));
      checks++;
      if (s_out !== exp) begin
        failures++;
        if (failures < 4) $display("FAIL round %0d", n % 24);
      end
    end
    v = '0;
    for (int ir = 0; ir < 24; ir++) begin
      s_in = v; rc = KECCAK_RC[ir];
      #1;
      v = s_out;
    end
    checks++;
    if (v[63:0] !== 64'hF1258F7940E1DDE7) begin
      failures++;
      $display("FAIL zero-state permutation lane0 %h", v[63:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
