// tb_ecc_arith_unit: self-checking test of the GF(2^163) arithmetic unit.
//
// Random and corner operands for the three operations; products are compared with the
// shift-and-add reference of hcp_ref_pkg, and a*a^-1 = 1 is checked through the unit.
module tb_ecc_arith_unit;
  import hcp_pkg::*;
  import hcp_ref_pkg::*;

  au_op_e op;
  fe_t    a, b, y;
  int checks = 0, failures = 0;

  ecc_arith_unit #(.M(163), .POLY(163'hC9)) dut (.op(op), .a(a), .b(b), .y(y));

  function automatic fe_t rnd();
    fe_t v;
    for (int i = 0; i < 163; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(au_op_e o, fe_t x, fe_t z, fe_t exp);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 5) $display("FAIL op=%s a=%h b=%h got %h exp %h", o.name(), x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t x, z;
    check(AU_MUL, '1, '1, gf_mul('1, '1));
    check(AU_MUL, {1'b1, 162'b0}, {1'b1, 162'b0}, gf_mul({1'b1, 162'b0}, {1'b1, 162'b0}));
    check(AU_MUL, 163'h1, CURVE_B, CURVE_B);
    for (int i = 0; i < 300; i++) begin
      x = rnd(); z = rnd();
      check(AU_MUL, x, z, gf_mul(x, z));
      check(AU_ADD, x, z, x ^ z);
      check(AU_MOVA, x, z, x);
    end
    for (int i = 0; i < 5; i++) begin
      x = rnd();
      check(AU_MUL, x, gf_inv(x), 163'h1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
