// tb_hcp_top: end-to-end test of the hybrid crypto processor at its default size
// (GF(2^163), B-163 curve, 1088-bit sponge rate).
//
// The testbench plays the receiver: it picks secret scalars a2, c, d, has the processor's
// key generation compute C = c*G and D = d*G (checked against the reference), publishes
// G1 = G, G2 = a2*G, C, D (x coordinates) and asks the processor to encapsulate
// a key for a random ephemeral scalar r. Every output (u1, u2, tag T, key K) is recomputed
// with the affine reference curve arithmetic and the reference sponge of hcp_ref_pkg,
// following the encapsulation steps: u1 = x(rG1), u2 = x(rG2), alpha = H(u1||u2),
// e = x(rC), f = x(alpha*(rD)), K1||K2 = H(e||f), T = H(K2||u1||u2). It also checks that
// the receiver, from u1 and its secrets alone, derives the same key (e = x(c*U1),
// f = x(alpha*d*U1)), and runs the processor's decapsulation on (u1, u2, T): it must
// return the same key, and with one tag bit flipped it must set err and return no key.
// A second encapsulation with r = 0 must end with err set.
// Mechanisms counted: scalar multiplications, ladder steps on bit 1 and on bit 0, field
// inversions, hash calls of each kind (TCR, KDF, MAC), key generations, decapsulations, rejected tags and
// the error outcome of an encapsulation.
module tb_hcp_top;
  import hcp_pkg::*;
  import hcp_ref_pkg::*;

  localparam int NB = 21;

  logic         clk = 0, rst_n = 0, start = 0, decap = 0, keygen = 0;
  fe_t          pk_cx, pk_dx;
  fe_t          r, g1x, g2x, cx, dx, sk_c, sk_d, u1_in, u2_in;
  logic [255:0] tag_in;
  logic         busy, done, err;
  fe_t          u1, u2;
  logic [255:0] tag;
  logic [127:0] key;
  int checks = 0, failures = 0;
  int n_ecc = 0, n_bit1 = 0, n_bit0 = 0, n_inv = 0, n_tcr = 0, n_kdf = 0, n_mac = 0, n_err = 0;
  int n_dec = 0, n_reject = 0, n_keygen = 0;

  hcp_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .r(r), .g1x(g1x), .g2x(g2x), .cx(cx), .dx(dx),
    .curve_b(CURVE_B), .keygen(keygen), .decap(decap), .sk_c(sk_c), .sk_d(sk_d), .u1_in(u1_in), .u2_in(u2_in),
    .tag_in(tag_in), .busy(busy), .done(done), .err(err), .u1(u1), .u2(u2), .tag(tag),
    .key(key), .pk_cx(pk_cx), .pk_dx(pk_dx)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ecc.start && !dut.u_ecc.busy) n_ecc++;
    if (dut.u_ecc.u_ctrl.state == dut.u_ecc.u_ctrl.S_LADDER && dut.u_ecc.u_ctrl.step == 0) begin
      if (dut.u_ecc.u_ctrl.lbit) n_bit1++; else n_bit0++;
    end
    if (dut.u_ecc.u_ctrl.state == dut.u_ecc.u_ctrl.S_INV_INIT) n_inv++;
    if (dut.u_mkdh.in_valid && dut.u_mkdh.in_ready) begin
      case (dut.u_kem.phase)
        dut.u_kem.P_TCR: n_tcr++;
        dut.u_kem.P_KDF: n_kdf++;
        dut.u_kem.P_MAC: n_mac++;
        default: ;
      endcase
    end
  end

  function automatic fe_t rnd();
    fe_t v;
    for (int i = 0; i < 163; i += 32) v[i +: 32] = $urandom;
    v[162:160] = 3'b0;
    return v;
  endfunction

  function automatic void push_fe(ref byte unsigned q [$], input fe_t v);
    logic [8*NB-1:0] w = (8*NB)'(v);
    for (int i = 0; i < NB; i++) q.push_back(w[8*i +: 8]);
  endfunction

  task automatic expect_eq(logic [255:0] got, logic [255:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic encapsulate(fe_t rr, output int cyc);
    @(negedge clk);
    r = rr; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    point_t g, g2, pc, pd, pu1, pu2, pw, pe, pf;
    fe_t a2, c, d, alpha, ralpha;
    byte unsigned q [$];
    logic [255:0] h, tcr, kdf, mac;
    int cyc;

    g  = base_point();
    a2 = rnd(); c = rnd(); d = rnd();
    g2 = pt_mul(a2, g); pc = pt_mul(c, g); pd = pt_mul(d, g);
    g1x = g.x; g2x = g2.x; cx = '0; dx = '0;
    r = '0; sk_c = c; sk_d = d; u1_in = '0; u2_in = '0; tag_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- key generation by the processor
    keygen = 1;
    encapsulate('0, cyc);
    keygen = 0;
    n_keygen++;
    $display("key generation took %0d cycles", cyc);
    checks++;
    if (err !== 1'b0) begin failures++; $display("FAIL err set in key generation"); end
    expect_eq(256'(pk_cx), 256'(pc.x), "public C");
    expect_eq(256'(pk_dx), 256'(pd.x), "public D");
    cx = pk_cx; dx = pk_dx;

    // ---- encapsulation with a random r
    encapsulate(rnd(), cyc);
    $display("encapsulation took %0d cycles", cyc);
    pu1 = pt_mul(r, g);
    pu2 = pt_mul(r, g2);
    q.delete(); push_fe(q, pu1.x); push_fe(q, pu2.x);
    tcr = sponge_hash(q, 136);
    alpha = tcr[162:0];
    pe = pt_mul(r, pc);
    pw = pt_mul(r, pd);
    pf = pt_mul(alpha, pw);
    q.delete(); push_fe(q, pe.x); push_fe(q, pf.x);
    kdf = sponge_hash(q, 136);
    q.delete();
    for (int i = 0; i < 16; i++) q.push_back(kdf[128 + 8*i +: 8]);
    push_fe(q, pu1.x); push_fe(q, pu2.x);
    mac = sponge_hash(q, 136);
    checks++;
    if (err !== 1'b0) begin failures++; $display("FAIL err set"); end
    expect_eq(256'(u1), 256'(pu1.x), "u1");
    expect_eq(256'(u2), 256'(pu2.x), "u2");
    expect_eq(256'(key), 256'(kdf[127:0]), "key");
    expect_eq(tag, mac, "tag");

    // ---- the receiver's view: same key from u1 and the secrets c, d
    pe = pt_mul(c, pu1);
    pf = pt_mul(alpha, pt_mul(d, pu1));
    q.delete(); push_fe(q, pe.x); push_fe(q, pf.x);
    h = sponge_hash(q, 136);
    expect_eq(256'(key), 256'(h[127:0]), "receiver key");

    // ---- decapsulation by the processor: accepted, then with a corrupted tag
    u1_in = u1; u2_in = u2; tag_in = tag;
    decap = 1;
    encapsulate('0, cyc);
    $display("decapsulation took %0d cycles", cyc);
    n_dec++;
    checks++;
    if (err !== 1'b0) begin failures++; $display("FAIL valid tag rejected"); end
    expect_eq(256'(key), 256'(kdf[127:0]), "decapsulated key");
    expect_eq(tag, mac, "recomputed tag");
    tag_in[17] = ~tag_in[17];
    encapsulate('0, cyc);
    n_dec++;
    checks += 2;
    if (err !== 1'b1) begin failures++; $display("FAIL corrupted tag accepted"); end
    else n_reject++;
    if (key !== '0) begin failures++; $display("FAIL key released on a rejected tag"); end
    decap = 0;

    // ---- r = 0 gives the point at infinity: bottom
    encapsulate('0, cyc);
    checks++;
    if (err !== 1'b1) begin failures++; $display("FAIL err not set for r = 0"); end
    else n_err++;

    $display("mechanisms: ecc=%0d bit1=%0d bit0=%0d inv=%0d tcr=%0d kdf=%0d mac=%0d err=%0d dec=%0d reject=%0d keygen=%0d",
             n_ecc, n_bit1, n_bit0, n_inv, n_tcr, n_kdf, n_mac, n_err, n_dec, n_reject, n_keygen);
    checks++;
    if (n_ecc != 18 || n_keygen != 1 || n_bit1 == 0 || n_bit0 == 0 || n_inv == 0 || n_tcr != 4 || n_kdf != 4 ||
        n_mac != 4 || n_err != 1 || n_dec != 2 || n_reject != 1) begin
      failures++;
      $display("FAIL a mechanism was not exercised as expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
