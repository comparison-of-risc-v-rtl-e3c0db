// tb_tta_ntru_dec: NTRU decryption on the TTA-P5 processor at its default
// size.
//
// NTRU works in the ring Z[x]/(x^N - 1) with a small modulus p = 3 and a
// large one q. The private key is a ternary polynomial f together with its
// inverse Fp modulo p; the public key is h = p * Fq * g mod q, Fq being the
// inverse of f modulo q and g another ternary polynomial. A ternary message
// m is encrypted as e = r * h + m mod q. Decryption computes a = f * e mod q,
// lifts the coefficients of a into (-q/2, q/2], then d = Fp * a mod p lifted
// into {-1, 0, 1}, which equals m.
//
// The testbench makes the keys itself (random ternary f and g, inverses by
// Gaussian elimination modulo 2 and 3 and Newton iteration from 2 up to q),
// encrypts a random message, and has the processor decrypt it with N = 11,
// q = 2048. The processor program has one convolution subroutine, called
// twice (f * e, then Fp * a), a lifting loop that reduces modulo q with an
// AND and subtracts q under a guard, and a loop that reduces modulo 3 on the
// DIV-MOD unit and corrects the remainder with two guarded moves. The test
// checks each recovered coefficient against m and against a model of the
// same steps, checks the exact cycle count of the static schedule, and
// counts calls, returns, squashed guarded moves, multiplies and divisions,
// failing if one never occurs.
module tb_tta_ntru_dec;
  import tta_pkg::*;

  localparam int unsigned NB   = 4;
  localparam int unsigned IW   = NB * SLOT_W;
  localparam int unsigned PC_W = 10;
  localparam int unsigned DAW  = 12;

  localparam int N = 11;
  localparam int P = 3;
  localparam int Q = 2048;

  // data layout (byte addresses)
  localparam int E_BASE  = 'h100;   // e, words
  localparam int F_BASE  = 'h180;   // f, signed bytes
  localparam int FP_BASE = 'h1c0;   // Fp, signed bytes
  localparam int A_BASE  = 'h200;   // a, words
  localparam int D_BASE  = 'h280;   // Fp * a before reduction, words
  localparam int M_OUT   = 'h300;   // recovered message, signed bytes

  localparam logic [4:0] LSU0 = U_LSU0, LSU1 = U_LSU0 + 1;
  localparam logic [4:0] ART0 = U_ART0, ART1 = U_ART0 + 1, ART2 = U_ART0 + 2, ART3 = U_ART0 + 3;
  localparam logic [4:0] SHF0 = U_SHF0, ADD0 = U_ADD0, ADD1 = U_ADD0 + 1;
  localparam logic [4:0] RF0 = U_RF0, RF1 = U_RF0 + 1;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            imem_we;
  logic [PC_W-1:0] imem_addr;
  logic [IW-1:0]   imem_wdata;
  logic            host_req, host_we;
  logic [DAW-1:0]  host_addr;
  logic [3:0]      host_be;
  logic [DW-1:0]   host_wdata, host_rdata;
  logic [PC_W-1:0] fetch_addr;
  int              checks = 0, failures = 0;

  tta_top dut (
    .clk, .rst_n,
    .imem_we_i(imem_we), .imem_addr_i(imem_addr), .imem_wdata_i(imem_wdata),
    .host_req_i(host_req), .host_we_i(host_we), .host_addr_i(host_addr),
    .host_be_i(host_be), .host_wdata_i(host_wdata), .host_rdata_o(host_rdata),
    .fetch_addr_o(fetch_addr));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ assembler
  slot_t [NB-1:0] prog [1 << PC_W];
  int             pc_emit = 0;
  int             prog_len = 0;

  function automatic slot_t M(logic [SRC_W-1:0] s, logic [DST_W-1:0] d,
                              logic [2:0] g = G_ALWAYS);
    return mv(g, s, d);
  endfunction
  function automatic logic [SRC_W-1:0] IMM(int v);       return src_imm(v); endfunction
  function automatic logic [SRC_W-1:0] R0(int i);        return src_unit(RF0, i); endfunction
  function automatic logic [SRC_W-1:0] R1(int i);        return src_unit(RF1, i); endfunction
  function automatic logic [SRC_W-1:0] RES(logic [4:0] u); return src_unit(u); endfunction
  function automatic logic [DST_W-1:0] W0(int i);        return dst_reg(RF0, i); endfunction
  function automatic logic [DST_W-1:0] W1(int i);        return dst_reg(RF1, i); endfunction
  function automatic logic [DST_W-1:0] WBL(int i);       return dst_reg(U_BL, i); endfunction
  function automatic logic [DST_W-1:0] OPD(logic [4:0] u); return dst_operand(u); endfunction
  function automatic logic [DST_W-1:0] TRG(logic [4:0] u, logic [3:0] op);
    return dst_trigger(u, op);
  endfunction

  task automatic I(slot_t s0 = NOP_SLOT, slot_t s1 = NOP_SLOT,
                   slot_t s2 = NOP_SLOT, slot_t s3 = NOP_SLOT);
    prog[pc_emit] = {s3, s2, s1, s0};
    pc_emit++;
    if (pc_emit > prog_len) prog_len = pc_emit;
  endtask

  localparam int CONV = 300;
  int L_COUTER, L_CINNER, L_LIFT, L_MODP, L_HALT;
  int len_cinit, len_cpre, len_cinner, len_cpost, len_cret;
  int len_m0, len_m1, len_lift, len_m2, len_m3, len_modp;

  // Register use: RF0 r0 = k, r1 = i, r2 = accumulator, r4 = j, r5 = scratch;
  // RF1 r0 = base of the word operand x, r1 = base of the byte operand y,
  // r2 = base of the word result.
  task automatic assemble();
    // ---------------------------------- CONV: out_k = sum_i x_i * y_((k-i) mod N)
    pc_emit = CONV;
    I(M(IMM(0), W0(0)));
    len_cinit = pc_emit - CONV;
    L_COUTER = pc_emit;
    I(M(IMM(0), W0(2)));
    I(M(IMM(0), W0(1)));
    len_cpre = pc_emit - L_COUTER;
    L_CINNER = pc_emit;
    I(M(R0(1), OPD(ART0)));
    I(M(R0(0), TRG(ART0, ART_SUB)));                                 // k - i
    I(M(RES(ART0), W0(4)), M(RES(ART0), OPD(ART1)), M(IMM(0), TRG(ART1, ART_GT)));
    I(M(RES(ART1), WBL(0)), M(IMM(N), OPD(ART2)), M(RES(ART0), TRG(ART2, ART_ADD)));
    I(M(RES(ART2), W0(4), G_BL0));                                   // wrap around
    I(M(R0(4), OPD(ART3)), M(R1(1), TRG(ART3, ART_ADD)));
    I(M(RES(ART3), TRG(LSU0, LSU_LDQ)), M(IMM(2), OPD(SHF0)), M(R0(1), TRG(SHF0, SHF_SHL)));
    I(M(R1(0), OPD(ADD0)), M(RES(SHF0), TRG(ADD0, 0)));
    I(M(RES(ADD0), TRG(LSU1, LSU_LDW)), M(RES(LSU0), OPD(U_MUL)));
    I();
    I(M(RES(LSU1), TRG(U_MUL, 0)));
    I(M(IMM(1), OPD(ADD1)), M(R0(1), TRG(ADD1, 0)));
    I(M(RES(ADD1), W0(1)));
    I(M(RES(U_MUL), OPD(ADD0)), M(R0(2), TRG(ADD0, 0)));
    I(M(RES(ADD0), W0(2)), M(R0(1), TRG(ART0, ART_EQ)), M(IMM(N), OPD(ART0)));
    I(M(RES(ART0), WBL(0)));
    I(M(IMM(L_CINNER), TRG(U_GCU, GCU_JUMP), G_NBL0));
    I();                                                             // delay slot
    len_cinner = pc_emit - L_CINNER;
    I(M(IMM(2), OPD(SHF0)), M(R0(0), TRG(SHF0, SHF_SHL)));
    I(M(R1(2), OPD(ADD0)), M(RES(SHF0), TRG(ADD0, 0)));
    I(M(RES(ADD0), TRG(LSU0, LSU_STW)), M(R0(2), OPD(LSU0)));
    I(M(IMM(1), OPD(ADD1)), M(R0(0), TRG(ADD1, 0)));
    I(M(RES(ADD1), W0(0)), M(RES(ADD1), TRG(ART0, ART_EQ)), M(IMM(N), OPD(ART0)));
    I(M(RES(ART0), WBL(0)));
    I(M(IMM(L_COUTER), TRG(U_GCU, GCU_JUMP), G_NBL0));
    I();
    len_cpost = pc_emit - L_CINNER - len_cinner;
    I(M(RES(U_GCU), TRG(U_GCU, GCU_JUMP)));                          // return
    I();
    len_cret = pc_emit - L_CINNER - len_cinner - len_cpost;

    // ---------------------------------- main
    pc_emit = 0;
    I(M(IMM(E_BASE), W1(0)));
    I(M(IMM(F_BASE), W1(1)));
    I(M(IMM(A_BASE), W1(2)));
    I(M(IMM(CONV), TRG(U_GCU, GCU_CALL)));                           // a = f * e
    I();
    len_m0 = pc_emit;
    I(M(IMM(0), W0(0)));
    len_m1 = pc_emit - len_m0;
    L_LIFT = pc_emit;                                                // a_k: mod q, lift
    I(M(IMM(2), OPD(SHF0)), M(R0(0), TRG(SHF0, SHF_SHL)));
    I(M(IMM(A_BASE), OPD(ADD0)), M(RES(SHF0), TRG(ADD0, 0)));
    I(M(RES(ADD0), TRG(LSU0, LSU_LDW)), M(RES(ADD0), W0(5)));
    I();
    I(M(RES(LSU0), TRG(U_LOG, LOG_AND)), M(IMM(Q - 1), OPD(U_LOG)));
    I(M(RES(U_LOG), TRG(ART0, ART_GT)), M(IMM(Q / 2), OPD(ART0)),
      M(RES(U_LOG), TRG(ART1, ART_SUB)), M(IMM(Q), OPD(ART1)));
    I(M(RES(ART0), WBL(0)), M(RES(U_LOG), OPD(LSU0)));
    I(M(RES(ART1), OPD(LSU0), G_BL0), M(R0(5), TRG(LSU0, LSU_STW)));
    I(M(IMM(1), OPD(ADD1)), M(R0(0), TRG(ADD1, 0)));
    I(M(RES(ADD1), W0(0)), M(RES(ADD1), TRG(ART0, ART_EQ)), M(IMM(N), OPD(ART0)));
    I(M(RES(ART0), WBL(0)));
    I(M(IMM(L_LIFT), TRG(U_GCU, GCU_JUMP), G_NBL0));
    I();
    len_lift = pc_emit - L_LIFT;
    I(M(IMM(A_BASE), W1(0)));
    I(M(IMM(FP_BASE), W1(1)));
    I(M(IMM(D_BASE), W1(2)));
    I(M(IMM(CONV), TRG(U_GCU, GCU_CALL)));                           // d = Fp * a
    I();
    len_m2 = pc_emit - L_LIFT - len_lift;
    I(M(IMM(0), W0(0)));
    len_m3 = 1;
    L_MODP = pc_emit;                                                // d_k mod 3, lift
    I(M(IMM(2), OPD(SHF0)), M(R0(0), TRG(SHF0, SHF_SHL)));
    I(M(IMM(D_BASE), OPD(ADD0)), M(RES(SHF0), TRG(ADD0, 0)));
    I(M(RES(ADD0), TRG(LSU0, LSU_LDW)));
    I();
    I(M(RES(LSU0), TRG(U_DIV, DIV_MOD)), M(IMM(P), OPD(U_DIV)));
    repeat (32) I();                                                 // DIV-MOD latency 33
    I(M(RES(U_DIV), W0(5)), M(RES(U_DIV), TRG(ART0, ART_GT)), M(IMM(1), OPD(ART0)));
    I(M(RES(ART0), WBL(0)), M(IMM(-1), TRG(ART1, ART_GT)), M(RES(U_DIV), OPD(ART1)));
    I(M(RES(ART1), WBL(1)), M(RES(U_DIV), TRG(ART2, ART_SUB)), M(IMM(P), OPD(ART2)));
    I(M(RES(U_DIV), TRG(ART3, ART_ADD)), M(IMM(P), OPD(ART3)), M(RES(ART2), W0(5), G_BL0));
    I(M(RES(ART3), W0(5), G_BL1), M(IMM(M_OUT), OPD(ADD0)), M(R0(0), TRG(ADD0, 0)));
    I(M(RES(ADD0), TRG(LSU1, LSU_STQ)), M(R0(5), OPD(LSU1)));
    I(M(IMM(1), OPD(ADD1)), M(R0(0), TRG(ADD1, 0)));
    I(M(RES(ADD1), W0(0)), M(RES(ADD1), TRG(ART0, ART_EQ)), M(IMM(N), OPD(ART0)));
    I(M(RES(ART0), WBL(0)));
    I(M(IMM(L_MODP), TRG(U_GCU, GCU_JUMP), G_NBL0));
    I();
    len_modp = pc_emit - L_MODP;
    L_HALT = pc_emit;
    I(M(IMM(L_HALT), TRG(U_GCU, GCU_JUMP)));
    I();
  endtask

  // ------------------------------------------------------------ host side
  task automatic host_write(int baddr, logic [31:0] data, logic [3:0] be = 4'b1111);
    @(negedge clk);
    host_req = 1'b1; host_we = 1'b1; host_addr = DAW'(baddr >> 2);
    host_be = be; host_wdata = data;
    @(negedge clk);
    host_req = 1'b0; host_we = 1'b0;
  endtask

  task automatic host_read(int baddr, output logic [31:0] data);
    @(negedge clk);
    host_req = 1'b1; host_we = 1'b0; host_addr = DAW'(baddr >> 2);
    @(negedge clk);
    host_req = 1'b0;
    data = host_rdata;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_bytes(int base, int v [N]);
    logic [31:0] w;
    for (int i = 0; i < N; i += 4) begin
      w = '0;
      for (int b = 0; b < 4 && i + b < N; b++) w[8*b +: 8] = 8'(v[i + b]);
      host_write(base + i, w);
    end
  endtask

  // ------------------------------------------------------------ reference model
  typedef int poly_t [N];

  function automatic int md(int v, int m);
    return ((v % m) + m) % m;
  endfunction

  function automatic poly_t conv(poly_t x, poly_t y, int m);
    poly_t z;
    for (int k = 0; k < N; k++) begin
      longint acc = 0;
      for (int i = 0; i < N; i++) acc += longint'(x[i]) * y[(k - i + N) % N];
      z[k] = (m == 0) ? int'(acc) : md(int'(acc % m), m);
    end
    return z;
  endfunction

  // Inverse of f in Z_m[x]/(x^N - 1) for a prime m: solves the circulant
  // system sum_j f_((k-j) mod N) b_j = [k == 0] by Gauss-Jordan elimination.
  function automatic bit inverse_prime(poly_t f, int m, output poly_t b);
    int a [N][N+1];
    for (int k = 0; k < N; k++) begin
      for (int j = 0; j < N; j++) a[k][j] = md(f[(k - j + N) % N], m);
      a[k][N] = (k == 0);
    end
    for (int c = 0; c < N; c++) begin
      int piv = -1, inv = 0;
      for (int r = c; r < N; r++) if (piv < 0 && a[r][c] != 0) piv = r;
      if (piv < 0) return 0;
      for (int j = 0; j <= N; j++) begin
        int t = a[c][j]; a[c][j] = a[piv][j]; a[piv][j] = t;
      end
      for (int v = 1; v < m; v++) if ((a[c][c] * v) % m == 1) inv = v;
      for (int j = 0; j <= N; j++) a[c][j] = (a[c][j] * inv) % m;
      for (int r = 0; r < N; r++)
        if (r != c && a[r][c] != 0) begin
          int fac = a[r][c];
          for (int j = 0; j <= N; j++) a[r][j] = md(a[r][j] - fac * a[c][j], m);
        end
    end
    for (int k = 0; k < N; k++) b[k] = a[k][N];
    return 1;
  endfunction

  function automatic poly_t ternary();
    poly_t t;
    for (int i = 0; i < N; i++) t[i] = int'($urandom_range(0, 2)) - 1;
    return t;
  endfunction

  // ------------------------------------------------------------ mechanism counters
  int  n_call = 0, n_ret = 0, n_squash = 0, n_guard_run = 0, n_mul = 0, n_div = 0;
  bit  counting = 0;

  always @(posedge clk) begin
    if (counting && rst_n) begin
      for (int b = 0; b < NB; b++) begin
        if (dut.move_squash[b]) n_squash++;
        if (dut.move_exec[b] && dut.slots[b].guard != G_ALWAYS) n_guard_run++;
        if (dut.move_exec[b] && dut.slots[b].dst == dst_trigger(U_GCU, GCU_JUMP)
            && dut.slots[b].src == src_unit(U_GCU)) n_ret++;
      end
      if (dut.unit_in[U_GCU].t_we && dut.unit_in[U_GCU].op == GCU_CALL) n_call++;
      if (dut.unit_in[U_MUL].t_we) n_mul++;
      if (dut.unit_in[U_DIV].t_we) n_div++;
    end
  end

  initial begin
    poly_t       f, g, fp, f2, fq, h, r, m, e, a, d, t;
    int          cycles, exp_cycles, conv_cycles, tries;
    logic [31:0] w;

    rst_n = 1'b0;
    imem_we = 1'b0; imem_addr = '0; imem_wdata = '0;
    host_req = 1'b0; host_we = 1'b0; host_addr = '0; host_be = '0; host_wdata = '0;
    for (int i = 0; i < (1 << PC_W); i++) prog[i] = {NB{NOP_SLOT}};
    assemble();
    for (int i = 0; i < prog_len; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_addr = PC_W'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;

    // key generation: f invertible modulo 2 and 3
    tries = 0;
    do begin
      f = ternary();
      tries++;
    end while (!(inverse_prime(f, P, fp) && inverse_prime(f, 2, f2)) && tries < 1000);
    check(tries < 1000, "found an invertible f");
    fq = f2;
    for (int it = 0; it < 4; it++) begin            // b = b * (2 - f * b), 2 -> 2^16
      t = conv(f, fq, Q);
      for (int i = 0; i < N; i++) t[i] = md((i == 0 ? 2 : 0) - t[i], Q);
      fq = conv(fq, t, Q);
    end
    t = conv(f, fq, Q);
    for (int i = 0; i < N; i++) check(t[i] == (i == 0), "f * Fq = 1 mod q");
    t = conv(f, fp, P);
    for (int i = 0; i < N; i++) check(t[i] == (i == 0), "f * Fp = 1 mod p");
    for (int i = 0; i < N; i++) fp[i] = (fp[i] == 2) ? -1 : fp[i];   // centred
    g = ternary();
    h = conv(fq, g, Q);
    for (int i = 0; i < N; i++) h[i] = md(P * h[i], Q);

    // encryption
    m = ternary();
    r = ternary();
    e = conv(r, h, Q);
    for (int i = 0; i < N; i++) e[i] = md(e[i] + m[i], Q);

    // decryption, as the program does it
    a = conv(f, e, 0);
    for (int i = 0; i < N; i++) begin
      a[i] = a[i] & (Q - 1);
      if (a[i] > Q / 2) a[i] -= Q;
    end
    d = conv(fp, a, 0);
    for (int i = 0; i < N; i++) begin
      d[i] = d[i] % P;
      if (d[i] > 1) d[i] -= P;
      if (d[i] < -1) d[i] += P;
    end
    for (int i = 0; i < N; i++) check(d[i] == m[i], $sformatf("model recovers m[%0d]", i));

    for (int i = 0; i < N; i++) host_write(E_BASE + 4 * i, e[i]);
    write_bytes(F_BASE, f);
    write_bytes(FP_BASE, fp);
    for (int a4 = A_BASE; a4 < M_OUT + 16; a4 += 4) host_write(a4, 32'hdead_beef);

    @(negedge clk);
    counting = 1;
    rst_n = 1'b1;
    cycles = 0;
    while (fetch_addr != PC_W'(L_HALT)) begin
      @(negedge clk);
      cycles++;
    end
    repeat (4) @(negedge clk);
    counting = 0;
    rst_n = 1'b0;

    conv_cycles = len_cinit + N * (len_cpre + N * len_cinner + len_cpost) + len_cret;
    exp_cycles = len_m0 + conv_cycles + len_m1 + N * len_lift + len_m2 + conv_cycles
               + len_m3 + N * len_modp;
    check(cycles == exp_cycles, $sformatf("cycle count %0d, schedule %0d", cycles, exp_cycles));

    for (int k = 0; k < N; k++) begin
      host_read(A_BASE + 4 * k, w);
      check(int'(w) == a[k], $sformatf("a[%0d] = %0d, expected %0d", k, int'(w), a[k]));
    end
    for (int k = 0; k < N; k += 4) begin
      host_read(M_OUT + k, w);
      for (int b = 0; b < 4 && k + b < N; b++)
        check(int'($signed(w[8*b +: 8])) == m[k + b],
              $sformatf("m[%0d] = %0d, expected %0d", k + b, $signed(w[8*b +: 8]), m[k + b]));
    end

    $display("program %0d words, cycles %0d; calls %0d returns %0d; guarded moves run %0d squashed %0d; MUL %0d DIV-MOD %0d",
             prog_len, cycles, n_call, n_ret, n_guard_run, n_squash, n_mul, n_div);
    check(n_call == 2 && n_ret == 2, "calls and returns");
    check(n_guard_run > 0 && n_squash > 0, "guarded moves");
    check(n_mul == 2 * N * N, "multiplies");
    check(n_div == N, "divisions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
