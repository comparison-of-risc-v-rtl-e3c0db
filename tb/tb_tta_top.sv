// tb_tta_top: end-to-end testbench of the TTA-P5 processor at its default
// size.
//
// The testbench assembles a hand-scheduled TTA program that performs the
// encryption step of NTRU, e = r * h + m (mod q), in the ring Z[x]/(x^N - 1):
// h is a public-key polynomial with coefficients in [0, q), r and m are
// ternary polynomials stored as signed bytes. The product is a cyclic
// convolution, e_k = sum_i h_i * r_((k - i) mod N), computed with two nested
// loops; the reduction mod q is a called subroutine that uses the DIV-MOD
// unit and a guarded correction for negative remainders. Each e_k is stored
// as a halfword. A second loop folds the stored coefficients into a checksum,
// (cs << 1) ^ e_k, and a short tail exercises the remaining load, store,
// logic and shift operations.
//
// The program goes in through the instruction-memory load port and the data
// through the host port, both while the processor is in reset. The
// testbench then runs the processor until it reaches its final self-jump,
// reads the results back through the host port and compares them with values
// computed here. It also checks that the run takes exactly the number of
// cycles of the static schedule (the processor never stalls), and counts how
// often each mechanism of the processor happened: jumps, calls, returns,
// guard-squashed and guard-enabled moves, operand/trigger pairs in one
// instruction, direct unit-to-unit moves, instructions using all four buses,
// both LSUs busy at once, each load and store width, MUL and DIV-MOD use. A
// mechanism that never happened counts as a failure.
module tb_tta_top;
  import tta_pkg::*;

  localparam int unsigned NB   = 4;
  localparam int unsigned IW   = NB * SLOT_W;
  localparam int unsigned PC_W = 10;
  localparam int unsigned DAW  = 12;

  // workload size
  localparam int N = 11;
  localparam int Q = 2048;

  // data layout (byte addresses)
  localparam int H_BASE  = 'h100;
  localparam int R_BASE  = 'h200;
  localparam int M_BASE  = 'h280;
  localparam int E_BASE  = 'h300;
  localparam int OUT     = 'h400;

  // unit ids
  localparam logic [4:0] LSU0 = U_LSU0, LSU1 = U_LSU0 + 1;
  localparam logic [4:0] ART0 = U_ART0, ART1 = U_ART0 + 1, ART2 = U_ART0 + 2, ART3 = U_ART0 + 3;
  localparam logic [4:0] SHF0 = U_SHF0, SHF1 = U_SHF0 + 1;
  localparam logic [4:0] ADD0 = U_ADD0, ADD1 = U_ADD0 + 1;
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

  // label addresses
  localparam int REDUCE = 200;
  int L_OUTER, L_INNER, L_RET, L_CSUM, L_HALT;
  int len_init, len_outer_pre, len_inner, len_outer_post, len_sub, len_csum_pre, len_csum, len_tail;

  task automatic assemble();
    // -------------------------------------------- subroutine: r6 = r2 mod q in [0, q)
    pc_emit = REDUCE;
    I(M(R0(2), TRG(U_DIV, DIV_MOD)), M(IMM(Q), OPD(U_DIV)));
    I(M(IMM(Q), OPD(ART2)));                              // for the correction
    repeat (31) I();                                      // DIV-MOD latency 33
    I(M(RES(U_DIV), W0(6)), M(RES(U_DIV), OPD(ART3)), M(IMM(0), TRG(ART3, ART_GT)),
      M(RES(U_DIV), TRG(ART2, ART_ADD)));
    I(M(RES(ART3), WBL(0)), M(RES(U_GCU), TRG(U_GCU, GCU_JUMP)));    // return
    I(M(RES(ART2), W0(6), G_BL0));                      // delay slot: fix negative
    len_sub = pc_emit - REDUCE;

    // -------------------------------------------- main
    pc_emit = 0;
    I(M(IMM(N), W0(3)), M(IMM(H_BASE), W1(0)), M(IMM(2), OPD(SHF0)));
    I(M(IMM(Q), W0(4)), M(IMM(R_BASE), W1(1)));
    I(M(IMM(0), W0(0)), M(IMM(E_BASE), W1(2)));
    len_init = pc_emit;
    L_OUTER = pc_emit;                                    // for k = 0 .. N-1
    I(M(IMM(0), OPD(ADD1)), M(IMM(0), TRG(ADD1, 0)));    // accumulator = 0
    I(M(IMM(0), W0(1)));                                  // i = 0
    len_outer_pre = pc_emit - L_OUTER;
    L_INNER = pc_emit;                                    // for i = 0 .. N-1
    I(M(R0(1), OPD(ART0)), M(R0(1), TRG(SHF0, SHF_SHL)), M(R1(0), OPD(ADD0)),
      M(RES(ADD1), W0(2)));
    I(M(R0(0), TRG(ART0, ART_SUB)), M(RES(SHF0), TRG(ADD0, 0)));
    I(M(RES(ART0), OPD(ART1)), M(RES(ADD0), TRG(LSU0, LSU_LDW)), M(IMM(0), TRG(ART1, ART_GT)),
      M(RES(ART0), W0(5)));
    I(M(RES(ART1), WBL(0)), M(R0(3), OPD(ART2)), M(RES(ART0), TRG(ART2, ART_ADD)));
    I(M(RES(ART2), W0(5), G_BL0), M(RES(LSU0), OPD(U_MUL)));
    I(M(R0(5), TRG(ADD1, 0)), M(R1(1), OPD(ADD1)));
    I(M(RES(ADD1), TRG(LSU1, LSU_LDQ)), M(R0(1), TRG(ART3, ART_ADD)), M(IMM(1), OPD(ART3)));
    I(M(RES(ART3), W0(1)), M(RES(ART3), TRG(ART1, ART_EQ)), M(R0(3), OPD(ART1)));
    I(M(RES(LSU1), TRG(U_MUL, 0)), M(RES(ART1), WBL(1)));
    I();
    I(M(IMM(L_INNER), TRG(U_GCU, GCU_JUMP), G_NBL1));
    I(M(RES(U_MUL), TRG(ADD1, 0)), M(R0(2), OPD(ADD1)));  // delay slot: accumulate
    len_inner = pc_emit - L_INNER;
    // add the message coefficient, reduce, store
    I(M(RES(ADD1), W0(2)), M(R0(0), TRG(ADD0, 0)), M(IMM(M_BASE), OPD(ADD0)));
    I(M(RES(ADD0), TRG(LSU1, LSU_LDQ)));
    I();
    I(M(RES(LSU1), TRG(ADD1, 0)), M(R0(2), OPD(ADD1)));
    I(M(RES(ADD1), W0(2)), M(IMM(REDUCE), TRG(U_GCU, GCU_CALL)));
    I();                                                  // delay slot
    L_RET = pc_emit;
    I(M(R0(0), TRG(SHF1, SHF_SHL)), M(IMM(1), OPD(SHF1)));
    I(M(RES(SHF1), TRG(ADD0, 0)), M(R1(2), OPD(ADD0)));
    I(M(R0(6), OPD(LSU0)), M(RES(ADD0), TRG(LSU0, LSU_STH)));
    I(M(R0(0), TRG(ART0, ART_ADD)), M(IMM(1), OPD(ART0)));
    I(M(RES(ART0), W0(0)), M(RES(ART0), TRG(ART1, ART_EQ)), M(R0(3), OPD(ART1)));
    I(M(RES(ART1), WBL(1)));
    I(M(IMM(L_OUTER), TRG(U_GCU, GCU_JUMP), G_NBL1));
    I();                                                  // delay slot
    len_outer_post = pc_emit - L_RET + 6;                 // incl. the 6 before the call
    // -------------------------------------------- checksum of the stored e
    I(M(IMM(0), W0(0)), M(IMM(0), W1(3)));
    len_csum_pre = 1;
    L_CSUM = pc_emit;
    I(M(R0(0), TRG(SHF1, SHF_SHL)), M(IMM(1), OPD(SHF1)));
    I(M(RES(SHF1), TRG(ADD0, 0)), M(R1(2), OPD(ADD0)));
    I(M(RES(ADD0), TRG(LSU1, LSU_LDHU)), M(R1(3), TRG(SHF0, SHF_SHL)), M(IMM(1), OPD(SHF0)));
    I(M(R0(0), TRG(ART0, ART_ADD)), M(IMM(1), OPD(ART0)));
    I(M(RES(LSU1), TRG(U_LOG, LOG_XOR)), M(RES(SHF0), OPD(U_LOG)), M(RES(ART0), W0(0)),
      M(RES(ART0), TRG(ART1, ART_EQ)));
    I(M(RES(U_LOG), W1(3)), M(RES(ART1), WBL(1)));
    I(M(IMM(L_CSUM), TRG(U_GCU, GCU_JUMP), G_NBL1));
    I();
    len_csum = pc_emit - L_CSUM;
    // -------------------------------------------- tail
    I(M(R1(3), OPD(LSU0)), M(IMM(OUT), TRG(LSU0, LSU_STW)),
      M(IMM('h5A), OPD(LSU1)), M(IMM(OUT + 4), TRG(LSU1, LSU_STQ)));
    I(M(IMM(OUT + 4), TRG(LSU0, LSU_LDQU)), M(IMM(E_BASE), TRG(LSU1, LSU_LDH)));
    I();
    I(M(RES(LSU0), OPD(U_LOG)), M(RES(LSU1), TRG(U_LOG, LOG_IOR)));
    I(M(RES(U_LOG), OPD(LSU0)), M(IMM(OUT + 8), TRG(LSU0, LSU_STW)),
      M(RES(U_LOG), TRG(U_LOG, LOG_AND)), M(IMM('h0F), OPD(U_LOG)));
    I(M(RES(U_LOG), OPD(LSU1)), M(IMM(OUT + 12), TRG(LSU1, LSU_STH)),
      M(IMM(-64), TRG(SHF0, SHF_SHR)), M(IMM(3), OPD(SHF0)));
    I(M(RES(SHF0), OPD(LSU0)), M(IMM(OUT + 16), TRG(LSU0, LSU_STW)),
      M(IMM(-64), TRG(SHF1, SHF_SHRU)), M(IMM(28), OPD(SHF1)));
    I(M(RES(SHF1), OPD(LSU1)), M(IMM(OUT + 20), TRG(LSU1, LSU_STW)));
    len_tail = pc_emit - L_CSUM - len_csum;
    L_HALT = pc_emit;
    I(M(IMM(L_HALT), TRG(U_GCU, GCU_JUMP)));
    I();
  endtask

  // ------------------------------------------------------------ host access
  task automatic host_write(int baddr, logic [31:0] data, logic [3:0] be);
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

  // ------------------------------------------------------------ mechanism counters
  int n_jump, n_call, n_ret, n_squash, n_guarded, n_bypass, n_direct, n_full_bus,
      n_dual_lsu, n_mul, n_div, n_ld[8], n_st[8];
  bit counting = 0;

  always @(posedge clk) begin
    if (counting && rst_n) begin
      automatic int busy = 0;
      for (int b = 0; b < int'(NB); b++) begin
        automatic slot_t s = dut.slots[b];
        if (dut.move_exec[b]) begin
          busy++;
          if (s.guard != G_ALWAYS) n_guarded++;
          // unit result moved straight into another unit's port
          if (!s.src[24] && s.src[10:6] inside {[1:13]} && s.dst[15:11] inside {[1:13]})
            n_direct++;
          if (s.dst[15:11] == U_GCU && s.dst[4] && s.dst[3:0] == GCU_CALL) n_call++;
          if (s.dst[15:11] == U_GCU && s.dst[4] && s.dst[3:0] == GCU_JUMP) begin
            n_jump++;
            if (!s.src[24] && s.src[10:6] == U_GCU) n_ret++;
          end
        end
        if (dut.move_squash[b]) n_squash++;
      end
      if (busy == int'(NB)) n_full_bus++;
      for (int u = 1; u < 14; u++)
        if (dut.unit_in[u].o_we && dut.unit_in[u].t_we) n_bypass++;
      if (dut.unit_in[LSU0].t_we && dut.unit_in[LSU1].t_we) n_dual_lsu++;
      for (int l = 0; l < 2; l++)
        if (dut.unit_in[U_LSU0 + l].t_we) begin
          automatic int op = int'(dut.unit_in[U_LSU0 + l].op);
          if (op >= int'(LSU_STW)) n_st[op]++; else n_ld[op]++;
        end
      if (dut.unit_in[U_MUL].t_we) n_mul++;
      if (dut.unit_in[U_DIV].t_we) n_div++;
    end
  end

  // ------------------------------------------------------------ test
  initial begin
    int          h [N], r [N], m [N], e [N];
    longint      acc;
    logic [31:0] cs, w, v;
    int          cycles, exp_cycles;

    rst_n = 1'b0;
    imem_we = 1'b0; imem_addr = '0; imem_wdata = '0;
    host_req = 1'b0; host_we = 1'b0; host_addr = '0; host_be = '0; host_wdata = '0;
    n_jump = 0; n_call = 0; n_ret = 0; n_squash = 0; n_guarded = 0; n_bypass = 0;
    n_direct = 0; n_full_bus = 0; n_dual_lsu = 0; n_mul = 0; n_div = 0;
    for (int i = 0; i < 8; i++) begin n_ld[i] = 0; n_st[i] = 0; end
    for (int i = 0; i < (1 << PC_W); i++) prog[i] = {NB{NOP_SLOT}};

    assemble();
    for (int a = 0; a < prog_len; a++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_addr = PC_W'(a); imem_wdata = prog[a];
    end
    @(negedge clk);
    imem_we = 1'b0;

    // operands: h in [0, q), r and m ternary
    for (int i = 0; i < N; i++) begin
      h[i] = $urandom_range(0, Q - 1);
      r[i] = $urandom_range(0, 2) - 1;
      m[i] = $urandom_range(0, 2) - 1;
    end
    r[0] = -1; m[1] = -1;                    // make sure negatives occur
    for (int i = 0; i < N; i++) host_write(H_BASE + 4 * i, h[i], 4'b1111);
    for (int i = 0; i < N; i += 4) begin
      w = '0;
      for (int b = 0; b < 4 && i + b < N; b++) w[8*b +: 8] = 8'(r[i + b]);
      host_write(R_BASE + i, w, 4'b1111);
      w = '0;
      for (int b = 0; b < 4 && i + b < N; b++) w[8*b +: 8] = 8'(m[i + b]);
      host_write(M_BASE + i, w, 4'b1111);
    end
    for (int a = E_BASE; a < OUT + 32; a += 4) host_write(a, 32'd0, 4'b1111);

    // reference: e = r * h + m mod q, coefficients in [0, q)
    for (int k = 0; k < N; k++) begin
      acc = 0;
      for (int i = 0; i < N; i++) acc += longint'(h[i]) * longint'(r[(k - i + N) % N]);
      acc += m[k];
      e[k] = int'(((acc % Q) + Q) % Q);
    end
    cs = '0;
    for (int k = 0; k < N; k++) cs = (cs << 1) ^ 32'(e[k]);

    // run
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

    // static schedule: every instruction takes one cycle
    exp_cycles = len_init + N * (len_outer_pre + N * len_inner + len_outer_post + len_sub)
               + len_csum_pre + N * len_csum + len_tail;
    check(cycles == exp_cycles, $sformatf("cycle count %0d, schedule %0d", cycles, exp_cycles));

    for (int k = 0; k < N; k += 2) begin
      host_read(E_BASE + 2 * k, w);
      check(w[15:0] == 16'(e[k]), $sformatf("e[%0d] = %0d, expected %0d", k, w[15:0], e[k]));
      if (k + 1 < N)
        check(w[31:16] == 16'(e[k + 1]),
              $sformatf("e[%0d] = %0d, expected %0d", k + 1, w[31:16], e[k + 1]));
    end
    host_read(OUT, w);
    check(w == cs, $sformatf("checksum %h, expected %h", w, cs));
    host_read(OUT + 4, w);
    check(w == 32'h0000_005A, $sformatf("byte store %h", w));
    v = 32'h5A | 32'(e[0]);
    host_read(OUT + 8, w);
    check(w == v, $sformatf("ldqu|ldh %h, expected %h", w, v));
    host_read(OUT + 12, w);
    check(w == (v & 32'h0F), $sformatf("and/sth %h, expected %h", w, v & 32'h0F));
    host_read(OUT + 16, w);
    check(w == 32'hFFFF_FFF8, $sformatf("shr %h", w));
    host_read(OUT + 20, w);
    check(w == 32'h0000_000F, $sformatf("shru %h", w));

    $display("program: main %0d words, subroutine %0d words", L_HALT + 2, len_sub);
    $display("cycles %0d; jumps %0d calls %0d returns %0d; guarded moves run %0d squashed %0d",
             cycles, n_jump, n_call, n_ret, n_guarded, n_squash);
    $display("operand+trigger in one instruction %0d; unit-to-unit moves %0d; 4-bus instructions %0d; both LSUs %0d",
             n_bypass, n_direct, n_full_bus, n_dual_lsu);
    $display("mul %0d div %0d; loads w/h/hu/q/qu %0d/%0d/%0d/%0d/%0d; stores w/h/q %0d/%0d/%0d",
             n_mul, n_div, n_ld[0], n_ld[1], n_ld[2], n_ld[3], n_ld[4], n_st[5], n_st[6], n_st[7]);
    check(n_jump > 0 && n_call == N && n_ret == N, "control flow");
    check(n_guarded > 0 && n_squash > 0, "guards");
    check(n_bypass > 0 && n_direct > 0, "bypassing");
    check(n_full_bus > 0 && n_dual_lsu > 0, "parallel moves");
    check(n_mul == N * N && n_div == N, "mul and div use");
    for (int i = 0; i < 5; i++) check(n_ld[i] > 0, $sformatf("load kind %0d", i));
    for (int i = 5; i < 8; i++) check(n_st[i] > 0, $sformatf("store kind %0d", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
