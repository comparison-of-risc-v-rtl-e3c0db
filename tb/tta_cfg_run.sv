// tta_cfg_run: test harness that builds the processor in one configuration
// of its family, given by the unit-count parameters, and runs the same NTRU
// encryption program on it. Used by tb_tta_configs, which instantiates it
// once per configuration.
//
// The program is written for the smallest configuration, TTA-P1: one move per
// instruction (bus 0; the slots of any further buses hold empty moves) and
// only LSU 0, ART 0, LOG, SHF 0 and RF 0, which every configuration has.
// Without a multiplier, e = r * h + m (mod q) relies on r being ternary: for
// every index pair the program compares r_j with +1 and -1 (EQ into the two
// boolean registers) and then adds or subtracts h_i with guarded moves, of
// which one is squashed. The reduction mod q = 2048 is an AND with q - 1 on
// the LOG unit. The harness loads program and data, runs to the final
// self-jump, compares the stored coefficients with a model, checks the cycle
// count of the static schedule (identical in every configuration), and counts
// jumps, executed and squashed guarded moves, loads and stores. It raises
// done_o when finished, with its check and failure counts on checks_o and
// failures_o.
module tta_cfg_run
  import tta_pkg::*;
#(
  parameter int unsigned N_BUS = 1,
  parameter int unsigned N_LSU = 1,
  parameter int unsigned N_ART = 1,
  parameter int unsigned N_LOG = 1,
  parameter int unsigned N_SHF = 1,
  parameter int unsigned N_ADD = 0,
  parameter int unsigned N_MUL = 0,
  parameter int unsigned N_DIV = 0,
  parameter int unsigned N_RF  = 1
) (
  input  logic clk,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);

  localparam int unsigned NB   = N_BUS;
  localparam int unsigned IW   = NB * SLOT_W;
  localparam int unsigned PC_W = 10;
  localparam int unsigned DAW  = 12;

  localparam int N = 11;
  localparam int Q = 2048;

  localparam int H_BASE = 'h100;
  localparam int R_BASE = 'h200;
  localparam int M_BASE = 'h280;
  localparam int E_BASE = 'h300;

  localparam logic [4:0] LSU0 = U_LSU0, ART0 = U_ART0, SHF0 = U_SHF0, RF0 = U_RF0;

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

  tta_top #(.N_BUS(N_BUS), .N_LSU(N_LSU), .N_ART(N_ART), .N_LOG(N_LOG), .N_SHF(N_SHF),
            .N_ADD(N_ADD), .N_MUL(N_MUL), .N_DIV(N_DIV), .N_RF(N_RF)) dut (
    .clk, .rst_n,
    .imem_we_i(imem_we), .imem_addr_i(imem_addr), .imem_wdata_i(imem_wdata),
    .host_req_i(host_req), .host_we_i(host_we), .host_addr_i(host_addr),
    .host_be_i(host_be), .host_wdata_i(host_wdata), .host_rdata_o(host_rdata),
    .fetch_addr_o(fetch_addr));

  // ------------------------------------------------------------ assembler
  slot_t prog [1 << PC_W];
  int    pc_emit = 0;

  function automatic logic [SRC_W-1:0] IMM(int v); return src_imm(v); endfunction
  function automatic logic [SRC_W-1:0] R(int i);   return src_unit(RF0, i); endfunction
  function automatic logic [SRC_W-1:0] RES(logic [4:0] u); return src_unit(u); endfunction
  function automatic logic [DST_W-1:0] W(int i);   return dst_reg(RF0, i); endfunction
  function automatic logic [DST_W-1:0] WBL(int i); return dst_reg(U_BL, i); endfunction
  function automatic logic [DST_W-1:0] OPD(logic [4:0] u); return dst_operand(u); endfunction
  function automatic logic [DST_W-1:0] TRG(logic [4:0] u, logic [3:0] op);
    return dst_trigger(u, op);
  endfunction

  // one move per instruction
  task automatic I(logic [SRC_W-1:0] s, logic [DST_W-1:0] d, logic [2:0] g = G_ALWAYS);
    prog[pc_emit] = mv(g, s, d);
    pc_emit++;
  endtask
  task automatic NOP();
    prog[pc_emit] = NOP_SLOT;
    pc_emit++;
  endtask

  int L_OUTER, L_INNER, L_HALT, len_init, len_pre, len_inner, len_post;

  // registers: r0 k, r1 i, r2 acc, r3 N, r4 j, r5 h_i, r6 r_j
  task automatic assemble();
    I(IMM(N), W(3));
    I(IMM(0), W(0));
    len_init = pc_emit;
    L_OUTER = pc_emit;
    I(IMM(0), W(2));
    I(IMM(0), W(1));
    len_pre = pc_emit - L_OUTER;
    L_INNER = pc_emit;
    // j = (k - i) mod N
    I(R(1), OPD(ART0));
    I(R(0), TRG(ART0, ART_SUB));
    I(RES(ART0), W(4));
    I(RES(ART0), OPD(ART0));
    I(IMM(0), TRG(ART0, ART_GT));
    I(RES(ART0), WBL(0));
    I(R(3), OPD(ART0));
    I(R(4), TRG(ART0, ART_ADD));
    I(RES(ART0), W(4), G_BL0);
    // r_j (signed byte) and h_i (word)
    I(IMM(R_BASE), OPD(ART0));
    I(R(4), TRG(ART0, ART_ADD));
    I(RES(ART0), TRG(LSU0, LSU_LDQ));
    I(IMM(2), OPD(SHF0));
    I(RES(LSU0), W(6));
    I(R(1), TRG(SHF0, SHF_SHL));
    I(IMM(H_BASE), OPD(ART0));
    I(RES(SHF0), TRG(ART0, ART_ADD));
    I(RES(ART0), TRG(LSU0, LSU_LDW));
    I(IMM(1), OPD(ART0));
    I(RES(LSU0), W(5));
    // BL0 = (r_j == 1), BL1 = (r_j == -1)
    I(R(6), TRG(ART0, ART_EQ));
    I(RES(ART0), WBL(0));
    I(IMM(-1), OPD(ART0));
    I(R(6), TRG(ART0, ART_EQ));
    I(RES(ART0), WBL(1));
    // acc += h_i or acc -= h_i
    I(R(5), OPD(ART0));
    I(R(2), TRG(ART0, ART_ADD), G_BL0);
    I(R(2), TRG(ART0, ART_SUB), G_BL1);
    I(RES(ART0), W(2), G_BL0);
    I(RES(ART0), W(2), G_BL1);
    // i++ and loop
    I(IMM(1), OPD(ART0));
    I(R(1), TRG(ART0, ART_ADD));
    I(RES(ART0), W(1));
    I(R(3), OPD(ART0));
    I(R(1), TRG(ART0, ART_EQ));
    I(RES(ART0), WBL(0));
    I(IMM(L_INNER), TRG(U_GCU, GCU_JUMP), G_NBL0);
    NOP();                                           // delay slot
    len_inner = pc_emit - L_INNER;
    // + m_k, mod q, store halfword
    I(IMM(M_BASE), OPD(ART0));
    I(R(0), TRG(ART0, ART_ADD));
    I(RES(ART0), TRG(LSU0, LSU_LDQ));
    I(R(2), OPD(ART0));
    I(RES(LSU0), TRG(ART0, ART_ADD));
    I(IMM(Q - 1), OPD(U_LOG));
    I(RES(ART0), TRG(U_LOG, LOG_AND));
    I(IMM(1), OPD(SHF0));
    I(R(0), TRG(SHF0, SHF_SHL));
    I(RES(U_LOG), OPD(LSU0));
    I(IMM(E_BASE), OPD(ART0));
    I(RES(SHF0), TRG(ART0, ART_ADD));
    I(RES(ART0), TRG(LSU0, LSU_STH));
    // k++ and loop
    I(IMM(1), OPD(ART0));
    I(R(0), TRG(ART0, ART_ADD));
    I(RES(ART0), W(0));
    I(R(3), OPD(ART0));
    I(R(0), TRG(ART0, ART_EQ));
    I(RES(ART0), WBL(0));
    I(IMM(L_OUTER), TRG(U_GCU, GCU_JUMP), G_NBL0);
    NOP();
    len_post = pc_emit - L_INNER - len_inner;
    L_HALT = pc_emit;
    I(IMM(L_HALT), TRG(U_GCU, GCU_JUMP));
    NOP();
  endtask

  task automatic host_write(int baddr, logic [31:0] data);
    @(negedge clk);
    host_req = 1'b1; host_we = 1'b1; host_addr = DAW'(baddr >> 2);
    host_be = 4'b1111; host_wdata = data;
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

  int n_jump = 0, n_guarded = 0, n_squash = 0, n_ld = 0, n_st = 0;
  bit counting = 0;

  always @(posedge clk) begin
    if (counting && rst_n) begin
      if (dut.move_exec[0] && dut.slots[0].guard != G_ALWAYS) n_guarded++;
      if (dut.move_squash[0]) n_squash++;
      if (dut.unit_in[U_GCU].t_we) n_jump++;
      if (dut.unit_in[U_LSU0].t_we) begin
        if (dut.unit_in[U_LSU0].op >= LSU_STW) n_st++; else n_ld++;
      end
    end
  end

  initial begin
    int          h [N], r [N], m [N], e [N];
    int          acc, cycles, exp_cycles;
    logic [31:0] w;

    done_o = 1'b0;
    checks_o = 0;
    failures_o = 0;
    rst_n = 1'b0;
    imem_we = 1'b0; imem_addr = '0; imem_wdata = '0;
    host_req = 1'b0; host_we = 1'b0; host_addr = '0; host_be = '0; host_wdata = '0;
    for (int i = 0; i < (1 << PC_W); i++) prog[i] = NOP_SLOT;
    assemble();
    for (int a = 0; a < pc_emit; a++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_addr = PC_W'(a);
      for (int b = 0; b < NB; b++) imem_wdata[b*SLOT_W +: SLOT_W] = (b == 0) ? prog[a] : NOP_SLOT;
    end
    @(negedge clk);
    imem_we = 1'b0;

    for (int i = 0; i < N; i++) begin
      h[i] = $urandom_range(0, Q - 1);
      r[i] = $urandom_range(0, 2) - 1;
      m[i] = $urandom_range(0, 2) - 1;
    end
    r[0] = 1; r[1] = -1; r[2] = 0;
    for (int i = 0; i < N; i++) host_write(H_BASE + 4 * i, h[i]);
    for (int i = 0; i < N; i += 4) begin
      w = '0;
      for (int b = 0; b < 4 && i + b < N; b++) w[8*b +: 8] = 8'(r[i + b]);
      host_write(R_BASE + i, w);
      w = '0;
      for (int b = 0; b < 4 && i + b < N; b++) w[8*b +: 8] = 8'(m[i + b]);
      host_write(M_BASE + i, w);
    end
    for (int a = E_BASE; a < E_BASE + 2 * N + 4; a += 4) host_write(a, 32'd0);

    for (int k = 0; k < N; k++) begin
      acc = m[k];
      for (int i = 0; i < N; i++) acc += h[i] * r[(k - i + N) % N];
      e[k] = ((acc % Q) + Q) % Q;
    end

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

    exp_cycles = len_init + N * (len_pre + N * len_inner + len_post);
    check(cycles == exp_cycles, $sformatf("cycle count %0d, schedule %0d", cycles, exp_cycles));
    for (int k = 0; k < N; k += 2) begin
      host_read(E_BASE + 2 * k, w);
      check(w[15:0] == 16'(e[k]), $sformatf("e[%0d] = %0d, expected %0d", k, w[15:0], e[k]));
      if (k + 1 < N)
        check(w[31:16] == 16'(e[k + 1]),
              $sformatf("e[%0d] = %0d, expected %0d", k + 1, w[31:16], e[k + 1]));
    end
    $display("%0d bus(es): program %0d words, cycles %0d; jumps %0d; guarded moves run %0d squashed %0d; loads %0d stores %0d",
             NB, pc_emit, cycles, n_jump, n_guarded, n_squash, n_ld, n_st);
    check(n_jump > 0, "jumps");
    check(n_guarded > 0 && n_squash > 0, "guards");
    check(n_ld == N * (2 * N + 1) && n_st == N, "loads and stores");
    checks_o = checks;
    failures_o = failures;
    done_o = 1'b1;
  end
endmodule
