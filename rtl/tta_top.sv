// tta_top: a transport triggered architecture (TTA) processor for running a
// lattice-based public-key cryptosystem (NTRU) in software, in its largest
// configuration, TTA-P5: four transport buses, two load-store units, four
// arithmetic units (ART), one logic unit (LOG), two shift units (SHF), two
// adders (ADD), one multiplier (MUL), one divide/modulo unit (DIV-MOD), two
// 40 x 32-bit register files, one 2 x 1-bit boolean register file (BL) and
// the global control unit (GCU), with instruction and data memory.
//
// A program is a sequence of 176-bit instructions, one 44-bit move slot per
// bus (layout in tta_pkg). Each cycle the GCU fetches one instruction and the
// interconnect executes all its moves at once: operations start as a side
// effect of moving a value into a unit's trigger port, and results are
// fetched by moving them out of the unit's result register. The processor has
// no interlocks: the program (normally produced by a compiler that knows the
// unit latencies) must wait long enough before it reads a result. Latencies:
// ART, LOG, SHF, ADD 1 cycle; LSU loads 2; MUL MUL_LATENCY (3); DIV-MOD 33;
// jumps and calls take effect after one delay slot.
//
// The unit counts are parameters, so the smaller processors of the same
// family (one bus and one unit of each basic kind for TTA-P1, and so on) are
// built by overriding them; the defaults are TTA-P5.
//
// Ports: `imem_*` load the program while the processor is held in reset
// (`rst_n` low). The `host_*` port reaches the data memory through the port
// of LSU 0, and takes precedence over LSU 0 when `host_req_i` is high; the
// host uses it to place inputs and read results while the processor is in
// reset. `fetch_addr_o` shows the address being fetched.
module tta_top
  import tta_pkg::*;
#(
  parameter int unsigned N_BUS       = 4,
  parameter int unsigned N_LSU       = 2,
  parameter int unsigned N_ART       = 4,
  parameter int unsigned N_LOG       = 1,
  parameter int unsigned N_SHF       = 2,
  parameter int unsigned N_ADD       = 2,
  parameter int unsigned N_MUL       = 1,
  parameter int unsigned N_DIV       = 1,
  parameter int unsigned N_RF        = 2,
  parameter int unsigned RF_DEPTH    = 40,
  parameter int unsigned BL_DEPTH    = 2,
  parameter int unsigned MUL_LATENCY = 3,
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned DMEM_DEPTH  = 4096,
  parameter int unsigned IW          = N_BUS * SLOT_W,
  parameter int unsigned PC_W        = $clog2(IMEM_DEPTH),
  parameter int unsigned DAW         = $clog2(DMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // program loading
  input  logic            imem_we_i,
  input  logic [PC_W-1:0] imem_addr_i,
  input  logic [IW-1:0]   imem_wdata_i,
  // host access to the data memory
  input  logic            host_req_i,
  input  logic            host_we_i,
  input  logic [DAW-1:0]  host_addr_i,
  input  logic [3:0]      host_be_i,
  input  logic [DW-1:0]   host_wdata_i,
  output logic [DW-1:0]   host_rdata_o,
  // status
  output logic [PC_W-1:0] fetch_addr_o
);
  logic [IW-1:0]               instr;
  slot_t [N_BUS-1:0]           slots;
  logic                        instr_valid;
  unit_in_t [N_UNITS-1:0]      unit_in;
  logic [N_UNITS-1:0][DW-1:0]  src_val;
  logic [MAX_RF-1:0][IDX_W-1:0] rf_ridx;
  logic [BL_DEPTH-1:0]         bl_bits;
  logic [N_BUS-1:0]            move_exec, move_squash;
  logic                        div_busy;

  // data memory ports
  logic [1:0]                  dm_req, dm_we;
  logic [1:0][DAW-1:0]         dm_addr;
  logic [1:0][3:0]             dm_be;
  logic [1:0][DW-1:0]          dm_wdata, dm_rdata;
  logic [1:0]                  lsu_req, lsu_we;
  logic [1:0][DAW-1:0]         lsu_addr;
  logic [1:0][3:0]             lsu_be;
  logic [1:0][DW-1:0]          lsu_wdata;

  assign slots = instr;

  // ---------------------------------------------------------------- control
  tta_gcu #(.PC_W(PC_W)) u_gcu (
    .clk, .rst_n,
    .in_i          (unit_in[U_GCU]),
    .ra_o          (src_val[U_GCU]),
    .fetch_addr_o  (fetch_addr_o),
    .instr_valid_o (instr_valid)
  );

  tta_imem #(.IW(IW), .DEPTH(IMEM_DEPTH)) u_imem (
    .clk,
    .raddr_i (fetch_addr_o),
    .rdata_o (instr),
    .we_i    (imem_we_i),
    .waddr_i (imem_addr_i),
    .wdata_i (imem_wdata_i)
  );

  tta_interconnect #(.N_BUS(N_BUS), .BL_BITS(BL_DEPTH)) u_ic (
    .slots_i       (slots),
    .valid_i       (instr_valid),
    .bl_i          (bl_bits),
    .src_val_i     (src_val),
    .rf_ridx_o     (rf_ridx),
    .unit_o        (unit_in),
    .move_exec_o   (move_exec),
    .move_squash_o (move_squash)
  );

  // ---------------------------------------------------------- function units
  assign src_val[U_NONE] = '0;

  for (genvar i = 0; i < int'(MAX_LSU); i++) begin : g_lsu
    if (i < int'(N_LSU)) begin : g_on
      tta_lsu #(.AW(DAW)) u_lsu (
        .clk, .rst_n,
        .in_i        (unit_in[U_LSU0 + i]),
        .result_o    (src_val[U_LSU0 + i]),
        .mem_req_o   (lsu_req[i]),
        .mem_we_o    (lsu_we[i]),
        .mem_addr_o  (lsu_addr[i]),
        .mem_be_o    (lsu_be[i]),
        .mem_wdata_o (lsu_wdata[i]),
        .mem_rdata_i (dm_rdata[i])
      );
    end else begin : g_off
      assign src_val[U_LSU0 + i] = '0;
      assign lsu_req[i]   = 1'b0;
      assign lsu_we[i]    = 1'b0;
      assign lsu_addr[i]  = '0;
      assign lsu_be[i]    = '0;
      assign lsu_wdata[i] = '0;
    end
  end

  for (genvar i = 0; i < int'(MAX_ART); i++) begin : g_art
    if (i < int'(N_ART)) begin : g_on
      tta_art u_art (.clk, .rst_n, .in_i(unit_in[U_ART0 + i]),
                     .result_o(src_val[U_ART0 + i]));
    end else begin : g_off
      assign src_val[U_ART0 + i] = '0;
    end
  end

  if (N_LOG > 0) begin : g_log
    tta_log u_log (.clk, .rst_n, .in_i(unit_in[U_LOG]), .result_o(src_val[U_LOG]));
  end else begin : g_no_log
    assign src_val[U_LOG] = '0;
  end

  for (genvar i = 0; i < int'(MAX_SHF); i++) begin : g_shf
    if (i < int'(N_SHF)) begin : g_on
      tta_shf u_shf (.clk, .rst_n, .in_i(unit_in[U_SHF0 + i]),
                     .result_o(src_val[U_SHF0 + i]));
    end else begin : g_off
      assign src_val[U_SHF0 + i] = '0;
    end
  end

  for (genvar i = 0; i < int'(MAX_ADD); i++) begin : g_add
    if (i < int'(N_ADD)) begin : g_on
      tta_add u_add (.clk, .rst_n, .in_i(unit_in[U_ADD0 + i]),
                     .result_o(src_val[U_ADD0 + i]));
    end else begin : g_off
      assign src_val[U_ADD0 + i] = '0;
    end
  end

  if (N_MUL > 0) begin : g_mul
    tta_mul #(.LATENCY(MUL_LATENCY)) u_mul (
      .clk, .rst_n, .in_i(unit_in[U_MUL]), .result_o(src_val[U_MUL]));
  end else begin : g_no_mul
    assign src_val[U_MUL] = '0;
  end

  if (N_DIV > 0) begin : g_div
    tta_divmod u_div (.clk, .rst_n, .in_i(unit_in[U_DIV]),
                      .result_o(src_val[U_DIV]), .busy_o(div_busy));
  end else begin : g_no_div
    assign src_val[U_DIV] = '0;
    assign div_busy       = 1'b0;
  end

  // --------------------------------------------------------- register files
  for (genvar i = 0; i < int'(MAX_RF); i++) begin : g_rf
    if (i < int'(N_RF)) begin : g_on
      tta_rf #(.DEPTH(RF_DEPTH)) u_rf (
        .clk, .rst_n, .in_i(unit_in[U_RF0 + i]),
        .ridx_i(rf_ridx[i]), .rdata_o(src_val[U_RF0 + i]));
    end else begin : g_off
      assign src_val[U_RF0 + i] = '0;
    end
  end

  tta_bool_rf #(.DEPTH(BL_DEPTH)) u_bl (
    .clk, .rst_n, .in_i(unit_in[U_BL]), .bits_o(bl_bits));
  assign src_val[U_BL] = DW'(bl_bits);

  // ------------------------------------------------------------ data memory
  always_comb begin
    dm_req   = lsu_req;
    dm_we    = lsu_we;
    dm_addr  = lsu_addr;
    dm_be    = lsu_be;
    dm_wdata = lsu_wdata;
    if (host_req_i) begin
      dm_req[0]   = 1'b1;
      dm_we[0]    = host_we_i;
      dm_addr[0]  = host_addr_i;
      dm_be[0]    = host_be_i;
      dm_wdata[0] = host_wdata_i;
    end
  end
  assign host_rdata_o = dm_rdata[0];

  tta_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .req_i   (dm_req),
    .we_i    (dm_we),
    .addr_i  (dm_addr),
    .be_i    (dm_be),
    .wdata_i (dm_wdata),
    .rdata_o (dm_rdata)
  );

  initial begin
    assert (N_BUS >= 1 && N_LSU >= 1 && N_LSU <= MAX_LSU && N_ART <= MAX_ART
            && N_LOG <= 1 && N_SHF <= MAX_SHF && N_ADD <= MAX_ADD && N_MUL <= 1
            && N_DIV <= 1 && N_RF >= 1 && N_RF <= MAX_RF)
      else $error("tta_top: unit counts outside the supported range");
  end
endmodule
