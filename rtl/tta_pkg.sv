// tta_pkg: types and constants shared by the transport triggered architecture
// (TTA) processor.
//
// A TTA instruction is a set of move slots, one per transport bus. Each slot
// moves one 32-bit value from a source (a register-file entry, a function
// unit's result register, the GCU's return address or a short immediate) to a
// destination port of a unit. Writing a unit's trigger port starts the
// operation chosen by the opcode carried in the destination field; writing its
// operand port only stores the value. Every move may be guarded by a bit of
// the boolean register file.
//
// Slot layout (44 bits, so 4 buses give the 176-bit instruction word of the
// four-bus processors):
//   [43:41] guard   0 always, 1 if BL0, 2 if !BL0, 3 if BL1, 4 if !BL1,
//                   5..7 never (empty slot)
//   [40:16] source  bit 24 set: bits 23:0 are a sign-extended immediate
//                   bit 24 clear: bits 10:6 unit id, bits 5:0 index
//   [15:0]  dest    bits 15:11 unit id, bits 10:0 sub-address:
//                   function units: bit 4 = trigger, bits 3:0 = opcode
//                   register files: bits 5:0 = register index
//                   unit id 0 = no destination
// The unit ids are fixed for the largest configuration; a processor built
// with fewer units leaves the missing ids unanswered (reads return 0).
package tta_pkg;

  localparam int unsigned DW        = 32;   // data path width
  localparam int unsigned SLOT_W    = 44;   // bits per move slot
  localparam int unsigned GUARD_W   = 3;
  localparam int unsigned SRC_W     = 25;
  localparam int unsigned DST_W     = 16;
  localparam int unsigned UNIT_W    = 5;
  localparam int unsigned IDX_W     = 6;
  localparam int unsigned OP_W      = 4;

  // Largest unit counts (the TTA-P5 configuration of the design).
  localparam int unsigned MAX_LSU = 2;
  localparam int unsigned MAX_ART = 4;
  localparam int unsigned MAX_SHF = 2;
  localparam int unsigned MAX_ADD = 2;
  localparam int unsigned MAX_RF  = 2;

  // Unit ids.
  localparam logic [UNIT_W-1:0] U_NONE = 5'd0;
  localparam logic [UNIT_W-1:0] U_LSU0 = 5'd1;   // 1..2
  localparam logic [UNIT_W-1:0] U_ART0 = 5'd3;   // 3..6
  localparam logic [UNIT_W-1:0] U_LOG  = 5'd7;
  localparam logic [UNIT_W-1:0] U_SHF0 = 5'd8;   // 8..9
  localparam logic [UNIT_W-1:0] U_ADD0 = 5'd10;  // 10..11
  localparam logic [UNIT_W-1:0] U_MUL  = 5'd12;
  localparam logic [UNIT_W-1:0] U_DIV  = 5'd13;
  localparam logic [UNIT_W-1:0] U_RF0  = 5'd14;  // 14..15
  localparam logic [UNIT_W-1:0] U_BL   = 5'd16;
  localparam logic [UNIT_W-1:0] U_GCU  = 5'd17;
  localparam int unsigned       N_UNITS = 18;    // ids 0..17

  // Guard codes.
  typedef enum logic [GUARD_W-1:0] {
    G_ALWAYS = 3'd0,
    G_BL0    = 3'd1,
    G_NBL0   = 3'd2,
    G_BL1    = 3'd3,
    G_NBL1   = 3'd4,
    G_NEVER  = 3'd7
  } guard_e;

  // Opcodes, per unit kind.
  typedef enum logic [OP_W-1:0] {
    ART_ADD = 4'd0, ART_SUB = 4'd1, ART_EQ = 4'd2, ART_GT = 4'd3
  } art_op_e;
  typedef enum logic [OP_W-1:0] {
    LOG_AND = 4'd0, LOG_IOR = 4'd1, LOG_XOR = 4'd2
  } log_op_e;
  typedef enum logic [OP_W-1:0] {
    SHF_SHL = 4'd0, SHF_SHR = 4'd1, SHF_SHRU = 4'd2
  } shf_op_e;
  typedef enum logic [OP_W-1:0] {
    DIV_DIV = 4'd0, DIV_DIVU = 4'd1, DIV_MOD = 4'd2, DIV_MODU = 4'd3
  } div_op_e;
  typedef enum logic [OP_W-1:0] {
    LSU_LDW = 4'd0, LSU_LDH = 4'd1, LSU_LDHU = 4'd2, LSU_LDQ = 4'd3,
    LSU_LDQU = 4'd4, LSU_STW = 4'd5, LSU_STH = 4'd6, LSU_STQ = 4'd7
  } lsu_op_e;
  typedef enum logic [OP_W-1:0] {
    GCU_JUMP = 4'd0, GCU_CALL = 4'd1
  } gcu_op_e;

  typedef struct packed {
    logic [GUARD_W-1:0] guard;
    logic [SRC_W-1:0]   src;
    logic [DST_W-1:0]   dst;
  } slot_t;

  // What the interconnect delivers to one unit in one cycle.
  typedef struct packed {
    logic             o_we;    // operand port written
    logic [DW-1:0]    o_data;
    logic             t_we;    // trigger port written (starts an operation)
    logic [DW-1:0]    t_data;
    logic [OP_W-1:0]  op;      // opcode of the trigger move
    logic [IDX_W-1:0] widx;    // register index written (register files)
  } unit_in_t;

  // Move-slot builders, used by programs written as SystemVerilog.
  function automatic slot_t mv(logic [GUARD_W-1:0] g, logic [SRC_W-1:0] s,
                               logic [DST_W-1:0] d);
    mv = '{guard: g, src: s, dst: d};
  endfunction

  function automatic logic [SRC_W-1:0] src_imm(int value);
    src_imm = {1'b1, value[23:0]};
  endfunction

  function automatic logic [SRC_W-1:0] src_unit(logic [UNIT_W-1:0] u,
                                                int unsigned idx = 0);
    src_unit = {1'b0, 13'd0, u, idx[IDX_W-1:0]};
  endfunction

  function automatic logic [DST_W-1:0] dst_operand(logic [UNIT_W-1:0] u);
    dst_operand = {u, 11'd0};
  endfunction

  function automatic logic [DST_W-1:0] dst_trigger(logic [UNIT_W-1:0] u,
                                                   logic [OP_W-1:0] op);
    dst_trigger = {u, 6'd0, 1'b1, op};
  endfunction

  function automatic logic [DST_W-1:0] dst_reg(logic [UNIT_W-1:0] u,
                                               int unsigned idx);
    dst_reg = {u, 5'd0, idx[IDX_W-1:0]};
  endfunction

  localparam slot_t NOP_SLOT = '{guard: G_NEVER, src: '0, dst: '0};

endpackage
