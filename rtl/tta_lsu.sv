// tta_lsu: the load-store unit (LSU) of the TTA processor.
//
// The LSU connects the transport buses to one port of the data memory and
// moves 8, 16 or 32 bits at a time. The trigger value is a byte address; for
// stores the operand port holds the data. Operations: LDW, LDH (sign
// extended), LDHU, LDQ (byte, sign extended), LDQU, STW, STH, STQ.
//
// Timing: a trigger issues the memory access in the same cycle. The memory
// answers a read one cycle later, the LSU aligns and extends the addressed
// part and writes it to the result register, so a load result is readable
// two cycles after the trigger (latency 2). A store takes effect at the end
// of the trigger cycle. Memory words are little-endian; halfword and word
// accesses are expected to be naturally aligned (the low address bits below
// the access size are ignored). Byte order, alignment rule, opcodes and
// latency are this design's choices.
//
// Memory port: `mem_req_o` for one cycle per access, `mem_we_o` with
// `mem_be_o` byte enables for stores, `mem_addr_o` a word address,
// `mem_rdata_i` valid the cycle after a read request.
module tta_lsu
  import tta_pkg::*;
#(
  parameter int unsigned AW = 12   // word-address width of the data memory
) (
  input  logic          clk,
  input  logic          rst_n,
  input  unit_in_t      in_i,
  output logic [DW-1:0] result_o,
  output logic          mem_req_o,
  output logic          mem_we_o,
  output logic [AW-1:0] mem_addr_o,
  output logic [3:0]    mem_be_o,
  output logic [DW-1:0] mem_wdata_o,
  input  logic [DW-1:0] mem_rdata_i
);
  logic [DW-1:0] operand_q, operand;
  logic          load_q;
  lsu_op_e       op_q;
  logic [1:0]    off_q;
  logic [1:0]    off;
  logic          is_store;
  logic [15:0]   half;
  logic [7:0]    byte_v;

  assign operand  = in_i.o_we ? in_i.o_data : operand_q;
  assign off      = in_i.t_data[1:0];
  assign is_store = in_i.op inside {LSU_STW, LSU_STH, LSU_STQ};

  // Request side.
  always_comb begin
    mem_req_o   = in_i.t_we;
    mem_we_o    = in_i.t_we && is_store;
    mem_addr_o  = in_i.t_data[AW+1:2];
    mem_be_o    = 4'b0000;
    mem_wdata_o = operand;
    unique case (in_i.op)
      LSU_STW: mem_be_o = 4'b1111;
      LSU_STH: begin
        mem_be_o    = off[1] ? 4'b1100 : 4'b0011;
        mem_wdata_o = {2{operand[15:0]}};
      end
      LSU_STQ: begin
        mem_be_o    = 4'b0001 << off;
        mem_wdata_o = {4{operand[7:0]}};
      end
      default: mem_be_o = 4'b0000;
    endcase
  end

  // Response side.
  assign half   = off_q[1] ? mem_rdata_i[31:16] : mem_rdata_i[15:0];
  assign byte_v = mem_rdata_i[8*off_q +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      operand_q <= '0;
      result_o  <= '0;
      load_q    <= 1'b0;
      op_q      <= LSU_LDW;
      off_q     <= '0;
    end else begin
      if (in_i.o_we) operand_q <= in_i.o_data;
      load_q <= in_i.t_we && !is_store;
      op_q   <= lsu_op_e'(in_i.op);
      off_q  <= off;
      if (load_q) begin
        unique case (op_q)
          LSU_LDH:  result_o <= {{16{half[15]}}, half};
          LSU_LDHU: result_o <= {16'd0, half};
          LSU_LDQ:  result_o <= {{24{byte_v[7]}}, byte_v};
          LSU_LDQU: result_o <= {24'd0, byte_v};
          default:  result_o <= mem_rdata_i;
        endcase
      end
    end
  end
endmodule
