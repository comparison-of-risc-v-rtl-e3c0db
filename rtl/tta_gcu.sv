// tta_gcu: the global control unit (GCU) of the TTA processor.
//
// The GCU holds the program counter and fetches one instruction per cycle
// from the instruction memory, which answers one cycle after it is given an
// address. It runs the control-flow operations: JUMP (trigger value = target
// instruction address) and CALL (the same, and the return address register RA
// receives the address to return to). A return is a move of RA into the JUMP
// trigger. RA is also written by a move to the GCU's operand port, so a
// program can save and restore it.
//
// Timing: an instruction fetched at address a executes one cycle after the
// fetch. While it executes, a+1 is already being fetched, so a jump or call
// in the instruction at a takes effect after one delay slot: a+1 still
// executes, then the target. A call therefore sets RA to a+2. The first cycle
// after reset executes nothing (`instr_valid_o` low). The delay slot and the
// reset address 0 are this design's choices.
module tta_gcu
  import tta_pkg::*;
#(
  parameter int unsigned PC_W = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  unit_in_t        in_i,
  output logic [DW-1:0]   ra_o,
  output logic [PC_W-1:0] fetch_addr_o,
  output logic            instr_valid_o
);
  logic [PC_W-1:0] pc_q;

  assign fetch_addr_o = pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q          <= '0;
      ra_o          <= '0;
      instr_valid_o <= 1'b0;
    end else begin
      instr_valid_o <= 1'b1;
      if (in_i.t_we) begin
        pc_q <= in_i.t_data[PC_W-1:0];
        if (in_i.op == GCU_CALL) ra_o <= DW'(pc_q) + DW'(1);
      end else begin
        pc_q <= pc_q + PC_W'(1);
      end
      if (in_i.o_we && !(in_i.t_we && in_i.op == GCU_CALL)) ra_o <= in_i.o_data;
    end
  end
endmodule
