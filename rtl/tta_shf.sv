// tta_shf: the shift function unit (SHF) of the TTA processor.
//
// Operations: SHL (shift left), SHR (arithmetic shift right) and SHRU
// (logical shift right). The trigger value is shifted by the low five bits of
// the operand value. The unit is specified only as shifting left or right; the
// choice of an arithmetic and a logical right shift is this design's.
// Port convention as for every function unit here: stored operand, trigger
// that starts the operation named by `in_i.op`, result register valid one
// cycle later, same-instruction operand used at once.
module tta_shf
  import tta_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  unit_in_t      in_i,
  output logic [DW-1:0] result_o
);
  logic [DW-1:0] operand_q, operand;
  logic [4:0]    amount;

  assign operand = in_i.o_we ? in_i.o_data : operand_q;
  assign amount  = operand[4:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      operand_q <= '0;
      result_o  <= '0;
    end else begin
      if (in_i.o_we) operand_q <= in_i.o_data;
      if (in_i.t_we) begin
        unique case (in_i.op)
          SHF_SHL:  result_o <= in_i.t_data << amount;
          SHF_SHR:  result_o <= DW'($signed(in_i.t_data) >>> amount);
          SHF_SHRU: result_o <= in_i.t_data >> amount;
          default:  result_o <= '0;
        endcase
      end
    end
  end
endmodule
