// tta_log: the logic function unit (LOG) of the TTA processor.
//
// Operations: AND, IOR (inclusive or) and XOR of the trigger value with the
// operand value. The unit follows the same port convention as every function
// unit of this processor: a stored operand port, a trigger port whose write
// starts the operation named by `in_i.op`, and a result register that holds
// the answer one cycle later. An operand written in the same instruction as
// the trigger is used at once. Opcode numbers and latency are this design's
// choice.
module tta_log
  import tta_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  unit_in_t      in_i,
  output logic [DW-1:0] result_o
);
  logic [DW-1:0] operand_q, operand;

  assign operand = in_i.o_we ? in_i.o_data : operand_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      operand_q <= '0;
      result_o  <= '0;
    end else begin
      if (in_i.o_we) operand_q <= in_i.o_data;
      if (in_i.t_we) begin
        unique case (in_i.op)
          LOG_AND: result_o <= in_i.t_data & operand;
          LOG_IOR: result_o <= in_i.t_data | operand;
          LOG_XOR: result_o <= in_i.t_data ^ operand;
          default: result_o <= '0;
        endcase
      end
    end
  end
endmodule
