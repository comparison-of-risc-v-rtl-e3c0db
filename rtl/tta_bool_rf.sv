// tta_bool_rf: the boolean register file (BL) of the TTA processor, two
// 1-bit registers by default.
//
// A move whose destination is (BL, index) stores bit 0 of the moved value,
// typically the 0/1 result of an ART comparison. The registers drive the
// guards of the interconnect, which let a move execute only if a chosen
// register is set (or clear), and can also be read back as a source. A write
// takes effect at the end of the cycle, so it guards moves from the next
// instruction on. Registers reset to zero.
module tta_bool_rf
  import tta_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  unit_in_t         in_i,
  output logic [DEPTH-1:0] bits_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_o <= '0;
    end else if (in_i.t_we) begin
      for (int i = 0; i < int'(DEPTH); i++)
        if (int'(in_i.widx) == i) bits_o[i] <= in_i.t_data[0];
    end
  end
endmodule
