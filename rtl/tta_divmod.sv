// tta_divmod: the division and modulo function unit (DIV-MOD) of the TTA
// processor.
//
// Operations: DIV and MOD on signed numbers (C semantics: the quotient is
// rounded toward zero and the remainder has the sign of the dividend), DIVU
// and MODU on unsigned numbers. The trigger value is the dividend and the
// operand value the divisor. Division by zero gives a quotient of all ones
// and returns the dividend as remainder.
//
// The unit is a radix-2 restoring divider that retires one quotient bit per
// cycle: the trigger loads the magnitudes, 32 iteration cycles follow, and the
// sign-corrected result lands in the result register, LATENCY = 33 cycles
// after the trigger. The unit is not pipelined: a trigger while it is busy
// abandons the running division and starts the new one. `busy_o` is high
// while a division runs. The processor has no interlocks, so the program must
// wait LATENCY cycles before it reads the result. The algorithm and latency
// are this design's choice; only the unit's operations are specified.
module tta_divmod
  import tta_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  unit_in_t      in_i,
  output logic [DW-1:0] result_o,
  output logic          busy_o
);
  logic [DW-1:0] operand_q, operand;
  logic [DW-1:0] quot_q, rem_q, divisor_q;
  logic [5:0]    count_q;
  logic          want_mod_q, neg_q, zero_q;
  logic [DW-1:0] dividend_q;   // original dividend, for division by zero

  logic          is_signed, want_mod, a_neg, b_neg;
  logic [DW-1:0] a_mag, b_mag;
  logic [DW:0]   trial;
  logic [DW-1:0] rem_shift;

  assign operand   = in_i.o_we ? in_i.o_data : operand_q;
  assign is_signed = (in_i.op == DIV_DIV) || (in_i.op == DIV_MOD);
  assign want_mod  = (in_i.op == DIV_MOD) || (in_i.op == DIV_MODU);
  assign a_neg     = is_signed && in_i.t_data[DW-1];
  assign b_neg     = is_signed && operand[DW-1];
  assign a_mag     = a_neg ? -in_i.t_data : in_i.t_data;
  assign b_mag     = b_neg ? -operand : operand;

  // One restoring step: shift the next dividend bit into the remainder and
  // subtract the divisor if it fits.
  assign rem_shift = {rem_q[DW-2:0], quot_q[DW-1]};
  assign trial     = {rem_q, quot_q[DW-1]} - {1'b0, divisor_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      operand_q  <= '0;
      result_o   <= '0;
      quot_q     <= '0;
      rem_q      <= '0;
      divisor_q  <= '0;
      dividend_q <= '0;
      count_q    <= '0;
      want_mod_q <= 1'b0;
      neg_q      <= 1'b0;
      zero_q     <= 1'b0;
      busy_o     <= 1'b0;
    end else begin
      if (in_i.o_we) operand_q <= in_i.o_data;
      if (in_i.t_we) begin
        quot_q     <= a_mag;          // dividend bits shift out of the top
        rem_q      <= '0;
        divisor_q  <= b_mag;
        dividend_q <= in_i.t_data;
        want_mod_q <= want_mod;
        // Sign of the result: the quotient is negative when the signs
        // differ, the remainder takes the dividend's sign.
        neg_q      <= want_mod ? a_neg : (a_neg ^ b_neg);
        zero_q     <= (operand == '0);
        count_q    <= 6'(DW);
        busy_o     <= 1'b1;
      end else if (busy_o) begin
        if (!trial[DW]) begin
          rem_q  <= trial[DW-1:0];
          quot_q <= {quot_q[DW-2:0], 1'b1};
        end else begin
          rem_q  <= rem_shift;
          quot_q <= {quot_q[DW-2:0], 1'b0};
        end
        count_q <= count_q - 6'd1;
        if (count_q == 6'd1) begin
          busy_o <= 1'b0;
          if (zero_q) begin
            result_o <= want_mod_q ? dividend_q : '1;
          end else if (want_mod_q) begin
            result_o <= neg_q ? -(trial[DW] ? rem_shift : trial[DW-1:0])
                              :  (trial[DW] ? rem_shift : trial[DW-1:0]);
          end else begin
            result_o <= neg_q ? -{quot_q[DW-2:0], ~trial[DW]}
                              :  {quot_q[DW-2:0], ~trial[DW]};
          end
        end
      end
    end
  end
endmodule
