// tta_mul: the multiplier function unit (MUL) of the TTA processor.
//
// Every trigger multiplies the trigger value by the operand value and keeps
// the low 32 bits, which is the same for signed and unsigned numbers. The
// product goes through a pipeline of LATENCY registers: the result register
// shows it LATENCY cycles after the trigger and a new multiplication may start
// every cycle (LATENCY is at least 2). The result register keeps the latest finished product until the
// next one arrives. The latency (default 3, as a pipelined FPGA multiplier
// would have) is this design's choice; the schedule of the program must
// respect it, since the processor has no interlocks.
module tta_mul
  import tta_pkg::*;
#(
  parameter int unsigned LATENCY = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  unit_in_t      in_i,
  output logic [DW-1:0] result_o
);
  logic [DW-1:0] operand_q, operand;
  // Stages 0..LATENCY-2; the result register is the last stage.
  logic [DW-1:0] pipe_q  [LATENCY-1];
  logic          valid_q [LATENCY-1];

  assign operand = in_i.o_we ? in_i.o_data : operand_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      operand_q <= '0;
      result_o  <= '0;
      for (int i = 0; i < int'(LATENCY) - 1; i++) begin
        pipe_q[i]  <= '0;
        valid_q[i] <= 1'b0;
      end
    end else begin
      if (in_i.o_we) operand_q <= in_i.o_data;
      pipe_q[0]  <= in_i.t_data * operand;
      valid_q[0] <= in_i.t_we;
      for (int i = 1; i < int'(LATENCY) - 1; i++) begin
        pipe_q[i]  <= pipe_q[i-1];
        valid_q[i] <= valid_q[i-1];
      end
      if (valid_q[LATENCY-2]) result_o <= pipe_q[LATENCY-2];
    end
  end

  initial assert (LATENCY >= 2) else $error("tta_mul: LATENCY must be at least 2");
endmodule
