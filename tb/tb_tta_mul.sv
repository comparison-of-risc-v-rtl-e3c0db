// tb_tta_mul: self-checking testbench of the MUL function unit.
//
// Issues a multiplication in back-to-back cycles (pipelined use) and in
// isolated cycles, with operands written before or together with the
// trigger, and checks that each low 32-bit product appears in the result
// register exactly LATENCY cycles after its trigger. A pseudo-random model of
// the product is computed here by shift-and-add, not with the * operator.
module tb_tta_mul;
  import tta_pkg::*;

  localparam int unsigned LAT = 3;

  logic          clk = 1'b0;
  logic          rst_n;
  unit_in_t      in;
  logic [DW-1:0] result;
  int            checks = 0, failures = 0;
  logic [31:0]   expect_q [$];
  int            due_q    [$];
  int            cycle = 0;

  tta_mul #(.LATENCY(LAT)) dut (.clk, .rst_n, .in_i(in), .result_o(result));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(logic [31:0] a, logic [31:0] b);
    logic [31:0] p = '0;
    for (int i = 0; i < 32; i++) if (b[i]) p += a << i;
    return p;
  endfunction

  // Compare each product in the cycle it is due.
  always @(negedge clk) begin
    if (due_q.size() > 0 && due_q[0] == cycle) begin
      checks++;
      if (result !== expect_q[0]) begin
        failures++;
        $display("cycle %0d: got %h expected %h", cycle, result, expect_q[0]);
      end
      void'(expect_q.pop_front());
      void'(due_q.pop_front());
    end
  end

  initial begin
    logic [31:0] o_val, t_val;
    in    = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    o_val = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      #1;
      in = '0;
      if ($urandom_range(0, 3) == 0) continue;       // idle cycle
      t_val = $urandom;
      if ($urandom_range(0, 1) == 1) begin
        o_val     = ($urandom_range(0, 1) == 1) ? $urandom : $urandom_range(0, 9);
        in.o_we   = 1'b1;
        in.o_data = o_val;
      end
      in.t_we   = 1'b1;
      in.t_data = t_val;
      expect_q.push_back(model(t_val, o_val));
      due_q.push_back(cycle + LAT);
    end
    @(negedge clk);
    #1 in = '0;
    repeat (LAT + 3) @(negedge clk);
    if (due_q.size() != 0) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
