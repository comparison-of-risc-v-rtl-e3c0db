// tb_tta_shf: self-checking testbench of the SHF function unit.
//
// Drives random operand and trigger moves for SHL, SHR and SHRU, with the operand
// written either in an earlier cycle or in the same cycle as the trigger,
// and compares the result register one cycle after each trigger with a
// reference model written here.
module tb_tta_shf;
  import tta_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n;
  unit_in_t      in;
  logic [DW-1:0] result;
  int            checks = 0, failures = 0;

  tta_shf dut (.clk, .rst_n, .in_i(in), .result_o(result));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(logic [3:0] op, logic [31:0] t, logic [31:0] o);
    logic [31:0] r;
    r = t;
    // bit-serial reference, independent of the shift operators
    for (int i = 0; i < int'(o[4:0]); i++) begin
      unique case (op)
        SHF_SHL:  r = {r[30:0], 1'b0};
        SHF_SHR:  r = {r[31], r[31:1]};
        SHF_SHRU: r = {1'b0, r[31:1]};
        default:  r = '0;
      endcase
    end
    return r;
  endfunction

  function automatic logic [31:0] rnd();
    int unsigned kind = $urandom_range(0, 3);
    unique case (kind)
      0: return $urandom_range(0, 40);
      1: return 32'hFFFF_FFFF - $urandom_range(0, 40);
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [3:0]  ops [] = {SHF_SHL, SHF_SHR, SHF_SHRU};
    logic [31:0] o_val, t_val, expect_v;
    logic [3:0]  op;
    in    = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    if (result !== '0) failures++;
    checks++;
    o_val = '0;
    for (int n = 0; n < 600; n++) begin
      op    = ops[$urandom_range(0, 3 - 1)];
      t_val = rnd();
      @(negedge clk);
      in = '0;
      if ($urandom_range(0, 1) == 1) begin
        // operand in an earlier instruction
        o_val     = rnd();
        in.o_we   = 1'b1;
        in.o_data = o_val;
        @(negedge clk);
        in = '0;
      end else if ($urandom_range(0, 1) == 1) begin
        // operand in the same instruction as the trigger
        o_val     = (n % 7 == 0) ? t_val : rnd();
        in.o_we   = 1'b1;
        in.o_data = o_val;
      end
      in.t_we   = 1'b1;
      in.t_data = t_val;
      in.op     = op;
      expect_v  = model(op, t_val, o_val);
      @(negedge clk);
      in = '0;
      checks++;
      if (result !== expect_v) begin
        failures++;
        $display("op %0d t=%h o=%h: got %h expected %h", op, t_val, o_val, result, expect_v);
      end
      // the result register holds its value until the next trigger
      @(negedge clk);
      checks++;
      if (result !== expect_v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
