// tb_tta_divmod: self-checking testbench of the DIV-MOD function unit.
//
// Runs DIV, DIVU, MOD and MODU on random, small, negative, zero-divisor and
// overflow operands. For each, it checks that the unit is busy for the whole
// division, that the result register changes exactly 33 cycles after the
// trigger, and that the value matches C semantics computed here with the
// simulator's own integer arithmetic.
module tb_tta_divmod;
  import tta_pkg::*;

  localparam int LAT = 33;

  logic          clk = 1'b0;
  logic          rst_n;
  unit_in_t      in;
  logic [DW-1:0] result;
  logic          busy;
  int            checks = 0, failures = 0;

  tta_divmod dut (.clk, .rst_n, .in_i(in), .result_o(result), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(logic [3:0] op, logic [31:0] a, logic [31:0] b);
    longint sa = longint'($signed(a)), sb = longint'($signed(b));
    longint ua = longint'({32'd0, a}), ub = longint'({32'd0, b});
    if (b == 0) return (op == DIV_MOD || op == DIV_MODU) ? a : 32'hFFFF_FFFF;
    unique case (op)
      DIV_DIV:  return 32'(sa / sb);
      DIV_MOD:  return 32'(sa % sb);
      DIV_DIVU: return 32'(ua / ub);
      default:  return 32'(ua % ub);
    endcase
  endfunction

  task automatic run(logic [3:0] op, logic [31:0] a, logic [31:0] b);
    logic [31:0] e, prev_res;
    int          t;
    e = model(op, a, b);
    @(negedge clk);
    in        = '0;
    in.o_we   = 1'b1;
    in.o_data = b;
    in.t_we   = 1'b1;
    in.t_data = a;
    in.op     = op;
    @(negedge clk);
    in = '0;
    prev_res = result;
    // busy during the iterations, result unchanged until the last one
    for (t = 1; t < LAT; t++) begin
      if (!busy || result !== prev_res) begin
        failures++;
        $display("op %0d: early result or idle at cycle %0d", op, t);
        break;
      end
      @(negedge clk);
    end
    checks++;
    if (busy || result !== e) begin
      failures++;
      $display("op %0d a=%h b=%h: got %h expected %h (busy %b)", op, a, b, result, e, busy);
    end
  endtask

  initial begin
    logic [31:0] a, b;
    in    = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < 4; op++) begin
      run(4'(op), 32'd100, 32'd7);
      run(4'(op), -32'sd100, 32'd7);
      run(4'(op), 32'd100, -32'sd7);
      run(4'(op), -32'sd100, -32'sd7);
      run(4'(op), 32'd5, 32'd0);
      run(4'(op), 32'h8000_0000, 32'hFFFF_FFFF);
      run(4'(op), 32'hFFFF_FFFF, 32'd1);
    end
    for (int n = 0; n < 200; n++) begin
      a = $urandom;
      b = ($urandom_range(0, 1) == 1) ? $urandom : $urandom_range(1, 300);
      run(4'($urandom_range(0, 3)), a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
