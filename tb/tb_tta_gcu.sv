// tb_tta_gcu: self-checking testbench of the global control unit.
//
// Checks that after reset the fetch address starts at 0 and the first cycle
// is marked invalid, that the address then advances by one per cycle, that a
// JUMP or CALL trigger loads the target as the next fetch address, that a
// CALL stores the fetch address + 1 (the instruction after the delay slot)
// in RA, and that a move to the operand port writes RA.
module tb_tta_gcu;
  import tta_pkg::*;

  localparam int unsigned PC_W = 10;

  logic            clk = 1'b0;
  logic            rst_n;
  unit_in_t        in;
  logic [DW-1:0]   ra;
  logic [PC_W-1:0] pc;
  logic            valid;
  int              checks = 0, failures = 0;

  tta_gcu #(.PC_W(PC_W)) dut (.clk, .rst_n, .in_i(in), .ra_o(ra),
                              .fetch_addr_o(pc), .instr_valid_o(valid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%s (pc %0d ra %0d valid %b)", what, pc, ra, valid);
    end
  endtask

  initial begin
    logic [PC_W-1:0] exp_pc, tgt;
    logic [31:0]     exp_ra;
    int unsigned     kind;
    in    = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(pc == 0 && !valid && ra == 0, "reset state");
    rst_n = 1'b1;
    @(negedge clk);
    check(pc == 0 && !valid, "held before the first edge");
    @(negedge clk);
    check(pc == 1 && valid, "first advance");
    exp_pc = 1;
    exp_ra = 0;
    for (int n = 0; n < 1000; n++) begin
      kind = $urandom_range(0, 5);
      tgt  = PC_W'($urandom);
      in = '0;
      unique case (kind)
        0: begin in.t_we = 1'b1; in.op = GCU_JUMP; in.t_data = 32'(tgt); end
        1: begin in.t_we = 1'b1; in.op = GCU_CALL; in.t_data = 32'(tgt);
                 exp_ra = 32'(exp_pc) + 1; end
        2: begin in.o_we = 1'b1; in.o_data = $urandom; exp_ra = in.o_data; end
        default: ;
      endcase
      exp_pc = (kind <= 1) ? tgt : exp_pc + 1;
      @(negedge clk);
      in = '0;
      check(pc == exp_pc, "fetch address");
      check(ra == exp_ra, "return address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
