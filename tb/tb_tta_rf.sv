// tb_tta_rf: self-checking testbench of the 40 x 32-bit register file.
//
// Checks reset to zero, then random writes and reads of all 40 registers
// against a model array, including a read of a register in the cycle it is
// being written (which must still return the old value) and the cycle after.
module tb_tta_rf;
  import tta_pkg::*;

  localparam int unsigned DEPTH = 40;

  logic             clk = 1'b0;
  logic             rst_n;
  unit_in_t         in;
  logic [IDX_W-1:0] ridx;
  logic [DW-1:0]    rdata;
  logic [31:0]      model [DEPTH];
  int               checks = 0, failures = 0;

  tta_rf dut (.clk, .rst_n, .in_i(in), .ridx_i(ridx), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned w, r;
    logic [31:0] d;
    in    = '0;
    ridx  = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < int'(DEPTH); i++) begin
      model[i] = '0;
      ridx = IDX_W'(i);
      #1;
      checks++;
      if (rdata !== '0) failures++;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      w = $urandom_range(0, DEPTH - 1);
      r = ($urandom_range(0, 3) == 0) ? w : $urandom_range(0, DEPTH - 1);
      d = $urandom;
      in = '0;
      in.t_we = ($urandom_range(0, 3) != 0);
      in.widx = IDX_W'(w);
      in.t_data = d;
      ridx = IDX_W'(r);
      #1;
      checks++;
      if (rdata !== model[r]) begin
        failures++;
        $display("read r%0d: got %h expected %h", r, rdata, model[r]);
      end
      if (in.t_we) model[w] = d;
    end
    @(negedge clk);
    in = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      ridx = IDX_W'(i);
      #1;
      checks++;
      if (rdata !== model[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
