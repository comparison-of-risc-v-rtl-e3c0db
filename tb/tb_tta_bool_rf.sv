// tb_tta_bool_rf: self-checking testbench of the 2 x 1-bit boolean register
// file. Checks reset, that only bit 0 of the moved value is stored, that each
// write changes only its own register, and that writes of other cycles leave
// the bits alone.
module tb_tta_bool_rf;
  import tta_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  unit_in_t   in;
  logic [1:0] bits, model;
  int         checks = 0, failures = 0;

  tta_bool_rf dut (.clk, .rst_n, .in_i(in), .bits_o(bits));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned i;
    logic [31:0] d;
    in    = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    model = '0;
    checks++;
    if (bits !== 2'b00) failures++;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      i = $urandom_range(0, 1);
      d = $urandom;
      in = '0;
      in.t_we   = ($urandom_range(0, 2) != 0);
      in.widx   = IDX_W'(i);
      in.t_data = d;
      if (in.t_we) model[i] = d[0];
      @(negedge clk);
      in = '0;
      checks++;
      if (bits !== model) begin
        failures++;
        $display("got %b expected %b", bits, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
