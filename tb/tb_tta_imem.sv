// tb_tta_imem: self-checking testbench of the instruction memory.
//
// Writes random 176-bit words to random addresses, then reads addresses back
// and checks that each word appears one clock after its address, including a
// read and a write of different addresses in the same cycle.
module tb_tta_imem;
  localparam int unsigned IW = 176, DEPTH = 64, AW = 6;

  logic          clk = 1'b0;
  logic [AW-1:0] raddr, waddr;
  logic [IW-1:0] rdata, wdata;
  logic          we;
  logic [IW-1:0] model [DEPTH];
  int            checks = 0, failures = 0;

  tta_imem #(.IW(IW), .DEPTH(DEPTH)) dut (.clk, .raddr_i(raddr), .rdata_o(rdata),
                                          .we_i(we), .waddr_i(waddr), .wdata_i(wdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [IW-1:0] rnd_word();
    logic [IW-1:0] w;
    for (int i = 0; i < IW; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    logic [AW-1:0] a;
    we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = rnd_word(); model[i] = wdata;
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      a = AW'($urandom);
      raddr = a;
      we = ($urandom_range(0, 1) == 1);
      waddr = a + AW'(1 + $urandom_range(0, DEPTH - 2));   // never the read address
      wdata = rnd_word();
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("addr %0d: wrong word", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
