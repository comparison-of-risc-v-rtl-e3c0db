// tb_tta_dmem: self-checking testbench of the dual-port data memory.
//
// Both ports issue random byte-enabled writes and reads at the same time,
// mostly to different words; reads are checked one clock after the request
// against a model array updated with the same rules (port 1 wins a same-byte
// collision). Read data must hold while a port is idle.
module tb_tta_dmem;
  localparam int unsigned DEPTH = 32, AW = 5;

  logic                 clk = 1'b0;
  logic [1:0]           req, we;
  logic [1:0][AW-1:0]   addr;
  logic [1:0][3:0]      be;
  logic [1:0][31:0]     wdata, rdata, exp_rd;
  logic [31:0]          model [DEPTH];
  int                   checks = 0, failures = 0;

  tta_dmem #(.DEPTH(DEPTH)) dut (.clk, .req_i(req), .we_i(we), .addr_i(addr),
                                 .be_i(be), .wdata_i(wdata), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; we = '0; addr = '0; be = '0; wdata = '0;
    // fill through both ports
    for (int i = 0; i < int'(DEPTH); i += 2) begin
      @(negedge clk);
      req = 2'b11; we = 2'b11; be = '1;
      addr[0] = AW'(i); addr[1] = AW'(i + 1);
      wdata[0] = $urandom; wdata[1] = $urandom;
      model[i] = wdata[0]; model[i + 1] = wdata[1];
    end
    // one read on each port so that both read registers hold known words
    @(negedge clk);
    req = 2'b11; we = 2'b00; addr[0] = '0; addr[1] = AW'(1);
    exp_rd[0] = model[0]; exp_rd[1] = model[1];
    @(negedge clk);
    req = '0;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        req[p]   = ($urandom_range(0, 3) != 0);
        we[p]    = ($urandom_range(0, 1) == 1);
        addr[p]  = AW'($urandom);
        be[p]    = 4'($urandom);
        wdata[p] = $urandom;
      end
      // reads see the old contents; writes land afterwards, port 1 last
      for (int p = 0; p < 2; p++)
        if (req[p] && !we[p]) exp_rd[p] = model[addr[p]];
      for (int p = 0; p < 2; p++)
        if (req[p] && we[p])
          for (int b = 0; b < 4; b++)
            if (be[p][b]) model[addr[p]][8*b +: 8] = wdata[p][8*b +: 8];
      @(posedge clk);
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] !== exp_rd[p]) begin
          failures++;
          $display("port %0d: got %h expected %h", p, rdata[p], exp_rd[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
