// tb_tta_lsu: self-checking testbench of the load-store unit.
//
// The LSU is connected to a small word memory modelled here (synchronous
// read, byte-enable write). Random stores of words, halfwords and bytes are
// mirrored in a byte array; random loads of every width and signedness are
// checked two cycles after their trigger against that array. Some stores get
// their data in the same instruction as the trigger.
module tb_tta_lsu;
  import tta_pkg::*;

  localparam int unsigned AW = 6;   // 64 words

  logic          clk = 1'b0;
  logic          rst_n;
  unit_in_t      in;
  logic [DW-1:0] result;
  logic          req, we;
  logic [AW-1:0] addr;
  logic [3:0]    be;
  logic [DW-1:0] wdata, rdata;
  logic [31:0]   mem [2**AW];
  logic [7:0]    shadow [4 * 2**AW];
  int            checks = 0, failures = 0;

  tta_lsu #(.AW(AW)) dut (
    .clk, .rst_n, .in_i(in), .result_o(result),
    .mem_req_o(req), .mem_we_o(we), .mem_addr_o(addr), .mem_be_o(be),
    .mem_wdata_o(wdata), .mem_rdata_i(rdata));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (req && we) begin
      for (int b = 0; b < 4; b++) if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    end else if (req) begin
      rdata <= mem[addr];
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(lsu_op_e op, int unsigned baddr, logic [31:0] data, bit same);
    @(negedge clk);
    in = '0;
    if (!same) begin
      in.o_we = 1'b1; in.o_data = data;
      @(negedge clk);
      in = '0;
    end else begin
      in.o_we = 1'b1; in.o_data = data;
    end
    in.t_we = 1'b1; in.t_data = baddr; in.op = op;
    unique case (op)
      LSU_STW: for (int b = 0; b < 4; b++) shadow[baddr + b] = data[8*b +: 8];
      LSU_STH: for (int b = 0; b < 2; b++) shadow[baddr + b] = data[8*b +: 8];
      default: shadow[baddr] = data[7:0];
    endcase
    @(negedge clk);
    in = '0;
  endtask

  task automatic load(lsu_op_e op, int unsigned baddr);
    logic [31:0] e;
    unique case (op)
      LSU_LDW:  e = {shadow[baddr+3], shadow[baddr+2], shadow[baddr+1], shadow[baddr]};
      LSU_LDH:  e = {{16{shadow[baddr+1][7]}}, shadow[baddr+1], shadow[baddr]};
      LSU_LDHU: e = {16'd0, shadow[baddr+1], shadow[baddr]};
      LSU_LDQ:  e = {{24{shadow[baddr][7]}}, shadow[baddr]};
      default:  e = {24'd0, shadow[baddr]};
    endcase
    @(negedge clk);
    in = '0;
    in.t_we = 1'b1; in.t_data = baddr; in.op = op;
    @(negedge clk);
    in = '0;
    @(negedge clk);                    // latency 2
    checks++;
    if (result !== e) begin
      failures++;
      $display("load op %0d @%0d: got %h expected %h", op, baddr, result, e);
    end
  endtask

  initial begin
    int unsigned kind;
    in    = '0;
    rst_n = 1'b0;
    rdata = '0;
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < 4 * 2**AW; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      if ($urandom_range(0, 1) == 1) begin
        kind = $urandom_range(0, 2);
        unique case (kind)
          0: store(LSU_STW, 4 * $urandom_range(0, 2**AW - 1), $urandom, $urandom_range(0, 1) == 1);
          1: store(LSU_STH, 2 * $urandom_range(0, 2 * 2**AW - 1), $urandom, $urandom_range(0, 1) == 1);
          default: store(LSU_STQ, $urandom_range(0, 4 * 2**AW - 1), $urandom, $urandom_range(0, 1) == 1);
        endcase
      end else begin
        kind = $urandom_range(0, 4);
        unique case (kind)
          0: load(LSU_LDW,  4 * $urandom_range(0, 2**AW - 1));
          1: load(LSU_LDH,  2 * $urandom_range(0, 2 * 2**AW - 1));
          2: load(LSU_LDHU, 2 * $urandom_range(0, 2 * 2**AW - 1));
          3: load(LSU_LDQ,  $urandom_range(0, 4 * 2**AW - 1));
          default: load(LSU_LDQU, $urandom_range(0, 4 * 2**AW - 1));
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
