// tb_tta_configs: runs one program on all five configurations of the
// processor family side by side, TTA-P1 (one bus, no multiplier, adder or
// divider) up to TTA-P5 (four buses, the default). Each instance of
// tta_cfg_run builds the processor with the unit counts of one configuration,
// loads an NTRU encryption program written for the one-bus machine, runs it,
// and checks the result coefficients, the cycle count of the static schedule
// and that jumps, guarded and squashed moves, loads and stores occurred. The
// same program giving the same results and cycle count everywhere shows that
// the unit ids and the move encoding do not depend on the configuration.
module tb_tta_configs;

  localparam int NCFG = 5;

  logic clk = 1'b0;
  logic done [NCFG];
  int   checks [NCFG], failures [NCFG];

  always #5 clk = ~clk;

  tta_cfg_run #(.N_BUS(1), .N_LSU(1), .N_ART(1), .N_LOG(1), .N_SHF(1),
                .N_ADD(0), .N_MUL(0), .N_DIV(0), .N_RF(1))
    p1 (.clk, .done_o(done[0]), .checks_o(checks[0]), .failures_o(failures[0]));
  tta_cfg_run #(.N_BUS(2), .N_LSU(1), .N_ART(2), .N_LOG(1), .N_SHF(1),
                .N_ADD(0), .N_MUL(0), .N_DIV(0), .N_RF(1))
    p2 (.clk, .done_o(done[1]), .checks_o(checks[1]), .failures_o(failures[1]));
  tta_cfg_run #(.N_BUS(4), .N_LSU(2), .N_ART(2), .N_LOG(1), .N_SHF(1),
                .N_ADD(0), .N_MUL(0), .N_DIV(0), .N_RF(2))
    p3 (.clk, .done_o(done[2]), .checks_o(checks[2]), .failures_o(failures[2]));
  tta_cfg_run #(.N_BUS(4), .N_LSU(2), .N_ART(4), .N_LOG(1), .N_SHF(2),
                .N_ADD(2), .N_MUL(1), .N_DIV(0), .N_RF(2))
    p4 (.clk, .done_o(done[3]), .checks_o(checks[3]), .failures_o(failures[3]));
  tta_cfg_run #(.N_BUS(4), .N_LSU(2), .N_ART(4), .N_LOG(1), .N_SHF(2),
                .N_ADD(2), .N_MUL(1), .N_DIV(1), .N_RF(2))
    p5 (.clk, .done_o(done[4]), .checks_o(checks[4]), .failures_o(failures[4]));

  int total_checks, total_failures;

  task automatic report();
    total_checks = 0;
    total_failures = 0;
    for (int c = 0; c < NCFG; c++) begin
      total_checks += checks[c];
      total_failures += failures[c];
      if (!done[c]) begin
        total_failures++;
        $display("TTA-P%0d did not finish", c + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int c = 0; c < NCFG; c++)
      $display("TTA-P%0d: %0d checks, %0d failures", c + 1, checks[c], failures[c]);
    report();
    $finish;
  end
endmodule
