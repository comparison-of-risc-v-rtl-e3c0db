// tb_tta_interconnect: self-checking testbench of the transport buses.
//
// Each trial builds a random legal four-move instruction (distinct
// destination units, every kind of source: immediates, unit results,
// register-file reads, boolean registers, the return address), random guard
// codes and boolean register values, and random source values. A reference
// decoder written here predicts, per unit, which ports are written with what
// value and opcode, which moves run or are squashed by their guard, and which
// index each register-file read port gets; all outputs are compared with it.
module tb_tta_interconnect;
  import tta_pkg::*;

  localparam int unsigned NB = 4;

  slot_t [NB-1:0]               slots;
  logic                         valid;
  logic [1:0]                   bl;
  logic [N_UNITS-1:0][DW-1:0]   src_val;
  logic [MAX_RF-1:0][IDX_W-1:0] ridx;
  unit_in_t [N_UNITS-1:0]       uo;
  logic [NB-1:0]                exec, squash;
  int                           checks = 0, failures = 0;
  logic                         clk = 1'b0;

  tta_interconnect #(.N_BUS(NB)) dut (
    .slots_i(slots), .valid_i(valid), .bl_i(bl), .src_val_i(src_val),
    .rf_ridx_o(ridx), .unit_o(uo), .move_exec_o(exec), .move_squash_o(squash));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit guard_pass(logic [2:0] g, logic [1:0] b);
    case (g)
      3'd0: return 1;
      3'd1: return b[0];
      3'd2: return !b[0];
      3'd3: return b[1];
      3'd4: return !b[1];
      default: return 0;
    endcase
  endfunction

  function automatic bit is_regfile(int u);
    return u == 14 || u == 15 || u == 16;
  endfunction

  initial begin
    int          dunit [NB];
    int          pick, n_used;
    bit          used [N_UNITS];
    logic [31:0] val [NB];
    logic [5:0]  rf_idx [2];
    unit_in_t    e_uo [N_UNITS];
    logic [NB-1:0] e_exec, e_squash;
    int          u, su, sidx;
    int          n_exec = 0, n_squash = 0;

    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < int'(N_UNITS); i++) begin
        src_val[i] = $urandom;
        used[i]    = 0;
      end
      bl      = 2'($urandom);
      src_val[16] = 32'(bl);          // the boolean file shows its bits
      valid   = ($urandom_range(0, 9) != 0);
      rf_idx[0] = 6'($urandom_range(0, 39));
      rf_idx[1] = 6'($urandom_range(0, 39));
      for (int b = 0; b < int'(NB); b++) begin
        // destination: an unused unit, or none
        do pick = $urandom_range(0, N_UNITS - 1); while (pick != 0 && used[pick]);
        used[pick] = 1;
        dunit[b]   = pick;
        slots[b].guard = ($urandom_range(0, 2) == 0) ? 3'($urandom_range(0, 7)) : 3'd0;
        if (is_regfile(pick))
          slots[b].dst = {5'(pick), 5'd0, 6'($urandom_range(0, 39))};
        else
          slots[b].dst = {5'(pick), 6'd0, 1'($urandom), 4'($urandom)};
        // source
        if ($urandom_range(0, 3) == 0) begin
          slots[b].src = {1'b1, 24'($urandom)};
          val[b] = {{8{slots[b].src[23]}}, slots[b].src[23:0]};
        end else begin
          su = $urandom_range(0, N_UNITS - 1);
          if (su == 14 || su == 15) sidx = rf_idx[su - 14];
          else if (su == 16)        sidx = $urandom_range(0, 1);
          else                      sidx = 0;
          slots[b].src = {1'b0, 13'd0, 5'(su), 6'(sidx)};
          val[b] = (su == 16) ? 32'(bl[sidx]) : src_val[su];
        end
      end
      // reference decoder
      for (int i = 0; i < int'(N_UNITS); i++) e_uo[i] = '0;
      for (int b = 0; b < int'(NB); b++) begin
        u = dunit[b];
        e_exec[b]   = valid && u != 0 && guard_pass(slots[b].guard, bl);
        e_squash[b] = valid && u != 0 && slots[b].guard != 3'd7 && !guard_pass(slots[b].guard, bl);
        if (e_exec[b]) begin
          if (is_regfile(u)) begin
            e_uo[u].t_we = 1; e_uo[u].t_data = val[b]; e_uo[u].widx = slots[b].dst[5:0];
          end else if (slots[b].dst[4]) begin
            e_uo[u].t_we = 1; e_uo[u].t_data = val[b]; e_uo[u].op = slots[b].dst[3:0];
          end else begin
            e_uo[u].o_we = 1; e_uo[u].o_data = val[b];
          end
        end
      end
      #1;
      checks++;
      if (exec !== e_exec || squash !== e_squash) begin
        failures++;
        $display("trial %0d: exec %b/%b squash %b/%b", n, exec, e_exec, squash, e_squash);
      end
      for (int i = 0; i < int'(N_UNITS); i++) begin
        checks++;
        if (uo[i] !== e_uo[i]) begin
          failures++;
          $display("trial %0d: unit %0d got %h expected %h", n, i, uo[i], e_uo[i]);
        end
      end
      for (int b = 0; b < int'(NB); b++)
        if (!slots[b].src[24] && (slots[b].src[10:6] == 14 || slots[b].src[10:6] == 15)) begin
          checks++;
          if (ridx[slots[b].src[10:6] - 14] !== rf_idx[slots[b].src[10:6] - 14]) failures++;
        end
      n_exec   += $countones(exec);
      n_squash += $countones(squash);
    end
    checks++;
    if (n_exec == 0 || n_squash == 0) failures++;
    $display("moves executed %0d, squashed %0d", n_exec, n_squash);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
