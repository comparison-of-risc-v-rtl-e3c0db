// tta_interconnect: the transport buses and sockets of the TTA processor.
//
// Every bus carries one move per instruction. For each bus the interconnect
// decodes the move slot of the current instruction (layout in tta_pkg),
// evaluates its guard against the boolean register file, picks the source
// value (short immediate, a function unit's result register, a register-file
// read port, a boolean register or the GCU's return address) and delivers it
// to the destination port named by the slot. All units sit on all buses, as
// in a fully connected TTA, so any source can reach any destination in one
// move; in particular a result can go straight from one function unit into
// another without passing through a register file.
//
// Interface: `slots_i` is the instruction (bus 0 in the low slot),
// `valid_i` qualifies it, `bl_i` are the boolean registers, `src_val_i[u]`
// the value unit u shows as a source (for a register file, its read port,
// addressed by `rf_ridx_o`). `unit_o[u]` tells unit u what was written to its
// ports this cycle. The decoding is purely combinational; units register what
// they receive at the next clock edge.
//
// Rules a program must keep, checked by assertions: in one instruction no two
// executed moves write the same port, and no two moves read different
// registers of one register file (each file has one read port). If they are
// broken anyway, the highest-numbered bus wins.
module tta_interconnect
  import tta_pkg::*;
#(
  parameter int unsigned N_BUS   = 4,
  parameter int unsigned BL_BITS = 2
) (
  input  slot_t [N_BUS-1:0]          slots_i,
  input  logic                       valid_i,
  input  logic  [BL_BITS-1:0]        bl_i,
  input  logic  [N_UNITS-1:0][DW-1:0] src_val_i,
  output logic  [MAX_RF-1:0][IDX_W-1:0] rf_ridx_o,
  output unit_in_t [N_UNITS-1:0]     unit_o,
  output logic  [N_BUS-1:0]          move_exec_o,    // move executed on bus b
  output logic  [N_BUS-1:0]          move_squash_o   // guarded move cancelled
);
  logic [N_BUS-1:0]              guard_ok;
  logic [N_BUS-1:0][DW-1:0]      bus_val;
  logic [N_BUS-1:0][UNIT_W-1:0]  s_unit, d_unit;
  logic [N_BUS-1:0][IDX_W-1:0]   s_idx;
  logic [N_BUS-1:0]              s_imm;

  function automatic logic bl_bit(logic [BL_BITS-1:0] bl, int unsigned i);
    return (i < BL_BITS) ? bl[i] : 1'b0;
  endfunction

  always_comb begin
    for (int b = 0; b < int'(N_BUS); b++) begin
      s_imm[b]  = slots_i[b].src[SRC_W-1];
      s_unit[b] = slots_i[b].src[IDX_W +: UNIT_W];
      s_idx[b]  = slots_i[b].src[IDX_W-1:0];
      d_unit[b] = slots_i[b].dst[DST_W-1 -: UNIT_W];
      unique case (slots_i[b].guard)
        G_ALWAYS: guard_ok[b] = 1'b1;
        G_BL0:    guard_ok[b] =  bl_bit(bl_i, 0);
        G_NBL0:   guard_ok[b] = !bl_bit(bl_i, 0);
        G_BL1:    guard_ok[b] =  bl_bit(bl_i, 1);
        G_NBL1:   guard_ok[b] = !bl_bit(bl_i, 1);
        default:  guard_ok[b] = 1'b0;
      endcase
      move_exec_o[b]   = valid_i && guard_ok[b] && (d_unit[b] != U_NONE)
                         && (int'(d_unit[b]) < int'(N_UNITS));
      move_squash_o[b] = valid_i && !guard_ok[b] && (d_unit[b] != U_NONE)
                         && (slots_i[b].guard != G_NEVER);
    end
  end

  // Register-file read ports: the index comes from the moves that read them.
  always_comb begin
    rf_ridx_o = '0;
    for (int b = 0; b < int'(N_BUS); b++)
      for (int r = 0; r < int'(MAX_RF); r++)
        if (!s_imm[b] && s_unit[b] == U_RF0 + UNIT_W'(r)) rf_ridx_o[r] = s_idx[b];
  end

  // Source multiplexers.
  always_comb begin
    for (int b = 0; b < int'(N_BUS); b++) begin
      if (s_imm[b])
        bus_val[b] = {{(DW-24){slots_i[b].src[23]}}, slots_i[b].src[23:0]};
      else if (int'(s_unit[b]) >= int'(N_UNITS))
        bus_val[b] = '0;
      else if (s_unit[b] == U_BL)
        bus_val[b] = DW'(src_val_i[U_BL][s_idx[b][4:0]]);
      else
        bus_val[b] = src_val_i[s_unit[b]];
    end
  end

  // Destination sockets.
  always_comb begin
    unit_o = '0;
    for (int b = 0; b < int'(N_BUS); b++) begin
      if (move_exec_o[b]) begin
        for (int u = 1; u < int'(N_UNITS); u++) begin
          if (d_unit[b] == UNIT_W'(u)) begin
            if (u == int'(U_RF0) || u == int'(U_RF0) + 1 || u == int'(U_BL)) begin
              unit_o[u].t_we   = 1'b1;
              unit_o[u].t_data = bus_val[b];
              unit_o[u].widx   = slots_i[b].dst[IDX_W-1:0];
            end else if (slots_i[b].dst[OP_W]) begin
              unit_o[u].t_we   = 1'b1;
              unit_o[u].t_data = bus_val[b];
              unit_o[u].op     = slots_i[b].dst[OP_W-1:0];
            end else begin
              unit_o[u].o_we   = 1'b1;
              unit_o[u].o_data = bus_val[b];
            end
          end
        end
      end
    end
  end

  // Program rules.
  function automatic logic is_rf(logic [UNIT_W-1:0] u);
    return u == U_RF0 || u == U_RF0 + 1 || u == U_BL;
  endfunction

  always_comb begin
    for (int a = 0; a < int'(N_BUS); a++)
      for (int b = a + 1; b < int'(N_BUS); b++) begin
        if (move_exec_o[a] && move_exec_o[b] && d_unit[a] == d_unit[b])
          assert (!is_rf(d_unit[a]) && slots_i[a].dst[OP_W] != slots_i[b].dst[OP_W])
            else $error("two moves write one port of unit %0d", d_unit[a]);
        if (valid_i && !s_imm[a] && !s_imm[b] && s_unit[a] == s_unit[b]
            && (s_unit[a] == U_RF0 || s_unit[a] == U_RF0 + 1))
          assert (s_idx[a] == s_idx[b])
            else $error("two moves read different registers of one file");
      end
  end
endmodule
