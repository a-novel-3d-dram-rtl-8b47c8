// bank_manager: open-row and timing state of every DRAM bank.
//
// Tracks, per bank, whether a row is open and which one, and counts down the
// DDR3 intervals after each command: ACT->RD/WR (tRCD), ACT->PRE (tRAS),
// WR->PRE (write recovery), RD->PRE (tRTP), PRE->ACT (tRP) and REF->ACT (tRFC).
// From that it tells the command FSM which banks may take an ACT, a column
// command or a PRE this cycle, and lets it skip needless PRE/ACT pairs when
// the wanted row is already open. cmd_i is the command issued this cycle;
// all_i marks a precharge-all or refresh.
// Monitoring bank status to avoid useless closing/opening is the cube
// description's; the timing set is standard DDR3 and the values are in cube_pkg.
module bank_manager
  import cube_pkg::*;
#(
  parameter int NB = NUM_BANKS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  ddr_cmd_e                 cmd_i,
  input  logic                     all_i,
  input  logic [$clog2(NB)-1:0]    bank_i,
  input  logic [ROW_W-1:0]         row_i,
  output logic [NB-1:0]            open_o,
  output logic [NB-1:0][ROW_W-1:0] open_row_o,
  output logic [NB-1:0]            can_act_o,
  output logic [NB-1:0]            can_rw_o,
  output logic [NB-1:0]            can_pre_o,
  output logic                     all_idle_o
);

  localparam int CW = 8;
  logic [NB-1:0][CW-1:0] rcd_c, pre_c, act_c;   // cycles left before RW / PRE / ACT

  function automatic logic [CW-1:0] dec(logic [CW-1:0] c);
    return (c == '0) ? c : c - 1'b1;
  endfunction

  function automatic logic [CW-1:0] maxc(logic [CW-1:0] a, int b);
    return (32'(a) > b) ? a : CW'(b);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      open_o     <= '0;
      open_row_o <= '0;
      rcd_c      <= '0;
      pre_c      <= '0;
      act_c      <= '0;
    end else begin
      for (int b = 0; b < NB; b++) begin
        rcd_c[b] <= dec(rcd_c[b]);
        pre_c[b] <= dec(pre_c[b]);
        act_c[b] <= dec(act_c[b]);
        if (all_i || bank_i == ($clog2(NB))'(b)) begin
          case (cmd_i)
            CMD_ACT: if (!all_i) begin
              open_o[b]     <= 1'b1;
              open_row_o[b] <= row_i;
              rcd_c[b]      <= CW'(T_RCD - 1);
              pre_c[b]      <= CW'(T_RAS - 1);
            end
            CMD_RD: if (!all_i) pre_c[b] <= maxc(dec(pre_c[b]), T_RTP - 1);
            CMD_WR: if (!all_i) pre_c[b] <= maxc(dec(pre_c[b]), T_WR - 1);
            CMD_PRE: begin
              if (open_o[b]) act_c[b] <= CW'(T_RP - 1);
              open_o[b] <= 1'b0;
            end
            CMD_REF: act_c[b] <= CW'(T_RFC - 1);
            default: ;
          endcase
        end
      end
    end

  always_comb begin
    all_idle_o = 1'b1;
    for (int b = 0; b < NB; b++) begin
      can_act_o[b] = !open_o[b] && act_c[b] == '0;
      can_rw_o[b]  = open_o[b] && rcd_c[b] == '0;
      can_pre_o[b] = !open_o[b] || pre_c[b] == '0;
      if (!can_act_o[b]) all_idle_o = 1'b0;
    end
  end

endmodule
