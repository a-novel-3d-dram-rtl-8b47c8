// dram_fsm: command finite state machine of the DRAM controller.
//
// Turns the request picked by the scheduler into DDR3 commands while obeying
// the bank timing reported by bank_manager: a row hit goes straight to RD/WR,
// a closed bank gets ACT first, a row conflict gets PRE then ACT. Under the
// open-page policy the row is left open after the column command; under the
// close-page policy (close_page_i) the bank is precharged as soon as tRAS/tWR
// allow. Owed refreshes are served between requests (at once when urgent):
// all banks are precharged, then REF is issued. After pd_idle_i idle cycles
// with pd_en_i set, CKE is dropped (precharge power-down) until a request or a
// refresh arrives, then tXP is waited. Command outputs are combinational and
// valid in the cycle they are issued; bank_manager samples them at the same
// edge. A read is only issued when the read-return path is free (rd_busy_i).
// The FSM, open/close-page policies, refresh and power-down are the cube
// description's; the state set and the service order are this design's.
module dram_fsm
  import cube_pkg::*;
#(
  parameter int NB = NUM_BANKS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     close_page_i,
  input  logic                     pd_en_i,
  input  logic [15:0]              pd_idle_i,
  // scheduler
  input  logic                     grant_valid_i,
  input  logic [$clog2(NB)-1:0]    grant_bank_i,
  input  q_entry_t [NB-1:0]        head_i,
  output logic [NB-1:0]            pop_o,
  // bank manager
  input  logic [NB-1:0]            open_i,
  input  logic [NB-1:0][ROW_W-1:0] open_row_i,
  input  logic [NB-1:0]            can_act_i,
  input  logic [NB-1:0]            can_rw_i,
  input  logic [NB-1:0]            can_pre_i,
  input  logic                     all_idle_i,
  // refresh
  input  logic                     ref_req_i,
  input  logic                     ref_urgent_i,
  output logic                     ref_ack_o,
  // read return path
  input  logic                     rd_busy_i,
  // command out
  output ddr_cmd_e                 cmd_o,
  output logic                     cmd_all_o,
  output logic [$clog2(NB)-1:0]    cmd_bank_o,
  output logic [ROW_W-1:0]         cmd_addr_o,
  output logic                     cke_o,
  output q_entry_t                 cur_o,        // request of the column command
  output logic                     pd_o          // in power-down
);

  typedef enum logic [2:0] {S_IDLE, S_SERVE, S_CLOSE, S_PREA, S_REF, S_PD, S_PDX} state_e;
  state_e                state, nstate;
  q_entry_t              cur;
  logic [$clog2(NB)-1:0] cb;
  logic [15:0]           idle_cnt;
  logic [3:0]            pd_cnt;

  assign cur_o = cur;
  assign pd_o  = (state == S_PD);

  always_comb begin
    nstate     = state;
    cmd_o      = CMD_NOP;
    cmd_all_o  = 1'b0;
    cmd_bank_o = cb;
    cmd_addr_o = '0;
    cke_o      = 1'b1;
    pop_o      = '0;
    ref_ack_o  = 1'b0;
    case (state)
      S_IDLE: begin
        if (ref_req_i && (ref_urgent_i || !grant_valid_i)) nstate = S_PREA;
        else if (grant_valid_i) begin
          pop_o[grant_bank_i] = 1'b1;
          nstate = S_SERVE;
        end else if (pd_en_i && idle_cnt >= pd_idle_i) nstate = S_PD;
      end
      S_SERVE: begin
        if (open_i[cb] && open_row_i[cb] == cur.row) begin
          if (can_rw_i[cb] && (cur.write || !rd_busy_i)) begin
            cmd_o      = cur.write ? CMD_WR : CMD_RD;
            cmd_addr_o = ROW_W'({cur.col, 3'b000});
            nstate     = close_page_i ? S_CLOSE : S_IDLE;
          end
        end else if (open_i[cb]) begin
          if (can_pre_i[cb]) cmd_o = CMD_PRE;
        end else if (can_act_i[cb]) begin
          cmd_o      = CMD_ACT;
          cmd_addr_o = cur.row;
        end
      end
      S_CLOSE:
        if (can_pre_i[cb]) begin
          cmd_o  = CMD_PRE;
          nstate = S_IDLE;
        end
      S_PREA:
        if (open_i == '0) nstate = S_REF;
        else if (&can_pre_i) begin
          cmd_o          = CMD_PRE;
          cmd_all_o      = 1'b1;
          cmd_addr_o[10] = 1'b1;
          nstate         = S_REF;
        end
      S_REF:
        if (all_idle_i) begin
          cmd_o     = CMD_REF;
          cmd_all_o = 1'b1;
          ref_ack_o = 1'b1;
          nstate    = S_IDLE;
        end
      S_PD: begin
        cke_o = 1'b0;
        if ((grant_valid_i || ref_req_i) && pd_cnt >= 4'(T_CKE)) nstate = S_PDX;
      end
      S_PDX: if (pd_cnt >= 4'(T_XP)) nstate = S_IDLE;
      default: nstate = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      cb       <= '0;
      idle_cnt <= '0;
      pd_cnt   <= '0;
    end else begin
      state <= nstate;
      if (state == S_IDLE && nstate == S_SERVE) begin
        cur <= head_i[grant_bank_i];
        cb  <= grant_bank_i;
      end
      idle_cnt <= (state == S_IDLE && !grant_valid_i && !ref_req_i) ? idle_cnt + {15'd0, idle_cnt != '1} : '0;
      pd_cnt   <= (nstate != state) ? '0 : pd_cnt + {3'd0, pd_cnt != '1};
    end

endmodule
