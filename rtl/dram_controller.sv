// dram_controller: the control-logic unit of the cube controller.
//
// Accepts burst requests (one BL8 burst = 8 code-word beats of 208 bits),
// parks write data in data_buffer, queues requests per bank
// (request_queues), picks the next one with FR-FCFS (frfcfs_scheduler), and
// issues DDR3 commands through dram_fsm under the timing kept by bank_manager,
// interleaving the refreshes owed by refresh_ctrl.
//
// Request side: req_valid_i/req_ready_o hand over a ctrl_req_t. For a write,
// exactly BL beats then follow on wdata_valid_i/wdata_ready_o; no other
// request is accepted meanwhile (busy_o). Read data returns as BL consecutive
// beats on rdata_valid_o, tagged with the requester (rdata_src_o) and the burst
// address; rdata_last_o marks the last beat. There is no back-pressure on the
// read stream. PHY side: one command per cycle (cmd_o, bank, address), the
// write burst per lane on wr_valid_o with its WR, and the read burst per lane
// on rd_valid_i, at whatever latency the PHY has. One read is outstanding at a
// time.
// The unit structure follows the cube description; the interfaces, the
// single outstanding read and the sizes are this design's choices.
module dram_controller
  import cube_pkg::*;
#(
  parameter int QDEPTH = 4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration
  input  logic                             close_page_i,
  input  logic                             pd_en_i,
  input  logic [15:0]                      pd_idle_i,
  input  logic [15:0]                      ref_interval_i,
  // request side
  input  logic                             req_valid_i,
  input  ctrl_req_t                        req_i,
  output logic                             req_ready_o,
  input  logic                             wdata_valid_i,
  input  logic [CODE_W-1:0]                wdata_i,
  output logic                             wdata_ready_o,
  output logic                             busy_o,
  output logic                             rdata_valid_o,
  output logic [CODE_W-1:0]                rdata_o,
  output src_e                             rdata_src_o,
  output baddr_t                           rdata_addr_o,
  output logic                             rdata_last_o,
  output logic                             idle_o,
  // PHY side
  output ddr_cmd_e                         cmd_o,
  output logic [BA_W-1:0]                  cmd_bank_o,
  output logic [ROW_W-1:0]                 cmd_addr_o,
  output logic                             cke_o,
  output logic                             wr_valid_o,
  output logic [NUM_LANES-1:0][BURST_W-1:0] wr_lanes_o,
  input  logic                             rd_valid_i,
  input  logic [NUM_LANES-1:0][BURST_W-1:0] rd_lanes_i,
  // event counters
  output logic [31:0]                      n_hit_o,
  output logic [31:0]                      n_act_o,
  output logic [31:0]                      n_pre_o,
  output logic [31:0]                      n_ref_o,
  output logic [31:0]                      n_pd_o
);

  // ---------------- intake ----------------
  logic [TS_W-1:0]   now;
  logic              collecting;
  ctrl_req_t         wreq;
  logic [SLOT_W-1:0] wslot;
  logic [2:0]        wbeat;
  logic              alloc_valid;
  logic [SLOT_W-1:0] alloc_slot;
  logic [NUM_BANKS-1:0] q_ready, head_valid, pop;
  q_entry_t [NUM_BANKS-1:0] heads;
  logic              q_empty;
  logic              push;
  logic [BA_W-1:0]   push_bank;
  q_entry_t          push_entry;
  logic              req_fire, last_beat;

  assign busy_o        = collecting;
  assign wdata_ready_o = collecting;
  assign req_ready_o   = !collecting && q_ready[req_i.addr.bank] && (!req_i.write || alloc_valid);
  assign req_fire      = req_valid_i && req_ready_o;
  assign last_beat     = collecting && wdata_valid_i && wbeat == 3'(BL-1);

  always_comb begin
    push       = 1'b0;
    push_bank  = req_i.addr.bank;
    push_entry = '{write: 1'b0, src: req_i.src, row: req_i.addr.row, col: req_i.addr.col,
                   slot: '0, ts: now};
    if (last_beat) begin
      push       = 1'b1;
      push_bank  = wreq.addr.bank;
      push_entry = '{write: 1'b1, src: wreq.src, row: wreq.addr.row, col: wreq.addr.col,
                     slot: wslot, ts: now};
    end else if (req_fire && !req_i.write) push = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      now        <= '0;
      collecting <= 1'b0;
      wreq       <= '0;
      wslot      <= '0;
      wbeat      <= '0;
    end else begin
      now <= now + 1'b1;
      if (req_fire && req_i.write) begin
        collecting <= 1'b1;
        wreq       <= req_i;
        wslot      <= alloc_slot;
        wbeat      <= '0;
      end else if (collecting && wdata_valid_i) begin
        wbeat <= wbeat + 1'b1;
        if (last_beat) collecting <= 1'b0;
      end
    end

  // ---------------- write data buffer ----------------
  logic [BL-1:0][CODE_W-1:0] wburst;
  q_entry_t                  cur;
  ddr_cmd_e                  cmd;

  data_buffer #(.N_SLOT(NSLOT), .WIDTH(CODE_W), .BEATS(BL)) u_buf (
    .clk, .rst_n,
    .alloc_valid_o(alloc_valid), .alloc_slot_o(alloc_slot),
    .alloc_take_i(req_fire && req_i.write),
    .wr_en_i(collecting && wdata_valid_i), .wr_slot_i(wslot), .wr_beat_i(wbeat),
    .wr_data_i(wdata_i),
    .rd_slot_i(cur.slot), .rd_burst_o(wburst),
    .free_i(cmd == CMD_WR), .free_slot_i(cur.slot), .used_o()
  );

  // ---------------- queues, scheduler, banks, refresh, FSM ----------------
  logic [NUM_BANKS-1:0]            bopen, can_act, can_rw, can_pre;
  logic [NUM_BANKS-1:0][ROW_W-1:0] orow;
  logic                            all_idle, gvalid, ghit;
  logic [BA_W-1:0]                 gbank;
  logic                            ref_req, ref_urgent, ref_ack, cmd_all, rd_busy, pd;
  logic [BA_W-1:0]                 cbank;

  request_queues #(.NB(NUM_BANKS), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .push_i(push), .push_bank_i(push_bank), .push_entry_i(push_entry),
    .ready_o(q_ready), .head_valid_o(head_valid), .head_o(heads), .pop_i(pop), .empty_o(q_empty)
  );

  frfcfs_scheduler #(.NB(NUM_BANKS)) u_sched (
    .now_i(now), .head_valid_i(head_valid), .head_i(heads), .bank_open_i(bopen),
    .open_row_i(orow), .grant_valid_o(gvalid), .grant_bank_o(gbank), .grant_hit_o(ghit)
  );

  bank_manager #(.NB(NUM_BANKS)) u_bm (
    .clk, .rst_n, .cmd_i(cmd), .all_i(cmd_all), .bank_i(cbank), .row_i(cmd_addr_o),
    .open_o(bopen), .open_row_o(orow), .can_act_o(can_act), .can_rw_o(can_rw),
    .can_pre_o(can_pre), .all_idle_o(all_idle)
  );

  refresh_ctrl #(.CNT_W(16)) u_ref (
    .clk, .rst_n, .interval_i(ref_interval_i), .ref_ack_i(ref_ack),
    .ref_req_o(ref_req), .urgent_o(ref_urgent), .owed_o()
  );

  dram_fsm #(.NB(NUM_BANKS)) u_fsm (
    .clk, .rst_n, .close_page_i, .pd_en_i, .pd_idle_i,
    .grant_valid_i(gvalid), .grant_bank_i(gbank), .head_i(heads), .pop_o(pop),
    .open_i(bopen), .open_row_i(orow), .can_act_i(can_act), .can_rw_i(can_rw),
    .can_pre_i(can_pre), .all_idle_i(all_idle),
    .ref_req_i(ref_req), .ref_urgent_i(ref_urgent), .ref_ack_o(ref_ack),
    .rd_busy_i(rd_busy), .cmd_o(cmd), .cmd_all_o(cmd_all), .cmd_bank_o(cbank),
    .cmd_addr_o(cmd_addr_o), .cke_o(cke_o), .cur_o(cur), .pd_o(pd)
  );

  assign cmd_o      = cmd;
  assign cmd_bank_o = cbank;
  assign idle_o     = q_empty && !collecting && !rd_busy && !ref_req;

  // write burst: beat-major buffer to lane-major PHY burst
  always_comb begin
    wr_valid_o = (cmd == CMD_WR);
    for (int l = 0; l < NUM_LANES; l++)
      for (int b = 0; b < BL; b++)
        wr_lanes_o[l][b*DQ_W +: DQ_W] = wburst[b][l*DQ_W +: DQ_W];
  end

  // ---------------- read return ----------------
  logic [NUM_LANES-1:0][BURST_W-1:0] rbuf;
  logic                              streaming;
  logic [2:0]                        rbeat;
  baddr_t                            raddr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_busy     <= 1'b0;
      streaming   <= 1'b0;
      rbeat       <= '0;
      rdata_src_o <= SRC_HOST;
      raddr       <= '0;
      rbuf        <= '0;
    end else begin
      if (cmd == CMD_RD) begin
        rd_busy     <= 1'b1;
        rdata_src_o <= cur.src;
        raddr       <= '{row: cur.row, bank: cbank, col: cur.col};
      end
      if (rd_valid_i && rd_busy && !streaming) begin
        rbuf      <= rd_lanes_i;
        streaming <= 1'b1;
        rbeat     <= '0;
      end else if (streaming) begin
        rbeat <= rbeat + 1'b1;
        if (rbeat == 3'(BL-1)) begin
          streaming <= 1'b0;
          rd_busy   <= 1'b0;
        end
      end
    end

  always_comb begin
    rdata_valid_o = streaming;
    rdata_last_o  = streaming && rbeat == 3'(BL-1);
    rdata_addr_o  = raddr;
    for (int l = 0; l < NUM_LANES; l++) rdata_o[l*DQ_W +: DQ_W] = rbuf[l][rbeat*DQ_W +: DQ_W];
  end

  // ---------------- event counters ----------------
  logic pd_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      n_hit_o <= '0; n_act_o <= '0; n_pre_o <= '0; n_ref_o <= '0; n_pd_o <= '0; pd_q <= 1'b0;
    end else begin
      pd_q <= pd;
      if (gvalid && ghit && pop != '0) n_hit_o <= n_hit_o + 1;
      if (cmd == CMD_ACT) n_act_o <= n_act_o + 1;
      if (cmd == CMD_PRE) n_pre_o <= n_pre_o + 1;
      if (cmd == CMD_REF) n_ref_o <= n_ref_o + 1;
      if (pd && !pd_q)    n_pd_o  <= n_pd_o + 1;
    end

endmodule
