// cube_ctrl_top: logic controller of the radiation-tolerant 3D DRAM cube.
//
// The controller sits under a stack of 14 DDR3 x16 dies: 8 data dies, 5 dies
// of BCH parity and one cold spare, each reached over its own point-to-point
// path. A host reaches the cube through a serial link (serdes_ctrl); packets
// for other cubes travel on the chain link. Each 128-bit word is BCH
// encoded into 208 bits (edac_bch_enc) so that any one die can fail
// completely and the data still reads back correct (edac_bch_dec). Requests
// from the host and from the maintenance engines (BIST, rebuild, scrub, in
// that priority after the host) share the DRAM controller (dram_controller:
// per-bank queues, FR-FCFS scheduling, open/close page, refresh, power-down).
// On the way to the dies the bank address spirals through the stack
// (bank_spiral), a retired die's lane is steered to the spare (spare_ctrl)
// and each die can be reset or power-cycled on its own (ddr_selector).
// Replacing a die or power-cycling one starts a rebuild sweep. Errors are
// recorded in diag_log. Chained cubes can be voted 2-of-3 or combined as XOR
// parity (nmr_voter) on the read data returned to the host.
//
// Timing: commands, addresses and write bursts to the PHY are registered (one
// cycle after the controller decides). The PHY returns a whole read burst per
// die on phy_rd_valid_i at any latency. Host read data leaves as a response
// packet on the host link.
//
// Configuration registers (OP_CFG word, register number in addr[25:20],
// value in addr[19:0]):
//   0 {spiral_en, pd_en, close_page}   1 power-down idle cycles
//   2 refresh interval (cycles)        3 {scope[1:0], scrub_en}
//   4 scrub interval (cycles)          5 scrub target {bank[18:16], row[15:0]}
//   6 die service {power_cycle[4], die[3:0]}
//   7 BIST start {zeroize[0]}          8 force spare {lane[3:0]}
//   9 start rebuild                    10 voter mode[1:0]
//   11 pop diagnostic log              12 BIST length in bursts (0 = all)
//   13 BIST seed (low 20 bits)
// The blocks and what they do follow the cube description; the register map,
// the source priority and all interfaces are this design's choices. The PHY
// and SerDes themselves are outside this RTL.
module cube_ctrl_top
  import cube_pkg::*;
#(
  parameter longint REBUILD_BURSTS = 64'(1) << BADDR_W,
  parameter int     SCRUB_ROWS     = 1 << ROW_W,
  parameter int     SPARE_THRESH   = 64,
  parameter int     SEL_RST_CYC    = 200,
  parameter int     SEL_PWR_CYC    = 1000
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [CUBE_W-1:0]                my_id_i,
  // host serial link (deserialised words)
  input  logic                             rx_valid_i,
  input  logic [31:0]                      rx_data_i,
  output logic                             rx_ready_o,
  output logic                             tx_valid_o,
  output logic [31:0]                      tx_data_o,
  input  logic                             tx_ready_i,
  // chain link to the next cube
  output logic                             ctx_valid_o,
  output logic [31:0]                      ctx_data_o,
  input  logic                             ctx_ready_i,
  input  logic                             crx_valid_i,
  input  logic [31:0]                      crx_data_i,
  output logic                             crx_ready_o,
  // read words of the two peer cubes for voting / parity
  input  logic [DATA_W-1:0]                peer0_data_i,
  input  logic [DATA_W-1:0]                peer1_data_i,
  // DDR PHY side, one lane per die
  output logic                             ddr_cke_o,
  output logic [NUM_DIES-1:0]              ddr_cs_n_o,
  output logic                             ddr_ras_n_o,
  output logic                             ddr_cas_n_o,
  output logic                             ddr_we_n_o,
  output logic [NUM_DIES-1:0][BA_W-1:0]    ddr_ba_o,
  output logic [ROW_W-1:0]                 ddr_addr_o,
  output logic [NUM_DIES-1:0]              ddr_reset_n_o,
  output logic [NUM_DIES-1:0]              ddr_pwr_en_o,
  output logic                             phy_wr_valid_o,
  output logic [NUM_DIES-1:0][BURST_W-1:0] phy_wr_data_o,
  input  logic                             phy_rd_valid_i,
  input  logic [NUM_DIES-1:0][BURST_W-1:0] phy_rd_data_i,
  // status
  output logic [31:0]                      n_ce_o,
  output logic [31:0]                      n_ue_o,
  output logic [31:0]                      n_row_hit_o,
  output logic [31:0]                      n_act_o,
  output logic [31:0]                      n_pre_o,
  output logic [31:0]                      n_ref_o,
  output logic [31:0]                      n_pd_o,
  output logic [31:0]                      n_scrubbed_o,
  output logic [31:0]                      n_scrub_fix_o,
  output logic [31:0]                      n_rebuilt_o,
  output logic                             rebuild_busy_o,
  output logic                             bist_busy_o,
  output logic [31:0]                      bist_fail_o,
  output logic                             spare_active_o,
  output logic [3:0]                       spare_lane_o,
  output logic [NUM_DIES-1:0]              die_busy_o,
  output logic                             log_valid_o,
  output diag_rec_t                        log_head_o,
  output logic [31:0]                      n_logged_o,
  output logic [2:0]                       vote_disagree_o
);

  // ---------------- serial interface and configuration ----------------
  host_req_t         hreq;
  logic              h_vld_req, h_vld_data, h_req_ready, h_data_ready;
  logic [DATA_W-1:0] h_wdata;
  logic              cfg_we;
  logic [5:0]        cfg_addr;
  logic [19:0]       cfg_wdata;
  logic              v_valid;
  logic [DATA_W-1:0] v_data;
  logic              v_ce, v_ue;

  serdes_ctrl u_sio (
    .clk, .rst_n, .my_id_i,
    .rx_valid_i, .rx_data_i, .rx_ready_o, .tx_valid_o, .tx_data_o, .tx_ready_i,
    .ctx_valid_o, .ctx_data_o, .ctx_ready_i, .crx_valid_i, .crx_data_i, .crx_ready_o,
    .req_o(hreq), .vld_req_o(h_vld_req), .req_ready_i(h_req_ready),
    .write_data_o(h_wdata), .vld_data_o(h_vld_data), .data_ready_i(h_data_ready),
    .read_corrected_data_i(v_data), .vld_read_i(v_valid),
    .rd_correctable_err_i(v_ce), .rd_uncorrectable_err_i(v_ue),
    .cfg_we_o(cfg_we), .cfg_addr_o(cfg_addr), .cfg_wdata_o(cfg_wdata)
  );

  logic              close_page, pd_en, spiral_en, scrub_en;
  logic [15:0]       pd_idle, ref_interval;
  logic [1:0]        scrub_scope, vote_mode;
  logic [31:0]       scrub_interval;
  logic [BA_W-1:0]   scrub_bank;
  logic [ROW_W-1:0]  scrub_row;
  logic [19:0]       bist_len, bist_seed;
  logic              sel_req, sel_pwr, bist_start, bist_zero, force_spare, rebuild_cmd, log_pop;
  logic [3:0]        sel_die, force_lane;
  logic              sel_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      close_page <= 1'b0; pd_en <= 1'b1; spiral_en <= 1'b1; scrub_en <= 1'b0;
      pd_idle <= 16'd64; ref_interval <= 16'(T_REFI);
      scrub_scope <= 2'd2; scrub_interval <= 32'd4096; scrub_bank <= '0; scrub_row <= '0;
      vote_mode <= 2'd0; bist_len <= '0; bist_seed <= '0;
      sel_req <= 1'b0; sel_pwr <= 1'b0; sel_die <= '0; bist_start <= 1'b0; bist_zero <= 1'b0;
      force_spare <= 1'b0; force_lane <= '0; rebuild_cmd <= 1'b0; log_pop <= 1'b0;
    end else begin
      bist_start  <= 1'b0;
      force_spare <= 1'b0;
      rebuild_cmd <= 1'b0;
      log_pop     <= 1'b0;
      if (sel_req && sel_ready) sel_req <= 1'b0;
      if (cfg_we)
        case (cfg_addr)
          6'd0:  {spiral_en, pd_en, close_page} <= cfg_wdata[2:0];
          6'd1:  pd_idle        <= cfg_wdata[15:0];
          6'd2:  ref_interval   <= cfg_wdata[15:0];
          6'd3:  {scrub_scope, scrub_en} <= cfg_wdata[2:0];
          6'd4:  scrub_interval <= 32'(cfg_wdata);
          6'd5:  {scrub_bank, scrub_row} <= cfg_wdata[18:0];
          6'd6:  begin sel_req <= 1'b1; sel_pwr <= cfg_wdata[4]; sel_die <= cfg_wdata[3:0]; end
          6'd7:  begin bist_start <= 1'b1; bist_zero <= cfg_wdata[0]; end
          6'd8:  begin force_spare <= 1'b1; force_lane <= cfg_wdata[3:0]; end
          6'd9:  rebuild_cmd <= 1'b1;
          6'd10: vote_mode <= cfg_wdata[1:0];
          6'd11: log_pop <= 1'b1;
          6'd12: bist_len <= cfg_wdata;
          6'd13: bist_seed <= cfg_wdata;
          default: ;
        endcase
    end

  // ---------------- request arbitration ----------------
  // source order: 0 host, 1 BIST, 2 rebuild, 3 scrub
  logic [3:0]             s_req_valid, s_wdata_valid;
  ctrl_req_t [3:0]        s_req;
  logic [3:0][DATA_W-1:0] s_wdata;
  logic [1:0]             sel, sel_q;
  logic                   c_req_ready, c_wdata_ready, c_busy;
  logic [CODE_W-1:0]      c_wdata;

  assign s_req_valid[0]   = h_vld_req;
  assign s_req[0]         = '{write: hreq.op == OP_WRITE, src: SRC_HOST, addr: baddr_t'(hreq.addr)};
  assign s_wdata_valid[0] = h_vld_data;
  assign s_wdata[0]       = h_wdata;

  always_comb begin
    sel = sel_q;
    if (!c_busy) begin
      sel = 2'd0;
      for (int s = 3; s >= 0; s--) if (s_req_valid[s]) sel = 2'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sel_q <= '0;
    else        sel_q <= sel;

  assign h_req_ready  = (sel == 2'd0) && c_req_ready;
  assign h_data_ready = (sel == 2'd0) && c_wdata_ready;

  edac_bch_enc u_enc (.data_i(s_wdata[sel]), .code_o(c_wdata));

  // ---------------- DRAM controller ----------------
  logic                              r_valid, r_last;
  logic [CODE_W-1:0]                 r_code;
  src_e                              r_src;
  baddr_t                            r_addr;
  ddr_cmd_e                          cmd;
  logic [BA_W-1:0]                   cmd_bank;
  logic [ROW_W-1:0]                  cmd_addr;
  logic                              cke, wr_valid;
  logic [NUM_LANES-1:0][BURST_W-1:0] wr_lanes, rd_lanes;

  dram_controller u_ctrl (
    .clk, .rst_n, .close_page_i(close_page), .pd_en_i(pd_en), .pd_idle_i(pd_idle),
    .ref_interval_i(ref_interval),
    .req_valid_i(s_req_valid[sel]), .req_i(s_req[sel]), .req_ready_o(c_req_ready),
    .wdata_valid_i(s_wdata_valid[sel]), .wdata_i(c_wdata), .wdata_ready_o(c_wdata_ready),
    .busy_o(c_busy), .rdata_valid_o(r_valid), .rdata_o(r_code), .rdata_src_o(r_src),
    .rdata_addr_o(r_addr), .rdata_last_o(r_last), .idle_o(),
    .cmd_o(cmd), .cmd_bank_o(cmd_bank), .cmd_addr_o(cmd_addr), .cke_o(cke),
    .wr_valid_o(wr_valid), .wr_lanes_o(wr_lanes), .rd_valid_i(phy_rd_valid_i),
    .rd_lanes_i(rd_lanes),
    .n_hit_o(n_row_hit_o), .n_act_o(n_act_o), .n_pre_o(n_pre_o), .n_ref_o(n_ref_o),
    .n_pd_o(n_pd_o)
  );

  // ---------------- read path: EDAC decode and routing ----------------
  logic [DATA_W-1:0]    d_data;
  logic                 d_ce, d_ue;
  logic [NUM_LANES-1:0] d_lanes;

  edac_bch_dec u_dec (.code_i(r_code), .data_o(d_data), .ce_o(d_ce), .ue_o(d_ue),
                      .lane_err_o(d_lanes));

  logic [3:0] s_rd_valid;
  always_comb
    for (int s = 0; s < 4; s++) s_rd_valid[s] = r_valid && r_src == src_e'(s);

  // host data through the voter (1 cycle), flags delayed to match
  nmr_voter u_vote (
    .clk, .rst_n, .mode_i(vote_mode), .valid_i(s_rd_valid[0]), .local_i(d_data),
    .peer0_i(peer0_data_i), .peer1_i(peer1_data_i),
    .valid_o(v_valid), .data_o(v_data), .disagree_o(vote_disagree_o)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v_ce <= 1'b0; v_ue <= 1'b0; n_ce_o <= '0; n_ue_o <= '0;
    end else begin
      v_ce <= d_ce;
      v_ue <= d_ue;
      if (r_valid && d_ce) n_ce_o <= n_ce_o + 1;
      if (r_valid && d_ue) n_ue_o <= n_ue_o + 1;
    end

  // ---------------- maintenance engines ----------------
  logic      bist_log_valid, bist_done;
  diag_rec_t bist_log;

  bist u_bist (
    .clk, .rst_n, .start_i(bist_start), .zeroize_i(bist_zero), .seed_i(32'(bist_seed)),
    .n_bursts_i(bist_len == '0 ? '0 : BADDR_W'(bist_len)),
    .busy_o(bist_busy_o), .done_o(bist_done), .n_fail_o(bist_fail_o), .n_ce_o(),
    .log_valid_o(bist_log_valid), .log_o(bist_log),
    .req_valid_o(s_req_valid[1]), .req_o(s_req[1]), .req_ready_i(sel == 2'd1 && c_req_ready),
    .wdata_valid_o(s_wdata_valid[1]), .wdata_o(s_wdata[1]),
    .wdata_ready_i(sel == 2'd1 && c_wdata_ready),
    .rd_valid_i(s_rd_valid[3]), .rd_data_i(d_data), .rd_ce_i(d_ce), .rd_ue_i(d_ue),
    .rd_last_i(r_last)
  );

  logic spare_swap, rebuild_done;
  logic [NUM_DIES-1:0] die_done;

  rebuild #(.N_BURSTS(REBUILD_BURSTS)) u_rebuild (
    .clk, .rst_n, .start_i(rebuild_cmd || spare_swap || die_done != '0),
    .busy_o(rebuild_busy_o), .done_o(rebuild_done), .n_done_o(n_rebuilt_o),
    .req_valid_o(s_req_valid[2]), .req_o(s_req[2]), .req_ready_i(sel == 2'd2 && c_req_ready),
    .wdata_valid_o(s_wdata_valid[2]), .wdata_o(s_wdata[2]),
    .wdata_ready_i(sel == 2'd2 && c_wdata_ready),
    .rd_valid_i(s_rd_valid[2]), .rd_data_i(d_data), .rd_ce_i(d_ce), .rd_ue_i(d_ue),
    .rd_last_i(r_last)
  );

  scrub_logic #(.ROWS(SCRUB_ROWS)) u_scrub (
    .clk, .rst_n, .en_i(scrub_en && !rebuild_busy_o && !bist_busy_o), .scope_i(scrub_scope),
    .interval_i(scrub_interval), .bank_i(scrub_bank), .row_i(scrub_row),
    .n_scrubbed_o(n_scrubbed_o), .n_corrected_o(n_scrub_fix_o), .n_passes_o(),
    .req_valid_o(s_req_valid[3]), .req_o(s_req[3]), .req_ready_i(sel == 2'd3 && c_req_ready),
    .wdata_valid_o(s_wdata_valid[3]), .wdata_o(s_wdata[3]),
    .wdata_ready_i(sel == 2'd3 && c_wdata_ready),
    .rd_valid_i(s_rd_valid[1]), .rd_data_i(d_data), .rd_ce_i(d_ce), .rd_ue_i(d_ue),
    .rd_last_i(r_last)
  );

  // ---------------- diagnostic log ----------------
  logic                 acc_ce, acc_ue;
  logic [NUM_LANES-1:0] acc_lanes;
  logic                 log_push;
  diag_rec_t            log_rec;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc_ce <= 1'b0; acc_ue <= 1'b0; acc_lanes <= '0;
    end else if (r_valid) begin
      acc_ce    <= r_last ? 1'b0 : acc_ce | d_ce;
      acc_ue    <= r_last ? 1'b0 : acc_ue | d_ue;
      acc_lanes <= r_last ? '0   : acc_lanes | d_lanes;
    end

  always_comb begin
    log_push = 1'b0;
    log_rec  = '{src: r_src, addr: r_addr, ce: acc_ce | d_ce, ue: acc_ue | d_ue,
                 miscompare: 1'b0, lanes: acc_lanes | d_lanes};
    if (bist_log_valid) begin
      log_push = 1'b1;
      log_rec  = bist_log;
    end else if (r_valid && r_last && r_src != SRC_BIST && (log_rec.ce || log_rec.ue))
      log_push = 1'b1;
  end

  diag_log #(.DEPTH(16)) u_log (
    .clk, .rst_n, .push_i(log_push), .rec_i(log_rec), .pop_i(log_pop),
    .valid_o(log_valid_o), .head_o(log_head_o), .count_o(), .n_logged_o(n_logged_o),
    .n_dropped_o()
  );

  // ---------------- sparing, die selection, spiral addressing ----------------
  logic [NUM_DIES-1:0][BURST_W-1:0] die_wr;
  logic [NUM_DIES-1:0]              cs_n;
  logic [NUM_DIES-1:0][BA_W-1:0]    die_ba;

  spare_ctrl #(.THRESH(SPARE_THRESH)) u_spare (
    .clk, .rst_n, .err_valid_i(r_valid && d_ce), .lane_err_i(d_lanes),
    .force_i(force_spare), .force_lane_i(force_lane),
    .active_o(spare_active_o), .lane_o(spare_lane_o), .swap_o(spare_swap),
    .lane_wr_i(wr_lanes), .die_wr_o(die_wr), .die_rd_i(phy_rd_data_i), .lane_rd_o(rd_lanes)
  );

  ddr_selector #(.N_DIES(NUM_DIES), .RST_CYC(SEL_RST_CYC), .PWR_OFF_CYC(SEL_PWR_CYC)) u_sel (
    .clk, .rst_n, .req_valid_i(sel_req), .req_pwr_i(sel_pwr), .req_die_i(sel_die),
    .req_ready_o(sel_ready), .cs_n_i(cmd == CMD_NOP), .cs_n_o(cs_n),
    .die_reset_n_o(ddr_reset_n_o), .die_pwr_en_o(ddr_pwr_en_o), .die_busy_o(die_busy_o),
    .die_done_o(die_done)
  );

  bank_spiral #(.N_DIES(NUM_DIES)) u_spiral (
    .spiral_en_i(spiral_en), .bank_i(cmd_bank), .die_bank_o(die_ba)
  );

  // registered PHY outputs
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ddr_cke_o <= 1'b1; ddr_cs_n_o <= '1; ddr_ras_n_o <= 1'b1; ddr_cas_n_o <= 1'b1;
      ddr_we_n_o <= 1'b1; ddr_ba_o <= '0; ddr_addr_o <= '0; phy_wr_valid_o <= 1'b0;
      phy_wr_data_o <= '0;
    end else begin
      ddr_cke_o      <= cke;
      ddr_cs_n_o     <= cs_n;
      {ddr_ras_n_o, ddr_cas_n_o, ddr_we_n_o} <= cmd[2:0];
      ddr_ba_o       <= die_ba;
      ddr_addr_o     <= cmd_addr;
      phy_wr_valid_o <= wr_valid;
      if (wr_valid) phy_wr_data_o <= die_wr;
    end

endmodule
