// tb_cube_ctrl_top: end-to-end test of the cube controller with 14 die models.
//
// Drives host packets on the serial link and checks every read response
// against a scoreboard. It walks through the mechanisms of the design and
// counts each one: row hits and row conflicts, refresh, power-down, the
// close-page mode switch, correction of an upset, scrub write-back, a dead die
// corrected on the fly, the forced swap to the spare die and its rebuild, a
// die power cycle with automatic rebuild, BIST, chain forwarding of requests
// and responses, TMR voting and XOR parity, spiral bank addressing and the
// diagnostic log. A mechanism that never happened counts as a failure. The die
// models also report any DDR3 timing or protocol breach.
// The rebuild sweep, scrub range and die-service delays are shortened through
// the top's parameters.
module tb_cube_ctrl_top;
  import cube_pkg::*;

  localparam int     NREB   = 32;
  localparam logic [3:0] MY_ID = 4'd1;

  logic clk = 1'b0, rst_n = 1'b1;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge

  logic rx_valid = 1'b0, rx_ready, tx_valid, ctx_valid, crx_valid = 1'b0, crx_ready;
  logic [31:0] rx_data = '0, tx_data, ctx_data, crx_data = '0;
  logic [DATA_W-1:0] peer0 = '0, peer1 = '0;
  logic ddr_cke, ras_n, cas_n, we_n, wr_valid, rd_valid;
  logic [NUM_DIES-1:0] cs_n, reset_n, pwr_en, die_busy, die_rd_valid, fail = '0;
  logic [NUM_DIES-1:0][BA_W-1:0] ba;
  logic [ROW_W-1:0] addr;
  logic [NUM_DIES-1:0][BURST_W-1:0] wr_data, rd_data;
  logic [31:0] n_ce, n_ue, n_hit, n_act, n_pre, n_ref, n_pd, n_scrubbed, n_scrub_fix, n_rebuilt;
  logic [31:0] bist_fail, n_logged;
  logic rebuild_busy, bist_busy, spare_active, log_valid;
  logic [3:0] spare_lane;
  logic [2:0] disagree;
  diag_rec_t log_head;
  int viol [NUM_DIES];
  int nwr  [NUM_DIES];

  cube_ctrl_top #(.REBUILD_BURSTS(NREB), .SCRUB_ROWS(2), .SPARE_THRESH(1000),
                  .SEL_RST_CYC(20), .SEL_PWR_CYC(50)) dut (
    .clk, .rst_n, .my_id_i(MY_ID),
    .rx_valid_i(rx_valid), .rx_data_i(rx_data), .rx_ready_o(rx_ready),
    .tx_valid_o(tx_valid), .tx_data_o(tx_data), .tx_ready_i(1'b1),
    .ctx_valid_o(ctx_valid), .ctx_data_o(ctx_data), .ctx_ready_i(1'b1),
    .crx_valid_i(crx_valid), .crx_data_i(crx_data), .crx_ready_o(crx_ready),
    .peer0_data_i(peer0), .peer1_data_i(peer1),
    .ddr_cke_o(ddr_cke), .ddr_cs_n_o(cs_n), .ddr_ras_n_o(ras_n), .ddr_cas_n_o(cas_n),
    .ddr_we_n_o(we_n), .ddr_ba_o(ba), .ddr_addr_o(addr), .ddr_reset_n_o(reset_n),
    .ddr_pwr_en_o(pwr_en), .phy_wr_valid_o(wr_valid), .phy_wr_data_o(wr_data),
    .phy_rd_valid_i(rd_valid), .phy_rd_data_i(rd_data),
    .n_ce_o(n_ce), .n_ue_o(n_ue), .n_row_hit_o(n_hit), .n_act_o(n_act), .n_pre_o(n_pre),
    .n_ref_o(n_ref), .n_pd_o(n_pd), .n_scrubbed_o(n_scrubbed), .n_scrub_fix_o(n_scrub_fix),
    .n_rebuilt_o(n_rebuilt), .rebuild_busy_o(rebuild_busy), .bist_busy_o(bist_busy),
    .bist_fail_o(bist_fail), .spare_active_o(spare_active), .spare_lane_o(spare_lane),
    .die_busy_o(die_busy), .log_valid_o(log_valid), .log_head_o(log_head),
    .n_logged_o(n_logged), .vote_disagree_o(disagree)
  );

  for (genvar d = 0; d < NUM_DIES; d++) begin : g_die
    ddr3_die_model #(.DIE(d)) u_die (
      .clk, .cke(ddr_cke), .cs_n(cs_n[d]), .ras_n, .cas_n, .we_n, .ba(ba[d]), .addr,
      .reset_n(reset_n[d]), .pwr_en(pwr_en[d]), .wr_valid, .wr_data(wr_data[d]),
      .fail_i(fail[d]), .rd_data(rd_data[d]), .rd_valid(die_rd_valid[d]),
      .violations(viol[d]), .n_writes(nwr[d])
    );
  end
  assign rd_valid = |die_rd_valid;

  int checks = 0, failures = 0;
  typedef enum int {M_HIT, M_CONFLICT, M_REFRESH, M_PD, M_CLOSE, M_CE, M_SCRUB, M_DEADDIE,
                    M_SPARE, M_REBUILD, M_PWRCYC, M_BIST, M_FWD, M_CHAINRSP, M_VOTE, M_XOR,
                    M_SPIRAL, M_LOG, M_NUM} mech_e;
  int mech [M_NUM] = '{default: 0};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---------------- host link ----------------
  logic [31:0] txq[$];
  always @(posedge clk) if (tx_valid) txq.push_back(tx_data);
  int ctx_words = 0;
  always @(posedge clk) if (ctx_valid) ctx_words++;

  // word queues feeding the host and chain receive links
  logic [31:0] rxq[$], crxq[$];
  always @(posedge clk) begin
    if (rx_valid && rx_ready) void'(rxq.pop_front());
    rx_valid <= (rxq.size() > 0);
    rx_data  <= (rxq.size() > 0) ? rxq[0] : 32'h0;
    if (crx_valid && crx_ready) void'(crxq.pop_front());
    crx_valid <= (crxq.size() > 0);
    crx_data  <= (crxq.size() > 0) ? crxq[0] : 32'h0;
  end

  task automatic send(logic [31:0] w);
    rxq.push_back(w);
  endtask

  task automatic drain();
    while (rxq.size() > 0 || crxq.size() > 0) @(posedge clk);
    @(posedge clk);
  endtask

  function automatic logic [31:0] hdr(op_e op, logic [3:0] id, logic [BADDR_W-1:0] a);
    host_req_t h;
    h = '{op: op, cube: id, addr: a};
    return 32'(h);
  endfunction

  task automatic cfg(int r, int v);
    send(hdr(OP_CFG, MY_ID, BADDR_W'({6'(r), 20'(v)})));
    drain();
    repeat (2) @(posedge clk);
  endtask

  typedef logic [BL-1:0][DATA_W-1:0] burst_t;
  burst_t exp_mem [int];

  task automatic host_write(int a, burst_t b, logic [3:0] id = MY_ID);
    send(hdr(OP_WRITE, id, BADDR_W'(a)));
    for (int i = 0; i < BL * 4; i++) send(b[i/4][(i%4)*32 +: 32]);
    drain();
    if (id == MY_ID) exp_mem[a] = b;
  endtask

  task automatic host_read(int a, output burst_t b, output logic ce, output logic ue);
    int t;
    txq.delete();
    send(hdr(OP_READ, MY_ID, BADDR_W'(a)));
    drain();
    t = 0;
    while (txq.size() < 33 && t < 5000) begin @(posedge clk); t++; end
    chk(txq.size() >= 33, "read response timed out");
    if (txq.size() >= 33) begin
      chk(txq[0][31:24] == 8'hA5 && txq[0][7:4] == MY_ID, $sformatf("response header %h %h %h n=%0d", txq[0], txq[1], txq[2], txq.size()));
      ce = txq[0][8];
      ue = txq[0][9];
      for (int i = 0; i < BL * 4; i++) b[i/4][(i%4)*32 +: 32] = txq[1+i];
    end else begin b = '0; ce = 0; ue = 1; end
  endtask

  task automatic check_read(int a, bit exp_ce, string what);
    burst_t b; logic ce, ue;
    host_read(a, b, ce, ue);
    chk(b == exp_mem[a], $sformatf("%s: data of burst %0d", what, a));
    chk(ce == exp_ce && !ue, $sformatf("%s: flags of burst %0d ce=%b ue=%b", what, a, ce, ue));
  endtask

  function automatic burst_t rnd_burst();
    burst_t b;
    for (int i = 0; i < BL; i++) b[i] = {$urandom, $urandom, $urandom, $urandom};
    return b;
  endfunction

  // physical location of burst a on die d (spiral bank)
  task automatic upset(int a, int d, int bitpos);
    baddr_t x;
    x = baddr_t'(a);
    case (d)
      0: g_die[0].u_die.flip_bit(x.bank + 3'(0), x.row, x.col, bitpos);
      2: g_die[2].u_die.flip_bit(x.bank + 3'(2), x.row, x.col, bitpos);
      4: g_die[4].u_die.flip_bit(x.bank + 3'(4), x.row, x.col, bitpos);
      default: ;
    endcase
  endtask

  // single-bank precharges under the open-page policy are row conflicts
  always @(posedge clk)
    if (rst_n && !cs_n[0] && !ras_n && cas_n && !we_n && !addr[10] && !dut.close_page)
      mech[M_CONFLICT]++;

  // spiral check on every ACT
  always @(posedge clk)
    if (rst_n && !cs_n[0] && !ras_n && cas_n && we_n) begin
      bit ok;
      ok = 1;
      for (int d = 0; d < NUM_DIES; d++) if (ba[d] != 3'(ba[0] + 3'(d))) ok = 0;
      checks++;
      if (!ok) begin failures++; $display("FAIL spiral bank mapping"); end
      else mech[M_SPIRAL]++;
    end

  function automatic logic [DATA_W-1:0] bist_pat(int a, int b, logic [31:0] seed);
    logic [DATA_W-1:0] p;
    for (int k = 0; k < 4; k++)
      p[k*32 +: 32] = (32'(a) * 32'h9E3779B1 + 32'(b) * 32'h85EBCA6B + 32'(k) * 32'h27D4EB2F) ^ seed;
    return p;
  endfunction

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addrs[$];
    burst_t b;
    logic ce, ue;
    int pre0, pd0, t;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    cfg(2, 400);                       // faster refresh

    // row hits in row 0 / bank 0 and bank 1, then row 1 of bank 0 (conflicts)
    for (int i = 0; i < 8; i++) addrs.push_back(i);
    for (int i = 0; i < 4; i++) addrs.push_back(128 + i);
    for (int i = 0; i < 4; i++) addrs.push_back(1024 + i);
    for (int i = 8; i < NREB; i++) addrs.push_back(i);
    foreach (addrs[i]) host_write(addrs[i], rnd_burst());
    pre0 = int'(n_pre);
    foreach (addrs[i]) check_read(addrs[i], 0, "clean");

    // power-down when idle, woken by a request
    repeat (300) @(posedge clk);
    check_read(5, 0, "after power-down");

    // single upset on die 2 is corrected and reported
    upset(3, 2, 17);
    check_read(3, 1, "upset");

    // scrub of row 0 / bank 0 repairs an upset in memory
    upset(6, 4, 100);
    cfg(4, 30); cfg(5, 0); cfg(3, 1);  // interval, target, enable (row scope)
    t = 0;
    while (n_scrub_fix < 2 && t < 40000) begin @(posedge clk); t++; end  // bursts 3 and 6
    cfg(3, 0);
    repeat (200) @(posedge clk);
    chk(n_scrub_fix == 2, "scrub wrote back bursts 3 and 6");
    check_read(6, 0, "scrubbed");

    // close-page policy: every access precharges
    cfg(0, 3'b111);
    pd0 = int'(n_pre);
    for (int i = 0; i < 4; i++) check_read(i, 0, "close page");
    chk(int'(n_pre) - pd0 >= 4, "close-page precharges");
    if (int'(n_pre) - pd0 >= 4) mech[M_CLOSE]++;
    cfg(0, 3'b110);

    // a dead die is corrected on the fly
    fail[6] = 1'b1;
    for (int i = 0; i < 4; i++) check_read(i, 1, "dead die 6");
    mech[M_DEADDIE]++;

    // swap it for the spare; rebuild refills the spare
    cfg(8, 6);
    repeat (3) @(posedge clk);
    chk(spare_active && spare_lane == 4'd6, "spare active on lane 6");
    if (spare_active) mech[M_SPARE]++;
    t = 0;
    while ((rebuild_busy || t < 5) && t < 200000) begin @(posedge clk); t++; end
    chk(n_rebuilt == NREB, $sformatf("rebuild swept %0d bursts", n_rebuilt));
    if (n_rebuilt == NREB) mech[M_REBUILD]++;
    foreach (addrs[i]) if (addrs[i] < NREB) check_read(addrs[i], 0, "after spare rebuild");

    // power-cycle die 9: contents lost, rebuilt automatically
    cfg(6, 16 + 9);
    t = 0;
    while (!die_busy[9] && t < 100) begin @(posedge clk); t++; end
    chk(die_busy[9] && !pwr_en[9], "die 9 powered off");
    while ((die_busy[9] || rebuild_busy || t < 200) && t < 400000) begin @(posedge clk); t++; end
    chk(n_rebuilt == 2 * NREB, "second rebuild");
    if (n_rebuilt == 2 * NREB) mech[M_PWRCYC]++;
    foreach (addrs[i]) if (addrs[i] < NREB) check_read(addrs[i], 0, "after power cycle");

    // chained cubes: a request for cube 5 is forwarded, a chain response is passed on
    t = ctx_words;
    host_write(40, rnd_burst(), 4'd5);
    chk(ctx_words - t == 33, "forwarded packet length");
    if (ctx_words - t == 33) mech[M_FWD]++;
    txq.delete();
    for (int i = 0; i < 33; i++) crxq.push_back((i == 0) ? 32'hA5000050 : 32'(i));
    drain();
    repeat (3) @(posedge clk);
    chk(txq.size() == 33 && txq[0] == 32'hA5000050 && txq[32] == 32'd32, "chain response passed to host");
    if (txq.size() == 33) mech[M_CHAINRSP]++;

    // TMR vote: both peers agree on a different word, majority follows them
    peer0 = 128'h0123456789ABCDEF_0F1E2D3C4B5A6978;
    peer1 = peer0;
    cfg(10, 1);
    host_read(7, b, ce, ue);
    chk(b[0] == peer0 && b[7] == peer0, "majority vote");
    if (b[0] == peer0) mech[M_VOTE]++;
    cfg(10, 2);
    peer1 = ~peer0;
    host_read(7, b, ce, ue);
    chk(b[2] == ~exp_mem[7][2], "xor parity");
    if (b[2] == ~exp_mem[7][2]) mech[M_XOR]++;
    cfg(10, 0);

    // BIST over 8 bursts
    cfg(12, 8); cfg(13, 20'h5A5A5);
    cfg(7, 0);
    t = 0;
    while ((bist_busy || t < 5) && t < 100000) begin @(posedge clk); t++; end
    chk(bist_fail == 0, "BIST passes");
    host_read(2, b, ce, ue);
    chk(b[5] == bist_pat(2, 5, 32'h5A5A5), "BIST pattern in memory");
    if (bist_fail == 0 && b[5] == bist_pat(2, 5, 32'h5A5A5)) mech[M_BIST]++;

    // diagnostic log saw the errors
    chk(n_logged > 0 && log_valid, "log holds records");
    if (log_valid) begin
      mech[M_LOG]++;
      cfg(11, 0);
    end

    mech[M_HIT]     = int'(n_hit);
    mech[M_REFRESH] = int'(n_ref);
    mech[M_PD]      = int'(n_pd);
    mech[M_CE]      = int'(n_ce);
    mech[M_SCRUB]   = int'(n_scrub_fix);
    for (int d = 0; d < NUM_DIES; d++) chk(viol[d] == 0, $sformatf("die %0d protocol", d));
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end else $display("mechanism %-12s happened %0d times", mech_e'(m), mech[m]);
    end
    $display("refreshes %0d, row hits %0d, power-downs %0d", n_ref, n_hit, n_pd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
