// tb_cube_full: the cube controller at its full default configuration
// (14 dies, 8 Gb geometry, DDR3 timing, full-array rebuild/scrub ranges)
// taken through complete host operations: burst writes to two rows of one
// bank and to a far row/bank corner, read-back of every burst through the
// EDAC, and the read of a burst holding a single-bit upset, which must come
// back corrected and flagged. The 14 die models check DDR3 command timing.
module tb_cube_full;
  import cube_pkg::*;

  localparam logic [3:0] MY_ID = 4'd2;

  logic clk = 1'b0, rst_n = 1'b1;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge

  logic rx_valid = 1'b0, rx_ready, tx_valid, ctx_valid, crx_ready;
  logic [31:0] rx_data = '0, tx_data, ctx_data;
  logic ddr_cke, ras_n, cas_n, we_n, wr_valid, rd_valid;
  logic [NUM_DIES-1:0] cs_n, reset_n, pwr_en, die_rd_valid;
  logic [NUM_DIES-1:0][BA_W-1:0] ba;
  logic [ROW_W-1:0] addr;
  logic [NUM_DIES-1:0][BURST_W-1:0] wr_data, rd_data;
  logic [31:0] n_ce;
  int viol [NUM_DIES];
  int nwr  [NUM_DIES];

  cube_ctrl_top dut (
    .clk, .rst_n, .my_id_i(MY_ID),
    .rx_valid_i(rx_valid), .rx_data_i(rx_data), .rx_ready_o(rx_ready),
    .tx_valid_o(tx_valid), .tx_data_o(tx_data), .tx_ready_i(1'b1),
    .ctx_valid_o(ctx_valid), .ctx_data_o(ctx_data), .ctx_ready_i(1'b1),
    .crx_valid_i(1'b0), .crx_data_i(32'h0), .crx_ready_o(crx_ready),
    .peer0_data_i('0), .peer1_data_i('0),
    .ddr_cke_o(ddr_cke), .ddr_cs_n_o(cs_n), .ddr_ras_n_o(ras_n), .ddr_cas_n_o(cas_n),
    .ddr_we_n_o(we_n), .ddr_ba_o(ba), .ddr_addr_o(addr), .ddr_reset_n_o(reset_n),
    .ddr_pwr_en_o(pwr_en), .phy_wr_valid_o(wr_valid), .phy_wr_data_o(wr_data),
    .phy_rd_valid_i(rd_valid), .phy_rd_data_i(rd_data),
    .n_ce_o(n_ce), .n_ue_o(), .n_row_hit_o(), .n_act_o(), .n_pre_o(), .n_ref_o(), .n_pd_o(),
    .n_scrubbed_o(), .n_scrub_fix_o(), .n_rebuilt_o(), .rebuild_busy_o(), .bist_busy_o(),
    .bist_fail_o(), .spare_active_o(), .spare_lane_o(), .die_busy_o(), .log_valid_o(),
    .log_head_o(), .n_logged_o(), .vote_disagree_o()
  );

  for (genvar d = 0; d < NUM_DIES; d++) begin : g_die
    ddr3_die_model #(.DIE(d)) u_die (
      .clk, .cke(ddr_cke), .cs_n(cs_n[d]), .ras_n, .cas_n, .we_n, .ba(ba[d]), .addr,
      .reset_n(reset_n[d]), .pwr_en(pwr_en[d]), .wr_valid, .wr_data(wr_data[d]),
      .fail_i(1'b0), .rd_data(rd_data[d]), .rd_valid(die_rd_valid[d]),
      .violations(viol[d]), .n_writes(nwr[d])
    );
  end
  assign rd_valid = |die_rd_valid;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  logic [31:0] txq[$], rxq[$];
  always @(posedge clk) begin
    if (tx_valid) txq.push_back(tx_data);
    if (rx_valid && rx_ready) void'(rxq.pop_front());
    rx_valid <= (rxq.size() > 0);
    rx_data  <= (rxq.size() > 0) ? rxq[0] : 32'h0;
  end

  task automatic drain();
    while (rxq.size() > 0) @(posedge clk);
    @(posedge clk);
  endtask

  function automatic logic [31:0] hdr(op_e op, logic [BADDR_W-1:0] a);
    host_req_t h;
    h = '{op: op, cube: MY_ID, addr: a};
    return 32'(h);
  endfunction

  typedef logic [BL-1:0][DATA_W-1:0] burst_t;
  burst_t exp_mem [int];

  task automatic host_write(int a);
    burst_t b;
    for (int i = 0; i < BL; i++) b[i] = {$urandom, $urandom, $urandom, $urandom};
    rxq.push_back(hdr(OP_WRITE, BADDR_W'(a)));
    for (int i = 0; i < BL * 4; i++) rxq.push_back(b[i/4][(i%4)*32 +: 32]);
    drain();
    exp_mem[a] = b;
  endtask

  task automatic check_read(int a, bit exp_ce);
    burst_t b;
    int t;
    txq.delete();
    rxq.push_back(hdr(OP_READ, BADDR_W'(a)));
    drain();
    t = 0;
    while (txq.size() < 33 && t < 5000) begin @(posedge clk); t++; end
    chk(txq.size() >= 33, "response");
    if (txq.size() >= 33) begin
      for (int i = 0; i < BL * 4; i++) b[i/4][(i%4)*32 +: 32] = txq[1+i];
      chk(txq[0][31:24] == 8'hA5 && txq[0][7:4] == MY_ID, "header");
      chk(b == exp_mem[a], $sformatf("data of burst %h", a));
      chk(txq[0][8] == exp_ce && !txq[0][9], $sformatf("flags of burst %h", a));
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a [5] = '{0, 1, 1 << 10, 26'h3FFFFFF, 26'h2A55A5A};
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    foreach (a[i]) host_write(a[i]);
    foreach (a[i]) check_read(a[i], 1'b0);
    // upset one stored bit of burst 1 on die 3 (bank 0 spirals to bank 3)
    g_die[3].u_die.flip_bit(3'd3, 16'd0, 7'd1, 77);
    check_read(1, 1'b1);
    chk(n_ce > 0, "correction counted");
    foreach (viol[d]) chk(viol[d] == 0, $sformatf("die %0d protocol", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
